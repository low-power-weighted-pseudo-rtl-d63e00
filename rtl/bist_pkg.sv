// bist_pkg: types and constants shared by the low-power weighted
// pseudo-random STUMPS BIST.
//
// The scheme applies three-valued weight sets (0, 1 or 0.5 per scan cell)
// with special scan cells (SFNC cells) that can hold a fixed value on the
// output that feeds the circuit under test while scan and capture go on
// underneath. This package holds:
//   * scan_ctrl_t  - the control bundle every SFNC cell receives
//                    (scan enable, Fixed_Load, Config_Load);
//   * scan_src_e   - the select of the scan-input multiplexer
//                    (LFSR or weight ROM);
//   * bist_phase_e - the phases of the BIST controller;
//   * example_rom_bit() - the formula of the example weight-ROM contents
//                    used when no circuit-specific weight sets are given.
//
// Weight ROM layout (this design's choice): one ROM word per shift cycle,
// one bit per scan chain. For weight set s, vector v (0 = weight vector,
// 1 = configuration vector) and shift cycle j (0 .. CHAIN_LEN-1) the word
// address is (2*s + v)*CHAIN_LEN + j. The bit shifted in at cycle j ends in
// cell CHAIN_LEN-1-j of its chain (cell 0 is next to the scan input).
package bist_pkg;

  // Control bundle distributed to every SFNC cell.
  typedef struct packed {
    logic scan_en;      // 1: shift (SI -> cell), 0: capture (DI -> cell)
    logic fixed_load;   // copy the scan flip-flop into the F (fixed value) store
    logic config_load;  // copy the scan flip-flop into the C (configuration) store
  } scan_ctrl_t;

  // Scan-input multiplexer select.
  typedef enum logic {
    SRC_LFSR = 1'b0,
    SRC_ROM  = 1'b1
  } scan_src_e;

  // BIST controller phases.
  typedef enum logic [3:0] {
    PH_IDLE     = 4'd0,  // functional mode, waiting for start
    PH_RANDOM   = 4'd1,  // pure pseudo-random patterns (all cells normal)
    PH_LOAD_W   = 4'd2,  // shift weight vector from ROM
    PH_FIX_LOAD = 4'd3,  // one-cycle Fixed_Load strobe
    PH_LOAD_C   = 4'd4,  // shift configuration vector from ROM
    PH_CFG_LOAD = 4'd5,  // one-cycle Config_Load strobe
    PH_WEIGHTED = 4'd6,  // weighted pseudo-random patterns
    PH_UNLOAD   = 4'd7,  // shift out the last captured response
    PH_DONE     = 4'd8   // signature final
  } bist_phase_e;

  // 32-bit mixing hash used by the example ROM contents.
  function automatic logic [31:0] mix32(input logic [31:0] a);
    logic [31:0] h;
    h = a ^ (a >> 16);
    h = h * 32'h7feb_352d;
    h = h ^ (h >> 15);
    h = h * 32'h846c_a68b;
    h = h ^ (h >> 16);
    return h;
  endfunction

  // Example ROM contents (placeholder for circuit-specific weight sets, which
  // come from an offline weight-selection run on the circuit under test).
  // For weight set s and scan cell (chain c, position p):
  //   h = mix32(s*65536 + c*4096 + p)
  //   the cell is random (weight 0.5, config bit 0) when h[31:24] < 26
  //   (about 10% of the cells, the evaluated share of random weights), otherwise
  //   fixed (config bit 1) to the value ^h[23:0].
  // vec = 0 returns the weight-vector bit, vec = 1 the configuration bit.
  function automatic logic example_cell_bit(input int s, input int vec,
                                            input int c, input int p);
    logic [31:0] h;
    h = mix32(32'(s) * 32'd65536 + 32'(c) * 32'd4096 + 32'(p));
    if (vec == 0) return ^h[23:0];
    return (h[31:24] >= 8'd26);
  endfunction

endpackage
