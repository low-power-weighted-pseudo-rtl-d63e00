// bist_controller: control logic of the low-power weighted STUMPS BIST.
//
// After start it runs one complete test session:
//   1. PH_RANDOM   NUM_RANDOM pure pseudo-random patterns. Every cell is in
//                  normal mode (its C bit is cleared by reset).
//   then for every weight set s = 0 .. NUM_SETS-1:
//   2. PH_LOAD_W   CHAIN_LEN shifts of the weight vector from the ROM,
//      PH_FIX_LOAD one cycle of Fixed_Load (scan flip-flops -> F),
//   3. PH_LOAD_C   CHAIN_LEN shifts of the configuration vector from the ROM,
//      PH_CFG_LOAD one cycle of Config_Load (scan flip-flops -> C),
//   4. PH_WEIGHTED NUM_WEIGHTED weighted patterns: random values from the
//                  LFSR are shifted through every cell, fixed cells keep
//                  their F value on the circuit side;
//   5. PH_UNLOAD   CHAIN_LEN shifts that move the last response into the MISR,
//   6. PH_DONE     done = 1 until reset.
// A pattern is CHAIN_LEN shift cycles (LFSR -> chains, LFSR advancing)
// followed by one capture cycle (scan_en = 0). The response captured by a
// pattern is shifted out, and compacted by the MISR, during the next
// CHAIN_LEN shift cycles, whether they load a pattern, a weight vector or
// the final unload (misr_en). The configuration-vector shifts push out the
// weight vector and are not compacted.
//
// Cycle count of a session:
//   NUM_RANDOM*(CHAIN_LEN+1)
//   + NUM_SETS*(2*(CHAIN_LEN+1) + NUM_WEIGHTED*(CHAIN_LEN+1)) + CHAIN_LEN
// from the cycle after start to the first cycle with done = 1.
//
// Following the scheme: the order weight vector / Fixed_Load / configuration
// vector / Config_Load / N weighted patterns, the pure random phase first,
// N = 256 and R = 1024 as defaults. This design's choices: the one-cycle
// strobes take a cycle of their own (the chains capture during it, which
// is harmless as the next scan overwrites it), the unload phase, the MISR
// enables, and no clearing of the C bits at the end: a new session needs a
// reset first, and start is only taken in PH_IDLE.
//
// The two concurrent assertions at the end are disabled during reset, so the
// asynchronous reset is also sampled synchronously by them; lint tools may
// report rst_n as used both ways, which is intended.
module bist_controller
  import bist_pkg::*;
#(
  parameter int unsigned CHAIN_LEN    = 107,
  parameter int unsigned NUM_SETS     = 12,
  parameter int unsigned NUM_RANDOM   = 1024,
  parameter int unsigned NUM_WEIGHTED = 256,
  localparam int unsigned ROM_DEPTH   = 2 * NUM_SETS * CHAIN_LEN,
  localparam int unsigned ROM_AW      = (ROM_DEPTH > 1) ? $clog2(ROM_DEPTH) : 1
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              start,
  output scan_ctrl_t        ctrl,       // to every SFNC cell
  output scan_src_e         src_sel,    // scan-input multiplexer
  output logic [ROM_AW-1:0] rom_addr,
  output logic              lfsr_en,
  output logic              misr_en,
  output logic              misr_clear,
  output logic              capture,    // capture cycle of a pattern
  output logic              busy,
  output logic              done,
  output bist_phase_e       phase
);

  localparam int unsigned MAX_PAT = (NUM_RANDOM > NUM_WEIGHTED) ? NUM_RANDOM : NUM_WEIGHTED;
  localparam int unsigned PW      = $clog2(MAX_PAT + 1);
  localparam int unsigned CW      = $clog2(CHAIN_LEN + 1);
  localparam int unsigned SW      = (NUM_SETS > 1) ? $clog2(NUM_SETS) : 1;

  bist_phase_e   phase_q;
  logic [CW-1:0] cnt_q;       // shift cycle within a scan (CHAIN_LEN = capture)
  logic [PW-1:0] pat_q;       // patterns finished in the current phase
  logic [SW-1:0] set_q;       // current weight set
  logic          resp_q;      // chains hold a captured response not yet unloaded

  logic last_shift;
  logic pattern_phase;

  assign last_shift    = (cnt_q == CW'(CHAIN_LEN - 1));
  assign pattern_phase = (phase_q == PH_RANDOM) || (phase_q == PH_WEIGHTED);

  // ---------------------------------------------------------------- outputs
  always_comb begin
    ctrl             = '0;
    ctrl.scan_en     = (pattern_phase && (cnt_q != CW'(CHAIN_LEN)))
                       || (phase_q == PH_LOAD_W) || (phase_q == PH_LOAD_C)
                       || (phase_q == PH_UNLOAD);
    ctrl.fixed_load  = (phase_q == PH_FIX_LOAD);
    ctrl.config_load = (phase_q == PH_CFG_LOAD);
    src_sel          = ((phase_q == PH_LOAD_W) || (phase_q == PH_LOAD_C)) ? SRC_ROM : SRC_LFSR;
    rom_addr         = ROM_AW'((2 * 32'(set_q) + ((phase_q == PH_LOAD_C) ? 32'd1 : 32'd0))
                               * CHAIN_LEN + 32'(cnt_q));
    lfsr_en          = pattern_phase && (cnt_q != CW'(CHAIN_LEN));
    capture          = pattern_phase && (cnt_q == CW'(CHAIN_LEN));
    misr_en          = ctrl.scan_en && resp_q;
    misr_clear       = (phase_q == PH_IDLE) && start;
    busy             = (phase_q != PH_IDLE) && (phase_q != PH_DONE);
    done             = (phase_q == PH_DONE);
    phase            = phase_q;
  end

  // ------------------------------------------------------------ sequencing
  // Phase that follows the pure random patterns / a finished weight set.
  function automatic bist_phase_e after_random();
    return (NUM_SETS > 0) ? PH_LOAD_W : PH_UNLOAD;
  endfunction

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      phase_q <= PH_IDLE;
      cnt_q   <= '0;
      pat_q   <= '0;
      set_q   <= '0;
      resp_q  <= 1'b0;
    end else begin
      unique case (phase_q)
        PH_IDLE: begin
          if (start) begin
            cnt_q   <= '0;
            pat_q   <= '0;
            set_q   <= '0;
            resp_q  <= 1'b0;
            phase_q <= (NUM_RANDOM > 0) ? PH_RANDOM : after_random();
          end
        end

        PH_RANDOM, PH_WEIGHTED: begin
          if (cnt_q == CW'(CHAIN_LEN)) begin
            // capture cycle: the chains now hold a response
            resp_q <= 1'b1;
            cnt_q  <= '0;
            if (pat_q == PW'((phase_q == PH_RANDOM) ? NUM_RANDOM - 1 : NUM_WEIGHTED - 1)) begin
              pat_q <= '0;
              if (phase_q == PH_RANDOM) begin
                phase_q <= after_random();
              end else if (32'(set_q) == NUM_SETS - 1) begin
                phase_q <= PH_UNLOAD;
              end else begin
                set_q   <= set_q + 1'b1;
                phase_q <= PH_LOAD_W;
              end
            end else begin
              pat_q <= pat_q + 1'b1;
            end
          end else begin
            if (last_shift) resp_q <= 1'b0;
            cnt_q <= cnt_q + 1'b1;
          end
        end

        PH_LOAD_W, PH_LOAD_C, PH_UNLOAD: begin
          if (last_shift) begin
            resp_q <= 1'b0;
            cnt_q  <= '0;
            unique case (phase_q)
              PH_LOAD_W: phase_q <= PH_FIX_LOAD;
              PH_LOAD_C: phase_q <= PH_CFG_LOAD;
              default:   phase_q <= PH_DONE;
            endcase
          end else begin
            cnt_q <= cnt_q + 1'b1;
          end
        end

        PH_FIX_LOAD: phase_q <= PH_LOAD_C;
        PH_CFG_LOAD: phase_q <= PH_WEIGHTED;
        PH_DONE:     phase_q <= PH_DONE;
        default:     phase_q <= PH_IDLE;
      endcase
    end
  end

  // ------------------------------------------------------------ checks
  if (NUM_WEIGHTED < 1) begin : g_chk_n
    $error("bist_controller: NUM_WEIGHTED must be at least 1");
  end
  if (CHAIN_LEN < 1) begin : g_chk_len
    $error("bist_controller: CHAIN_LEN must be at least 1");
  end

  // The two load strobes are exclusive and never coincide with shifting.
  a_strobes : assert property (@(posedge clk) disable iff (!rst_n)
    !(ctrl.fixed_load && ctrl.config_load)
    && !((ctrl.fixed_load || ctrl.config_load) && ctrl.scan_en));
  // The ROM is only addressed inside its range.
  a_rom_range : assert property (@(posedge clk) disable iff (!rst_n)
    (src_sel == SRC_ROM) |-> (32'(rom_addr) < ROM_DEPTH));

endmodule
