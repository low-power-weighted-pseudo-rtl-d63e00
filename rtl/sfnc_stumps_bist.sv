// sfnc_stumps_bist: STUMPS scan BIST with SFNC scan cells and a weight ROM.
//
// NUM_CHAINS parallel scan chains of CHAIN_LEN SFNC cells each replace the
// flip-flops of the circuit under test (CUT). The CUT's combinational logic
// is outside this module: it receives cut_data_out (the DO outputs of the
// cells) and returns cut_data_in (captured by the cells), both indexed
// [chain][cell].
//
// A test session (bist_start in idle) runs:
//   * NUM_RANDOM pure pseudo-random patterns from the LFSR;
//   * for each of NUM_SETS weight sets: the weight vector and the
//     configuration vector are shifted in from the weight ROM (through the
//     scan-input multiplexer) and latched with Fixed_Load and Config_Load;
//     then NUM_WEIGHTED LFSR patterns are applied. Cells configured fixed
//     present their stored 0/1 to the CUT throughout, so the logic they
//     drive does not toggle; the other cells receive random values
//     (weight 0.5);
//   * every captured response is shifted into the MISR; bist_done rises with
//     the final signature on bist_signature.
// Outside a session the controller holds scan enable low, so every cell is
// an ordinary flip-flop capturing cut_data_in (functional mode, provided the
// C bits are clear, as they are after reset).
//
// The default size (2 chains x 107 cells = 214 cells, 12 weight sets,
// R = 1024, N = 256) matches the smallest evaluated circuit; splitting the
// cells into two chains, the LFSR and MISR (32 bits) and the example ROM
// contents are this design's choices. A session takes
// NUM_RANDOM*(L+1) + NUM_SETS*(NUM_WEIGHTED+2)*(L+1) + L cycles, L = CHAIN_LEN
// (445 067 cycles at the defaults).
module sfnc_stumps_bist
  import bist_pkg::*;
#(
  parameter int unsigned NUM_CHAINS   = 2,
  parameter int unsigned CHAIN_LEN    = 107,
  parameter int unsigned NUM_SETS     = 12,
  parameter int unsigned NUM_RANDOM   = 1024,
  parameter int unsigned NUM_WEIGHTED = 256,
  parameter int unsigned LFSR_WIDTH   = 32,
  parameter logic [LFSR_WIDTH-1:0] LFSR_TAPS = LFSR_WIDTH'(32'h8020_0003),
  parameter logic [LFSR_WIDTH-1:0] LFSR_SEED = LFSR_WIDTH'(32'h1),
  parameter int unsigned MISR_WIDTH   = 32,
  parameter logic [MISR_WIDTH-1:0] MISR_TAPS = MISR_WIDTH'(32'h8020_0003),
  localparam int unsigned ROM_BITS    = 2 * NUM_SETS * CHAIN_LEN * NUM_CHAINS,
  parameter logic [ROM_BITS-1:0] ROM_CONTENTS = example_contents()
) (
  input  logic                                  clk,
  input  logic                                  rst_n,
  input  logic                                  bist_start,
  output logic                                  bist_busy,
  output logic                                  bist_done,
  output logic [MISR_WIDTH-1:0]                 bist_signature,
  output bist_phase_e                           bist_phase,
  output logic                                  bist_capture,
  input  logic [NUM_CHAINS-1:0][CHAIN_LEN-1:0]  cut_data_in,
  output logic [NUM_CHAINS-1:0][CHAIN_LEN-1:0]  cut_data_out
);

  localparam int unsigned ROM_DEPTH = 2 * NUM_SETS * CHAIN_LEN;
  localparam int unsigned ROM_AW    = (ROM_DEPTH > 1) ? $clog2(ROM_DEPTH) : 1;

  // Example weight-ROM image (same formula and layout as weight_rom's default).
  function automatic logic [ROM_BITS-1:0] example_contents();
    logic [ROM_BITS-1:0] img;
    img = '0;
    for (int s = 0; s < int'(NUM_SETS); s++)
      for (int v = 0; v < 2; v++)
        for (int j = 0; j < int'(CHAIN_LEN); j++)
          for (int c = 0; c < int'(NUM_CHAINS); c++)
            img[((2*s + v)*int'(CHAIN_LEN) + j)*int'(NUM_CHAINS) + c] =
              example_cell_bit(s, v, c, int'(CHAIN_LEN) - 1 - j);
    return img;
  endfunction

  scan_ctrl_t              ctrl;
  scan_src_e               src_sel;
  logic [ROM_AW-1:0]       rom_addr;
  logic                    lfsr_en, misr_en, misr_clear;
  logic [NUM_CHAINS-1:0]   lfsr_bits, rom_bits, chain_in, chain_out;

  bist_controller #(
    .CHAIN_LEN    (CHAIN_LEN),
    .NUM_SETS     (NUM_SETS),
    .NUM_RANDOM   (NUM_RANDOM),
    .NUM_WEIGHTED (NUM_WEIGHTED)
  ) u_ctrl (
    .clk        (clk),
    .rst_n      (rst_n),
    .start      (bist_start),
    .ctrl       (ctrl),
    .src_sel    (src_sel),
    .rom_addr   (rom_addr),
    .lfsr_en    (lfsr_en),
    .misr_en    (misr_en),
    .misr_clear (misr_clear),
    .capture    (bist_capture),
    .busy       (bist_busy),
    .done       (bist_done),
    .phase      (bist_phase)
  );

  lfsr #(
    .WIDTH   (LFSR_WIDTH),
    .TAPS    (LFSR_TAPS),
    .SEED    (LFSR_SEED),
    .NUM_OUT (NUM_CHAINS)
  ) u_lfsr (
    .clk   (clk),
    .rst_n (rst_n),
    .en    (lfsr_en),
    .out   (lfsr_bits)
  );

  weight_rom #(
    .NUM_CHAINS (NUM_CHAINS),
    .CHAIN_LEN  (CHAIN_LEN),
    .NUM_SETS   (NUM_SETS),
    .CONTENTS   (ROM_CONTENTS)
  ) u_rom (
    .addr (rom_addr),
    .data (rom_bits)
  );

  scan_in_mux #(
    .NUM_CHAINS (NUM_CHAINS)
  ) u_mux (
    .sel       (src_sel),
    .lfsr_bits (lfsr_bits),
    .rom_bits  (rom_bits),
    .chain_in  (chain_in)
  );

  for (genvar c = 0; c < NUM_CHAINS; c++) begin : g_chain
    sfnc_scan_chain #(
      .LEN (CHAIN_LEN)
    ) u_chain (
      .clk      (clk),
      .rst_n    (rst_n),
      .ctrl     (ctrl),
      .scan_in  (chain_in[c]),
      .scan_out (chain_out[c]),
      .data_in  (cut_data_in[c]),
      .data_out (cut_data_out[c])
    );
  end

  misr #(
    .WIDTH  (MISR_WIDTH),
    .TAPS   (MISR_TAPS),
    .NUM_IN (NUM_CHAINS)
  ) u_misr (
    .clk       (clk),
    .rst_n     (rst_n),
    .clear     (misr_clear),
    .en        (misr_en),
    .data_in   (chain_out),
    .signature (bist_signature)
  );

endmodule
