// lfsr: pseudo-random pattern generator (PRPG) of the STUMPS BIST.
//
// A WIDTH-bit Fibonacci LFSR: each enabled clock shifts the state up by one
// and feeds the XOR of the tapped stages (TAPS mask) into bit 0. The default
// mask is the maximal-length polynomial x^32 + x^22 + x^2 + x + 1. The state
// is loaded with SEED (must be non-zero) on reset.
//
// One output bit per scan chain: chain c takes stage c*(WIDTH/NUM_OUT), so
// the chains receive differently delayed copies of the sequence. There is no
// phase shifter. Width, polynomial, seed and tap spacing are this design's
// choices; the scheme only calls for an LFSR driving the scan chains.
//
// With NUM_OUT = WIDTH the whole state is visible on out.
//
// Timing: out is the registered state, valid during the cycle; it advances
// on each rising edge with en = 1.
module lfsr #(
  parameter int unsigned       WIDTH   = 32,
  parameter logic [WIDTH-1:0]  TAPS    = WIDTH'(32'h8020_0003),
  parameter logic [WIDTH-1:0]  SEED    = WIDTH'(1),
  parameter int unsigned       NUM_OUT = 2
) (
  input  logic               clk,
  input  logic               rst_n,
  input  logic               en,
  output logic [NUM_OUT-1:0] out
);

  localparam int unsigned STRIDE = WIDTH / NUM_OUT;

  logic [WIDTH-1:0] state;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)  state <= SEED;
    else if (en) state <= {state[WIDTH-2:0], ^(state & TAPS)};
  end

  for (genvar c = 0; c < NUM_OUT; c++) begin : g_out
    assign out[c] = state[c * STRIDE];
  end

  if (NUM_OUT > WIDTH) begin : g_chk
    $error("lfsr: NUM_OUT must not exceed WIDTH");
  end

endmodule
