// misr: multiple-input signature register compacting the scan-chain outputs.
//
// On each rising edge with en = 1 the register makes one LFSR step
// (shift up, XOR of the TAPS stages into bit 0) and XORs the NUM_IN inputs
// into its low bits: sig' = {sig[W-2:0], ^(sig & TAPS)} ^ data_in.
// clear (synchronous, has priority over en) and rst_n (asynchronous) set it
// to zero. signature is the register itself.
//
// The STUMPS architecture that the scheme builds on compacts the chain
// outputs in such a register; its width and polynomial are this design's
// choices (default 32 bits, x^32 + x^22 + x^2 + x + 1).
module misr #(
  parameter int unsigned      WIDTH  = 32,
  parameter logic [WIDTH-1:0] TAPS   = WIDTH'(32'h8020_0003),
  parameter int unsigned      NUM_IN = 2
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              clear,
  input  logic              en,
  input  logic [NUM_IN-1:0] data_in,
  output logic [WIDTH-1:0]  signature
);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)     signature <= '0;
    else if (clear) signature <= '0;
    else if (en)    signature <= {signature[WIDTH-2:0], ^(signature & TAPS)}
                                 ^ WIDTH'(data_in);
  end

  if (NUM_IN > WIDTH) begin : g_chk
    $error("misr: NUM_IN must not exceed WIDTH");
  end

endmodule
