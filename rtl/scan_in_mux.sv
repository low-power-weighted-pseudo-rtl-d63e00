// scan_in_mux: the multiplexer in front of the scan chains.
//
// For every chain it selects either the weight ROM (when a weight vector or
// a configuration vector is being loaded) or the LFSR (pseudo-random and
// weighted pseudo-random patterns). sel is shared by all chains.
// Purely combinational.
module scan_in_mux
  import bist_pkg::*;
#(
  parameter int unsigned NUM_CHAINS = 2
) (
  input  scan_src_e             sel,
  input  logic [NUM_CHAINS-1:0] lfsr_bits,
  input  logic [NUM_CHAINS-1:0] rom_bits,
  output logic [NUM_CHAINS-1:0] chain_in
);

  always_comb begin
    unique case (sel)
      SRC_ROM:  chain_in = rom_bits;
      default:  chain_in = lfsr_bits;
    endcase
  end

endmodule
