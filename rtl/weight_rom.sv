// weight_rom: ROM holding the weight sets of the low-power weighted BIST.
//
// Every weight set is stored as two scan vectors, two bits per scan cell:
// the weight vector (the value of each fixed cell) and the configuration
// vector (1 = fixed cell, 0 = random cell). The ROM is read one word per
// shift cycle; a word has one bit per scan chain. For set s, vector v
// (0 = weight, 1 = configuration) and shift cycle j the address is
// (2*s + v)*CHAIN_LEN + j, and bit c of that word is the bit for chain c
// that ends up in cell CHAIN_LEN-1-j. Data is stored uncompressed.
//
// CONTENTS is the whole ROM, word a in bits [a*NUM_CHAINS +: NUM_CHAINS].
// Its default is the example of bist_pkg::example_cell_bit() (about 90%
// of cells fixed per set); a real instance takes the weight sets computed
// for its circuit under test.
//
// Timing: asynchronous (combinational) read, data valid in the cycle the
// address is presented. The default size, 12 sets of 214 cells in 2 chains
// (5136 bits), is that of the smallest benchmark circuit; read port,
// word layout and example contents are this design's choices.
module weight_rom
  import bist_pkg::*;
#(
  parameter int unsigned NUM_CHAINS = 2,
  parameter int unsigned CHAIN_LEN  = 107,
  parameter int unsigned NUM_SETS   = 12,
  localparam int unsigned DEPTH     = 2 * NUM_SETS * CHAIN_LEN,
  localparam int unsigned AW        = (DEPTH > 1) ? $clog2(DEPTH) : 1,
  parameter logic [DEPTH*NUM_CHAINS-1:0] CONTENTS = example_contents()
) (
  input  logic [AW-1:0]         addr,
  output logic [NUM_CHAINS-1:0] data
);

  // Builds the example contents with the ROM layout described above.
  function automatic logic [DEPTH*NUM_CHAINS-1:0] example_contents();
    logic [DEPTH*NUM_CHAINS-1:0] img;
    img = '0;
    for (int s = 0; s < int'(NUM_SETS); s++)
      for (int v = 0; v < 2; v++)
        for (int j = 0; j < int'(CHAIN_LEN); j++)
          for (int c = 0; c < int'(NUM_CHAINS); c++)
            img[((2*s + v)*int'(CHAIN_LEN) + j)*int'(NUM_CHAINS) + c] =
              example_cell_bit(s, v, c, int'(CHAIN_LEN) - 1 - j);
    return img;
  endfunction

  logic [NUM_CHAINS-1:0] mem [DEPTH];

  for (genvar a = 0; a < DEPTH; a++) begin : g_word
    assign mem[a] = CONTENTS[a*NUM_CHAINS +: NUM_CHAINS];
  end

  assign data = (32'(addr) < DEPTH) ? mem[addr] : '0;

endmodule
