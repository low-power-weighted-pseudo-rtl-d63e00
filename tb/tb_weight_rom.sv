// tb_weight_rom: checks the weight ROM.
//   * A 3-chain, 5-cell, 2-set instance with contents built here from a
//     random-looking formula: every address returns its word, and an
//     address past the end returns 0.
//   * The default instance: each word matches the example weight sets,
//     looked up per cell (set s, vector v, chain c, cell L-1-j), which checks
//     the documented layout and the 2-bits-per-cell size (12 x 214 x 2 bits).
module tb_weight_rom;
  import bist_pkg::*;
  localparam int NC = 3, L = 5, S = 2, D = 2 * S * L;

  function automatic logic [D*NC-1:0] img();
    logic [D*NC-1:0] r;
    for (int i = 0; i < D * NC; i++) r[i] = ((i * 7 + 3) % 5) < 2;
    return r;
  endfunction
  localparam logic [D*NC-1:0] IMG = img();

  logic [$clog2(D)-1:0] a_s;
  logic [NC-1:0]        d_s;
  logic [12:0]          a_d;
  logic [1:0]           d_d;
  int checks = 0, failures = 0;

  weight_rom #(.NUM_CHAINS(NC), .CHAIN_LEN(L), .NUM_SETS(S), .CONTENTS(IMG)) dut_s (
    .addr(a_s), .data(d_s));
  weight_rom dut_d (.addr(a_d), .data(d_d));

  initial begin
    for (int a = 0; a < D; a++) begin
      a_s = a[$clog2(D)-1:0];
      #1;
      checks++;
      if (d_s !== NC'(IMG >> (a * NC))) begin
        failures++; $display("FAIL small rom addr %0d: %b", a, d_s);
      end
    end
    a_s = $clog2(D)'(D + 1);
    #1 checks++;
    if (d_s !== '0) begin failures++; $display("FAIL out-of-range read"); end
    checks++;
    if ($bits(dut_d.CONTENTS) != 12 * 214 * 2) begin
      failures++; $display("FAIL default ROM size %0d bits", $bits(dut_d.CONTENTS));
    end
    for (int s = 0; s < 12; s++)
      for (int v = 0; v < 2; v++)
        for (int j = 0; j < 107; j++) begin
          a_d = 13'((2 * s + v) * 107 + j);
          #1;
          for (int c = 0; c < 2; c++) begin
            checks++;
            if (d_d[c] !== example_cell_bit(s, v, c, 106 - j)) begin
              failures++; $display("FAIL default rom s=%0d v=%0d j=%0d c=%0d", s, v, j, c);
            end
          end
        end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #100000;
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
