// tb_scan_in_mux: exhaustive check of the scan-input multiplexer with three
// chains: every select value against every pair of LFSR / ROM inputs.
module tb_scan_in_mux;
  import bist_pkg::*;
  localparam int NC = 3;
  scan_src_e sel;
  logic [NC-1:0] l, r, o;
  int checks = 0, failures = 0;

  scan_in_mux #(.NUM_CHAINS(NC)) dut (.sel(sel), .lfsr_bits(l), .rom_bits(r), .chain_in(o));

  initial begin
    for (int s = 0; s < 2; s++)
      for (int a = 0; a < (1 << NC); a++)
        for (int b = 0; b < (1 << NC); b++) begin
          sel = (s == 1) ? SRC_ROM : SRC_LFSR;
          l = NC'(a); r = NC'(b);
          #1;
          checks++;
          if (o !== ((s == 1) ? NC'(b) : NC'(a))) begin
            failures++;
            $display("FAIL sel=%0d lfsr=%b rom=%b out=%b", s, l, r, o);
          end
        end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #10000;
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
