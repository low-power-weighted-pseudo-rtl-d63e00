// tb_misr: checks the signature register against a reference model.
// 3000 cycles of random data with random enable and occasional clear on a
// 16-bit, 3-input instance (x^16 + x^14 + x^13 + x^11 + 1), then the
// default 32-bit, 2-input instance: 2000 cycles against its own model.
module tb_misr;
  logic clk = 1'b0, rst_n = 1'b0;
  logic clr, en;
  logic [2:0] d3;
  logic [1:0] d2;
  logic [15:0] sig16;
  logic [31:0] sig32;
  int checks = 0, failures = 0;

  misr #(.WIDTH(16), .TAPS(16'hB400), .NUM_IN(3)) dut16 (
    .clk(clk), .rst_n(rst_n), .clear(clr), .en(en), .data_in(d3), .signature(sig16));
  misr dut32 (.clk(clk), .rst_n(rst_n), .clear(clr), .en(en), .data_in(d2), .signature(sig32));

  always #5 clk = ~clk;

  logic [15:0] m16;
  logic [31:0] m32;

  initial begin
    clr = 0; en = 0; d3 = 0; d2 = 0; m16 = 0; m32 = 0;
    #12 rst_n = 1'b1;
    for (int i = 0; i < 5000; i++) begin
      @(negedge clk);
      checks++;
      if (sig16 !== m16 || sig32 !== m32) begin
        failures++;
        $display("FAIL cycle %0d: %h/%h exp %h/%h", i, sig16, sig32, m16, m32);
      end
      clr = ($urandom_range(0, 199) == 0);
      en  = ($urandom_range(0, 3) != 0);
      d3  = 3'($urandom);
      d2  = 2'($urandom);
      if (clr) begin
        m16 = '0; m32 = '0;
      end else if (en) begin
        m16 = {m16[14:0], m16[15] ^ m16[13] ^ m16[12] ^ m16[10]} ^ {13'b0, d3};
        m32 = {m32[30:0], m32[31] ^ m32[21] ^ m32[1] ^ m32[0]} ^ {30'b0, d2};
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
