// tb_lfsr: checks the pattern generator.
//   * 8-bit instance (x^8 + x^6 + x^5 + x^4 + 1, all stages visible):
//     the state follows the reference recurrence, holds when en = 0, and
//     returns to the seed after exactly 255 steps (maximal length) and not
//     before.
//   * default 32-bit instance with two outputs: 3000 steps against the
//     reference recurrence, outputs taken from stages 0 and 16.
module tb_lfsr;
  logic clk = 1'b0, rst_n = 1'b0, en8 = 1'b0, en32 = 1'b0;
  logic [7:0] out8;
  logic [1:0] out32;
  int checks = 0, failures = 0;

  lfsr #(.WIDTH(8), .TAPS(8'hB8), .SEED(8'h01), .NUM_OUT(8)) dut8 (
    .clk(clk), .rst_n(rst_n), .en(en8), .out(out8));
  lfsr dut32 (.clk(clk), .rst_n(rst_n), .en(en32), .out(out32));

  always #5 clk = ~clk;

  logic [7:0]  m8;
  logic [31:0] m32;

  initial begin
    m8 = 8'h01; m32 = 32'h1;
    #12 rst_n = 1'b1;
    @(negedge clk);
    checks++;
    if (out8 !== 8'h01 || out32 !== 2'b01) begin failures++; $display("FAIL seed"); end
    // hold
    repeat (3) @(negedge clk);
    checks++;
    if (out8 !== 8'h01) begin failures++; $display("FAIL hold"); end
    // 8-bit period
    en8 = 1'b1;
    for (int i = 1; i <= 255; i++) begin
      @(negedge clk);
      m8 = {m8[6:0], m8[7] ^ m8[5] ^ m8[4] ^ m8[3]};
      checks++;
      if (out8 !== m8) begin failures++; $display("FAIL 8-bit step %0d: %h exp %h", i, out8, m8); end
      if (i < 255 && out8 == 8'h01) begin failures++; $display("FAIL early repeat at %0d", i); end
    end
    checks++;
    if (out8 !== 8'h01) begin failures++; $display("FAIL period is not 255"); end
    en8 = 1'b0;
    // 32-bit default
    en32 = 1'b1;
    for (int i = 0; i < 3000; i++) begin
      @(negedge clk);
      m32 = {m32[30:0], m32[31] ^ m32[21] ^ m32[1] ^ m32[0]};
      checks++;
      if (out32 !== {m32[16], m32[0]}) begin
        failures++; $display("FAIL 32-bit step %0d", i);
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
