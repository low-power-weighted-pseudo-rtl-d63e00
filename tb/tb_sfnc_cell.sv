// tb_sfnc_cell: self-checking testbench of one SFNC scan cell.
//
// Drives random scan enable, Fixed_Load, Config_Load, scan and data inputs
// for 2000 cycles and compares scan_out and data_out every cycle with a
// reference model kept in the testbench (Q, F, C). Also checks the
// asynchronous reset (normal mode, outputs 0) and a directed sequence:
// fix the cell to 1, then show that data_out stays 1 while 0s are shifted
// and captured, and that clearing C returns it to a normal scan cell.
module tb_sfnc_cell;
  import bist_pkg::*;

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  scan_ctrl_t ctrl;
  logic di, si, so, dout;
  int checks = 0, failures = 0;

  sfnc_cell dut (.clk(clk), .rst_n(rst_n), .ctrl(ctrl), .data_in(di),
                 .scan_in(si), .scan_out(so), .data_out(dout));

  always #5 clk = ~clk;

  logic mq, mf, mc;

  task automatic check(input logic exp_so, input logic exp_do, input string what);
    checks++;
    if (so !== exp_so || dout !== exp_do) begin
      failures++;
      $display("FAIL %s: so=%b (exp %b) do=%b (exp %b)", what, so, exp_so, dout, exp_do);
    end
  endtask

  // apply one cycle with the given inputs, update the model
  task automatic step(input logic s_en, input logic fl, input logic cl,
                      input logic d, input logic s);
    ctrl = '{scan_en: s_en, fixed_load: fl, config_load: cl};
    di = d; si = s;
    @(posedge clk);
    if (fl) mf = mq;
    if (cl) mc = mq;
    mq = s_en ? s : d;
    @(negedge clk);
    check(mq, mc ? mf : mq, "step");
  endtask

  initial begin
    ctrl = '0; di = 1'b1; si = 1'b1;
    mq = 0; mf = 0; mc = 0;
    #12;
    check(1'b0, 1'b0, "reset");
    @(negedge clk);
    rst_n = 1'b1;
    // directed: shift in 1, Fixed_Load, shift in 1, Config_Load -> fixed at 1
    step(1, 0, 0, 0, 1);
    step(0, 1, 0, 1, 0);   // F <= 1 while capturing 1
    step(1, 0, 1, 0, 0);   // C <= 1 while shifting 0
    for (int i = 0; i < 6; i++) begin
      step(i[0], 0, 0, 0, 0);
      checks++;
      if (dout !== 1'b1 || so !== 1'b0) begin
        failures++; $display("FAIL fixed cell did not hold 1");
      end
    end
    // clear C: shift 0 then Config_Load
    step(1, 0, 0, 0, 0);
    step(1, 0, 1, 0, 1);
    checks++;
    if (dout !== so) begin failures++; $display("FAIL normal mode after clearing C"); end
    // random
    for (int i = 0; i < 2000; i++)
      step($urandom_range(0, 1), ($urandom_range(0, 7) == 0), ($urandom_range(0, 7) == 0),
           $urandom_range(0, 1), $urandom_range(0, 1));
    // asynchronous reset in the middle of a cycle
    step(1, 1, 1, 1, 1);
    #2 rst_n = 1'b0; mq = 0; mf = 0; mc = 0;
    #1 check(1'b0, 1'b0, "async reset");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
