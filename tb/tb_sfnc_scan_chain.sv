// tb_sfnc_scan_chain: four SFNC cells connected functionally as a shift
// register (DI of cell k is DO of cell k-1, DI of cell 0 is driven here),
// as in the demonstration circuit of the scheme.
//   1. Weight set scanned in over four cycles: cell 1 = 0, cell 2 = 1;
//      one Fixed_Load cycle.
//   2. Configuration vector 0110 (cells 1 and 2 fixed) over four cycles;
//      one Config_Load cycle.
//   3. Scan in, capture and scan out: DO of cells 1 and 2 must stay 0 and 1,
//      DO of cells 0 and 3 must follow their flip-flops.
//   4. 3000 cycles of random control against a cell-by-cell model.
// Every cycle, all DO outputs and the chain's scan_out are compared with the
// model.
module tb_sfnc_scan_chain;
  import bist_pkg::*;
  localparam int L = 4;

  logic clk = 1'b0, rst_n = 1'b0;
  scan_ctrl_t ctrl;
  logic si, so, d0;
  logic [L-1:0] di, dout;
  int checks = 0, failures = 0;
  int held = 0;

  sfnc_scan_chain #(.LEN(L)) dut (.clk(clk), .rst_n(rst_n), .ctrl(ctrl), .scan_in(si),
                                  .scan_out(so), .data_in(di), .data_out(dout));

  assign di = {dout[L-2:0], d0};

  always #5 clk = ~clk;

  logic [L-1:0] mq, mf, mc;

  function automatic logic [L-1:0] mdo();
    return (mc & mf) | (~mc & mq);
  endfunction

  task automatic step(input logic s_en, input logic fl, input logic cl,
                      input logic s, input logic d);
    logic [L-1:0] din;
    ctrl = '{scan_en: s_en, fixed_load: fl, config_load: cl};
    si = s; d0 = d;
    din = mdo();
    din = {din[L-2:0], d};
    @(posedge clk);
    if (fl) mf = mq;
    if (cl) mc = mq;
    mq = s_en ? {mq[L-2:0], s} : din;
    @(negedge clk);
    checks++;
    if (dout !== mdo() || so !== mq[L-1]) begin
      failures++;
      $display("FAIL do=%b (exp %b) so=%b (exp %b)", dout, mdo(), so, mq[L-1]);
    end
  endtask

  // bit shifted at cycle j lands in cell L-1-j
  task automatic scan_vec(input logic [L-1:0] v);
    for (int j = 0; j < L; j++) step(1, 0, 0, v[L-1-j], 1'b0);
  endtask

  initial begin
    ctrl = '0; si = 0; d0 = 0;
    mq = '0; mf = '0; mc = '0;
    #12 rst_n = 1'b1;
    @(negedge clk);
    // 1. weight set: cell2 = 1, cell1 = 0 (cells 0 and 3 don't care: 1, 1)
    scan_vec(4'b1101);
    step(0, 1, 0, 0, 1);
    // 2. configuration: cells 1 and 2 fixed
    scan_vec(4'b0110);
    step(0, 0, 1, 0, 0);
    // 3. scan in, capture, scan out: cells 1 and 2 hold
    for (int i = 0; i < 3 * L; i++) begin
      if (i == L) step(0, 0, 0, 0, 1);        // capture
      else        step(1, 0, 0, i[0], 1'b0);
      checks++;
      if (dout[1] !== 1'b0 || dout[2] !== 1'b1) begin
        failures++; $display("FAIL fixed cells did not hold: %b", dout);
      end else held++;
    end
    checks++;
    if (held != 3 * L) begin failures++; $display("FAIL hold count %0d", held); end
    // 4. random control
    for (int i = 0; i < 3000; i++)
      step($urandom_range(0, 3) != 0, $urandom_range(0, 15) == 0, $urandom_range(0, 15) == 0,
           $urandom_range(0, 1), $urandom_range(0, 1));
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
