// tb_bist_controller: checks the BIST sequencing cycle by cycle.
//
// A small instance (3-cell chains, 2 weight sets, 2 random and 3 weighted
// patterns) is compared every cycle with a schedule built here from nested
// loops: scan enable, Fixed_Load, Config_Load, multiplexer select, ROM
// address, LFSR enable, MISR enable, capture, busy, done and phase.
// Start is also pulsed while busy and in done, where it must be ignored.
// A default-size instance (107-cell chains, 12 sets, R = 1024, N = 256) is
// run to completion and its session length compared with
// R*(L+1) + S*(N+2)*(L+1) + L = 445067 cycles.
module tb_bist_controller;
  import bist_pkg::*;
  localparam int L = 3, S = 2, R = 2, N = 3;

  logic clk = 1'b0, rst_n = 1'b0, start = 1'b0, start_d = 1'b0;
  scan_ctrl_t ctrl, ctrl_d;
  scan_src_e src, src_d;
  logic [3:0] addr;
  logic [12:0] addr_d;
  logic lfsr_en, misr_en, misr_clr, capture, busy, done;
  logic lfsr_en_d, misr_en_d, misr_clr_d, capture_d, busy_d, done_d;
  bist_phase_e phase, phase_d;
  int checks = 0, failures = 0;

  bist_controller #(.CHAIN_LEN(L), .NUM_SETS(S), .NUM_RANDOM(R), .NUM_WEIGHTED(N)) dut (
    .clk(clk), .rst_n(rst_n), .start(start), .ctrl(ctrl), .src_sel(src), .rom_addr(addr),
    .lfsr_en(lfsr_en), .misr_en(misr_en), .misr_clear(misr_clr), .capture(capture),
    .busy(busy), .done(done), .phase(phase));

  bist_controller dut_d (
    .clk(clk), .rst_n(rst_n), .start(start_d), .ctrl(ctrl_d), .src_sel(src_d), .rom_addr(addr_d),
    .lfsr_en(lfsr_en_d), .misr_en(misr_en_d), .misr_clear(misr_clr_d), .capture(capture_d),
    .busy(busy_d), .done(done_d), .phase(phase_d));

  always #5 clk = ~clk;

  // expected outputs of one cycle; compare, then advance
  task automatic expect_cycle(input bist_phase_e ph, input logic sc, input logic fl,
                              input logic cl, input scan_src_e sr, input int a,
                              input logic le, input logic me, input logic cap);
    checks++;
    if (phase !== ph || ctrl.scan_en !== sc || ctrl.fixed_load !== fl || ctrl.config_load !== cl
        || lfsr_en !== le || misr_en !== me || capture !== cap || busy !== 1'b1 || done !== 1'b0
        || (sr == SRC_ROM && (src !== SRC_ROM || int'(addr) != a))
        || (sr == SRC_LFSR && src !== SRC_LFSR)) begin
      failures++;
      $display("FAIL phase=%0d(exp %0d) scan=%b fl=%b cl=%b src=%0d addr=%0d(exp %0d) le=%b me=%b cap=%b",
               phase, ph, ctrl.scan_en, ctrl.fixed_load, ctrl.config_load, src, addr, a,
               lfsr_en, misr_en, cap);
    end
    start = ($urandom_range(0, 3) == 0);  // must be ignored while busy
    @(negedge clk);
  endtask

  task automatic patterns(input bist_phase_e ph, input int n, inout logic resp);
    for (int p = 0; p < n; p++) begin
      for (int j = 0; j < L; j++) expect_cycle(ph, 1, 0, 0, SRC_LFSR, 0, 1, resp, 0);
      resp = 1'b1;
      expect_cycle(ph, 0, 0, 0, SRC_LFSR, 0, 0, 0, 1);
    end
  endtask

  int cyc;

  initial begin
    logic resp;
    #12 rst_n = 1'b1;
    @(negedge clk);
    checks++;
    if (busy || done || phase != PH_IDLE || ctrl != '0) begin failures++; $display("FAIL idle"); end
    start = 1'b1;
    #1 checks++;
    if (misr_clr !== 1'b1) begin failures++; $display("FAIL misr_clear with start"); end
    @(negedge clk);
    resp = 1'b0;
    patterns(PH_RANDOM, R, resp);
    for (int s = 0; s < S; s++) begin
      for (int j = 0; j < L; j++) expect_cycle(PH_LOAD_W, 1, 0, 0, SRC_ROM, 2 * s * L + j, 0, resp, 0);
      resp = 1'b0;
      expect_cycle(PH_FIX_LOAD, 0, 1, 0, SRC_LFSR, 0, 0, 0, 0);
      for (int j = 0; j < L; j++) expect_cycle(PH_LOAD_C, 1, 0, 0, SRC_ROM, (2 * s + 1) * L + j, 0, 0, 0);
      expect_cycle(PH_CFG_LOAD, 0, 0, 1, SRC_LFSR, 0, 0, 0, 0);
      patterns(PH_WEIGHTED, N, resp);
    end
    for (int j = 0; j < L; j++) expect_cycle(PH_UNLOAD, 1, 0, 0, SRC_LFSR, 0, 0, 1, 0);
    checks++;
    if (done !== 1'b1 || busy !== 1'b0 || phase !== PH_DONE || ctrl != '0) begin
      failures++; $display("FAIL done");
    end
    start = 1'b1;
    repeat (3) @(negedge clk);
    checks++;
    if (done !== 1'b1 || misr_clr !== 1'b0) begin failures++; $display("FAIL start taken in done"); end
    start = 1'b0;
    // default size: session length
    start_d = 1'b1;
    @(negedge clk);
    start_d = 1'b0;
    cyc = 0;
    while (!done_d && cyc < 500000) begin
      @(negedge clk);
      cyc++;
    end
    checks++;
    if (cyc != 1024 * 108 + 12 * 258 * 108 + 107) begin
      failures++; $display("FAIL default session length %0d", cyc);
    end
    $display("default session: %0d cycles", cyc);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (600000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
