// tb_sfnc_stumps_bist: end-to-end test of the STUMPS BIST at its default
// size (2 chains x 107 SFNC cells, 12 weight sets, 1024 random and 256
// weighted patterns per set, example weight ROM).
//
// The combinational part of a circuit under test is modelled here: cell
// (c,k) captures a mix of the DO outputs of neighbouring cells. The
// testbench keeps its own model of every cell (scan flip-flop, F, C), of the
// LFSR and of the MISR, and steps it through the expected session schedule
// built from nested loops. Weight and configuration bits are taken per cell
// from the example formula (not from the ROM layout), so the ROM layout and
// the shift order are checked too. Every cycle all 214 DO outputs, busy,
// done, capture and phase are compared; at the end the signature.
//
// Mechanisms counted (each must occur): pure random patterns, weight-vector
// loads with Fixed_Load, configuration loads with Config_Load, weighted
// patterns, captures, fixed cells holding their value while the flip-flop
// under them differs, responses compacted in the MISR. The DO toggle count
// per pattern (the switching seen by the circuit under test) is reported
// for the random and the weighted phase; the weighted phase must be lower.
module tb_sfnc_stumps_bist;
  import bist_pkg::*;
  localparam int NC = 2, L = 107, S = 12, R = 1024, N = 256;

  logic clk = 1'b0, rst_n = 1'b0, start = 1'b0;
  logic busy, done, capture;
  logic [31:0] sig;
  bist_phase_e phase;
  logic [NC-1:0][L-1:0] cut_in, cut_out;
  int checks = 0, failures = 0;

  sfnc_stumps_bist dut (
    .clk(clk), .rst_n(rst_n), .bist_start(start), .bist_busy(busy), .bist_done(done),
    .bist_signature(sig), .bist_phase(phase), .bist_capture(capture),
    .cut_data_in(cut_in), .cut_data_out(cut_out));

  always #5 clk = ~clk;

  // combinational logic of the circuit under test (testbench model)
  function automatic logic [NC-1:0][L-1:0] cut_logic(input logic [NC-1:0][L-1:0] x);
    logic [NC-1:0][L-1:0] y;
    for (int c = 0; c < NC; c++)
      for (int k = 0; k < L; k++)
        y[c][k] = x[c][(k + L - 1) % L] ^ (x[(c + 1) % NC][(k + 3) % L] & x[c][(k + 5) % L])
                  ^ (k % 7 == 0 ? x[(c + 1) % NC][k] : 1'b0);
    return y;
  endfunction

  assign cut_in = cut_logic(cut_out);

  // reference model
  logic [NC-1:0][L-1:0] mq, mf, mc;
  logic [31:0] mlfsr, mmisr;
  logic resp;
  logic [NC-1:0][L-1:0] prev_do;

  // mechanism counters
  int n_random = 0, n_weighted = 0, n_wload = 0, n_cload = 0, n_capture = 0;
  int n_hold = 0, n_compact = 0;
  longint tog_random = 0, tog_weighted = 0, tog_fixed_weighted = 0;
  bit in_weighted = 0;

  function automatic logic [NC-1:0][L-1:0] mdo();
    return (mc & mf) | (~mc & mq);
  endfunction

  // One clock cycle. sc/fl/cl: scan enable and strobes; rom: scan input from
  // the weight set (set s, vector v, shift j) instead of the LFSR; adv: LFSR
  // steps; men: MISR compacts; ph/cap: expected phase and capture flag.
  task automatic cycle(input bist_phase_e ph, input logic sc, input logic fl, input logic cl,
                       input logic rom, input int s, input int v, input int j,
                       input logic adv, input logic men, input logic cap);
    logic [NC-1:0][L-1:0] d, di, nq;
    logic [NC-1:0] sin, so;
    d = mdo();
    checks++;
    if (cut_out !== d || busy !== 1'b1 || done !== 1'b0 || phase !== ph || capture !== cap) begin
      failures++;
      if (failures < 10)
        $display("FAIL t=%0t phase=%0d (exp %0d) busy=%b done=%b cap=%b do mismatch=%b",
                 $time, phase, ph, busy, done, capture, cut_out !== d);
    end
    // counters
    for (int c = 0; c < NC; c++)
      for (int k = 0; k < L; k++) begin
        if (d[c][k] != prev_do[c][k]) begin
          if (in_weighted) begin
            tog_weighted++;
            if (mc[c][k]) tog_fixed_weighted++;
          end else if (ph == PH_RANDOM) tog_random++;
        end
        if (in_weighted && mc[c][k] && mq[c][k] != mf[c][k]) n_hold++;
      end
    prev_do = d;
    // next state
    di = cut_logic(d);
    for (int c = 0; c < NC; c++) begin
      sin[c] = rom ? example_cell_bit(s, v, c, L - 1 - j) : mlfsr[c * 16];
      so[c]  = mq[c][L - 1];
    end
    for (int c = 0; c < NC; c++) nq[c] = sc ? {mq[c][L-2:0], sin[c]} : di[c];
    if (fl) mf = mq;
    if (cl) mc = mq;
    mq = nq;
    if (adv) mlfsr = {mlfsr[30:0], mlfsr[31] ^ mlfsr[21] ^ mlfsr[1] ^ mlfsr[0]};
    if (men) begin
      mmisr = {mmisr[30:0], mmisr[31] ^ mmisr[21] ^ mmisr[1] ^ mmisr[0]} ^ {30'b0, so};
      n_compact++;
    end
    if (fl) n_wload++;
    if (cl) n_cload++;
    if (cap) n_capture++;
    @(negedge clk);
  endtask

  task automatic patterns(input bist_phase_e ph, input int n);
    for (int p = 0; p < n; p++) begin
      for (int j = 0; j < L; j++) cycle(ph, 1, 0, 0, 0, 0, 0, 0, 1, resp, 0);
      resp = 1'b1;
      cycle(ph, 0, 0, 0, 0, 0, 0, 0, 0, 0, 1);
      if (ph == PH_RANDOM) n_random++; else n_weighted++;
    end
  endtask

  initial begin
    int nfixed;
    mq = '0; mf = '0; mc = '0; mlfsr = 32'h1; mmisr = '0; resp = 0; prev_do = '0;
    #12 rst_n = 1'b1;
    @(negedge clk);
    // functional mode before the session: cells capture the circuit's outputs
    for (int i = 0; i < 5; i++) begin
      checks++;
      if (cut_out !== mq || busy || done) begin failures++; $display("FAIL functional mode"); end
      mq = cut_logic(mq);
      @(negedge clk);
    end
    start = 1'b1;
    @(negedge clk);
    start = 1'b0;
    mmisr = '0;
    patterns(PH_RANDOM, R);
    for (int s = 0; s < S; s++) begin
      in_weighted = 0;
      for (int j = 0; j < L; j++) cycle(PH_LOAD_W, 1, 0, 0, 1, s, 0, j, 0, resp, 0);
      resp = 1'b0;
      cycle(PH_FIX_LOAD, 0, 1, 0, 0, 0, 0, 0, 0, 0, 0);
      for (int j = 0; j < L; j++) cycle(PH_LOAD_C, 1, 0, 0, 1, s, 1, j, 0, 0, 0);
      cycle(PH_CFG_LOAD, 0, 0, 1, 0, 0, 0, 0, 0, 0, 0);
      // the configuration now in C must be the example set, cell by cell
      nfixed = 0;
      for (int c = 0; c < NC; c++)
        for (int k = 0; k < L; k++) begin
          if (mc[c][k] !== example_cell_bit(s, 1, c, k)
              || (mc[c][k] && mf[c][k] !== example_cell_bit(s, 0, c, k))) begin
            failures++; $display("FAIL model load set %0d cell %0d/%0d", s, c, k);
          end
          nfixed += int'(mc[c][k]);
        end
      checks++;
      in_weighted = 1;
      prev_do = mdo();
      patterns(PH_WEIGHTED, N);
      if (s == 0) $display("set 0: %0d of %0d cells fixed", nfixed, NC * L);
    end
    in_weighted = 0;
    for (int j = 0; j < L; j++) cycle(PH_UNLOAD, 1, 0, 0, 0, 0, 0, 0, 0, 1, 0);
    checks++;
    if (done !== 1'b1 || busy !== 1'b0 || sig !== mmisr) begin
      failures++; $display("FAIL end: done=%b busy=%b signature %h (exp %h)", done, busy, sig, mmisr);
    end
    $display("signature %h", sig);
    $display("random patterns %0d, weighted patterns %0d, Fixed_Load %0d, Config_Load %0d, captures %0d",
             n_random, n_weighted, n_wload, n_cload, n_capture);
    $display("fixed-cell holds %0d, MISR compactions %0d", n_hold, n_compact);
    $display("DO toggles per pattern: random %0d, weighted %0d (fixed cells %0d)",
             tog_random / R, tog_weighted / (S * N), tog_fixed_weighted);
    checks++; if (n_random != R)         begin failures++; $display("FAIL no random patterns"); end
    checks++; if (n_weighted != S * N)   begin failures++; $display("FAIL weighted patterns"); end
    checks++; if (n_wload != S)          begin failures++; $display("FAIL Fixed_Load count"); end
    checks++; if (n_cload != S)          begin failures++; $display("FAIL Config_Load count"); end
    checks++; if (n_capture != R + S * N) begin failures++; $display("FAIL capture count"); end
    checks++; if (n_hold == 0)           begin failures++; $display("FAIL fixed cells never held"); end
    checks++; if (n_compact == 0)        begin failures++; $display("FAIL MISR never compacted"); end
    checks++; if (tog_fixed_weighted != 0) begin failures++; $display("FAIL fixed cells toggled"); end
    checks++;
    if (tog_weighted / (S * N) >= tog_random / R) begin
      failures++; $display("FAIL weighted patterns do not reduce switching");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (460000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
