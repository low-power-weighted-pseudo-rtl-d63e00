// stumps_session_check: runs one complete BIST session of sfnc_stumps_bist
// at the given size against a cycle-level reference model (helper of
// tb_stumps_workloads).
//
// The model is the one of the default-size end-to-end test: cell-by-cell
// scan flip-flop, F and C values, LFSR and MISR stepped through the expected
// schedule; weight and configuration bits taken per cell from the example
// formula. Every cycle the DO outputs, busy, done, phase and capture are
// compared, and at the end the signature and the counts of every mechanism.
// finished rises at the end; checks and failures are then final.
module stumps_session_check #(
  parameter int    NC   = 2,
  parameter int    L    = 107,
  parameter int    S    = 12,
  parameter int    R    = 1024,
  parameter int    N    = 256,
  parameter string NAME = "s5378"
) (
  output logic finished,
  output int   checks,
  output int   failures
);
  import bist_pkg::*;
  localparam int STRIDE = 32 / NC;

  logic clk = 1'b0, rst_n = 1'b0, start = 1'b0;
  logic busy, done, capture;
  logic [31:0] sig;
  bist_phase_e phase;
  logic [NC-1:0][L-1:0] cut_in, cut_out;

  sfnc_stumps_bist #(
    .NUM_CHAINS(NC), .CHAIN_LEN(L), .NUM_SETS(S), .NUM_RANDOM(R), .NUM_WEIGHTED(N)
  ) dut (
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
        $display("%s FAIL t=%0t phase=%0d (exp %0d) busy=%b done=%b cap=%b do mismatch=%b", NAME,
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
      sin[c] = rom ? example_cell_bit(s, v, c, L - 1 - j) : mlfsr[c * STRIDE];
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
    checks = 0; failures = 0; finished = 1'b0;
    mq = '0; mf = '0; mc = '0; mlfsr = 32'h1; mmisr = '0; resp = 0; prev_do = '0;
    #12 rst_n = 1'b1;
    @(negedge clk);
    // functional mode before the session: cells capture the circuit's outputs
    for (int i = 0; i < 5; i++) begin
      checks++;
      if (cut_out !== mq || busy || done) begin failures++; $display("%s FAIL functional mode", NAME); end
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
            failures++; $display("%s FAIL model load set %0d cell %0d/%0d", NAME, s, c, k);
          end
          nfixed += int'(mc[c][k]);
        end
      checks++;
      in_weighted = 1;
      prev_do = mdo();
      patterns(PH_WEIGHTED, N);
      if (s == 0) $display("%s set 0: %0d of %0d cells fixed", NAME, nfixed, NC * L);
    end
    in_weighted = 0;
    for (int j = 0; j < L; j++) cycle(PH_UNLOAD, 1, 0, 0, 0, 0, 0, 0, 0, 1, 0);
    checks++;
    if (done !== 1'b1 || busy !== 1'b0 || sig !== mmisr) begin
      failures++; $display("%s FAIL end: done=%b busy=%b signature %h (exp %h)", NAME, done, busy, sig, mmisr);
    end
    $display("%s: %0d chains x %0d cells, %0d sets, signature %h", NAME, NC, L, S, sig);
    $display("%s random patterns %0d, weighted patterns %0d, Fixed_Load %0d, Config_Load %0d, captures %0d",
             NAME, n_random, n_weighted, n_wload, n_cload, n_capture);
    $display("%s fixed-cell holds %0d, MISR compactions %0d", NAME, n_hold, n_compact);
    $display("%s DO toggles per pattern: random %0d, weighted %0d (fixed cells %0d)",
             NAME, tog_random / R, tog_weighted / (S * N), tog_fixed_weighted);
    checks++; if (n_random != R)         begin failures++; $display("%s FAIL no random patterns", NAME); end
    checks++; if (n_weighted != S * N)   begin failures++; $display("%s FAIL weighted patterns", NAME); end
    checks++; if (n_wload != S)          begin failures++; $display("%s FAIL Fixed_Load count", NAME); end
    checks++; if (n_cload != S)          begin failures++; $display("%s FAIL Config_Load count", NAME); end
    checks++; if (n_capture != R + S * N) begin failures++; $display("%s FAIL capture count", NAME); end
    checks++; if (n_hold == 0)           begin failures++; $display("%s FAIL fixed cells never held", NAME); end
    checks++; if (n_compact == 0)        begin failures++; $display("%s FAIL MISR never compacted", NAME); end
    checks++; if (tog_fixed_weighted != 0) begin failures++; $display("%s FAIL fixed cells toggled", NAME); end
    checks++;
    if (tog_weighted / (S * N) >= tog_random / R) begin
      failures++; $display("%s FAIL weighted patterns do not reduce switching", NAME);
    end
    finished = 1'b1;
  end

endmodule
