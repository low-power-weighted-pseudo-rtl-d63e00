// sfnc_cell: Scan-Fixed-Normal-Capture (SFNC) scan cell.
//
// A scan flip-flop with two extra storage bits and a second output:
//   * the scan flip-flop Q (the master/slave pair of an ordinary scan cell)
//     shifts scan_in when ctrl.scan_en = 1 and captures data_in otherwise;
//   * F holds the fixed value: it takes Q when ctrl.fixed_load is high;
//   * C says whether the cell is fixed (1) or normal (0): it takes Q when
//     ctrl.config_load is high;
//   * scan_out is always Q, so the scan path works in both modes;
//   * data_out, the output that feeds the circuit under test, is F when
//     C = 1 and Q when C = 0.
// In fixed mode the logic driven by data_out therefore sees a constant while
// patterns are shifted and responses captured through the cell. With C = 0
// the cell is an ordinary mux-D scan flip-flop.
//
// Timing: everything changes on the rising clock edge. F and C copy the value
// Q held before that edge, so the strobe is given in the cycle after the
// last shift of the vector. rst_n is asynchronous and clears C (normal mode
// at power-up, as the scheme requires), and also F and Q.
//
// Departures: the original cell is built from four level-sensitive latches
// (M, S, F, C), with F and C minimum-sized. Here the M/S pair is a rising-edge
// flip-flop and F and C are enabled flip-flops loaded on the same edge, which
// gives the same cycle-level behaviour without latch timing. The strobe the
// text calls both Fixed_Mode and Fixed_Load is ctrl.fixed_load. Clearing F
// and Q on reset is this design's choice.
module sfnc_cell
  import bist_pkg::*;
(
  input  logic       clk,
  input  logic       rst_n,
  input  scan_ctrl_t ctrl,
  input  logic       data_in,   // DI: response from the circuit under test
  input  logic       scan_in,   // SI: from the previous cell of the chain
  output logic       scan_out,  // SO: to the next cell of the chain
  output logic       data_out   // DO: to the circuit under test
);

  logic q;          // scan flip-flop (M/S latches)
  logic fixed_val;  // F store
  logic fixed_en;   // C store

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      q         <= 1'b0;
      fixed_val <= 1'b0;
      fixed_en  <= 1'b0;
    end else begin
      q <= ctrl.scan_en ? scan_in : data_in;
      if (ctrl.fixed_load)  fixed_val <= q;
      if (ctrl.config_load) fixed_en  <= q;
    end
  end

  assign scan_out = q;
  assign data_out = fixed_en ? fixed_val : q;

endmodule
