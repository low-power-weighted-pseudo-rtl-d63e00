// sfnc_scan_chain: one scan chain built from LEN SFNC cells.
//
// Cell 0 takes scan_in, cell k takes the scan_out of cell k-1 and cell LEN-1
// drives scan_out. All cells share the clock, reset and the control bundle
// (scan enable, Fixed_Load, Config_Load). data_in[k] / data_out[k] are the
// capture input and the circuit-facing output of cell k.
//
// Loading a fixed-value set takes two LEN-cycle scans: first the weight
// vector followed by one cycle of ctrl.fixed_load, then the configuration
// vector (1 = fixed, 0 = random) followed by one cycle of ctrl.config_load.
// The bit shifted in at shift cycle j ends in cell LEN-1-j.
//
// The chain is a plain serial connection; its length is a parameter
// (the benchmark circuits have 214 to 700 scan cells in all).
module sfnc_scan_chain
  import bist_pkg::*;
#(
  parameter int unsigned LEN = 107
) (
  input  logic           clk,
  input  logic           rst_n,
  input  scan_ctrl_t     ctrl,
  input  logic           scan_in,
  output logic           scan_out,
  input  logic [LEN-1:0] data_in,
  output logic [LEN-1:0] data_out
);

  logic [LEN:0] link;  // link[k] = scan input of cell k

  assign link[0] = scan_in;

  for (genvar k = 0; k < LEN; k++) begin : g_cell
    sfnc_cell u_cell (
      .clk      (clk),
      .rst_n    (rst_n),
      .ctrl     (ctrl),
      .data_in  (data_in[k]),
      .scan_in  (link[k]),
      .scan_out (link[k+1]),
      .data_out (data_out[k])
    );
  end

  assign scan_out = link[LEN];

endmodule
