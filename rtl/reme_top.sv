// reme_top: N_LANES independent regular-expression matching engines side by
// side, each scanning its own byte stream at two bytes per clock. Replicating
// the engine is how the design scales throughput: aggregate rate is
// N_LANES * 16 bits per clock (7 lanes at 250 MHz: 28 Gbit/s).
//
// Ports are per-lane arrays of the reme_engine ports; lanes share only clock
// and reset. Timing per lane as in reme_engine.
module reme_top
  import reme_pkg::*;
#(
  parameter int unsigned N_LANES = 7
)(
  input  logic                                 clk,
  input  logic                                 rst_n,
  input  logic [N_LANES-1:0]                   in_valid,
  input  char_t [N_LANES-1:0][1:0]             in_pair,
  output logic [N_LANES-1:0]                   out_valid,
  output logic [N_LANES-1:0][N_REGEX-1:0][1:0] match
);
  for (genvar g = 0; g < N_LANES; g++) begin : g_lane
    reme_engine u_eng (.clk, .rst_n, .in_valid(in_valid[g]), .in_pair(in_pair[g]),
                       .out_valid(out_valid[g]), .match(match[g]));
  end
endmodule
