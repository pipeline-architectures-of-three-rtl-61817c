// dwt3d_top: the two 3-D Daubechies transform architectures side by side.
//
// d4_*: 3-D Daub4 transform, built from the 1-D Daub4 pipeline with three
//       decomposition stages (8 multipliers per stage).
// d6_*: 3-D Daub6 transform, built from the 1-D Daub6 pipeline with two
//       decomposition stages (12 multipliers per stage).
// Both take an N x N x N volume of IW-bit pixels as N*N lines of N pixels
// (valid/ready per line) and return N*N lines of N coefficients (one-cycle
// valid per line), ordered as described in dwt3d. The two are independent;
// each has its own ports and sticky overflow flag. The image source, the
// display and the inverse transform used to judge the result live outside
// this design and connect to these ports.
module dwt3d_top
  import dwt_pkg::*;
#(
  parameter int N  = 8,
  parameter int IW = 8
) (
  input  logic          clk,
  input  logic          rst_n,
  // Daub4
  input  logic          d4_in_valid,
  output logic          d4_in_ready,
  input  logic [IW-1:0] d4_in_pix  [N],
  output logic          d4_out_valid,
  output sample_t       d4_out_row [N],
  output logic          d4_overflow,
  // Daub6
  input  logic          d6_in_valid,
  output logic          d6_in_ready,
  input  logic [IW-1:0] d6_in_pix  [N],
  output logic          d6_out_valid,
  output sample_t       d6_out_row [N],
  output logic          d6_overflow
);

  dwt3d #(.TAPS(4), .STAGES(3), .N(N), .IW(IW)) u_daub4 (
    .clk(clk), .rst_n(rst_n),
    .in_valid(d4_in_valid), .in_ready(d4_in_ready), .in_pix(d4_in_pix),
    .out_valid(d4_out_valid), .out_row(d4_out_row), .overflow(d4_overflow));

  dwt3d #(.TAPS(6), .STAGES(2), .N(N), .IW(IW)) u_daub6 (
    .clk(clk), .rst_n(rst_n),
    .in_valid(d6_in_valid), .in_ready(d6_in_ready), .in_pix(d6_in_pix),
    .out_valid(d6_out_valid), .out_row(d6_out_row), .overflow(d6_overflow));

endmodule
