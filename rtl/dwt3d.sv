// dwt3d: 3-D Daubechies wavelet transform of an N x N x N volume.
//
// The volume v[z][y][x] enters as N*N lines of N pixels, slice by slice and
// row by row (line index z*N + y, element x). Three identical 1-D cores and
// two transpose modules do the separable transform:
//   1-D core along x  ->  slice transpose (S=1)  ->  1-D core along y
//   ->  volume transpose (S=N)  ->  1-D core along z
// Each 1-D core applies STAGES pyramid stages of the TAPS-tap Daubechies
// filter along its line (periodic extension at the line ends), so the
// result w[p][q][r] has x-frequency index p, y-frequency index q and
// z-frequency index r, each in the pyramid order [s_S | d_S | ... | d_1].
// The output leaves as N*N lines, line index p*N + q, element r.
// With STAGES = 1 the eight octants of w are the LLL..HHH sub-bands.
//
// Interface: pixels are IW-bit unsigned; in_valid/in_ready per line. The
// output is a one-cycle out_valid pulse per line, without back-pressure.
// overflow is sticky and can only be set if a transpose buffer is overrun,
// which the rate matching of the three cores prevents.
// Timing: each core takes a line every N/2 + MAC latency + 1 cycles; the
// first output line of a volume follows the last input line of the volume
// after roughly N^2 such periods (the volume transpose must hold all of it).
module dwt3d
  import dwt_pkg::*;
#(
  parameter int TAPS   = 4,
  parameter int STAGES = 3,
  parameter int N      = 8,
  parameter int IW     = 8
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          in_valid,
  output logic          in_ready,
  input  logic [IW-1:0] in_pix  [N],
  output logic          out_valid,
  output sample_t       out_row [N],
  output logic          overflow
);

  sample_t row_in [N];
  sample_t x_row [N], t1_row [N], y_row [N], t2_row [N];
  logic    x_v, t1_v, t1_rdy, y_v, t2_v, t2_rdy;
  logic    ovf1, ovf2;

  always_comb begin
    for (int i = 0; i < N; i++) row_in[i] = sample_t'({1'b0, in_pix[i]});
  end

  daub_1d #(.TAPS(TAPS), .N(N), .STAGES(STAGES)) u_x (
    .clk(clk), .rst_n(rst_n), .in_valid(in_valid), .in_ready(in_ready),
    .in_row(row_in), .out_valid(x_v), .out_row(x_row));

  dwt_transpose #(.N(N), .S(1)) u_t1 (
    .clk(clk), .rst_n(rst_n), .in_valid(x_v), .in_row(x_row),
    .out_valid(t1_v), .out_ready(t1_rdy), .out_row(t1_row), .overflow(ovf1));

  daub_1d #(.TAPS(TAPS), .N(N), .STAGES(STAGES)) u_y (
    .clk(clk), .rst_n(rst_n), .in_valid(t1_v), .in_ready(t1_rdy),
    .in_row(t1_row), .out_valid(y_v), .out_row(y_row));

  dwt_transpose #(.N(N), .S(N)) u_t2 (
    .clk(clk), .rst_n(rst_n), .in_valid(y_v), .in_row(y_row),
    .out_valid(t2_v), .out_ready(t2_rdy), .out_row(t2_row), .overflow(ovf2));

  daub_1d #(.TAPS(TAPS), .N(N), .STAGES(STAGES)) u_z (
    .clk(clk), .rst_n(rst_n), .in_valid(t2_v), .in_ready(t2_rdy),
    .in_row(t2_row), .out_valid(out_valid), .out_row(out_row));

  assign overflow = ovf1 || ovf2;

endmodule
