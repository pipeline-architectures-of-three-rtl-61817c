// tb_dwt3d: checks the 3-D transform end to end against the reference 3-D
// Daubechies transform, in three configurations: Daub4 with one stage per
// dimension on a 4 x 4 x 4 volume (the eight LLL..HHH sub-bands), Daub4 with
// three stages on 8 x 8 x 8, Daub6 with two stages on 8 x 8 x 8, and Daub4
// with three stages on a larger 16 x 16 x 16 volume.
// Volumes follow each other back to back (see dwt3d_driver).
module tb_dwt3d;
  import dwt_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  int   c [4], f [4], st [4];
  logic d [4];

  initial begin
    repeat (60000) @(posedge clk);
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", c[0]+c[1]+c[2]+c[3], f[0]+f[1]+f[2]+f[3]+1);
    $finish;
  end

  // configuration 0: Daub4, 1 stage, N = 4
  logic         iv0, ir0, ov0, of0;
  logic [7:0]   ip0 [4];
  sample_t      or0 [4];
  dwt3d #(.TAPS(4), .STAGES(1), .N(4), .IW(8)) dut0 (.clk(clk), .rst_n(rst_n),
    .in_valid(iv0), .in_ready(ir0), .in_pix(ip0), .out_valid(ov0), .out_row(or0), .overflow(of0));
  dwt3d_driver #(.TAPS(4), .STAGES(1), .N(4), .IW(8), .VOLS(4)) drv0 (.clk(clk), .rst_n(rst_n),
    .in_valid(iv0), .in_ready(ir0), .in_pix(ip0), .out_valid(ov0), .out_row(or0), .overflow(of0),
    .checks(c[0]), .failures(f[0]), .stalls(st[0]), .done(d[0]));

  // configuration 1: Daub4, 3 stages, N = 8
  logic         iv1, ir1, ov1, of1;
  logic [7:0]   ip1 [8];
  sample_t      or1 [8];
  dwt3d #(.TAPS(4), .STAGES(3), .N(8), .IW(8)) dut1 (.clk(clk), .rst_n(rst_n),
    .in_valid(iv1), .in_ready(ir1), .in_pix(ip1), .out_valid(ov1), .out_row(or1), .overflow(of1));
  dwt3d_driver #(.TAPS(4), .STAGES(3), .N(8), .IW(8), .VOLS(3)) drv1 (.clk(clk), .rst_n(rst_n),
    .in_valid(iv1), .in_ready(ir1), .in_pix(ip1), .out_valid(ov1), .out_row(or1), .overflow(of1),
    .checks(c[1]), .failures(f[1]), .stalls(st[1]), .done(d[1]));

  // configuration 2: Daub6, 2 stages, N = 8
  logic         iv2, ir2, ov2, of2;
  logic [7:0]   ip2 [8];
  sample_t      or2 [8];
  dwt3d #(.TAPS(6), .STAGES(2), .N(8), .IW(8)) dut2 (.clk(clk), .rst_n(rst_n),
    .in_valid(iv2), .in_ready(ir2), .in_pix(ip2), .out_valid(ov2), .out_row(or2), .overflow(of2));
  dwt3d_driver #(.TAPS(6), .STAGES(2), .N(8), .IW(8), .VOLS(3)) drv2 (.clk(clk), .rst_n(rst_n),
    .in_valid(iv2), .in_ready(ir2), .in_pix(ip2), .out_valid(ov2), .out_row(or2), .overflow(of2),
    .checks(c[2]), .failures(f[2]), .stalls(st[2]), .done(d[2]));

  // configuration 3: Daub4, 3 stages, N = 16
  logic         iv3, ir3, ov3, of3;
  logic [7:0]   ip3 [16];
  sample_t      or3 [16];
  dwt3d #(.TAPS(4), .STAGES(3), .N(16), .IW(8)) dut3 (.clk(clk), .rst_n(rst_n),
    .in_valid(iv3), .in_ready(ir3), .in_pix(ip3), .out_valid(ov3), .out_row(or3), .overflow(of3));
  dwt3d_driver #(.TAPS(4), .STAGES(3), .N(16), .IW(8), .VOLS(3)) drv3 (.clk(clk), .rst_n(rst_n),
    .in_valid(iv3), .in_ready(ir3), .in_pix(ip3), .out_valid(ov3), .out_row(or3), .overflow(of3),
    .checks(c[3]), .failures(f[3]), .stalls(st[3]), .done(d[3]));

  initial begin
    repeat (3) @(negedge clk);
    rst_n = 1;
    wait (d[0] && d[1] && d[2] && d[3]);
    $display("input stall cycles: %0d %0d %0d %0d", st[0], st[1], st[2], st[3]);
    $display("TB_RESULT checks=%0d failures=%0d", c[0]+c[1]+c[2]+c[3], f[0]+f[1]+f[2]+f[3]);
    $finish;
  end
endmodule
