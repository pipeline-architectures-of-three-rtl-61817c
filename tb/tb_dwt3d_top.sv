// tb_dwt3d_top: end-to-end test of the top with every parameter at its
// default (8 x 8 x 8 volumes of 8-bit pixels). Three volumes go through the
// 3-D Daub4 transform (three stages per dimension) and, at the same time,
// three through the 3-D Daub6 transform (two stages per dimension); every
// output coefficient is compared with the reference transform.
// It also counts, for each transform, how often each mechanism of the
// design happened and fails if one never did:
//   wrap    windows that reach past the row end and wrap to its start
//   overlap cycles in which two stages of one 1-D core work on different rows
//   deep    rows finished by the last decomposition stage
//   pingpng cycles in which a transpose fills one bank while draining the other
//   stall   cycles in which an input line waited on in_ready
module tb_dwt3d_top;
  import dwt_pkg::*;

  localparam int N = 8;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic          d4_iv, d4_ir, d4_ov, d4_of, d6_iv, d6_ir, d6_ov, d6_of;
  logic [7:0]    d4_ip [N], d6_ip [N];
  sample_t       d4_or [N], d6_or [N];

  dwt3d_top dut (
    .clk(clk), .rst_n(rst_n),
    .d4_in_valid(d4_iv), .d4_in_ready(d4_ir), .d4_in_pix(d4_ip),
    .d4_out_valid(d4_ov), .d4_out_row(d4_or), .d4_overflow(d4_of),
    .d6_in_valid(d6_iv), .d6_in_ready(d6_ir), .d6_in_pix(d6_ip),
    .d6_out_valid(d6_ov), .d6_out_row(d6_or), .d6_overflow(d6_of));

  int   c [2], f [2], st [2];
  logic d [2];

  dwt3d_driver #(.TAPS(4), .STAGES(3), .N(N), .IW(8), .VOLS(3)) drv4 (.clk(clk), .rst_n(rst_n),
    .in_valid(d4_iv), .in_ready(d4_ir), .in_pix(d4_ip), .out_valid(d4_ov), .out_row(d4_or),
    .overflow(d4_of), .checks(c[0]), .failures(f[0]), .stalls(st[0]), .done(d[0]));
  dwt3d_driver #(.TAPS(6), .STAGES(2), .N(N), .IW(8), .VOLS(3)) drv6 (.clk(clk), .rst_n(rst_n),
    .in_valid(d6_iv), .in_ready(d6_ir), .in_pix(d6_ip), .out_valid(d6_ov), .out_row(d6_or),
    .overflow(d6_of), .checks(c[1]), .failures(f[1]), .stalls(st[1]), .done(d[1]));

  // mechanism counters, [0] = Daub4, [1] = Daub6
  int wrap [2], overlap [2], deep [2], pingpong [2];

  always @(posedge clk) if (rst_n) begin
    // Daub4: a window wraps when 2m + 3 >= L, i.e. the last window of a row
    if (dut.u_daub4.u_x.g_stage[0].u_level.issuing_q &&
        int'(dut.u_daub4.u_x.g_stage[0].u_level.issue_cnt_q) >= (8 - 3 + 1) / 2) wrap[0]++;
    if (dut.u_daub6.u_x.g_stage[0].u_level.issuing_q &&
        int'(dut.u_daub6.u_x.g_stage[0].u_level.issue_cnt_q) >= (8 - 5 + 1) / 2) wrap[1]++;
    if (dut.u_daub4.u_y.g_stage[0].u_level.busy_q && dut.u_daub4.u_y.g_stage[1].u_level.busy_q) overlap[0]++;
    if (dut.u_daub6.u_y.g_stage[0].u_level.busy_q && dut.u_daub6.u_y.g_stage[1].u_level.busy_q) overlap[1]++;
    if (dut.u_daub4.u_z.g_stage[2].u_level.out_valid) deep[0]++;
    if (dut.u_daub6.u_z.g_stage[1].u_level.out_valid) deep[1]++;
    if (dut.u_daub4.u_t2.wr && dut.u_daub4.u_t2.out_valid) pingpong[0]++;
    if (dut.u_daub6.u_t2.wr && dut.u_daub6.u_t2.out_valid) pingpong[1]++;
  end

  int checks, failures;

  task automatic need(string what, int count);
    checks++;
    if (count == 0) begin failures++; $display("FAIL mechanism never happened: %s", what); end
  endtask

  initial begin
    repeat (20000) @(posedge clk);
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", c[0]+c[1], f[0]+f[1]+1);
    $finish;
  end

  initial begin
    wrap = '{0, 0}; overlap = '{0, 0}; deep = '{0, 0}; pingpong = '{0, 0};
    repeat (3) @(negedge clk);
    rst_n = 1;
    wait (d[0] && d[1]);
    checks = c[0] + c[1];
    failures = f[0] + f[1];
    for (int u = 0; u < 2; u++) begin
      $display("%s: wrap=%0d overlap=%0d deep=%0d pingpong=%0d stall=%0d",
               u ? "Daub6" : "Daub4", wrap[u], overlap[u], deep[u], pingpong[u], st[u]);
      need("wrap-around", wrap[u]);
      need("stage overlap", overlap[u]);
      need("last stage", deep[u]);
      need("transpose ping-pong", pingpong[u]);
      need("input stall", st[u]);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
