// tb_daub_1d: checks the 1-D pipelined Daubechies transform in its two
// published configurations (Daub4 with three stages, Daub6 with two, both
// on 8-sample rows) and in a 16-sample Daub4 variant, against the reference
// pyramid transform with periodic extension; latency and row rate are
// checked too (see daub_1d_harness).
module tb_daub_1d;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int c [3], f [3];
  logic d [3];
  int checks, failures;

  daub_1d_harness #(.TAPS(4), .STAGES(3), .N(8),  .ROWS(30)) h0 (.clk(clk), .rst_n(rst_n), .checks(c[0]), .failures(f[0]), .done(d[0]));
  daub_1d_harness #(.TAPS(6), .STAGES(2), .N(8),  .ROWS(30)) h1 (.clk(clk), .rst_n(rst_n), .checks(c[1]), .failures(f[1]), .done(d[1]));
  daub_1d_harness #(.TAPS(4), .STAGES(3), .N(16), .ROWS(20)) h2 (.clk(clk), .rst_n(rst_n), .checks(c[2]), .failures(f[2]), .done(d[2]));

  initial begin
    repeat (20000) @(posedge clk);
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", c[0]+c[1]+c[2], f[0]+f[1]+f[2]+1);
    $finish;
  end

  initial begin
    repeat (3) @(negedge clk);
    rst_n = 1;
    wait (d[0] && d[1] && d[2]);
    checks = c[0] + c[1] + c[2];
    failures = f[0] + f[1] + f[2];
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
