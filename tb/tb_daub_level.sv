// tb_daub_level: checks one decomposition stage.
// Instance A: Daub4 on a full 8-entry row (first stage). Instance B: Daub6
// working on the first 4 entries of an 8-entry row whose entries 4..7 must
// pass through unchanged. Rows are offered back to back as soon as
// in_ready allows; every output row is compared with the reference stage,
// and the accept-to-output latency must be L/2 + MAC latency + 1 cycles.
module tb_daub_level;
  import dwt_pkg::*;
  import dwt_ref_pkg::*;

  localparam int N = 8;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;
  int cyc = 0;
  always @(posedge clk) cyc++;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ---- instance A: Daub4, L = 8
  logic    a_iv = 0, a_ir, a_ov;
  sample_t a_in [N], a_out [N];
  daub_level #(.TAPS(4), .N(N), .L(8)) dut_a (.clk(clk), .rst_n(rst_n),
    .in_valid(a_iv), .in_ready(a_ir), .in_row(a_in), .out_valid(a_ov), .out_row(a_out));

  // ---- instance B: Daub6, L = 4 of N = 8
  logic    b_iv = 0, b_ir, b_ov;
  sample_t b_in [N], b_out [N];
  daub_level #(.TAPS(6), .N(N), .L(4)) dut_b (.clk(clk), .rst_n(rst_n),
    .in_valid(b_iv), .in_ready(b_ir), .in_row(b_in), .out_valid(b_ov), .out_row(b_out));

  longint a_exp [$];   // N values per expected row, flattened
  longint b_exp [$];
  int     a_t [$], b_t [$];
  int     a_done = 0, b_done = 0;

  task automatic cmp(string tag, sample_t got [N], ref longint q [$], input int lat, input int exp_lat);
    for (int i = 0; i < N; i++) begin
      longint e;
      e = q.pop_front();
      checks++;
      if (longint'(got[i]) != e) begin
        failures++;
        $display("FAIL %s [%0d] got %0d exp %0d", tag, i, got[i], e);
      end
    end
    checks++;
    if (lat != exp_lat) begin failures++; $display("FAIL %s latency %0d exp %0d", tag, lat, exp_lat); end
  endtask

  always @(negedge clk) if (rst_n) begin
    if (a_ov) begin cmp("A", a_out, a_exp, cyc - a_t.pop_front(), 8/2 + 2 + 1); a_done++; end
    if (b_ov) begin cmp("B", b_out, b_exp, cyc - b_t.pop_front(), 4/2 + 3 + 1); b_done++; end
  end

  // drivers: offer a new row whenever the previous one was taken
  task automatic drive_a(int rows);
    for (int r = 0; r < rows; r++) begin
      longint x[];
      x = new[N];
      for (int i = 0; i < N; i++) begin
        a_in[i] = sample_t'($urandom_range(0, 255));
        if (r == 0) a_in[i] = sample_t'(i * 30);
        x[i] = longint'(a_in[i]);
      end
      ref_stage(4, 8, x);
      a_iv = 1;
      do @(posedge clk); while (!a_ir);
      for (int i = 0; i < N; i++) a_exp.push_back(x[i]);
      a_t.push_back(cyc);
      #1 a_iv = 0;
    end
  endtask

  task automatic drive_b(int rows);
    for (int r = 0; r < rows; r++) begin
      longint x[];
      x = new[N];
      for (int i = 0; i < N; i++) begin
        b_in[i] = sample_t'($urandom_range(0, 4000) - 2000);
        x[i] = longint'(b_in[i]);
      end
      ref_stage(6, 4, x);
      b_iv = 1;
      do @(posedge clk); while (!b_ir);
      for (int i = 0; i < N; i++) b_exp.push_back(x[i]);
      b_t.push_back(cyc);
      #1 b_iv = 0;
    end
  endtask

  initial begin
    repeat (3) @(negedge clk);
    rst_n = 1;
    @(negedge clk);
    fork
      drive_a(20);
      drive_b(20);
    join
    repeat (20) @(negedge clk);
    checks += 2;
    if (a_done != 20) begin failures++; $display("FAIL A rows %0d", a_done); end
    if (b_done != 20) begin failures++; $display("FAIL B rows %0d", b_done); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
