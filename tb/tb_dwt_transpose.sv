// tb_dwt_transpose: checks both uses of the transpose module, an N x N
// slice transpose (S = 1) and the volume transpose (S = N), with N = 4.
// Lines are tagged with their block, line and element numbers, written at
// random intervals while the reader is stalled at random; every output
// element must come from in_line[a*S + b][m] of the same block, blocks must
// come out in order, and both banks must be used. Finally the reader is
// stopped so that both banks fill: the next line must raise overflow.
module tb_dwt_transpose;
  import dwt_pkg::*;

  localparam int N = 4;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic sample_t tag(int blk, int line, int elem);
    return sample_t'(blk * 1000 + line * 10 + elem);
  endfunction

  // ---- S = 1 and S = N instances share the stimulus style
  logic    iv [2], ordy [2], ov [2], ovf [2];
  sample_t irow [2][N], orow [2][N];

  dwt_transpose #(.N(N), .S(1)) dut0 (.clk(clk), .rst_n(rst_n), .in_valid(iv[0]),
    .in_row(irow[0]), .out_valid(ov[0]), .out_ready(ordy[0]), .out_row(orow[0]), .overflow(ovf[0]));
  dwt_transpose #(.N(N), .S(N)) dut1 (.clk(clk), .rst_n(rst_n), .in_valid(iv[1]),
    .in_row(irow[1]), .out_valid(ov[1]), .out_ready(ordy[1]), .out_row(orow[1]), .overflow(ovf[1]));

  int  oq [2], oblk [2];        // output line counter / block counter
  logic stop_read = 0;

  always @(negedge clk) if (rst_n) begin
    for (int u = 0; u < 2; u++) begin
      int s, d;
      s = (u == 0) ? 1 : N;
      d = N * s;
      ordy[u] = !stop_read && ($urandom_range(0, 3) != 0);
      if (ov[u] && ordy[u]) begin
        int b, m;
        b = oq[u] / N;
        m = oq[u] % N;
        for (int a = 0; a < N; a++) begin
          checks++;
          if (orow[u][a] != tag(oblk[u], a*s + b, m)) begin
            failures++;
            $display("FAIL S=%0d blk %0d line %0d elem %0d got %0d exp %0d", s, oblk[u], oq[u], a,
                     orow[u][a], tag(oblk[u], a*s + b, m));
          end
        end
        oq[u]++;
        if (oq[u] == d) begin oq[u] = 0; oblk[u]++; end
      end
    end
  end

  int banks_seen [2];
  task automatic writer(int u, int blocks);
    int s, d;
    s = (u == 0) ? 1 : N;
    d = N * s;
    for (int blk = 0; blk < blocks; blk++) begin
      for (int l = 0; l < d; l++) begin
        @(negedge clk);
        while ($urandom_range(0, 2) == 0) begin iv[u] = 0; @(negedge clk); end
        for (int m = 0; m < N; m++) irow[u][m] = tag(blk, l, m);
        iv[u] = 1;
      end
      @(negedge clk);
      iv[u] = 0;
      // wait while both banks are full so that this phase never overflows
      while (dut_full(u)) @(negedge clk);
    end
  endtask

  function automatic logic dut_full(int u);
    return (u == 0) ? (dut0.full_q[0] && dut0.full_q[1]) : (dut1.full_q[0] && dut1.full_q[1]);
  endfunction

  always @(posedge clk) begin
    if (dut0.full_q[0] && dut0.full_q[1]) banks_seen[0]++;
    if (dut1.full_q[0] && dut1.full_q[1]) banks_seen[1]++;
  end

  initial begin
    iv = '{0, 0};
    ordy = '{0, 0};
    oq = '{0, 0};
    oblk = '{0, 0};
    banks_seen = '{0, 0};
    for (int u = 0; u < 2; u++) for (int m = 0; m < N; m++) irow[u][m] = '0;
    repeat (3) @(negedge clk);
    rst_n = 1;
    fork
      writer(0, 6);
      writer(1, 4);
    join
    wait (oblk[0] == 6 && oblk[1] == 4);
    for (int u = 0; u < 2; u++) begin
      checks += 2;
      if (ovf[u]) begin failures++; $display("FAIL overflow during normal use %0d", u); end
      if (banks_seen[u] == 0) begin failures++; $display("FAIL both banks never full %0d", u); end
    end
    // overrun: stop the reader and write three blocks into two banks
    stop_read = 1;
    @(negedge clk);
    for (int l = 0; l < 2*N + 1; l++) begin
      @(negedge clk);
      for (int m = 0; m < N; m++) irow[0][m] = tag(0, l, m);
      iv[0] = 1;
    end
    @(negedge clk);
    iv[0] = 0;
    @(negedge clk);
    checks++;
    if (!ovf[0]) begin failures++; $display("FAIL overflow not flagged"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
