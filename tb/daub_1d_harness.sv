// daub_1d_harness: drives one daub_1d instance with ROWS random rows, offered
// whenever in_ready allows, and checks every output row against the
// reference pyramid transform. It also checks the row latency (sum over the
// stages of L/2 + MAC latency + 1) and that rows are accepted every
// N/2 + MAC latency + 1 cycles when offered continuously.
module daub_1d_harness
  import dwt_pkg::*;
  import dwt_ref_pkg::*;
#(
  parameter int TAPS   = 4,
  parameter int STAGES = 3,
  parameter int N      = 8,
  parameter int ROWS   = 20
) (
  input  logic clk,
  input  logic rst_n,
  output int   checks,
  output int   failures,
  output logic done
);
  localparam int PL = (TAPS == 6) ? 3 : 2;

  function automatic int exp_latency();
    int s;
    s = 0;
    for (int k = 0; k < STAGES; k++) s += (N >> k) / 2 + PL + 1;
    return s;
  endfunction

  logic    iv = 0, ir, ov;
  sample_t in_row [N], out_row [N];
  daub_1d #(.TAPS(TAPS), .N(N), .STAGES(STAGES)) dut (.clk(clk), .rst_n(rst_n),
    .in_valid(iv), .in_ready(ir), .in_row(in_row), .out_valid(ov), .out_row(out_row));

  longint exp_q [$];
  int     t_q [$];
  int     cyc = 0, nout = 0, last_acc = -1;
  always @(posedge clk) cyc++;

  initial begin checks = 0; failures = 0; done = 0; end

  always @(negedge clk) if (rst_n && ov) begin
    int t0;
    for (int i = 0; i < N; i++) begin
      longint e;
      e = exp_q.pop_front();
      checks++;
      if (longint'(out_row[i]) != e) begin
        failures++;
        $display("FAIL T%0d/S%0d/N%0d row %0d [%0d] got %0d exp %0d", TAPS, STAGES, N, nout, i, out_row[i], e);
      end
    end
    t0 = t_q.pop_front();
    checks++;
    if (cyc - t0 != exp_latency()) begin
      failures++;
      $display("FAIL T%0d latency %0d exp %0d", TAPS, cyc - t0, exp_latency());
    end
    nout++;
  end

  initial begin
    @(posedge rst_n);
    @(negedge clk);
    for (int r = 0; r < ROWS; r++) begin
      longint x[];
      x = new[N];
      for (int i = 0; i < N; i++) begin
        case (r)
          0:       in_row[i] = sample_t'(255);               // flat row
          1:       in_row[i] = sample_t'((i % 2) ? 255 : 0); // alternating
          default: in_row[i] = sample_t'($urandom_range(0, 255));
        endcase
        x[i] = longint'(in_row[i]);
      end
      ref_1d(TAPS, STAGES, N, x);
      iv = 1;
      do @(posedge clk); while (!ir);
      for (int i = 0; i < N; i++) exp_q.push_back(x[i]);
      t_q.push_back(cyc);
      if (last_acc >= 0) begin
        checks++;
        if (cyc - last_acc != N/2 + PL + 1) begin
          failures++;
          $display("FAIL T%0d row interval %0d exp %0d", TAPS, cyc - last_acc, N/2 + PL + 1);
        end
      end
      last_acc = cyc;
      #1 iv = 0;
    end
    repeat (exp_latency() + 4) @(negedge clk);
    checks++;
    if (nout != ROWS) begin failures++; $display("FAIL T%0d rows out %0d", TAPS, nout); end
    done = 1;
  end
endmodule
