// tb_daub6_mac: checks the Daub6 multiply-add stage as the shifter drives
// it. For random rows of L = 8 samples it presents the L/2 + 1 four-sample
// windows x[(2m + p) mod L], p = 0..3 (the last one with in_head low), and
// compares every result with the six-tap reference inner products
// (coefficients computed from their closed forms). Rows follow each other
// back to back or after idle gaps; results must appear three cycles after
// their window, carrying its tag, and no result may appear for the extra
// window.
module tb_daub6_mac;
  import dwt_pkg::*;
  import dwt_ref_pkg::*;

  localparam int TAPS = 6, LAT = 3, L = 8;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic       in_valid = 0, in_head = 0, out_valid;
  logic [7:0] in_idx = 0, out_idx;
  sample_t    win [4];
  sample_t    lo, hi;

  daub6_mac #(.IDXW(8)) dut (.clk(clk), .rst_n(rst_n), .in_valid(in_valid),
    .in_head(in_head), .in_idx(in_idx), .win(win), .out_valid(out_valid),
    .out_idx(out_idx), .lo(lo), .hi(hi));

  longint exp_lo [256], exp_hi [256];
  int     sent_at [256];
  int     cyc = 0, nsent = 0, nrecv = 0;

  always @(posedge clk) cyc++;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(negedge clk) if (rst_n && out_valid) begin
    int t;
    t = int'(out_idx);
    checks += 3;
    if (longint'(lo) != exp_lo[t]) begin failures++; $display("FAIL lo %0d: %0d vs %0d", t, lo, exp_lo[t]); end
    if (longint'(hi) != exp_hi[t]) begin failures++; $display("FAIL hi %0d: %0d vs %0d", t, hi, exp_hi[t]); end
    if (cyc - sent_at[t] != LAT) begin failures++; $display("FAIL latency %0d", cyc - sent_at[t]); end
    nrecv++;
  end

  initial begin
    for (int p = 0; p < 4; p++) win[p] = '0;
    repeat (3) @(negedge clk);
    rst_n = 1;
    for (int r = 0; r < 30; r++) begin
      sample_t x [L];
      for (int i = 0; i < L; i++) begin
        if (r == 0)      x[i] = (i % 2) ? sample_t'(-40000) : sample_t'(40000);
        else if (r == 1) x[i] = sample_t'(40000);
        else             x[i] = sample_t'($urandom_range(0, 2*40000) - 40000);
      end
      for (int m = 0; m <= L/2; m++) begin
        @(negedge clk);
        for (int p = 0; p < 4; p++) win[p] = x[(2*m + p) % L];
        in_valid = 1;
        in_head  = (m < L/2);
        if (m < L/2) begin
          longint sh, sg;
          sh = 0; sg = 0;
          for (int j = 0; j < TAPS; j++) begin
            sh += ref_h(TAPS, j) * longint'(x[(2*m + j) % L]);
            sg += ref_g(TAPS, j) * longint'(x[(2*m + j) % L]);
          end
          in_idx = 8'(nsent);
          exp_lo[nsent % 256] = ref_round(sh);
          exp_hi[nsent % 256] = ref_round(sg);
          sent_at[nsent % 256] = cyc;
          nsent++;
        end else begin
          in_idx = 8'hff;
        end
      end
      if (r % 3 == 2) begin
        @(negedge clk);
        in_valid = 0;
        in_head  = 0;
        repeat (r % 4) @(negedge clk);
      end
    end
    @(negedge clk);
    in_valid = 0;
    repeat (6) @(negedge clk);
    checks++;
    if (nrecv != nsent) begin failures++; $display("FAIL count %0d vs %0d", nrecv, nsent); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
