// tb_daub4_mac: checks the Daub4 multiply-add stage against the reference
// inner products (coefficients computed from their closed forms), with a new
// random window every cycle plus some idle cycles. Each result must appear
// exactly two cycles after its window, with its tag.
module tb_daub4_mac;
  import dwt_pkg::*;
  import dwt_ref_pkg::*;

  localparam int TAPS = 4, LAT = 2;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic       in_valid = 0, out_valid;
  logic [7:0] in_idx = 0, out_idx;
  sample_t    win [TAPS];
  sample_t    lo, hi;

  daub4_mac #(.IDXW(8)) dut (.clk(clk), .rst_n(rst_n), .in_valid(in_valid),
    .in_idx(in_idx), .win(win), .out_valid(out_valid), .out_idx(out_idx),
    .lo(lo), .hi(hi));

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

  // checker
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
    for (int j = 0; j < TAPS; j++) win[j] = '0;
    repeat (3) @(negedge clk);
    rst_n = 1;
    for (int n = 0; n < 200; n++) begin
      @(negedge clk);
      if (n % 17 == 5) begin
        in_valid = 0;
      end else begin
        longint sh, sg;
        sh = 0; sg = 0;
        for (int j = 0; j < TAPS; j++) begin
          // full-scale values some of the time, random otherwise
          if (n < 4) win[j] = (n[0] ^ j[0]) ? sample_t'(-40000) : sample_t'(40000);
          else       win[j] = sample_t'($urandom_range(0, 2*40000) - 40000);
          sh += ref_h(TAPS, j) * longint'(win[j]);
          sg += ref_g(TAPS, j) * longint'(win[j]);
        end
        in_valid = 1;
        in_idx = 8'(nsent);
        exp_lo[nsent % 256] = ref_round(sh);
        exp_hi[nsent % 256] = ref_round(sg);
        sent_at[nsent % 256] = cyc;
        nsent++;
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
