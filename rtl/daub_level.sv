// daub_level: one decomposition stage of the 1-D Daubechies pipeline.
//
// The stage receives a whole row of N values. Its first L entries are the
// signal to transform at this stage (the raw samples for the first stage,
// the previous stage's scaling coefficients after that); entries L..N-1 are
// wavelet coefficients of earlier stages, which are only carried along (the
// bypass registers that run beside the stages of the pipeline).
//
// On acceptance the first L entries go into the wrap-around shifter. For
// L/2 cycles the shifter presents windows 2m .. 2m+3 (modulo L) to the
// multiply-add stage (daub4_mac or daub6_mac, chosen by TAPS), which returns
// one scaling coefficient s[m] and one wavelet coefficient d[m] per window.
// Daub6 needs one more window (L/2 + 1 in all): its tail taps of window m
// are read from window m+1, so the extra window completes the last pair.
// Results are written in place: s[m] to entry m, d[m] to entry L/2+m. When the
// last pair is written the row is complete and out_valid pulses for one
// cycle; out_row holds the row until the next one is accepted.
//
// Timing: in_ready is high while the stage is idle. A row accepted at edge
// t is presented on out_row with out_valid after L/2 + MAC latency + 1
// cycles (MAC latency 2 for Daub4, 3 for Daub6), and the stage is ready
// again in that same cycle. The stage takes one row at a time and finishes
// it before the next: the shifter order, the in-place output layout and this
// handshake are this design's choices; the shifter-multiplier-adder-register
// chain per stage follows the published pipeline.
module daub_level
  import dwt_pkg::*;
#(
  parameter int TAPS = 4,   // 4 = Daub4, 6 = Daub6
  parameter int N    = 8,   // full row length
  parameter int L    = 8    // samples transformed at this stage (L <= N, even)
) (
  input  logic    clk,
  input  logic    rst_n,
  input  logic    in_valid,
  output logic    in_ready,
  input  sample_t in_row  [N],
  output logic    out_valid,
  output sample_t out_row [N]
);

  localparam int HALF = L / 2;
  localparam int IDXW = (HALF > 1) ? $clog2(HALF) : 1;
  // Daub6 issues one window more: its tail half completes the last pair.
  localparam int NWIN = (TAPS == 6) ? HALF + 1 : HALF;
  localparam int CNTW = $clog2(NWIN + 1);
  localparam int WIN  = 4;   // window width needed by either MAC

  logic            busy_q, issuing_q;
  logic [CNTW-1:0] issue_cnt_q;
  logic            issue_head;
  logic [IDXW-1:0] issue_idx;
  sample_t         res_q [N];
  sample_t         load_row [L];
  sample_t         window [WIN];
  logic            accept;

  logic            mac_valid;
  logic [IDXW-1:0] mac_idx;
  sample_t         mac_lo, mac_hi;

  assign in_ready   = !busy_q;
  assign issue_head = int'(issue_cnt_q) < HALF;
  assign issue_idx  = IDXW'(issue_cnt_q);
  assign accept   = in_valid && in_ready;

  always_comb begin
    for (int i = 0; i < L; i++) load_row[i] = in_row[i];
  end

  daub_shifter #(.L(L), .WIN(WIN)) u_shift (
    .clk      (clk),
    .load     (accept),
    .load_row (load_row),
    .shift    (issuing_q),
    .window   (window)
  );

  generate
    if (TAPS == 6) begin : g_d6
      daub6_mac #(.IDXW(IDXW)) u_mac (
        .clk(clk), .rst_n(rst_n), .in_valid(issuing_q), .in_head(issue_head),
        .in_idx(issue_idx), .win(window), .out_valid(mac_valid), .out_idx(mac_idx),
        .lo(mac_lo), .hi(mac_hi));
    end else begin : g_d4
      daub4_mac #(.IDXW(IDXW)) u_mac (
        .clk(clk), .rst_n(rst_n), .in_valid(issuing_q), .in_idx(issue_idx),
        .win(window), .out_valid(mac_valid), .out_idx(mac_idx),
        .lo(mac_lo), .hi(mac_hi));
    end
  endgenerate

  // Control: issue NWIN windows, then wait for the last result.
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      busy_q      <= 1'b0;
      issuing_q   <= 1'b0;
      issue_cnt_q <= '0;
      out_valid   <= 1'b0;
    end else begin
      out_valid <= 1'b0;
      if (accept) begin
        busy_q      <= 1'b1;
        issuing_q   <= 1'b1;
        issue_cnt_q <= '0;
      end else if (issuing_q) begin
        issue_cnt_q <= issue_cnt_q + 1'b1;
        if (int'(issue_cnt_q) == NWIN - 1) issuing_q <= 1'b0;
      end
      if (mac_valid && int'(mac_idx) == HALF - 1) begin
        busy_q    <= 1'b0;
        out_valid <= 1'b1;
      end
    end
  end

  // Result row: bypassed entries copied on acceptance, s/d written in place.
  always_ff @(posedge clk) begin
    if (accept) begin
      res_q <= in_row;
    end else if (mac_valid) begin
      res_q[int'(mac_idx)]        <= mac_lo;
      res_q[HALF + int'(mac_idx)] <= mac_hi;
    end
  end

  assign out_row = res_q;

  // Results only arrive for a row that is being worked on.
  property p_no_result_while_idle;
    @(posedge clk) disable iff (!rst_n) mac_valid |-> busy_q;
  endproperty
  a_no_result_while_idle: assert property (p_no_result_while_idle);

endmodule
