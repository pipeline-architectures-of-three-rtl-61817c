// daub6_mac: multiply-add stage of the 1-D Daub6 pipeline.
//
// It forms, for each window m of six samples x[2m] .. x[2m+5],
//   lo = sum_j h_j * x[2m+j]   (scaling / low-pass coefficient)
//   hi = sum_j g_j * x[2m+j]   (wavelet / high-pass coefficient)
// with twelve constant-coefficient multipliers, but it only needs a
// four-sample window per cycle. The sum of each output is split in a head
// (taps 0-2) and a tail (taps 3-5). In the cycle window m is presented,
// positions 0..2 feed the head multipliers. One cycle later the shifter has
// rotated by two, so positions 1..3 of window m+1 hold x[2m+3] .. x[2m+5],
// which are exactly the tail samples of window m; they feed the tail
// multipliers. The datapath is the published Daub6 arrangement:
//   multipliers -> register row -> three-input adder (head) -> register
//                                  three-input adder (tail) -----+
//                                  two-input adder (head + tail) -> register
// so the head partial sum waits one cycle in its register and meets the
// tail partial sum of the next cycle. The window that follows the last one
// of a row only completes the tail (in_head low). Rounding to DW bits before
// the output register and all widths are this design's choices, as is the
// reading that the register skew pairs with the shifter's rotate-by-two.
//
// Timing: the result of a window presented with in_valid & in_head appears
// on lo/hi with out_valid three cycles later, provided the next cycle also
// presents a window (in_valid). in_idx travels with the head.
module daub6_mac
  import dwt_pkg::*;
#(
  parameter int IDXW = 8
) (
  input  logic            clk,
  input  logic            rst_n,
  input  logic            in_valid,   // a window is presented
  input  logic            in_head,    // ... and it starts a new output pair
  input  logic [IDXW-1:0] in_idx,
  input  sample_t         win [4],
  output logic            out_valid,
  output logic [IDXW-1:0] out_idx,
  output sample_t         lo,
  output sample_t         hi
);

  localparam int TAPS = 6;
  typedef logic signed [DW+CW-1:0] prod_t;
  typedef logic signed [PW-1:0]    acc_t;

  prod_t           hh_q [3], gh_q [3];    // head products, taps 0..2
  prod_t           ht_q [3], gt_q [3];    // tail products, taps 3..5
  acc_t            ah_q, ag_q;            // registered head partial sums
  logic            v1_q, head1_q, head2_q;
  logic [IDXW-1:0] idx1_q, idx2_q;

  // Multipliers and the register row behind them.
  always_ff @(posedge clk) begin
    for (int j = 0; j < 3; j++) begin
      hh_q[j] <= prod_t'(win[j])     * prod_t'(h_coef(TAPS, j));
      gh_q[j] <= prod_t'(win[j])     * prod_t'(g_coef(TAPS, j));
      ht_q[j] <= prod_t'(win[j + 1]) * prod_t'(h_coef(TAPS, j + 3));
      gt_q[j] <= prod_t'(win[j + 1]) * prod_t'(g_coef(TAPS, j + 3));
    end
    idx1_q <= in_idx;
  end

  // Head three-input adders and their register.
  always_ff @(posedge clk) begin
    ah_q   <= acc_t'(hh_q[0]) + acc_t'(hh_q[1]) + acc_t'(hh_q[2]);
    ag_q   <= acc_t'(gh_q[0]) + acc_t'(gh_q[1]) + acc_t'(gh_q[2]);
    idx2_q <= idx1_q;
  end

  // Tail three-input adders, two-input adders, rounding, output register.
  acc_t th, tg;
  always_comb begin
    th = acc_t'(ht_q[0]) + acc_t'(ht_q[1]) + acc_t'(ht_q[2]);
    tg = acc_t'(gt_q[0]) + acc_t'(gt_q[1]) + acc_t'(gt_q[2]);
  end

  always_ff @(posedge clk) begin
    lo      <= round_acc(ah_q + th);
    hi      <= round_acc(ag_q + tg);
    out_idx <= idx2_q;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      v1_q      <= 1'b0;
      head1_q   <= 1'b0;
      head2_q   <= 1'b0;
      out_valid <= 1'b0;
    end else begin
      v1_q      <= in_valid;
      head1_q   <= in_valid && in_head;
      head2_q   <= head1_q;
      out_valid <= head2_q && v1_q;
    end
  end

endmodule
