// daub4_mac: multiply-add stage of the 1-D Daub4 pipeline.
//
// From a four-sample window x0..x3 it forms, per cycle,
//   lo = sum_j h_j * x_j   (scaling / low-pass coefficient)
//   hi = sum_j g_j * x_j   (wavelet / high-pass coefficient)
// with eight constant-coefficient multipliers (four per output), a register
// row behind the multipliers and one four-input adder per output followed by
// an output register, which is the arrangement of Mul1..Mul8, Registers,
// Add1/Add2, Registers in the Daub4 stage. The full-precision sum is rounded
// to DW bits (round half up) before the output register; that rounding
// point and the widths are this design's choice.
//
// Timing: a window presented with in_valid appears on lo/hi with out_valid
// two cycles later. in_idx travels with the data unchanged, so the caller
// knows where each result belongs. One new window per cycle.
module daub4_mac
  import dwt_pkg::*;
#(
  parameter int IDXW = 8    // width of the tag carried with each window
) (
  input  logic            clk,
  input  logic            rst_n,
  input  logic            in_valid,
  input  logic [IDXW-1:0] in_idx,
  input  sample_t         win [4],
  output logic            out_valid,
  output logic [IDXW-1:0] out_idx,
  output sample_t         lo,
  output sample_t         hi
);

  localparam int TAPS = 4;
  typedef logic signed [DW+CW-1:0] prod_t;

  prod_t           ph_q [TAPS];   // products with h (Mul1..Mul4)
  prod_t           pg_q [TAPS];   // products with g (Mul5..Mul8)
  logic            v1_q;
  logic [IDXW-1:0] idx1_q;

  // Multipliers and the register row behind them.
  always_ff @(posedge clk) begin
    for (int j = 0; j < TAPS; j++) begin
      ph_q[j] <= prod_t'(win[j]) * prod_t'(h_coef(TAPS, j));
      pg_q[j] <= prod_t'(win[j]) * prod_t'(g_coef(TAPS, j));
    end
    idx1_q <= in_idx;
  end

  // Four-input adders (Add1: scaling, Add2: wavelet).
  logic signed [PW-1:0] sum_h, sum_g;
  always_comb begin
    sum_h = '0;
    sum_g = '0;
    for (int j = 0; j < TAPS; j++) begin
      sum_h += PW'(ph_q[j]);
      sum_g += PW'(pg_q[j]);
    end
  end

  always_ff @(posedge clk) begin
    lo      <= round_acc(sum_h);
    hi      <= round_acc(sum_g);
    out_idx <= idx1_q;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      v1_q      <= 1'b0;
      out_valid <= 1'b0;
    end else begin
      v1_q      <= in_valid;
      out_valid <= v1_q;
    end
  end

endmodule
