// daub_shifter: the wrap-around shifter in front of each Daubechies stage.
//
// A row of L samples is loaded in parallel. Every cycle in which `shift` is
// high the row is rotated left by two places, so that after m shifts the
// window output holds samples 2m, 2m+1, ..., 2m+WIN-1 of the row, each index
// taken modulo L. The last windows of a row therefore reach back to the
// first samples: this is the periodic extension that removes the Daubechies
// edge problem (samples s[L], s[L+1], ... are read as s[0], s[1], ...).
// Rows shorter than the window wrap more than once. Both multiply-add
// stages use WIN = 4: Daub4 takes its whole window, Daub6 takes its first
// three taps from one window and its last three from the next.
//
// Timing: `load` and `shift` take effect at the clock edge; the window is a
// plain read of the rotating register. `load` has priority over `shift`.
// The rotate-by-two register is this design's reading of the shifter's
// wrap-around role; the number of taps and the wrap-around come from the
// Daubechies algorithm itself.
module daub_shifter
  import dwt_pkg::*;
#(
  parameter int L    = 8,   // samples in the row at this stage
  parameter int WIN  = 4    // window width
) (
  input  logic    clk,
  input  logic    load,
  input  sample_t load_row [L],
  input  logic    shift,
  output sample_t window [WIN]
);

  sample_t rot_q [L];

  always_ff @(posedge clk) begin
    if (load) begin
      rot_q <= load_row;
    end else if (shift) begin
      for (int i = 0; i < L; i++) rot_q[i] <= rot_q[(i + 2) % L];
    end
  end

  always_comb begin
    for (int j = 0; j < WIN; j++) window[j] = rot_q[j % L];
  end

endmodule
