// daub_1d: pipelined direct-mapped 1-D Daubechies wavelet transform of a row.
//
// A row of N samples i(0)..i(N-1) is transformed by STAGES cascaded
// decomposition stages (daub_level). Stage k (k = 1..STAGES) works on the
// N/2^(k-1) scaling coefficients left by stage k-1, so only the low-pass
// output is decomposed further while each stage's wavelet coefficients are
// carried down to the output unchanged. The output row o(0)..o(N-1) is in
// the usual pyramid order
//   [ s_S | d_S | d_(S-1) | ... | d_1 ]
// with N/2^S entries for s_S and d_S, and N/2^k entries for d_k.
// The Daub4 configuration (TAPS=4) has three stages and the Daub6
// configuration (TAPS=6) two, as drawn in the two published pipelines; the
// STAGES default is 3 (Daub4).
//
// Interface: valid/ready on the input row (in_ready is the first stage's
// idle flag); the output is a one-cycle out_valid pulse with out_row, which
// has no back-pressure. Each stage is faster than the one before it, so a
// later stage is always idle when a row reaches it; an assertion checks this.
// Rate: one row every N/2 + MAC latency + 1 cycles (7 for Daub4, 8 for
// Daub6 at N = 8). Latency of a row is the sum over the stages of
// L/2 + MAC latency + 1 (16 cycles for Daub4 with three stages at N = 8,
// 14 for Daub6 with two). The stage structure (shifter, multipliers,
// register rows, adders, bypass of the detail outputs) follows the
// published pipelines; the row handshake and output layout are this
// design's choices.
module daub_1d
  import dwt_pkg::*;
#(
  parameter int TAPS   = 4,
  parameter int N      = 8,
  parameter int STAGES = 3
) (
  input  logic    clk,
  input  logic    rst_n,
  input  logic    in_valid,
  output logic    in_ready,
  input  sample_t in_row  [N],
  output logic    out_valid,
  output sample_t out_row [N]
);

  sample_t rows  [STAGES+1][N];
  logic    valid [STAGES+1];
  logic    ready [STAGES];

  assign rows[0]  = in_row;
  assign valid[0] = in_valid;
  assign in_ready = ready[0];

  for (genvar k = 0; k < STAGES; k++) begin : g_stage
    daub_level #(.TAPS(TAPS), .N(N), .L(N >> k)) u_level (
      .clk       (clk),
      .rst_n     (rst_n),
      .in_valid  (valid[k]),
      .in_ready  (ready[k]),
      .in_row    (rows[k]),
      .out_valid (valid[k+1]),
      .out_row   (rows[k+1])
    );
    if (k > 0) begin : g_chk
      // Stages after the first cannot stall their producer.
      a_stage_free: assert property (@(posedge clk) disable iff (!rst_n)
                                     valid[k] |-> ready[k]);
    end
  end

  assign out_valid = valid[STAGES];
  assign out_row   = rows[STAGES];

endmodule
