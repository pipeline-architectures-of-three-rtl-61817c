// dwt_transpose: transpose module between two 1-D transform cores.
//
// The 3-D transform applies one and the same 1-D core along rows, columns
// and slices; this module changes the order of the data between two cores
// so that the next core sees lines along the next dimension. It stores a
// block of D = N*S input lines of N values and reads them out as D lines in
// the other order:
//   out_line[b*N + m][a] = in_line[a*S + b][m],  a, m in 0..N-1, b in 0..S-1
// With S = 1 this is the transpose of an N x N slice (rows -> columns); with
// S = N it exchanges the slice index with the element index inside each
// line, which turns lines along y into lines along z for a whole N^3 volume.
//
// Two banks alternate (ping-pong): one fills while the other drains, so a
// block can be written while the previous one is read. The input has no
// back-pressure; a line that arrives while both banks are full is dropped
// and sets the sticky `overflow` flag. The output uses valid/ready.
// The storage is a register array so that a whole output line (N words from
// N different input lines) is read in one cycle.
// Timing: a block becomes readable in the cycle after its last line is
// written; one output line per cycle while out_ready is high. The access
// pattern follows the transpose role given for the published architecture;
// the banking, handshake and overflow flag are this design's choices.
module dwt_transpose
  import dwt_pkg::*;
#(
  parameter int N = 8,    // values per line
  parameter int S = 1     // 1: slice transpose, N: volume transpose
) (
  input  logic    clk,
  input  logic    rst_n,
  input  logic    in_valid,
  input  sample_t in_row  [N],
  output logic    out_valid,
  input  logic    out_ready,
  output sample_t out_row [N],
  output logic    overflow
);

  localparam int D  = N * S;
  localparam int CW_ = (D > 1) ? $clog2(D) : 1;

  sample_t         mem [2][D][N];
  logic            full_q [2];
  logic            wb_q, rb_q;
  logic [CW_-1:0]  wcnt_q, rcnt_q;
  logic            wr, rd;

  assign wr        = in_valid && !full_q[wb_q];
  assign out_valid = full_q[rb_q];
  assign rd        = out_valid && out_ready;

  always_ff @(posedge clk) begin
    if (wr) mem[wb_q][int'(wcnt_q)] <= in_row;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      full_q   <= '{1'b0, 1'b0};
      wb_q     <= 1'b0;
      rb_q     <= 1'b0;
      wcnt_q   <= '0;
      rcnt_q   <= '0;
      overflow <= 1'b0;
    end else begin
      if (in_valid && full_q[wb_q]) overflow <= 1'b1;
      if (wr) begin
        if (int'(wcnt_q) == D - 1) begin
          wcnt_q       <= '0;
          full_q[wb_q] <= 1'b1;
          wb_q         <= !wb_q;
        end else begin
          wcnt_q <= wcnt_q + 1'b1;
        end
      end
      if (rd) begin
        if (int'(rcnt_q) == D - 1) begin
          rcnt_q       <= '0;
          full_q[rb_q] <= 1'b0;
          rb_q         <= !rb_q;
        end else begin
          rcnt_q <= rcnt_q + 1'b1;
        end
      end
    end
  end

  // Gather output line q = b*N + m from N stored lines.
  always_comb begin
    int b, m;
    b = int'(rcnt_q) / N;
    m = int'(rcnt_q) % N;
    for (int a = 0; a < N; a++) out_row[a] = mem[rb_q][a*S + b][m];
  end

endmodule
