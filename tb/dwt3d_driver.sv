// dwt3d_driver: stimulus and checker for one 3-D transform (dwt3d or one
// half of dwt3d_top). It sends VOLS volumes of N x N x N pixels as N*N lines,
// offering a new line as soon as in_ready allows (with a short pause inside
// the second volume), and compares each output line with the reference 3-D
// transform. Volume 0 is a smooth bright blob on a dark background, volume 1
// a constant full-scale volume, the rest random pixels. It counts the
// cycles in which a line waited on in_ready, checks that overflow never
// rises, and checks that, in steady state, a new volume is finished every
// N*N*(N/2 + MAC latency + 1) cycles.
module dwt3d_driver
  import dwt_pkg::*;
  import dwt_ref_pkg::*;
#(
  parameter int TAPS   = 4,
  parameter int STAGES = 3,
  parameter int N      = 8,
  parameter int IW     = 8,
  parameter int VOLS   = 3
) (
  input  logic          clk,
  input  logic          rst_n,
  output logic          in_valid,
  input  logic          in_ready,
  output logic [IW-1:0] in_pix [N],
  input  logic          out_valid,
  input  sample_t       out_row [N],
  input  logic          overflow,
  output int            checks,
  output int            failures,
  output int            stalls,
  output logic          done
);
  localparam int PL     = (TAPS == 6) ? 3 : 2;
  localparam int PERIOD = N/2 + PL + 1;

  longint exp_q [$];
  int     cyc = 0, nlines = 0, nvols = 0, vol_end [$];
  always @(posedge clk) cyc++;

  initial begin
    checks = 0; failures = 0; stalls = 0; done = 0; in_valid = 0;
    for (int i = 0; i < N; i++) in_pix[i] = '0;
  end

  always @(posedge clk) if (rst_n && in_valid && !in_ready) stalls++;

  always @(negedge clk) if (rst_n) begin
    if (overflow) begin
      checks++; failures++;
      $display("FAIL T%0d overflow", TAPS);
    end
    if (out_valid) begin
      for (int i = 0; i < N; i++) begin
        longint e;
        e = exp_q.pop_front();
        checks++;
        if (longint'(out_row[i]) != e) begin
          failures++;
          if (failures < 10)
            $display("FAIL T%0d vol %0d line %0d [%0d] got %0d exp %0d", TAPS, nvols, nlines, i, out_row[i], e);
        end
      end
      nlines++;
      if (nlines == N*N) begin
        nlines = 0;
        nvols++;
        vol_end.push_back(cyc);
      end
    end
  end

  function automatic int pixel(int v, int z, int y, int x);
    int d2;
    case (v)
      0: begin
        d2 = (2*x - N) * (2*x - N) + (2*y - N) * (2*y - N) + (2*z - N) * (2*z - N);
        return (d2 < N*N) ? 200 - (d2 * 150) / (N*N) : 12;
      end
      1: return (1 << IW) - 1;
      default: return int'($urandom_range(0, (1 << IW) - 1));
    endcase
  endfunction

  initial begin
    @(posedge rst_n);
    @(negedge clk);
    for (int v = 0; v < VOLS; v++) begin
      longint vol[], w[];
      vol = new[N*N*N];
      for (int z = 0; z < N; z++) for (int y = 0; y < N; y++) for (int x = 0; x < N; x++)
        vol[(z*N + y)*N + x] = longint'(pixel(v, z, y, x));
      ref_3d(TAPS, STAGES, N, vol, w);
      for (int i = 0; i < N*N*N; i++) exp_q.push_back(w[i]);
      for (int l = 0; l < N*N; l++) begin
        if (v == 1 && l == N) begin
          in_valid = 0;
          repeat (3 * PERIOD) @(negedge clk);
        end
        for (int x = 0; x < N; x++) in_pix[x] = IW'(vol[l*N + x]);
        in_valid = 1;
        do @(posedge clk); while (!in_ready);
        #1 in_valid = 0;
      end
    end
    wait (nvols == VOLS);
    if (VOLS >= 3) begin
      checks++;
      if (vol_end[VOLS-1] - vol_end[VOLS-2] != N*N*PERIOD) begin
        failures++;
        $display("FAIL T%0d volume interval %0d exp %0d", TAPS, vol_end[VOLS-1] - vol_end[VOLS-2], N*N*PERIOD);
      end
    end
    checks++;
    if (exp_q.size() != 0) begin failures++; $display("FAIL T%0d leftover", TAPS); end
    repeat (PERIOD * 4) @(negedge clk);
    done = 1;
  end
endmodule
