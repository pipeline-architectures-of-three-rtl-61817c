// tb_daub_shifter: checks the wrap-around shifter.
// Two instances: a six-tap window over an 8-sample row, and a four-tap
// window over a 2-sample row (the window wraps twice). After m shifts the
// window must hold samples (2m + j) mod L of the loaded row; the test walks
// past a full rotation, reloads a new row mid-rotation, and checks that
// load wins over shift.
module tb_daub_shifter;
  import dwt_pkg::*;

  logic clk = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  sample_t rowa [8], wina [6];
  sample_t rowb [2], winb [4];
  logic loada = 0, shifta = 0, loadb = 0, shiftb = 0;

  daub_shifter #(.L(8), .WIN(6)) dut_a (.clk(clk), .load(loada), .load_row(rowa),
                                         .shift(shifta), .window(wina));
  daub_shifter #(.L(2), .WIN(4)) dut_b (.clk(clk), .load(loadb), .load_row(rowb),
                                         .shift(shiftb), .window(winb));

  sample_t ref_a [8], ref_b [2];

  task automatic check_a(int m);
    for (int j = 0; j < 6; j++) begin
      checks++;
      if (wina[j] !== ref_a[(2*m + j) % 8]) begin
        failures++;
        $display("FAIL A m=%0d j=%0d got %0d exp %0d", m, j, wina[j], ref_a[(2*m+j)%8]);
      end
    end
  endtask

  task automatic check_b();
    for (int j = 0; j < 4; j++) begin
      checks++;
      if (winb[j] !== ref_b[j % 2]) begin
        failures++;
        $display("FAIL B j=%0d got %0d exp %0d", j, winb[j], ref_b[j%2]);
      end
    end
  endtask

  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int r = 0; r < 3; r++) begin
      for (int i = 0; i < 8; i++) begin
        rowa[i] = sample_t'($urandom);
        ref_a[i] = rowa[i];
      end
      for (int i = 0; i < 2; i++) begin
        rowb[i] = sample_t'($urandom);
        ref_b[i] = rowb[i];
      end
      @(negedge clk);
      loada = 1; loadb = 1; shifta = (r == 2); shiftb = (r == 2);
      @(negedge clk);
      loada = 0; loadb = 0; shifta = 0; shiftb = 0;
      // scramble the load inputs: the register must hold its own copy
      for (int i = 0; i < 8; i++) rowa[i] = sample_t'($urandom);
      check_a(0);
      check_b();
      for (int m = 1; m <= 6 - 2*r; m++) begin
        shifta = 1; shiftb = 1;
        @(negedge clk);
        shifta = 0; shiftb = 0;
        check_a(m);
        check_b();
      end
      // hold: no shift, window must not move
      @(negedge clk);
      check_a(6 - 2*r);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
