// tb_control_unit: self-checking test of the strobe sequence.
// Runs 60 pixel periods after reset and checks, clock by clock, the
// strobes against the expected schedule: lr at phase 0, lr_img and clacc
// at phase 1, lacc at phases 2..9 with sa_sub at phase 9, ld_out from the
// third period on. It also checks the period (10 clocks between lr_img
// strobes) and the count of strobes per period.
module tb_control_unit;
  import da_pkg::*;

  logic clk = 1'b0, rst_n = 1'b0;
  ctrl_t ctrl;
  int checks = 0, failures = 0;

  control_unit dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    ctrl_t e;
    int last_img, n_lacc;
    last_img = -1;
    n_lacc = 0;
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    for (int c = 0; c < 60 * int'(PERIOD); c++) begin
      int ph, per;
      ph  = c % int'(PERIOD);
      per = c / int'(PERIOD);
      e = '0;
      e.lr     = (ph == 0);
      e.ld_out = (ph == 0) && (per >= 2);
      e.lr_img = (ph == 1);
      e.clacc  = (ph == 1);
      e.lacc   = (ph >= 2);
      e.sa_sub = (ph == int'(PERIOD) - 1);
      checks++;
      if (ctrl !== e) begin
        failures++;
        if (failures < 10) $display("clock %0d: ctrl=%b exp=%b", c, ctrl, e);
      end
      if (ctrl.lacc) n_lacc++;
      if (ctrl.lr_img) begin
        if (last_img >= 0) begin
          checks += 2;
          if (c - last_img != int'(PERIOD)) failures++;
          if (n_lacc != int'(PIX_W)) failures++;
        end
        last_img = c;
        n_lacc = 0;
      end
      @(negedge clk);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
