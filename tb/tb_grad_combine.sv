// tb_grad_combine: self-checking test of gradient combining and threshold.
// Applies every pair of 8-bit signed gradients (65536 pairs) with a random
// threshold and checks mag = floor(sqrt(yv^2 + yh^2)) (reference: r with
// r^2 <= s < (r+1)^2) and edge = mag > thr, one clock after valid_in.
module tb_grad_combine;
  import da_pkg::*;

  logic clk = 1'b0, rst_n = 1'b0, valid_in = 1'b0;
  logic signed [OUT_W-1:0] yv = '0, yh = '0;
  logic [OUT_W-1:0] thr = '0, mag;
  logic edge_o, valid_out;
  int checks = 0, failures = 0;

  grad_combine dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int s, r;
    int n_edge, n_flat;
    n_edge = 0;
    n_flat = 0;
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    for (int a = -128; a < 128; a++)
      for (int b = -128; b < 128; b++) begin
        @(negedge clk);
        yv = OUT_W'(a); yh = OUT_W'(b);
        thr = OUT_W'($urandom_range(190));
        valid_in = 1'b1;
        s = a * a + b * b;
        r = int'($floor($sqrt(real'(s))));
        while (r * r > s) r--;
        while ((r + 1) * (r + 1) <= s) r++;
        @(negedge clk);
        valid_in = 1'b0;
        checks += 3;
        if (!valid_out) failures++;
        if (int'(mag) != r) begin
          failures++;
          if (failures < 10) $display("yv=%0d yh=%0d mag=%0d exp=%0d", a, b, mag, r);
        end
        if (edge_o !== (r > int'(thr))) failures++;
        if (edge_o) n_edge++; else n_flat++;
      end
    @(negedge clk);
    checks++;
    if (valid_out) failures++;
    checks++;
    if (n_edge == 0 || n_flat == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
