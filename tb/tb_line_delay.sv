// tb_line_delay: self-checking test of the one-line RAM delay.
// Writes random samples with random gaps in the enable and checks that q
// always equals the sample written DEPTH enabled clocks before, over
// several wraps of the address counter.
module tb_line_delay;
  localparam int unsigned DEPTH = 256;
  localparam int unsigned WIDTH = 8;

  logic clk = 1'b0, rst_n = 1'b0, en = 1'b0;
  logic [WIDTH-1:0] d = '0, q;
  int checks = 0, failures = 0;
  logic [WIDTH-1:0] hist [$];

  line_delay #(.DEPTH(DEPTH), .WIDTH(WIDTH)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    for (int i = 0; i < 6 * DEPTH; i++) begin
      @(negedge clk);
      en = ($urandom_range(3) != 0);
      d  = WIDTH'($urandom);
      if (hist.size() >= DEPTH) begin
        checks++;
        if (q !== hist[hist.size() - DEPTH]) begin
          failures++;
          if (failures < 10) $display("mismatch at %0d: q=%h exp=%h", i, q, hist[hist.size()-DEPTH]);
        end
      end
      @(posedge clk);
      if (en) hist.push_back(d);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
