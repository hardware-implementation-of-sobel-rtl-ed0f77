// tb_out_buffer: self-checking test of the output buffer.
// Loads random and extreme accumulator values and checks the 8-bit sample
// (value divided by 8, rounded down, saturated to -128..127), that the
// sample holds between loads, and that valid pulses once per load.
module tb_out_buffer;
  import da_pkg::*;
  localparam int unsigned ACC_W = ROM_W + PIX_W;

  logic clk = 1'b0, rst_n = 1'b0, load = 1'b0;
  logic signed [ACC_W-1:0] acc = '0;
  logic signed [OUT_W-1:0] y;
  logic valid;
  int checks = 0, failures = 0;

  out_buffer #(.ACC_W(ACC_W), .SHIFT(3)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int a, e;
    int nsat;
    logic signed [OUT_W-1:0] last;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    last = '0;
    nsat = 0;
    for (int t = 0; t < 5000; t++) begin
      case ($urandom_range(4))
        0: a = int'($urandom_range(65535)) - 32768;
        1: a = int'($urandom_range(2047)) - 1024;
        2: a = (t % 2 != 0) ? 32767 : -32768;
        default: a = int'($urandom_range(16)) - 8;
      endcase
      e = int'($floor(real'(a) / 8.0));
      if (e > 127) begin e = 127; nsat++; end
      if (e < -128) begin e = -128; nsat++; end
      @(negedge clk);
      acc = ACC_W'(a);
      load = ($urandom_range(2) != 0);
      @(negedge clk);
      checks += 2;
      if (valid !== load) failures++;
      if (load) begin
        if (int'(y) != e) begin
          failures++;
          if (failures < 10) $display("acc=%0d y=%0d exp=%0d", a, y, e);
        end
        last = y;
      end else if (y !== last) failures++;
      load = 1'b0;
    end
    checks++;
    if (nsat == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
