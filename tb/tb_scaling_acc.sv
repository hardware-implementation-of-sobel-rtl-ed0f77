// tb_scaling_acc: self-checking test of the scaling accumulator.
// For random sequences of eight ROM words F_0..F_7 (least significant
// plane first) it clears the accumulator, accumulates the planes with the
// last one subtracted, and compares acc with
// sum_{j<7} F_j 2^j - F_7 2^7. Idle clocks between planes must hold acc,
// and a clear together with lacc must win.
module tb_scaling_acc;
  import da_pkg::*;
  localparam int unsigned ACC_W = ROM_W + PIX_W;

  logic clk = 1'b0, rst_n = 1'b0, clacc = 1'b0, lacc = 1'b0, sa_sub = 1'b0;
  logic signed [ROM_W-1:0] f = '0;
  logic signed [ACC_W-1:0] acc;
  int checks = 0, failures = 0;

  scaling_acc #(.ACC_W(ACC_W)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int fs [PIX_W];
    int expv;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    for (int t = 0; t < 2000; t++) begin
      expv = 0;
      for (int j = 0; j < int'(PIX_W); j++) begin
        // extremes often, to reach the widest intermediate values
        case ($urandom_range(3))
          0: fs[j] = -128;
          1: fs[j] = 127;
          default: fs[j] = int'($urandom_range(255)) - 128;
        endcase
        expv += (j == int'(PIX_W) - 1) ? -(fs[j] << j) : (fs[j] << j);
      end
      @(negedge clk);
      clacc = 1'b1; lacc = ($urandom_range(1) == 1); f = 8'sd99;
      @(negedge clk);
      clacc = 1'b0; lacc = 1'b0;
      checks++;
      if (acc !== '0) failures++;
      for (int j = 0; j < int'(PIX_W); j++) begin
        repeat ($urandom_range(1)) @(negedge clk);
        f = ROM_W'(fs[j]);
        lacc = 1'b1;
        sa_sub = (j == int'(PIX_W) - 1);
        @(negedge clk);
        lacc = 1'b0; sa_sub = 1'b0; f = ROM_W'($urandom);
      end
      checks++;
      if (int'(acc) != expv) begin
        failures++;
        if (failures < 10) $display("t=%0d acc=%0d exp=%0d", t, acc, expv);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
