// tb_frame_manager: self-checking test of the 3x3 window arrangement.
// Feeds a random raster stream with irregular lr_img strobes into a frame
// manager with a short line and checks, after each strobe, every window
// entry win[k][l] against stream sample s - k*LINE - l.
module tb_frame_manager;
  import da_pkg::*;
  localparam int unsigned LINE = 16;

  logic clk = 1'b0, rst_n = 1'b0, lr_img = 1'b0;
  pix_t pix_in = '0;
  win_t win;
  int checks = 0, failures = 0;
  pix_t stream [$];

  frame_manager #(.LINE(LINE)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    for (int i = 0; i < 20 * LINE; i++) begin
      @(negedge clk);
      lr_img = ($urandom_range(2) != 0);
      pix_in = pix_t'($urandom);
      @(posedge clk);
      if (lr_img) stream.push_back(pix_in);
      #1;
      if (lr_img && stream.size() >= 2 * LINE + 3) begin
        int s;
        s = stream.size() - 1;
        for (int k = 0; k < 3; k++)
          for (int l = 0; l < 3; l++) begin
            checks++;
            if (win[k][l] !== stream[s - k * LINE - l]) begin
              failures++;
              if (failures < 10)
                $display("s=%0d win[%0d][%0d]=%h exp=%h", s, k, l, win[k][l],
                         stream[s - k * LINE - l]);
            end
          end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
