// tb_piso_bank: self-checking test of the nine PISO shift registers.
// Loads random windows, then shifts out the eight bit planes (with random
// idle clocks between them) and checks each 9-bit address: bit 8-(3k+l)
// must be bit j of pixel x(m-k,n-l), top bit inverted.
module tb_piso_bank;
  import da_pkg::*;

  logic clk = 1'b0, rst_n = 1'b0, lr = 1'b0, shift = 1'b0;
  win_t win = '0;
  logic [ADDR_W-1:0] addr;
  int checks = 0, failures = 0;

  piso_bank dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    win_t w;
    logic [ADDR_W-1:0] exp_addr;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    for (int t = 0; t < 300; t++) begin
      for (int k = 0; k < 3; k++)
        for (int l = 0; l < 3; l++) w[k][l] = pix_t'($urandom);
      @(negedge clk);
      win = w; lr = 1'b1; shift = 1'b0;
      @(negedge clk);
      lr = 1'b0;
      win = '0;
      for (int j = 0; j < int'(PIX_W); j++) begin
        // idle clocks must hold the plane
        shift = 1'b0;
        repeat ($urandom_range(2)) @(negedge clk);
        for (int k = 0; k < 3; k++)
          for (int l = 0; l < 3; l++) begin
            logic [PIX_W-1:0] v;
            v = w[k][l];
            v[PIX_W-1] = ~v[PIX_W-1];
            exp_addr[8 - (3 * k + l)] = v[j];
          end
        checks++;
        if (addr !== exp_addr) begin
          failures++;
          if (failures < 10) $display("t=%0d plane %0d addr=%b exp=%b", t, j, addr, exp_addr);
        end
        shift = 1'b1;
        @(negedge clk);
      end
      shift = 1'b0;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
