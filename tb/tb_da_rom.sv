// tb_da_rom: self-checking test of the partial-product ROMs.
// Reads all 512 words of the vertical and horizontal Sobel ROMs and
// compares them with sums formed from the masks written out here as 3x3
// tables; also checks the rows of the partial-product table given for
// the design (addresses 0, 1, 2, 3, 508..511).
module tb_da_rom;
  import da_pkg::*;

  logic [ADDR_W-1:0] addr = '0;
  logic signed [ROM_W-1:0] qv, qh;
  int checks = 0, failures = 0;

  // h[k][l], row k, column l
  int hv [3][3] = '{'{-1, -2, -1}, '{0, 0, 0}, '{1, 2, 1}};
  int hh [3][3] = '{'{-1, 0, 1}, '{-2, 0, 2}, '{-1, 0, 1}};

  da_rom #(.H(SOBEL_VER)) dut_v (.addr, .q(qv));
  da_rom #(.H(SOBEL_HOR)) dut_h (.addr, .q(qh));

  function automatic int ref_sum(int h [3][3], int a);
    int s = 0;
    int bitpos = 8;
    for (int k = 0; k < 3; k++)
      for (int l = 0; l < 3; l++) begin
        if (a[bitpos]) s += h[k][l];
        bitpos--;
      end
    return s;
  endfunction

  task automatic check(int got, int exp, string what);
    checks++;
    if (got != exp) begin
      failures++;
      if (failures < 10) $display("%s addr=%0d got=%0d exp=%0d", what, addr, got, exp);
    end
  endtask

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int a = 0; a < 512; a++) begin
      addr = ADDR_W'(a);
      #1;
      check(int'(qv), ref_sum(hv, a), "ver");
      check(int'(qh), ref_sum(hh, a), "hor");
    end
    // table rows: 1 -> h(2,2); 2 -> h(2,1); 3 -> h(2,1)+h(2,2)
    addr = 9'd1;   #1; check(int'(qv), hv[2][2], "row1");
    addr = 9'd2;   #1; check(int'(qv), hv[2][1], "row2");
    addr = 9'd3;   #1; check(int'(qv), hv[2][1] + hv[2][2], "row3");
    addr = 9'd508; #1; check(int'(qh), hh[0][0]+hh[0][1]+hh[0][2]+hh[1][0]+hh[1][1]+hh[1][2]+hh[2][0], "row508");
    addr = 9'd511; #1; check(int'(qh), 0, "row511");
    addr = 9'd0;   #1; check(int'(qh), 0, "row0");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
