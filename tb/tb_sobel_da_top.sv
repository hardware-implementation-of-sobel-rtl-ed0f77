// tb_sobel_da_top: end-to-end test of the Sobel distributed arithmetic
// edge detector at its full size: one 256x256 grey-scale frame.
//
// The frame is generated here: the top half is a checkerboard of 32x32
// squares (grey levels 30 and 220), the bottom-left quarter a horizontal
// ramp, the bottom-right quarter random noise. It is fed in raster order,
// one pixel per pix_take, followed by two padding pixels so that the
// result of the last frame pixel comes out. For every pixel whose window
// lies within the stream, the test computes both Sobel sums directly from
// the mask tables, divides by 8 (rounding down), forms floor(sqrt) of the
// sum of squares and the thresholded edge bit, and compares them with
// y_ver, y_hor, mag and edge_o. It checks that each result appears 20
// clocks after its pixel was taken and that pixels are taken every 10
// clocks. It also counts the mechanisms the design relies on and fails
// if one never occurred: negative and positive results in both channels,
// windows with the pixel sign bit set and clear, edge and non-edge
// outputs, and line-delay wrap-arounds.
module tb_sobel_da_top;
  import da_pkg::*;

  localparam int W = int'(IMG_W);
  localparam int H = 256;
  localparam int N = W * H + 2;
  localparam int LATENCY = 20;
  localparam logic [OUT_W-1:0] THR = 8'd40;

  logic clk = 1'b0, rst_n = 1'b0;
  pix_t pix_in = '0;
  logic pix_take;
  logic [OUT_W-1:0] thr = THR;
  logic signed [OUT_W-1:0] y_ver, y_hor;
  logic y_valid;
  logic [OUT_W-1:0] mag;
  logic edge_o, mag_valid;

  sobel_da_top dut (.*);

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  int cyc = 0;
  pix_t img [N];
  int take_cyc [N];
  int n_taken = 0, n_out = 0, n_mag = 0;
  int exp_v [N], exp_h [N];

  // mechanism counters
  int n_neg_v = 0, n_pos_v = 0, n_neg_h = 0, n_pos_h = 0;
  int n_edge = 0, n_flat = 0, n_bright = 0, n_dark = 0, n_wrap = 0;

  int hv [3][3] = '{'{-1, -2, -1}, '{0, 0, 0}, '{1, 2, 1}};
  int hh [3][3] = '{'{-1, 0, 1}, '{-2, 0, 2}, '{-1, 0, 1}};

  function automatic int floor_div8(int v);
    return (v >= 0) ? v / 8 : -((-v + 7) / 8);
  endfunction

  function automatic int isqrt(int s);
    int r = 0;
    while ((r + 1) * (r + 1) <= s) r++;
    return r;
  endfunction

  task automatic fail(string msg);
    failures++;
    if (failures < 12) $display("FAIL: %s", msg);
  endtask

  initial begin
    repeat (N * int'(PERIOD) + 2000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // image and reference
  initial begin
    for (int m = 0; m < H; m++)
      for (int n = 0; n < W; n++) begin
        int v;
        if (m < H / 2)      v = (((m / 32) + (n / 32)) % 2 != 0) ? 220 : 30;
        else if (n < W / 2) v = 2 * n;
        else                v = int'($urandom_range(255));
        img[m * W + n] = pix_t'(v);
      end
    img[N-2] = '0;
    img[N-1] = '0;
    for (int s = 0; s < N; s++) begin
      int sv, sh;
      sv = 0;
      sh = 0;
      if (s >= 2 * W + 2) begin
        for (int k = 0; k < 3; k++)
          for (int l = 0; l < 3; l++) begin
            int p;
            p = int'(img[s - k * W - l]);
            sv += hv[k][l] * p;
            sh += hh[k][l] * p;
          end
      end
      exp_v[s] = floor_div8(sv);
      exp_h[s] = floor_div8(sh);
    end
  end

  always @(posedge clk) cyc <= cyc + 1;

  // pixel source
  always @(negedge clk) pix_in <= (n_taken < N) ? img[n_taken] : '0;
  always @(posedge clk) begin
    if (rst_n && pix_take && n_taken < N) begin
      if (n_taken > 0 && cyc - take_cyc[n_taken - 1] != int'(PERIOD)) begin
        checks++;
        fail($sformatf("pixel %0d taken %0d clocks after the previous one",
                       n_taken, cyc - take_cyc[n_taken - 1]));
      end else if (n_taken > 0) checks++;
      take_cyc[n_taken] = cyc;
      if (img[n_taken][PIX_W-1]) n_bright++; else n_dark++;
      if (n_taken % W == W - 1) n_wrap++;
      n_taken++;
    end
  end

  // gradient outputs
  always @(posedge clk) begin
    if (rst_n && y_valid && n_out < N) begin
      int s;
      s = n_out;
      checks++;
      if (cyc - take_cyc[s] != LATENCY)
        fail($sformatf("result %0d after %0d clocks", s, cyc - take_cyc[s]));
      if (s >= 2 * W + 2) begin
        checks += 2;
        if (int'(y_ver) != exp_v[s])
          fail($sformatf("pixel %0d y_ver=%0d exp=%0d", s, y_ver, exp_v[s]));
        if (int'(y_hor) != exp_h[s])
          fail($sformatf("pixel %0d y_hor=%0d exp=%0d", s, y_hor, exp_h[s]));
        if (y_ver < 0) n_neg_v++; else if (y_ver > 0) n_pos_v++;
        if (y_hor < 0) n_neg_h++; else if (y_hor > 0) n_pos_h++;
      end
      n_out++;
    end
  end

  // combined magnitude and threshold, one clock later
  always @(posedge clk) begin
    if (rst_n && mag_valid && n_mag < N) begin
      int s, r;
      s = n_mag;
      if (s >= 2 * W + 2) begin
        r = isqrt(exp_v[s] * exp_v[s] + exp_h[s] * exp_h[s]);
        checks += 2;
        if (int'(mag) != r) fail($sformatf("pixel %0d mag=%0d exp=%0d", s, mag, r));
        if (edge_o !== (r > int'(THR))) fail($sformatf("pixel %0d edge", s));
        if (edge_o) n_edge++; else n_flat++;
      end
      n_mag++;
    end
  end

  initial begin
    repeat (3) @(posedge clk);
    #1 rst_n = 1'b1;
    wait (n_mag == N);
    repeat (5) @(posedge clk);
    checks += 3;
    if (n_taken != N) fail("not all pixels taken");
    if (n_out != N) fail("not all results produced");
    if (n_mag != N) fail("not all magnitudes produced");
    $display("mechanisms: neg_ver=%0d pos_ver=%0d neg_hor=%0d pos_hor=%0d",
             n_neg_v, n_pos_v, n_neg_h, n_pos_h);
    $display("            edge=%0d flat=%0d msb_set=%0d msb_clear=%0d line_wraps=%0d",
             n_edge, n_flat, n_bright, n_dark, n_wrap);
    checks += 9;
    if (n_neg_v == 0) fail("no negative vertical gradient");
    if (n_pos_v == 0) fail("no positive vertical gradient");
    if (n_neg_h == 0) fail("no negative horizontal gradient");
    if (n_pos_h == 0) fail("no positive horizontal gradient");
    if (n_edge == 0)  fail("no edge output");
    if (n_flat == 0)  fail("no non-edge output");
    if (n_bright == 0) fail("no pixel with the top bit set");
    if (n_dark == 0)  fail("no pixel with the top bit clear");
    if (n_wrap < 2)   fail("line delays did not wrap");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
