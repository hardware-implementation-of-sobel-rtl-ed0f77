// sobel_da_top: Sobel edge detector for 256-pixel-wide grey-scale images,
// built as two multiplierless distributed arithmetic (DA) 3x3 filters that
// share one frame manager and one PISO bank.
//
// Data flow, one pixel every PERIOD = 10 clocks:
//   pix_in -> frame_manager (input buffer, PIPO column shift, two 256-sample
//   line delays) -> 3x3 window -> piso_bank (nine shift registers, one bit
//   plane per clock) -> 9-bit address -> da_rom (vertical mask) and da_rom
//   (horizontal mask) -> scaling_acc (shift-add, sign plane subtracted) ->
//   out_buffer (8-bit samples y_ver, y_hor) -> grad_combine (magnitude and
//   threshold).
//   control_unit sequences lr, lr_img, clacc, lacc and s/a.
//
// Interface and timing:
//   pix_take  high for one clock when pix_in is sampled (lr_img). The pixel
//             source must hold pix_in valid in that cycle; pixels enter in
//             raster order, one line of IMG_W pixels after another.
//   y_ver, y_hor, y_valid
//             8-bit signed gradients (the filter sum divided by 8);
//             y_valid pulses once per pixel. The result of the pixel taken
//             at one pix_take appears with the y_valid 20 clocks later,
//             i.e. two pixel periods after the pixel was taken.
//             The first 2*IMG_W+2 results after reset have windows that
//             reach back before the first pixel and are not meaningful.
//   mag, edge_o, mag_valid
//             gradient magnitude sqrt(y_ver^2 + y_hor^2) and edge = mag > thr,
//             one clock after y_valid.
//   The window is x(m-k, n-l), k, l = 0..2, for the pixel x(m,n) taken last,
//   and the output is the convolution sum h(k,l) x(m-k,n-l); it therefore
//   belongs to the image position (m-1, n-1), the window centre.
//
// The structure (one PISO bank feeding two ROMs, two scaling accumulators,
// two 8-bit outputs) follows the design. The reset, the pix_take and valid
// handshake, the 10-clock schedule and the on-chip gradient combining stage
// are this implementation's choices; y_ver and y_hor remain available on
// their own ports.
module sobel_da_top
  import da_pkg::*;
#(
  parameter int unsigned LINE  = IMG_W,
  parameter mask_t       H_VER = SOBEL_VER,
  parameter mask_t       H_HOR = SOBEL_HOR
) (
  input  logic                    clk,
  input  logic                    rst_n,
  input  pix_t                    pix_in,
  output logic                    pix_take,
  input  logic [OUT_W-1:0]        thr,
  output logic signed [OUT_W-1:0] y_ver,
  output logic signed [OUT_W-1:0] y_hor,
  output logic                    y_valid,
  output logic [OUT_W-1:0]        mag,
  output logic                    edge_o,
  output logic                    mag_valid
);
  localparam int unsigned ACC_W = ROM_W + PIX_W;

  ctrl_t                   ctrl;
  win_t                    win;
  logic [ADDR_W-1:0]       addr;
  logic signed [ROM_W-1:0] f_ver, f_hor;
  logic signed [ACC_W-1:0] acc_ver, acc_hor;
  logic                    valid_hor;

  control_unit u_ctrl (.clk, .rst_n, .ctrl);

  assign pix_take = ctrl.lr_img;

  frame_manager #(.LINE(LINE)) u_fm (
    .clk, .rst_n, .lr_img(ctrl.lr_img), .pix_in, .win
  );

  piso_bank u_piso (
    .clk, .rst_n, .lr(ctrl.lr), .shift(ctrl.lacc), .win, .addr
  );

  da_rom #(.H(H_VER)) u_rom_ver (.addr, .q(f_ver));
  da_rom #(.H(H_HOR)) u_rom_hor (.addr, .q(f_hor));

  scaling_acc #(.ACC_W(ACC_W)) u_acc_ver (
    .clk, .rst_n, .clacc(ctrl.clacc), .lacc(ctrl.lacc), .sa_sub(ctrl.sa_sub),
    .f(f_ver), .acc(acc_ver)
  );
  scaling_acc #(.ACC_W(ACC_W)) u_acc_hor (
    .clk, .rst_n, .clacc(ctrl.clacc), .lacc(ctrl.lacc), .sa_sub(ctrl.sa_sub),
    .f(f_hor), .acc(acc_hor)
  );

  out_buffer #(.ACC_W(ACC_W)) u_out_ver (
    .clk, .rst_n, .load(ctrl.ld_out), .acc(acc_ver), .y(y_ver), .valid(y_valid)
  );
  out_buffer #(.ACC_W(ACC_W)) u_out_hor (
    .clk, .rst_n, .load(ctrl.ld_out), .acc(acc_hor), .y(y_hor), .valid(valid_hor)
  );

  grad_combine u_grad (
    .clk, .rst_n, .valid_in(y_valid), .yv(y_ver), .yh(y_hor), .thr,
    .mag, .edge_o, .valid_out(mag_valid)
  );

  // Both channels are loaded by the same strobe.
  assert property (@(posedge clk) disable iff (!rst_n) y_valid == valid_hor);
  // The accumulator is never asked to clear and accumulate at once.
  assert property (@(posedge clk) disable iff (!rst_n) !(ctrl.clacc && ctrl.lacc));

endmodule
