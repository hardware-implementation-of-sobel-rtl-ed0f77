// frame_manager: arranges a raster-scanned pixel stream into the 3x3
// neighbourhood the filter needs.
//
// The incoming pixel x(m,n) and the outputs of two cascaded one-line delays,
// x(m-1,n) and x(m-2,n), form one image column. On every lr_img strobe that
// column is loaded into the input buffer (the n column of the window) while
// the previous buffer column moves to n-1 and that one to n-2, a two-stage
// parallel-in parallel-out shift per row. After the strobe for pixel s of
// the stream, win[k][l] holds stream sample s - k*LINE - l.
//
// Interface: pix_in is sampled on the clock edge where lr_img is high; win
// is a register output, valid from the edge after that strobe until the
// next strobe. The buffer, PIPO column shift and RAM line delays follow
// the design's frame manager; the rest is this implementation's choice.
// No border handling is done: near the top and left image
// edges the window contains pixels of the previous line or frame, as a pure
// raster delay line gives. The window registers reset to zero.
module frame_manager
  import da_pkg::*;
#(
  parameter int unsigned LINE = IMG_W
) (
  input  logic clk,
  input  logic rst_n,
  input  logic lr_img,
  input  pix_t pix_in,
  output win_t win
);
  pix_t row1, row2;  // x(m-1,n), x(m-2,n)

  line_delay #(.DEPTH(LINE), .WIDTH(PIX_W)) u_line1 (
    .clk, .rst_n, .en(lr_img), .d(pix_in), .q(row1)
  );
  line_delay #(.DEPTH(LINE), .WIDTH(PIX_W)) u_line2 (
    .clk, .rst_n, .en(lr_img), .d(row1), .q(row2)
  );

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      win <= '0;
    end else if (lr_img) begin
      win[0][0] <= pix_in;
      win[1][0] <= row1;
      win[2][0] <= row2;
      for (int k = 0; k < 3; k++) begin
        win[k][1] <= win[k][0];
        win[k][2] <= win[k][1];
      end
    end
  end

endmodule
