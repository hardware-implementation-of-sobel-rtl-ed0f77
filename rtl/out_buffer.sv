// out_buffer: output register of one filter channel.
//
// On load it takes the full-precision accumulator value, divides it by
// 2^SHIFT (arithmetic shift, rounding towards minus infinity) and
// saturates it to an OUT_W-bit two's complement sample. valid is high for
// the one cycle after each load. With the Sobel masks and 8-bit pixels the
// result lies in -1020..1020, so the default SHIFT of 3 fits it into
// 8 bits without saturating. The 8-bit width of each output follows the
// design; the choice of which accumulator bits form it is this
// implementation's.
module out_buffer
  import da_pkg::*;
#(
  parameter int unsigned ACC_W = ROM_W + PIX_W,
  parameter int unsigned SHIFT = 3
) (
  input  logic                    clk,
  input  logic                    rst_n,
  input  logic                    load,
  input  logic signed [ACC_W-1:0] acc,
  output logic signed [OUT_W-1:0] y,
  output logic                    valid
);
  localparam logic signed [ACC_W-1:0] MAXV = ACC_W'((1 << (OUT_W - 1)) - 1);
  localparam logic signed [ACC_W-1:0] MINV = -ACC_W'(1 << (OUT_W - 1));

  logic signed [ACC_W-1:0] scaled;
  logic signed [OUT_W-1:0] sat;

  always_comb begin
    scaled = acc >>> SHIFT;
    if (scaled > MAXV)      sat = MAXV[OUT_W-1:0];
    else if (scaled < MINV) sat = MINV[OUT_W-1:0];
    else                    sat = scaled[OUT_W-1:0];
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      y     <= '0;
      valid <= 1'b0;
    end else begin
      valid <= load;
      if (load) y <= sat;
    end
  end

endmodule
