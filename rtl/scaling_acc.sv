// scaling_acc: the scaling accumulator (ACC) of one distributed arithmetic
// channel.
//
// Bit planes arrive least significant first. On each lacc the accumulator
// is halved (arithmetic shift right) and the ROM word, weighted by
// 2^(PIX_W-1), is added, or subtracted when sa_sub is high for the sign
// plane. After the PIX_W planes acc holds
//   sum_{j<PIX_W-1} F_j 2^j - F_{PIX_W-1} 2^(PIX_W-1),
// the integer filter output for two's complement pixels. No bit is lost in
// the halving: after plane j the low PIX_W-1-j bits are zero. The width
// ROM_W+PIX_W holds every intermediate value. clacc clears the register
// and has priority over lacc.
module scaling_acc
  import da_pkg::*;
#(
  parameter int unsigned ACC_W = ROM_W + PIX_W
) (
  input  logic                    clk,
  input  logic                    rst_n,
  input  logic                    clacc,
  input  logic                    lacc,
  input  logic                    sa_sub,  // 1: subtract (sign plane)
  input  logic signed [ROM_W-1:0] f,       // ROM word for this plane
  output logic signed [ACC_W-1:0] acc
);
  logic signed [ACC_W-1:0] term;

  always_comb begin
    term = ACC_W'(f) <<< (PIX_W - 1);
    if (sa_sub) term = -term;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)     acc <= '0;
    else if (clacc) acc <= '0;
    else if (lacc)  acc <= (acc >>> 1) + term;
  end

endmodule
