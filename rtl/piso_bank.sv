// piso_bank: nine parallel-in serial-out shift registers that turn the
// 3x3 pixel window into a sequence of 9-bit ROM addresses, one per bit
// plane.
//
// On lr the nine window pixels are loaded. While shift is high each
// register moves right by one bit per clock, so the bits leave least
// significant first and the sign bit, the eighth, leaves last. The current
// output bit of the register for x(m-k,n-l) drives address bit 8-(3k+l),
// which places h(0,0) on the most significant address bit.
//
// The pixels of the input image are unsigned grey levels (0..255) while the
// arithmetic treats every word as two's complement. With FLIP_MSB set the
// top bit is inverted on loading, which maps a grey level p to p-128. The
// Sobel masks sum to zero, so this offset leaves the filter output exact.
// The offset step is this implementation's choice; the bit order and the
// subtraction of the last (sign) plane follow the design.
module piso_bank
  import da_pkg::*;
#(
  parameter bit FLIP_MSB = 1'b1
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              lr,     // load the window
  input  logic              shift,  // advance one bit plane
  input  win_t              win,
  output logic [ADDR_W-1:0] addr    // current bit plane, h(2,2) on bit 0
);
  pix_t sr [TAPS];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int f = 0; f < int'(TAPS); f++) sr[f] <= '0;
    end else if (lr) begin
      for (int k = 0; k < 3; k++)
        for (int l = 0; l < 3; l++)
          sr[3*k+l] <= win[k][l] ^ {FLIP_MSB, {(PIX_W-1){1'b0}}};
    end else if (shift) begin
      for (int f = 0; f < int'(TAPS); f++) sr[f] <= sr[f] >> 1;
    end
  end

  always_comb begin
    for (int f = 0; f < int'(TAPS); f++) addr[TAPS-1-f] = sr[f][0];
  end

endmodule
