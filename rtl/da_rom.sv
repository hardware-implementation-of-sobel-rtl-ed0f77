// da_rom: the 512-word partial-product memory of one distributed
// arithmetic channel.
//
// Word a holds F(a) = sum of the coefficients h(k,l) whose address bit
// 8-(3k+l) is set, stored as an ROM_W-bit two's complement number. The
// contents are computed from the coefficient parameter H when the memory
// is initialised, so any 3x3 mask whose partial sums fit ROM_W bits can be
// used; the two Sobel masks need only -4..4. The 512 x 8-bit size, the
// contents (partial sums of the coefficients) and the address order follow
// the design; filling the memory from a parameter is this implementation's. Reading is asynchronous: q
// follows addr in the same cycle, ready for the accumulator.
module da_rom
  import da_pkg::*;
#(
  parameter mask_t H = SOBEL_VER
) (
  input  logic [ADDR_W-1:0]       addr,
  output logic signed [ROM_W-1:0] q
);
  localparam int unsigned WORDS = 1 << ADDR_W;

  logic signed [ROM_W-1:0] rom [WORDS];

  initial begin
    for (int unsigned a = 0; a < WORDS; a++)
      rom[a] = ROM_W'(partial_product(H, a));
  end

  assign q = rom[addr];

endmodule
