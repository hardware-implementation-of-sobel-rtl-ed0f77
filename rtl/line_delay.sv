// line_delay: a delay of DEPTH samples for a pixel stream, built from a
// RAM instead of a chain of registers.
//
// One address counter walks the RAM and wraps at DEPTH. The read port is
// asynchronous: q always shows the word at the counter, which is the
// sample written DEPTH advances ago. On a clock edge with en high the
// input d is written over that word and the counter moves on, so q then
// shows the next oldest sample. With DEPTH equal to the image width, q is
// the pixel one line above d.
//
// Following the design, the delay of 256 steps is a RAM with a wrapping
// address rather than 256 registers. The asynchronous read and the reset of
// the address counter only (the RAM itself is not cleared) are choices of
// this implementation; the first DEPTH outputs after reset are the RAM's
// power-up contents.
module line_delay #(
  parameter int unsigned DEPTH = 256,
  parameter int unsigned WIDTH = 8
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             en,
  input  logic [WIDTH-1:0] d,
  output logic [WIDTH-1:0] q
);
  localparam int unsigned AW = (DEPTH > 1) ? $clog2(DEPTH) : 1;

  logic [WIDTH-1:0] mem [DEPTH];
  logic [AW-1:0]    ptr;

  assign q = mem[ptr];

  always_ff @(posedge clk) begin
    if (en) mem[ptr] <= d;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)                          ptr <= '0;
    else if (en && ptr == AW'(DEPTH - 1)) ptr <= '0;
    else if (en)                          ptr <= ptr + 1'b1;
  end

endmodule
