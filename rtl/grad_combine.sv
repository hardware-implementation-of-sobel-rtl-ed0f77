// grad_combine: combines the vertical and horizontal gradient samples into
// an edge magnitude and applies a threshold.
//
// mag = floor(sqrt(yv^2 + yh^2)), the Euclidean combination of the two
// gradients, and edge = (mag > thr), the two-level edge image. The square
// root is a restoring digit-by-digit square root over the 2*OUT_W-bit sum,
// unrolled into combinational logic; the result is registered, so mag and
// edge appear, with valid_out, one clock after valid_in. For 8-bit signed
// gradients mag is at most 181 and always fits OUT_W bits.
// The combining formula and the threshold follow the design; the
// register stage, the strict comparison and a threshold input set at run
// time are this implementation's.
module grad_combine
  import da_pkg::*;
(
  input  logic                    clk,
  input  logic                    rst_n,
  input  logic                    valid_in,
  input  logic signed [OUT_W-1:0] yv,
  input  logic signed [OUT_W-1:0] yh,
  input  logic [OUT_W-1:0]        thr,
  output logic [OUT_W-1:0]        mag,
  output logic                    edge_o,
  output logic                    valid_out
);
  localparam int unsigned SW = 2 * OUT_W;  // width of yv^2 + yh^2
  localparam int unsigned RW = OUT_W;      // width of its square root

  logic [SW-1:0] sumsq;
  logic [RW-1:0] root;

  always_comb begin
    sumsq = SW'(yv * yv) + SW'(yh * yh);
  end

  // Restoring square root: one result bit per step, most significant first.
  always_comb begin
    logic [SW-1:0]   rem;
    logic [RW-1:0]   r;
    logic [SW+1:0]   trial;
    rem = sumsq;
    r   = '0;
    for (int i = int'(RW) - 1; i >= 0; i--) begin
      // (r + 2^i)^2 - r^2 = r * 2^(i+1) + 2^(2i)
      trial = ((SW+2)'(r) << (i + 1)) + ((SW+2)'(1) << (2 * i));
      if ((SW+2)'(rem) >= trial) begin
        rem  = SW'((SW+2)'(rem) - trial);
        r[i] = 1'b1;
      end
    end
    root = r;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      mag       <= '0;
      edge_o    <= 1'b0;
      valid_out <= 1'b0;
    end else begin
      valid_out <= valid_in;
      if (valid_in) begin
        mag    <= root;
        edge_o <= (root > thr);
      end
    end
  end

endmodule
