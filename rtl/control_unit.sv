// control_unit: sequences one pixel of the bit-serial filter.
//
// A phase counter runs 0..PERIOD-1 (PERIOD = PIX_W + 2 = 10 clocks for
// 8-bit pixels) and the strobes are decoded from it:
//   phase 0         lr      load the PISO bank with the current window and
//                           (ld_out) the output buffers with the finished
//                           result of the pixel before
//   phase 1         lr_img  take the next pixel into the frame manager
//                   clacc   clear the accumulators
//   phases 2..P-1   lacc    one bit plane per clock, least significant first
//   phase P-1       sa_sub  the sign plane is subtracted
// The order load, accumulate, subtract on the eighth bit, load result,
// clear follows the design's four-step description. The exact phases, the
// overlap of lr_img with clacc and the warm-up are this implementation's:
// ld_out is held back for the first two periods after reset, until the
// first real result has passed through the pipeline.
//
// A pixel taken at phase 1 of period p is in the PISO bank at period p+1
// and in the output buffers after phase 0 of period p+2.
module control_unit
  import da_pkg::*;
(
  input  logic  clk,
  input  logic  rst_n,
  output ctrl_t ctrl
);
  localparam int unsigned PW = $clog2(PERIOD);

  logic [PW-1:0] phase;
  logic [1:0]    warm;  // periods completed since reset, saturating at 2

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      phase <= '0;
      warm  <= '0;
    end else if (phase == PW'(PERIOD - 1)) begin
      phase <= '0;
      if (warm != 2'd2) warm <= warm + 1'b1;
    end else begin
      phase <= phase + 1'b1;
    end
  end

  always_comb begin
    ctrl        = '0;
    ctrl.lr     = (phase == '0);
    ctrl.ld_out = (phase == '0) && (warm == 2'd2);
    ctrl.lr_img = (phase == PW'(1));
    ctrl.clacc  = (phase == PW'(1));
    ctrl.lacc   = (phase >= PW'(2));
    ctrl.sa_sub = (phase == PW'(PERIOD - 1));
  end

endmodule
