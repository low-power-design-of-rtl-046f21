// bf_pe: processing element, the weight and weighted pixel of one tap.
//
// A five-stage pipeline, one stage per step of the processing element:
//   1 difference  D = centre - neighbour (9-bit signed)
//   2 absolute    |D|
//   3 range weight Wr = LUT[|D|] (approximate range Gaussian)
//   4 combined weight W = round(Ws * Wr / 256), Ws the tap's spatial weight
//   5 product     W * neighbour
// Outputs `w` and `wi` belong to the window that entered five `clk` edges
// earlier. Every stage advances on every rising edge of `clk`, which is the
// pipeline's gated clock; validity travels alongside in the output unit, so
// the pipeline registers need no reset. The range LUT is written on `lut_clk`.
// The stages follow the processing element as described; the widths and the
// rounding of the weight product are this design's choices. Summing the
// products of all taps (the accumulation step) is done by the shared MAC
// unit that follows the PE array.
module bf_pe
  import bf_pkg::*;
(
  input  logic    clk,
  input  logic    lut_clk,
  input  logic    lut_we,
  input  pixel_t  lut_addr,
  input  weight_t lut_data,
  input  pixel_t  center,
  input  pixel_t  neighbor,
  input  weight_t ws,
  output weight_t w,
  output wprod_t  wi
);

  // Stage 1: difference
  logic signed [PIX_W:0] d1;
  pixel_t  nb1;
  weight_t ws1;
  // Stage 2: absolute value
  pixel_t  ad2;
  pixel_t  nb2;
  weight_t ws2;
  // Stage 3: range weight (LUT output register)
  weight_t wr3;
  pixel_t  nb3;
  weight_t ws3;
  // Stage 4: combined weight
  weight_t w4;
  pixel_t  nb4;

  // Rounded product of the two weights, kept at WGT_W bits.
  weight_t wprod;
  assign wprod = WGT_W'(((2*WGT_W)'(ws3) * (2*WGT_W)'(wr3) + (2*WGT_W)'(1 << (WGT_W - 1))) >> WGT_W);

  always_ff @(posedge clk) begin
    d1  <= $signed({1'b0, center}) - $signed({1'b0, neighbor});
    nb1 <= neighbor;
    ws1 <= ws;

    ad2 <= d1[PIX_W] ? PIX_W'(-d1) : d1[PIX_W-1:0];
    nb2 <= nb1;
    ws2 <= ws1;

    nb3 <= nb2;
    ws3 <= ws2;

    w4  <= wprod;
    nb4 <= nb3;

    w   <= w4;
    wi  <= w4 * nb4;
  end

  bf_range_lut u_lut (
    .wclk (lut_clk),
    .we   (lut_we),
    .waddr(lut_addr),
    .wdata(lut_data),
    .rclk (clk),
    .ren  (1'b1),
    .raddr(ad2),
    .rdata(wr3)
  );

endmodule
