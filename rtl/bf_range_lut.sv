// bf_range_lut: range-weight lookup table of one processing element.
//
// 256 words of 8 bits, indexed by the absolute intensity difference |D|,
// holding the approximate range weight w(D^2) built by the weight generator.
// Writes come on the generator's clock `wclk` (broadcast to every PE's
// copy); reads are synchronous on the pipeline clock `rclk`: `rdata` shows
// the word addressed at the previous read edge with `ren` high. On an FPGA
// this maps to distributed or block RAM. A table per PE follows the LUT
// drawn inside the processing element; its write port is this design's way
// of making the table reconfigurable at run time.
module bf_range_lut
  import bf_pkg::*;
(
  input  logic    wclk,
  input  logic    we,
  input  pixel_t  waddr,
  input  weight_t wdata,
  input  logic    rclk,
  input  logic    ren,
  input  pixel_t  raddr,
  output weight_t rdata
);

  weight_t mem [2**PIX_W];

  always_ff @(posedge wclk) begin
    if (we) mem[waddr] <= wdata;
  end

  always_ff @(posedge rclk) begin
    if (ren) rdata <= mem[raddr];
  end

endmodule
