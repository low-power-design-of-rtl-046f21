// bf_output_unit: output unit, pairs each filtered pixel with its position.
//
// The control unit marks every group of LANES windows that enters the
// processing pipeline with one valid bit per lane and the coordinates of
// lane 0's centre (lane l is centred at x + l). This unit carries that tag
// through a delay line of LAT stages, matching the latency of the PE array,
// the MAC unit and the divider, and then registers the tag together with
// the divider results as the output pixels. `frame_done` is high with the
// last filtered group of a frame, whose last lane is centred at
// (IMG_W-1-RAD, IMG_H-1-RAD). `busy` is high while any tag, or the output
// register, is valid: the pipeline clock must keep running until then. All registers
// advance on every rising edge of `clk`, the pipeline's gated clock.
// Only windows that lie wholly inside the image are filtered and output, so
// a frame yields (IMG_W-2*RAD) x (IMG_H-2*RAD) pixels; that border policy is
// this design's choice.
module bf_output_unit
  import bf_pkg::*;
#(
  parameter int unsigned IMG_W = 512,
  parameter int unsigned IMG_H = 512,
  parameter int unsigned LANES = 1,
  parameter int unsigned LAT   = 16
) (
  input  logic                     clk,
  input  logic                     rst_n,
  input  logic [LANES-1:0]         in_valid,
  input  logic [$clog2(IMG_W)-1:0] in_x,
  input  logic [$clog2(IMG_H)-1:0] in_y,
  input  pixel_t                   result [LANES],
  output logic [LANES-1:0]         out_valid,
  output pixel_t                   out_pixel [LANES],
  output logic [$clog2(IMG_W)-1:0] out_x,
  output logic [$clog2(IMG_H)-1:0] out_y,
  output logic                     frame_done,
  output logic                     busy
);

  localparam int unsigned XW = $clog2(IMG_W);
  localparam int unsigned YW = $clog2(IMG_H);

  typedef struct packed {
    logic [LANES-1:0] valid;
    logic [XW-1:0] x;
    logic [YW-1:0] y;
  } tag_t;

  tag_t tags [LAT];
  logic any_tag;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < LAT; i++) tags[i] <= '0;
      out_valid  <= '0;
      for (int l = 0; l < LANES; l++) out_pixel[l] <= '0;
      out_x      <= '0;
      out_y      <= '0;
      frame_done <= 1'b0;
    end else begin
      tags[0] <= '{valid: in_valid, x: in_x, y: in_y};
      for (int i = 1; i < LAT; i++) tags[i] <= tags[i-1];
      out_valid  <= tags[LAT-1].valid;
      out_pixel  <= result;
      out_x      <= tags[LAT-1].x;
      out_y      <= tags[LAT-1].y;
      frame_done <= (|tags[LAT-1].valid)
                    && tags[LAT-1].x == XW'(IMG_W - LANES - RAD)
                    && tags[LAT-1].y == YW'(IMG_H - 1 - RAD);
    end
  end

  always_comb begin
    any_tag = 1'b0;
    for (int i = 0; i < LAT; i++) any_tag |= |tags[i].valid;
  end

  assign busy = any_tag | (|out_valid);

endmodule
