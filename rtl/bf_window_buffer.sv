// bf_window_buffer: sliding WIN x WIN windows over a raster-scanned image.
//
// Four line FIFOs in a chain each delay the stream by one image line, and
// five register rows hold the newest pixels of the current line and of the
// four lines above it, as in the buffer drawn for the architecture. A shift
// takes LANES horizontally adjacent pixels at once (din[0] leftmost). Each
// register row is WIN-1+LANES pixels wide: a shift moves it left by LANES
// and appends the new group, and each FIFO (LANES pixels wide, IMG_W/LANES
// groups deep) feeds the row above with the group one line up.
// After a shift whose group starts at (x, y), `win[l]` holds, row-major,
// the pixels (x+l-4..x+l, y-4..y): tap 0 is the top-left pixel, tap NTAP-1
// the newest pixel of lane l and tap NTAP/2 its centre (x+l-2, y-2). A
// window is valid only once it lies inside the image; the control unit
// tracks that. `clk` is the buffer's gated clock; `shift` is the enable.
// With LANES = 1 this is the structure of the source; wider groups are this
// design's way of processing several pixels per clock. IMG_W must be a
// multiple of LANES.
module bf_window_buffer
  import bf_pkg::*;
#(
  parameter int unsigned IMG_W = 512,
  parameter int unsigned LANES = 1
) (
  input  logic   clk,
  input  logic   rst_n,
  input  logic   shift,
  input  pixel_t din [LANES],
  output pixel_t win [LANES][NTAP]
);

  localparam int unsigned RW = WIN - 1 + LANES;   // register row width
  localparam int unsigned GW = LANES * PIX_W;     // group width in bits

  logic [GW-1:0] row_in [WIN];   // group entering each row, row 0 = top
  pixel_t        regs [WIN][RW];

  always_comb begin
    for (int l = 0; l < LANES; l++) row_in[WIN-1][l*PIX_W +: PIX_W] = din[l];
  end

  for (genvar r = 0; r < WIN - 1; r++) begin : g_fifo
    // FIFO r feeds row WIN-2-r from the row input below it.
    bf_line_fifo #(.WIDTH(GW), .DEPTH(IMG_W / LANES)) u_fifo (
      .clk  (clk),
      .rst_n(rst_n),
      .shift(shift),
      .din  (row_in[WIN-1-r]),
      .dout (row_in[WIN-2-r])
    );
  end

  always_ff @(posedge clk) begin
    if (shift) begin
      for (int r = 0; r < WIN; r++) begin
        for (int c = 0; c < WIN - 1; c++) regs[r][c] <= regs[r][c+LANES];
        for (int l = 0; l < LANES; l++) regs[r][WIN-1+l] <= row_in[r][l*PIX_W +: PIX_W];
      end
    end
  end

  always_comb begin
    for (int l = 0; l < LANES; l++)
      for (int r = 0; r < WIN; r++)
        for (int c = 0; c < WIN; c++) win[l][r*WIN + c] = regs[r][c + l];
  end

endmodule
