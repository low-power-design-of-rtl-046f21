// bf_control: control unit, steers the pixel stream and the clock gates.
//
// Position tracking: every accepted group of LANES adjacent pixels
// (in_valid && in_ready) gets the raster position of its first pixel;
// `in_sof` marks the first group of a frame, and the position also wraps to
// (0,0) after a full IMG_W x IMG_H frame. One cycle after a group at (x, y)
// is accepted, bit l of `win_valid` is high if lane l's window lies inside
// the image, i.e. x+l >= 2*RAD and y >= 2*RAD. `win_x`, `win_y` give the
// centre of lane 0's window, (x-RAD, y-RAD), modulo 2^width; lane l's centre
// is win_x + l.
// Configuration: `cfg_we` stores new settings and requests a rebuild of the
// weight tables. The rebuild starts (`gen_start`, one cycle) only once the
// processing pipeline is empty, and `in_ready` stays low from the request
// until the rebuild is over: the input stalls meanwhile. Reset requests a
// rebuild with the default settings, so the filter is usable without any
// configuration.
// Clock gating: three clock enables, one per gated clock domain.
//   en_buf  = a pixel is accepted           (window buffer)
//   en_pipe = a window enters, or the pipeline still holds one (PE array,
//             MAC, divider, output unit)
//   en_gen  = a rebuild starts or runs      (weight generator, LUT writes)
// The top level derives a fourth enable, for the outer-ring PEs, from
// en_pipe and the kernel size in force.
// Gating idle modules follows the source; the choice of these three domains
// and of the enable terms is this design's.
module bf_control
  import bf_pkg::*;
#(
  parameter int unsigned IMG_W = 512,
  parameter int unsigned IMG_H = 512,
  parameter int unsigned LANES = 1,
  parameter bf_cfg_t     CFG_RESET = '{s2_spatial: 16'd8, s2_range: 16'd800, ksize: KSIZE_5X5}
) (
  input  logic                     clk,
  input  logic                     rst_n,
  // pixel stream handshake
  input  logic                     in_valid,
  input  logic                     in_sof,
  output logic                     in_ready,
  output logic                     accept,
  // configuration
  input  logic                     cfg_we,
  input  bf_cfg_t                  cfg_in,
  output bf_cfg_t                  cfg,
  output logic                     gen_start,
  input  logic                     gen_busy,
  // pipeline entry tag
  output logic [LANES-1:0]         win_valid,
  output logic [$clog2(IMG_W)-1:0] win_x,
  output logic [$clog2(IMG_H)-1:0] win_y,
  input  logic                     pipe_busy,
  // clock enables
  output logic                     en_buf,
  output logic                     en_pipe,
  output logic                     en_gen
);

  localparam int unsigned XW = $clog2(IMG_W);
  localparam int unsigned YW = $clog2(IMG_H);

  logic [XW-1:0] col, px;
  logic [YW-1:0] row, py;
  logic          cfg_pending;

  assign in_ready = !cfg_pending && !gen_busy && !gen_start;
  assign accept   = in_valid && in_ready;
  assign px       = in_sof ? '0 : col;
  assign py       = in_sof ? '0 : row;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      col       <= '0;
      row       <= '0;
      win_valid <= '0;
      win_x     <= '0;
      win_y     <= '0;
    end else begin
      win_valid <= '0;
      if (accept) begin
        if (px == XW'(IMG_W - LANES)) begin
          col <= '0;
          row <= (py == YW'(IMG_H - 1)) ? '0 : py + 1'b1;
        end else begin
          col <= px + XW'(LANES);
          row <= py;
        end
        for (int l = 0; l < LANES; l++)
          win_valid[l] <= (int'(px) + l >= int'(2 * RAD)) && (py >= YW'(2 * RAD));
        win_x     <= px - XW'(RAD);
        win_y     <= py - YW'(RAD);
      end
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      cfg         <= CFG_RESET;
      cfg_pending <= 1'b1;
      gen_start   <= 1'b0;
    end else begin
      gen_start <= 1'b0;
      if (cfg_we) begin
        cfg         <= cfg_in;
        cfg_pending <= 1'b1;
      end else if (cfg_pending && !gen_busy && !gen_start && win_valid == '0 && !pipe_busy) begin
        cfg_pending <= 1'b0;
        gen_start   <= 1'b1;
      end
    end
  end

  assign en_buf  = accept;
  assign en_pipe = (|win_valid) | pipe_busy;
  assign en_gen  = gen_start | gen_busy;

endmodule
