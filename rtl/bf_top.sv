// bf_top: streaming approximate bilateral filter with clock gating.
//
// Each output pixel is the bilateral average of its WIN x WIN neighbourhood,
//     out = sum(Ws * Wr * I) / sum(Ws * Wr),
// where the spatial weight Ws depends on the tap's distance from the centre,
// the range weight Wr on the neighbour's intensity difference from the
// centre, and both Gaussians exp(-v / 2sigma^2) are replaced by the cheap
// approximation 2sigma^2 / (2sigma^2 + v).
// Datapath: window buffer (four line FIFOs and a 5 x 5 register array) ->
// NTAP parallel processing elements (difference, |.|, range LUT, weight
// product, weighted pixel) -> MAC adder tree -> pipelined divider -> output
// unit. One window enters per clock. For more throughput, LANES > 1 takes
// LANES adjacent pixels per clock and replicates the PE array, the MAC unit
// and the divider once per lane (LANES = 1 is the configuration of the
// source; IMG_W must be a multiple of LANES). A weight generator rebuilds the spatial
// table and the 25 range LUTs from the run-time sigma settings; the kernel
// size (3 x 3 or 5 x 5) is selectable at run time.
// Power: four clock gates cut the clock of the window buffer when no pixel
// arrives, of the processing pipeline when it holds no window, of the 16
// outer-ring processing elements while the 3 x 3 kernel is in force, and of
// the weight generator when no rebuild runs.
// Interface: pixels arrive in raster order, LANES per transfer (in_pixel[0]
// leftmost), with a valid/ready handshake and `in_sof` on the first transfer
// of a frame. The result for the window centred at (x, y) appears
// LATENCY = 17 clocks after the pixel at (x+2, y+2) is accepted, as a
// one-cycle pulse on its lane's `out_valid` bit; `out_x` is the centre
// column of lane 0 (modulo 2^width; lane l is at out_x + l) and `out_y` the
// row. Only pixels whose window lies inside the image are produced,
// (IMG_W-4) x (IMG_H-4) per frame. There is no output back-pressure. `cfg_we` loads new
// settings; the input stalls (in_ready low) while the tables are rebuilt,
// 2651 clocks plus the time to drain the pipeline. After reset the tables
// are built with the default settings, in the same way.
// The block structure, the approximation and the clock gating follow the
// source; sizes other than the 5 x 5 window, the number formats, the
// handshake and the border policy are this design's choices.
module bf_top
  import bf_pkg::*;
#(
  parameter int unsigned IMG_W = 512,
  parameter int unsigned IMG_H = 512,
  parameter int unsigned LANES = 1
) (
  input  logic                     clk,
  input  logic                     rst_n,
  input  logic                     test_en,
  // configuration
  input  logic                     cfg_we,
  input  bf_cfg_t                  cfg_in,
  output logic                     cfg_busy,
  // input pixel stream
  input  logic                     in_valid,
  input  logic                     in_sof,
  input  pixel_t                   in_pixel [LANES],
  output logic                     in_ready,
  // output pixel stream
  output logic [LANES-1:0]         out_valid,
  output pixel_t                   out_pixel [LANES],
  output logic [$clog2(IMG_W)-1:0] out_x,
  output logic [$clog2(IMG_H)-1:0] out_y,
  output logic                     frame_done
);

  localparam int unsigned PE_LAT  = 5;
  localparam int unsigned MAC_LAT = 2;
  localparam int unsigned DIV_LAT = 9;
  localparam int unsigned XW      = $clog2(IMG_W);
  localparam int unsigned YW      = $clog2(IMG_H);

  logic    accept, gen_start, gen_busy, pipe_busy;
  logic [LANES-1:0] win_valid;
  logic [XW-1:0] win_x;
  logic [YW-1:0] win_y;
  logic    en_buf, en_pipe, en_gen;
  logic    gclk_buf, gclk_pipe, gclk_outer, gclk_gen;
  logic    en_outer;
  logic [NTAP-1:0] tap_en;
  bf_cfg_t cfg;

  logic    lut_we;
  pixel_t  lut_addr;
  weight_t lut_data;
  weight_t ws_win [NTAP];

  pixel_t  win [LANES][NTAP];
  pixel_t  result [LANES];

  bf_control #(.IMG_W(IMG_W), .IMG_H(IMG_H), .LANES(LANES)) u_ctrl (
    .clk      (clk),
    .rst_n    (rst_n),
    .in_valid (in_valid),
    .in_sof   (in_sof),
    .in_ready (in_ready),
    .accept   (accept),
    .cfg_we   (cfg_we),
    .cfg_in   (cfg_in),
    .cfg      (cfg),
    .gen_start(gen_start),
    .gen_busy (gen_busy),
    .win_valid(win_valid),
    .win_x    (win_x),
    .win_y    (win_y),
    .pipe_busy(pipe_busy),
    .en_buf   (en_buf),
    .en_pipe  (en_pipe),
    .en_gen   (en_gen)
  );

  assign cfg_busy = !in_ready;

  bf_clock_gate u_cg_buf  (.clk(clk), .en(en_buf),  .test_en(test_en), .gclk(gclk_buf));
  bf_clock_gate u_cg_pipe (.clk(clk), .en(en_pipe), .test_en(test_en), .gclk(gclk_pipe));
  bf_clock_gate u_cg_gen  (.clk(clk), .en(en_gen),  .test_en(test_en), .gclk(gclk_gen));

  // Outer-ring PEs run only while the 5 x 5 kernel is in force. The kernel
  // size changes only when a rebuild starts, with the pipeline empty.
  assign en_outer = en_pipe & tap_en[0];
  bf_clock_gate u_cg_outer (.clk(clk), .en(en_outer), .test_en(test_en), .gclk(gclk_outer));

  bf_weight_gen u_wgen (
    .clk     (gclk_gen),
    .rst_n   (rst_n),
    .start   (gen_start),
    .cfg     (cfg),
    .busy    (gen_busy),
    .lut_we  (lut_we),
    .lut_addr(lut_addr),
    .lut_data(lut_data),
    .ws_win  (ws_win),
    .tap_en  (tap_en)
  );

  bf_window_buffer #(.IMG_W(IMG_W), .LANES(LANES)) u_buf (
    .clk  (gclk_buf),
    .rst_n(rst_n),
    .shift(accept),
    .din  (in_pixel),
    .win  (win)
  );

  for (genvar l = 0; l < LANES; l++) begin : g_lane
    weight_t w  [NTAP];
    wprod_t  wi [NTAP];
    sumw_t   sum_w;
    sump_t   sum_wi;

    for (genvar t = 0; t < NTAP; t++) begin : g_pe
      bf_pe u_pe (
        .clk     (tap_in_3x3(t) ? gclk_pipe : gclk_outer),
        .lut_clk (gclk_gen),
        .lut_we  (lut_we),
        .lut_addr(lut_addr),
        .lut_data(lut_data),
        .center  (win[l][NTAP/2]),
        .neighbor(win[l][t]),
        .ws      (ws_win[t]),
        .w       (w[t]),
        .wi      (wi[t])
      );
    end

    bf_mac u_mac (
      .clk   (gclk_pipe),
      .tap_en(tap_en),
      .w     (w),
      .wi    (wi),
      .sum_w (sum_w),
      .sum_wi(sum_wi)
    );

    bf_divider u_div (
      .clk   (gclk_pipe),
      .sum_w (sum_w),
      .sum_wi(sum_wi),
      .q     (result[l])
    );
  end

  bf_output_unit #(
    .IMG_W(IMG_W), .IMG_H(IMG_H), .LANES(LANES), .LAT(PE_LAT + MAC_LAT + DIV_LAT)
  ) u_out (
    .clk       (gclk_pipe),
    .rst_n     (rst_n),
    .in_valid  (win_valid),
    .in_x      (win_x),
    .in_y      (win_y),
    .result    (result),
    .out_valid (out_valid),
    .out_pixel (out_pixel),
    .out_x     (out_x),
    .out_y     (out_y),
    .frame_done(frame_done),
    .busy      (pipe_busy)
  );

endmodule
