// bf_control_tb: checks the control unit bf_control.
//
// The testbench plays the weight generator (busy for a fixed time after
// gen_start) and the pipeline (pipe_busy). It checks:
//  - after reset a rebuild starts with the reset settings, and in_ready is
//    low until it ends;
//  - a settings write waits for the pipeline to drain before gen_start,
//    stalls the input until the rebuild ends, and the stored settings match;
//  - for frames of 8 x 6 pixels, taken two pixels (LANES = 2) per transfer,
//    with random gaps and a restart by in_sof, the per-lane win_valid bits,
//    win_x and win_y after every accepted group, including the automatic
//    wrap to the next frame;
//  - the three clock enables in every cycle.
module bf_control_tb;
  import bf_pkg::*;

  localparam int unsigned W = 8;
  localparam int unsigned LANES = 2;
  localparam int unsigned H = 6;
  localparam int unsigned XW = $clog2(W);
  localparam int unsigned YW = $clog2(H);
  localparam int unsigned GEN_CYCLES = 20;

  logic          clk = 1'b0, rst_n = 1'b0;
  logic          in_valid = 1'b0, in_sof = 1'b0, in_ready, accept;
  logic          cfg_we = 1'b0;
  bf_cfg_t       cfg_in = '0, cfg;
  logic          gen_start, gen_busy;
  logic [LANES-1:0] win_valid;
  logic [XW-1:0] win_x;
  logic [YW-1:0] win_y;
  logic          pipe_busy = 1'b0;
  logic          en_buf, en_pipe, en_gen;

  int unsigned checks = 0, failures = 0;
  int unsigned n_starts = 0;
  int          gen_left = 0;

  bf_control #(.IMG_W(W), .IMG_H(H), .LANES(LANES)) dut (.*);

  always #5 clk = ~clk;

  // generator model
  always @(posedge clk) begin
    if (gen_start) gen_left <= GEN_CYCLES;
    else if (gen_left > 0) gen_left <= gen_left - 1;
  end
  assign gen_busy = (gen_left > 0);

  task automatic check(string what, int got, int want);
    checks++;
    if (got != want) begin
      failures++;
      $display("FAIL %s: got %0d expected %0d", what, got, want);
    end
  endtask

  // enables, every cycle
  always @(negedge clk) begin
    if (rst_n) begin
      check("en_buf",  en_buf,  in_valid & in_ready);
      check("en_pipe", en_pipe, (|win_valid) | pipe_busy);
      check("en_gen",  en_gen,  gen_start | gen_busy);
      check("accept",  accept,  in_valid & in_ready);
      if (gen_start) n_starts++;
    end
  end

  task automatic wait_ready(output int cycles);
    cycles = 0;
    while (!in_ready) begin
      @(negedge clk);
      cycles++;
    end
  endtask

  // stream pixel groups; sof_at: restart the frame at this group count
  // (-1: never)
  task automatic stream(int ngroups, int sof_at);
    int x = 0, y = 0;
    for (int n = 0; n < ngroups; n++) begin
      while ($urandom_range(3) == 0) begin
        in_valid = 1'b0;
        @(negedge clk);
        check("win_valid in gap", win_valid, 0);
      end
      if (n == sof_at) begin
        x = 0;
        y = 0;
      end
      in_valid = 1'b1;
      in_sof   = (n == sof_at);
      check("in_ready while streaming", in_ready, 1);
      @(negedge clk);
      in_valid = 1'b0;
      in_sof   = 1'b0;
      for (int l = 0; l < int'(LANES); l++)
        check($sformatf("win_valid[%0d] after (%0d,%0d)", l, x, y), win_valid[l],
              (x + l >= 4 && y >= 4));
      if (win_valid != '0) begin
        check("win_x", win_x, (x - 2) & ((1 << XW) - 1));
        check("win_y", win_y, y - 2);
      end
      x += LANES;
      if (x == int'(W)) begin
        x = 0;
        y = (y == int'(H) - 1) ? 0 : y + 1;
      end
    end
  endtask

  initial begin
    int c;
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    check("in_ready after reset", in_ready, 0);
    wait_ready(c);
    check("reset rebuilds", n_starts, 1);
    check("reset s2_spatial", cfg.s2_spatial, 8);
    check("reset s2_range", cfg.s2_range, 800);
    check("reset ksize", cfg.ksize, KSIZE_5X5);

    // one and a half frames, then a restart, then a full frame with wrap
    stream((W * H + W * H / 2) / LANES, -1);
    stream(2 * W * H / LANES, 3);

    // settings write while the pipeline is busy: no rebuild until it drains
    @(negedge clk);
    pipe_busy = 1'b1;
    cfg_we = 1'b1;
    cfg_in = '{s2_spatial: 16'd5, s2_range: 16'd123, ksize: KSIZE_3X3};
    @(negedge clk);
    cfg_we = 1'b0;
    check("stored s2_spatial", cfg.s2_spatial, 5);
    check("stored s2_range", cfg.s2_range, 123);
    check("stored ksize", cfg.ksize, KSIZE_3X3);
    in_valid = 1'b1;
    repeat (10) begin
      check("in_ready during pending write", in_ready, 0);
      check("no rebuild while pipeline busy", gen_start, 0);
      check("no accept while stalled", accept, 0);
      @(negedge clk);
    end
    pipe_busy = 1'b0;
    wait_ready(c);
    check("stall length after drain", c, GEN_CYCLES + 2);
    check("rebuilds", n_starts, 2);
    in_valid = 1'b0;
    stream(W * H / LANES, 0);

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
