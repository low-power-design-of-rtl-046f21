// bf_output_unit_tb: checks the output unit bf_output_unit.
//
// With a delay of LAT = 4, two lanes and an 8 x 6 image, it applies random
// tags (per-lane valid bits, x, y) and random per-lane divider results every
// clock and checks that out_valid, out_x and out_y repeat the tag of LAT+1
// clocks before, that out_pixel is the result sampled at the same edge, that
// frame_done marks only a valid tag whose last lane is centred at
// (IMG_W-3, IMG_H-3), and that busy is high exactly while a valid tag is in
// flight or on the output.
module bf_output_unit_tb;
  import bf_pkg::*;

  localparam int unsigned W = 8;
  localparam int unsigned H = 6;
  localparam int unsigned LAT = 4;
  localparam int unsigned LANES = 2;
  localparam int unsigned N = 600;

  logic         clk = 1'b0, rst_n = 1'b0;
  logic [LANES-1:0] in_valid = '0;
  logic [2:0]   in_x = '0, out_x;
  logic [2:0]   in_y = '0, out_y;
  pixel_t       result [LANES], out_pixel [LANES];
  logic [LANES-1:0] out_valid;
  logic         frame_done, busy;

  int unsigned checks = 0, failures = 0, n_done = 0;
  int hv [N], hx [N], hy [N], hr [N][LANES];

  bf_output_unit #(.IMG_W(W), .IMG_H(H), .LANES(LANES), .LAT(LAT)) dut (.*);

  always #5 clk = ~clk;

  task automatic check(string what, int got, int want);
    checks++;
    if (got != want) begin
      failures++;
      $display("FAIL %s: got %0d expected %0d", what, got, want);
    end
  endtask

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    check("busy after reset", busy, 0);
    for (int n = 0; n < int'(N); n++) begin
      int k, inflight;
      // idle stretches let the pipeline drain
      hv[n] = ((n / 50) % 2 == 1) ? 0 : int'($urandom_range(3));
      hx[n] = (n % 7 == 0) ? W - 4 : $urandom_range(W - 1);
      hy[n] = (n % 7 == 0) ? H - 3 : $urandom_range(H - 1);
      in_valid = hv[n][LANES-1:0];
      in_x = 3'(hx[n]);
      in_y = 3'(hy[n]);
      for (int l = 0; l < int'(LANES); l++) begin
        hr[n][l] = $urandom_range(255);
        result[l] = pixel_t'(hr[n][l]);
      end
      @(negedge clk);
      // outputs now reflect the edge just passed
      k = n - int'(LAT);
      if (k >= 0) begin
        check("out_valid", out_valid, hv[k]);
        if (hv[k] != 0) begin
          check("out_x", out_x, hx[k]);
          check("out_y", out_y, hy[k]);
          for (int l = 0; l < int'(LANES); l++)
            check("out_pixel", out_pixel[l], hr[n][l]);
        end
        check("frame_done", frame_done,
              (hv[k] != 0 && hx[k] == int'(W) - 4 && hy[k] == int'(H) - 3));
        if (frame_done) n_done++;
      end
      inflight = 0;
      for (int j = n - int'(LAT); j <= n; j++) if (j >= 0 && hv[j] != 0) inflight = 1;
      if (n >= int'(LAT)) check("busy", busy, inflight);
    end
    check("frame_done seen", n_done > 0, 1);
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
