// bf_pe_tb: checks one processing element, bf_pe.
//
// Loads the range LUT with a random table through its write port, then
// feeds a new random (centre, neighbour, spatial weight) triple every clock
// and checks, five clocks later, the combined weight
//   W = floor((Ws * LUT[|centre - neighbour|] + 128) / 256)
// and the weighted pixel W * neighbour. Extreme differences (0 and 255 in
// both directions) are included.
module bf_pe_tb;
  import bf_pkg::*;

  localparam int unsigned LAT = 5;
  localparam int unsigned N = 400;

  logic    clk = 1'b0, lut_we = 1'b0;
  pixel_t  lut_addr = '0;
  weight_t lut_data = '0;
  pixel_t  center = '0, neighbor = '0;
  weight_t ws = '0;
  weight_t w;
  wprod_t  wi;

  int unsigned checks = 0, failures = 0;
  int tab [256];
  int exp_w [N + LAT + 1];
  int exp_wi [N + LAT + 1];

  bf_pe dut (.clk(clk), .lut_clk(clk), .*);

  always #5 clk = ~clk;

  initial begin
    for (int a = 0; a < 256; a++) begin
      @(negedge clk);
      tab[a]   = $urandom_range(255);
      lut_we   = 1'b1;
      lut_addr = pixel_t'(a);
      lut_data = weight_t'(tab[a]);
    end
    @(negedge clk);
    lut_we = 1'b0;
    for (int n = 0; n < int'(N + LAT); n++) begin
      int c, b, s, d;
      if (n < int'(N)) begin
        unique case (n)
          0: begin c = 0;   b = 255; end
          1: begin c = 255; b = 0;   end
          2: begin c = 77;  b = 77;  end
          default: begin c = $urandom_range(255); b = $urandom_range(255); end
        endcase
        s = (n < 3) ? 255 : $urandom_range(255);
        center = pixel_t'(c);
        neighbor = pixel_t'(b);
        ws = weight_t'(s);
        d = (c > b) ? c - b : b - c;
        exp_w[n]  = (s * tab[d] + 128) / 256;
        exp_wi[n] = exp_w[n] * b;
      end
      @(posedge clk);
      #1;
      // after this edge, the outputs belong to the input of LAT edges ago
      if (n >= int'(LAT) - 1) begin
        int k;
        k = n - int'(LAT - 1);
        if (k < int'(N)) begin
          checks += 2;
          if (w != weight_t'(exp_w[k]) || wi != wprod_t'(exp_wi[k])) begin
            failures++;
            $display("FAIL input %0d: w %0d wi %0d expected %0d %0d", k, w, wi, exp_w[k], exp_wi[k]);
          end
        end
      end
      @(negedge clk);
    end
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
