// bf_divider: divider and normaliser, out = round(sum_wi / sum_w).
//
// A fully pipelined restoring divider that accepts one division per clock.
// Stage 0 forms the rounded numerator N = sum_wi + floor(sum_w / 2) and
// registers the divisor. Stages 1..8 each resolve one quotient bit, from bit
// 7 down to bit 0, by trial subtraction of sum_w << k. Because the result is
// a weighted average of 8-bit pixels, N < 256 * sum_w and eight bits hold
// the quotient. `q` appears LAT = 9 `clk` edges after the inputs. A zero
// divisor gives 255; it cannot occur in the filter, where the centre tap
// always has a non-zero weight. The source names the divider and
// normaliser; its construction is this design's choice.
module bf_divider
  import bf_pkg::*;
(
  input  logic   clk,
  input  sumw_t  sum_w,
  input  sump_t  sum_wi,
  output pixel_t q
);

  localparam int unsigned NQ    = PIX_W;
  localparam int unsigned REM_W = SUMP_W + 1;

  logic [REM_W-1:0] rem [NQ+1];
  sumw_t            den [NQ+1];
  pixel_t           quo [NQ+1];

  always_ff @(posedge clk) begin
    rem[0] <= REM_W'(sum_wi) + REM_W'(sum_w >> 1);
    den[0] <= sum_w;
    quo[0] <= '0;
  end

  for (genvar s = 0; s < NQ; s++) begin : g_stage
    localparam int unsigned K = NQ - 1 - s;   // quotient bit of this stage
    logic [REM_W-1:0] trial;
    assign trial = REM_W'(den[s]) << K;
    always_ff @(posedge clk) begin
      den[s+1] <= den[s];
      if (rem[s] >= trial) begin
        rem[s+1] <= rem[s] - trial;
        quo[s+1] <= quo[s] | PIX_W'(1 << K);
      end else begin
        rem[s+1] <= rem[s];
        quo[s+1] <= quo[s];
      end
    end
  end

  assign q = quo[NQ];

endmodule
