// bf_mac: MAC unit, sums the weights and the weighted pixels of all taps.
//
// Two pipelined adder-tree stages: the first adds the WIN taps of each
// window row, the second adds the WIN row sums. Taps whose `tap_en` bit is
// low count as zero: their processing elements may be clock-gated and hold
// stale values. `sum_w` (the normaliser
// W_p) and `sum_wi` (the weighted sum) appear two `clk` edges after their
// inputs. Every stage advances on every rising edge of `clk`, the pipeline's
// gated clock. The source names a MAC / adder-accumulator block between the
// processing elements and the divider; the adder-tree form, which finishes
// one window per clock, is this design's choice.
module bf_mac
  import bf_pkg::*;
(
  input  logic            clk,
  input  logic [NTAP-1:0] tap_en,
  input  weight_t w  [NTAP],
  input  wprod_t  wi [NTAP],
  output sumw_t   sum_w,
  output sump_t   sum_wi
);

  sumw_t row_w  [WIN];
  sump_t row_wi [WIN];

  always_ff @(posedge clk) begin
    for (int r = 0; r < WIN; r++) begin
      sumw_t aw;
      sump_t ap;
      aw = '0;
      ap = '0;
      for (int c = 0; c < WIN; c++) begin
        if (tap_en[r*WIN + c]) begin
          aw += SUMW_W'(w[r*WIN + c]);
          ap += SUMP_W'(wi[r*WIN + c]);
        end
      end
      row_w[r]  <= aw;
      row_wi[r] <= ap;
    end
  end

  always_ff @(posedge clk) begin
    sumw_t aw;
    sump_t ap;
    aw = '0;
    ap = '0;
    for (int r = 0; r < WIN; r++) begin
      aw += row_w[r];
      ap += row_wi[r];
    end
    sum_w  <= aw;
    sum_wi <= ap;
  end

endmodule
