// bf_weight_gen: approximation unit, builds the spatial and range weight
// tables from the run-time sigma settings.
//
// The Gaussian exp(-v / S), with v the squared distance (spatial) or the
// squared intensity difference (range) and S = 2*sigma^2, is replaced by the
// approximation exp(-x) ~ 1 / (1 + x), i.e. S / (S + v). Each weight is
// stored as an 8-bit fraction:
//     w(v) = floor((255*S + (S+v)/2) / (S+v))       (rounded, 255 = 1.0)
// A pulse on `start` captures the settings and walks through the spatial
// entries v = d^2 = 0..2*RAD^2 (kept in registers here) and then the 256
// range entries v = D^2, D = 0..255, which are broadcast on the `lut_*`
// write port to the range LUT of every processing element. Each entry is
// one setup cycle, eight restoring-division cycles (one quotient bit each)
// and one write cycle: 10 cycles per entry; `busy` lasts 2651 cycles.
// `busy` is high from the cycle after `start` until the last write. A zero
// sigma setting is treated as 1.
// `ws_win` gives the spatial weight of every window tap; taps outside the
// centred 3 x 3 kernel read 0 when the 3 x 3 kernel size is selected, and
// `tap_en` marks the taps of the kernel in force (all 25, or the inner 9).
// Both change only when a rebuild starts. The `tap_en` bits of the inner
// nine taps are always 1; they are kept so that the mask covers all taps.
// The approximation and the run-time choice of sigma and kernel size follow
// the source; the table format, the rounding and the sequential divider are
// this design's choices. `clk` may be a gated clock that runs only while
// `start` or `busy` is high.
module bf_weight_gen
  import bf_pkg::*;
(
  input  logic             clk,
  input  logic             rst_n,
  input  logic             start,
  input  bf_cfg_t          cfg,
  output logic             busy,
  output logic             lut_we,
  output pixel_t           lut_addr,
  output weight_t          lut_data,
  output weight_t          ws_win [NTAP],
  output logic [NTAP-1:0]  tap_en
);

  typedef enum logic [1:0] {S_IDLE, S_SETUP, S_DIV, S_WRITE} state_e;

  localparam int unsigned DEN_W = SIG_W + 1;          // S + v
  localparam int unsigned REM_W = SIG_W + WGT_W + 1;  // 255*S + (S+v)/2

  state_e               state;
  logic                 spatial;      // 1: spatial phase, 0: range phase
  logic [PIX_W-1:0]     idx;          // entry index within the phase
  logic [2:0]           bitn;         // quotient bit being resolved
  logic [SIG_W-1:0]     s_sp, s_rg;   // captured 2*sigma^2 settings
  ksize_e               ksize;
  logic [DEN_W-1:0]     den;
  logic [REM_W-1:0]     rem;
  weight_t              quo;
  weight_t              ws_tab [NSPAT];

  logic [SIG_W-1:0]     s_cur;
  logic [SIG_W-1:0]     v_cur;
  logic [DEN_W-1:0]     den_n;
  logic [REM_W-1:0]     trial_sub;
  logic                 trial_ok;

  always_comb begin
    s_cur = spatial ? s_sp : s_rg;
    v_cur = spatial ? SIG_W'(idx) : SIG_W'(idx) * SIG_W'(idx);
    den_n = DEN_W'(s_cur) + DEN_W'(v_cur);
    trial_sub = REM_W'(den) << bitn;
    trial_ok  = rem >= trial_sub;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state   <= S_IDLE;
      spatial <= 1'b1;
      idx     <= '0;
      bitn    <= '0;
      s_sp    <= SIG_W'(1);
      s_rg    <= SIG_W'(1);
      ksize   <= KSIZE_5X5;
      den     <= '0;
      rem     <= '0;
      quo     <= '0;
      lut_we  <= 1'b0;
      lut_addr <= '0;
      lut_data <= '0;
      for (int i = 0; i < NSPAT; i++) ws_tab[i] <= '0;
    end else begin
      lut_we <= 1'b0;
      unique case (state)
        S_IDLE: begin
          if (start) begin
            s_sp    <= (cfg.s2_spatial == '0) ? SIG_W'(1) : cfg.s2_spatial;
            s_rg    <= (cfg.s2_range   == '0) ? SIG_W'(1) : cfg.s2_range;
            ksize   <= cfg.ksize;
            spatial <= 1'b1;
            idx     <= '0;
            state   <= S_SETUP;
          end
        end
        S_SETUP: begin
          den   <= den_n;
          rem   <= (REM_W'(s_cur) << WGT_W) - REM_W'(s_cur) + REM_W'(den_n >> 1);
          quo   <= '0;
          bitn  <= 3'd7;
          state <= S_DIV;
        end
        S_DIV: begin
          if (trial_ok) begin
            rem       <= rem - trial_sub;
            quo[bitn] <= 1'b1;
          end
          if (bitn == 3'd0) state <= S_WRITE;
          else              bitn  <= bitn - 3'd1;
        end
        S_WRITE: begin
          if (spatial) begin
            ws_tab[idx[$clog2(NSPAT)-1:0]] <= quo;
            if (idx == PIX_W'(NSPAT - 1)) begin
              spatial <= 1'b0;
              idx     <= '0;
            end else begin
              idx <= idx + 1'b1;
            end
            state <= S_SETUP;
          end else begin
            lut_we   <= 1'b1;
            lut_addr <= idx;
            lut_data <= quo;
            idx      <= idx + 1'b1;
            state    <= (idx == '1) ? S_IDLE : S_SETUP;
          end
        end
        default: state <= S_IDLE;
      endcase
    end
  end

  assign busy = (state != S_IDLE) || lut_we;

  always_comb begin
    for (int t = 0; t < NTAP; t++) begin
      tap_en[t] = (ksize == KSIZE_5X5) || tap_in_3x3(t);
      ws_win[t] = tap_en[t] ? ws_tab[tap_dist2(t)] : '0;
    end
  end

endmodule
