// compute_kernel: evaluates the query functions over one key's window:
// average, minimum, maximum and median of the values.
//
// Values stream in (one per cycle, in_first/in_last framing). The
// distributive and algebraic functions are computed on the fly: a running
// sum, minimum and maximum. The median is holistic and needs the whole
// window, so it uses a two-pass histogram method:
//   1. while values arrive, they are stored in a window buffer and counted
//      in a 2**HI_W-bin histogram of their upper HI_W bits;
//   2. a scan of that histogram finds the bin holding the value of rank
//      r = floor((n-1)/2) (the lower median) and the rank inside the bin;
//      the scan looks at SCAN_P bins per cycle (a running prefix sum);
//   3. the buffer is read again and the values of that bin are counted in
//      a 2**(VAL_W-HI_W)-bin histogram of their lower bits;
//   4. a scan of the second histogram gives the lower bits of the median.
// Each scan clears the bins it visits, ready for the next window. The
// average is floor(sum/n) from a bit-serial divider that runs during the
// scans. A result (mlq_pkg::result_t) leaves with valid/ready.
// Timing: about 2n + (2**HI_W + 2**(VAL_W-HI_W))/SCAN_P + 4 cycles per
// window of n values (2n + 128 at the defaults); the kernel accepts the
// next window after its result is taken.
// The functions and the use of histogram-based median follow the
// document; the two-pass scheme, the rank convention and the integer
// average are this design's choice.
module compute_kernel
  import mlq_pkg::*;
#(
  parameter int unsigned WS_MAX = 4096,
  parameter int unsigned HI_W   = 8,
  parameter int unsigned SCAN_P = 4,    // histogram bins scanned per cycle
  localparam int unsigned WCNT_W = $clog2(WS_MAX) + 1,
  localparam int unsigned LO_W   = VAL_W - HI_W,
  localparam int unsigned SUM_W  = VAL_W + WCNT_W
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              in_valid,
  output logic              in_ready,
  input  logic [VAL_W-1:0]  in_value,
  input  logic              in_first,
  input  logic              in_last,
  input  logic [KEY_W-1:0]  in_key,
  input  logic [TS_W-1:0]   in_ts,
  output logic              res_valid,
  input  logic              res_ready,
  output result_t           res
);
  typedef enum logic [2:0] {K_ACC, K_SCAN1, K_PASS2, K_DRAIN, K_SCAN2, K_WAITDIV, K_OUT} kst_e;
  kst_e st;

  logic [VAL_W-1:0]  wbuf [WS_MAX];
  logic [WCNT_W-1:0] hist_hi [2**HI_W];
  logic [WCNT_W-1:0] hist_lo [2**LO_W];
  logic [WCNT_W-1:0] n, rank, cum, j;
  logic [SUM_W-1:0]  sum;
  logic [VAL_W-1:0]  vmin, vmax;
  logic [HI_W-1:0]   bin_hi, mbin_hi;
  logic [LO_W-1:0]   bin_lo, mbin_lo;
  logic              found;
  logic [VAL_W-1:0]  rd_val;
  logic              rd_ok;
  logic [KEY_W-1:0]  key;
  logic [TS_W-1:0]   ts;

  // Bit-serial restoring divider for the average.
  logic              div_busy, div_done;
  logic [SUM_W-1:0]  quo;
  logic [WCNT_W:0]   rmd;
  logic [$clog2(SUM_W+1)-1:0] div_i;
  logic [WCNT_W:0]   rmd_sh;
  assign rmd_sh = {rmd[WCNT_W-1:0], quo[SUM_W-1]};

  assign in_ready = (st == K_ACC);

  // Scan step shared by both histograms: SCAN_P bins from the current
  // bin, the first one where the running count passes the rank, the count
  // below it, and the count after all SCAN_P bins.
  logic [WCNT_W-1:0]         sc_cnt [SCAN_P];
  logic                      sc_hit;
  logic [$clog2(SCAN_P)-1:0] sc_off;
  logic [WCNT_W-1:0]         sc_below, sc_total;
  always_comb begin
    logic [WCNT_W-1:0] acc;
    for (int p = 0; p < SCAN_P; p++)
      sc_cnt[p] = (st == K_SCAN1) ? hist_hi[bin_hi + HI_W'(p)] : hist_lo[bin_lo + LO_W'(p)];
    sc_hit   = 1'b0;
    sc_off   = '0;
    sc_below = cum;
    acc      = cum;
    for (int p = 0; p < SCAN_P; p++) begin
      if (!sc_hit && acc + sc_cnt[p] > rank) begin
        sc_hit   = 1'b1;
        sc_off   = ($clog2(SCAN_P))'(p);
        sc_below = acc;
      end
      acc = acc + sc_cnt[p];
    end
    sc_total = acc;
  end

  // Window buffer: written while values arrive, read in pass 2.
  always_ff @(posedge clk) begin
    if (st == K_ACC && in_valid) wbuf[in_first ? '0 : j[WCNT_W-2:0]] <= in_value;
    rd_val <= wbuf[j[WCNT_W-2:0]];
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      st <= K_ACC;
      for (int b = 0; b < 2**HI_W; b++) hist_hi[b] <= '0;
      for (int b = 0; b < 2**LO_W; b++) hist_lo[b] <= '0;
      n <= '0; rank <= '0; cum <= '0; j <= '0;
      sum <= '0; vmin <= '0; vmax <= '0;
      bin_hi <= '0; mbin_hi <= '0; bin_lo <= '0; mbin_lo <= '0;
      found <= 1'b0; rd_ok <= 1'b0;
      key <= '0; ts <= '0;
      div_busy <= 1'b0; div_done <= 1'b0; quo <= '0; rmd <= '0; div_i <= '0;
      res_valid <= 1'b0; res <= '0;
    end else begin
      unique case (st)
        K_ACC: if (in_valid) begin
          hist_hi[in_value[VAL_W-1 -: HI_W]] <= hist_hi[in_value[VAL_W-1 -: HI_W]] + 1'b1;
          if (in_first) begin
            sum  <= SUM_W'(in_value);
            vmin <= in_value;
            vmax <= in_value;
            j    <= WCNT_W'(1);
            key  <= in_key;
            ts   <= in_ts;
          end else begin
            sum  <= sum + SUM_W'(in_value);
            if (in_value < vmin) vmin <= in_value;
            if (in_value > vmax) vmax <= in_value;
            j    <= j + 1'b1;
          end
          if (in_last) begin
            n      <= in_first ? WCNT_W'(1) : j + 1'b1;
            rank   <= in_first ? '0 : j >> 1;     // floor((n-1)/2), n = j+1
            cum    <= '0;
            bin_hi <= '0;
            found  <= 1'b0;
            st     <= K_SCAN1;
          end
        end
        K_SCAN1: begin
          if (!found && sc_hit) begin
            found   <= 1'b1;
            mbin_hi <= bin_hi + HI_W'(sc_off);
            rank    <= rank - sc_below;
          end
          cum <= sc_total;
          for (int p = 0; p < SCAN_P; p++) hist_hi[bin_hi + HI_W'(p)] <= '0;
          bin_hi <= bin_hi + HI_W'(SCAN_P);
          if (bin_hi == HI_W'(2**HI_W - SCAN_P)) begin
            j     <= '0;
            rd_ok <= 1'b0;
            st    <= K_PASS2;
          end
        end
        K_PASS2, K_DRAIN: begin
          // One read per cycle; the value read last cycle is counted now.
          rd_ok <= (st == K_PASS2);
          if (st == K_PASS2) begin
            j <= j + 1'b1;
            if (j + 1'b1 == n) st <= K_DRAIN;
          end
          if (rd_ok && rd_val[VAL_W-1 -: HI_W] == mbin_hi)
            hist_lo[rd_val[LO_W-1:0]] <= hist_lo[rd_val[LO_W-1:0]] + 1'b1;
          if (st == K_DRAIN) begin
            cum    <= '0;
            bin_lo <= '0;
            found  <= 1'b0;
            st     <= K_SCAN2;
          end
        end
        K_SCAN2: begin
          if (!found && sc_hit) begin
            found   <= 1'b1;
            mbin_lo <= bin_lo + LO_W'(sc_off);
          end
          cum <= sc_total;
          for (int p = 0; p < SCAN_P; p++) hist_lo[bin_lo + LO_W'(p)] <= '0;
          bin_lo <= bin_lo + LO_W'(SCAN_P);
          if (bin_lo == LO_W'(2**LO_W - SCAN_P)) st <= K_WAITDIV;
        end
        K_WAITDIV: if (div_done) begin
          res_valid  <= 1'b1;
          res.key    <= key;
          res.ts     <= ts;
          res.count  <= CNT_W'(n);
          res.avg    <= VAL_W'(quo);
          res.vmin   <= vmin;
          res.vmax   <= vmax;
          res.median <= {mbin_hi, mbin_lo};
          st         <= K_OUT;
        end
        K_OUT: if (res_ready) begin
          res_valid <= 1'b0;
          st        <= K_ACC;
        end
        default: st <= K_ACC;
      endcase

      // Divider: started when the window is complete.
      if (st == K_ACC && in_valid && in_last) begin
        div_busy <= 1'b1;
        div_done <= 1'b0;
        quo      <= in_first ? SUM_W'(in_value) : sum + SUM_W'(in_value);
        rmd      <= '0;
        div_i    <= '0;
      end else if (div_busy) begin
        if ({1'b0, rmd_sh} >= {2'b0, n}) begin
          rmd <= rmd_sh - (WCNT_W+1)'(n);
          quo <= {quo[SUM_W-2:0], 1'b1};
        end else begin
          rmd <= rmd_sh;
          quo <= {quo[SUM_W-2:0], 1'b0};
        end
        div_i <= div_i + 1'b1;
        if (div_i == ($clog2(SUM_W+1))'(SUM_W - 1)) begin
          div_busy <= 1'b0;
          div_done <= 1'b1;
        end
      end
    end
  end
endmodule
