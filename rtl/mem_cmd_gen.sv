// mem_cmd_gen: memory command generator of the multi-level queue (MLQ).
//
// For every tuple it reads the key's metadata from the hash table and
// turns the four MLQ operations into read/write micro-commands per level:
//   insert     - write the value at the tail, always in level 1 (BRAM);
//   flush 1->2 - when the level-1 block of V1 values is full, write it into
//                the key's level-2 (QDR-SRAM) block with byte enables;
//   flush 2->3 - when the level-2 block of V2 values is full, read its
//                V2/M2_VPW words and write them as one level-3 (DRAM) line;
//   aggregate  - when the window holds cfg_ws values, read all of it from
//                every level that holds part of it, in parallel, and tell
//                the data collector which values each level returns;
//   bulk evict - after an aggregation drop the cfg_wa oldest values by
//                lowering the count, i.e. moving the head pointer.
// A key's queue is identified by its hash-table slot. Values carry a
// sequence number, TAIL counting modulo WS_MAX: values in level 1 are the
// last TAIL mod V1, level 2 holds the V2-aligned block before them and
// level 3 is a ring of WS_MAX values (WS_MAX/M3_VPL lines) per key, in
// which the value with number s sits at position s mod WS_MAX.
// The head is TAIL - CNT: a window of CNT values is read from level 3
// (its oldest part), then level 2, then level 1.
//
// Timing: tuples are handled one at a time by a state machine, at least
// five cycles per tuple (accept, table response, level-1 read, check,
// table write-back) plus the cycles of flushes and of issuing aggregation
// reads. Commands go to channel (slot mod CH) of each level, so one key's
// commands stay in order in one controller; the channel address is the
// global one. Flush read data come back on m2f_*, tagged by the level-2
// controller. An aggregation waits until the collector is idle.
// The operations, the block sizes and the rule that the tail stays in
// level 1 follow the document; the sequence-number bookkeeping, the
// one-tuple-at-a-time control and the channel mapping are this design's.
module mem_cmd_gen
  import mlq_pkg::*;
#(
  parameter int unsigned NUM_HASH  = 2,
  parameter int unsigned IDX_W     = 16,
  parameter int unsigned WS_MAX    = 4096,
  parameter int unsigned V1        = 2,
  parameter int unsigned V2        = 32,
  parameter int unsigned M2_VPW    = 8,
  parameter int unsigned M3_VPL    = 32,
  parameter int unsigned CH2       = 2,
  parameter int unsigned CH3       = 3,
  parameter int unsigned M2_ADDR_W = 22,
  parameter int unsigned M3_ADDR_W = 27,
  localparam int unsigned BANK_W   = (NUM_HASH > 1) ? $clog2(NUM_HASH) : 1,
  localparam int unsigned SLOT_W   = BANK_W + IDX_W,
  localparam int unsigned TAIL_W   = $clog2(WS_MAX),
  localparam int unsigned WCNT_W   = TAIL_W + 1,
  localparam int unsigned W2K      = V2 / M2_VPW,
  localparam int unsigned L3K      = WS_MAX / M3_VPL,
  localparam int unsigned M2_W     = M2_VPW * VAL_W,
  localparam int unsigned LINE_W   = M3_VPL * VAL_W
) (
  input  logic                           clk,
  input  logic                           rst_n,
  input  logic [WCNT_W-1:0]              cfg_ws,
  input  logic [WCNT_W-1:0]              cfg_wa,
  // hashed tuples
  input  logic                           in_valid,
  output logic                           in_ready,
  input  tuple_t                         in_tuple,
  input  logic [NUM_HASH-1:0][IDX_W-1:0] in_idx,
  // hash table
  input  logic                           ht_init_done,
  output logic                           ht_lk_valid,
  output logic [KEY_W-1:0]               ht_lk_key,
  output logic [NUM_HASH-1:0][IDX_W-1:0] ht_lk_idx,
  input  logic                           ht_rsp_valid,
  input  logic                           ht_rsp_hit,
  input  logic                           ht_rsp_new,
  input  logic                           ht_rsp_fail,
  input  logic [SLOT_W-1:0]              ht_rsp_slot,
  input  logic [TAIL_W-1:0]              ht_rsp_tail,
  input  logic [WCNT_W-1:0]              ht_rsp_cnt,
  output logic                           ht_wr_en,
  output logic [SLOT_W-1:0]              ht_wr_slot,
  output logic [TAIL_W-1:0]              ht_wr_tail,
  output logic [WCNT_W-1:0]              ht_wr_cnt,
  // level 1
  output logic                           m1_rd_en,
  output logic [SLOT_W-1:0]              m1_rd_addr,
  input  logic [V1*VAL_W-1:0]            m1_rd_data,
  output logic                           m1_wr_en,
  output logic [SLOT_W-1:0]              m1_wr_addr,
  output logic [V1-1:0]                  m1_wr_lane_en,
  output logic [V1*VAL_W-1:0]            m1_wr_data,
  // level 2 commands, one set per channel
  output logic [CH2-1:0]                 m2_cmd_valid,
  input  logic [CH2-1:0]                 m2_cmd_ready,
  output logic                           m2_cmd_we,
  output logic [M2_ADDR_W-1:0]           m2_cmd_addr,
  output logic [M2_W-1:0]                m2_cmd_wdata,
  output logic [M2_W/8-1:0]              m2_cmd_be,
  output rd_tag_e                        m2_cmd_tag,
  // level 2 read data of flushes
  input  logic                           m2f_valid,
  input  logic [M2_W-1:0]                m2f_data,
  // level 3 commands, one set per channel
  output logic [CH3-1:0]                 m3_cmd_valid,
  input  logic [CH3-1:0]                 m3_cmd_ready,
  output logic                           m3_cmd_we,
  output logic [M3_ADDR_W-1:0]           m3_cmd_addr,
  output logic [LINE_W-1:0]              m3_cmd_wdata,
  // aggregation descriptor to the data collector
  output logic                           agg_valid,
  input  logic                           agg_ready,
  output logic [KEY_W-1:0]               agg_key,
  output logic [TS_W-1:0]                agg_ts,
  output logic [WCNT_W-1:0]              agg_cnt,
  output logic [WCNT_W-1:0]              agg_a3,
  output logic [$clog2(M3_VPL)-1:0]      agg_skip3,
  output logic [WCNT_W-1:0]              agg_a2,
  output logic [$clog2(M2_VPW)-1:0]      agg_skip2,
  output logic [WCNT_W-1:0]              agg_a1,
  output logic [$clog2(V1+1)-1:0]        agg_first1,
  output logic [V1*VAL_W-1:0]            agg_m1,
  // event counters
  output logic [31:0]                    cnt_insert,
  output logic [31:0]                    cnt_fail,
  output logic [31:0]                    cnt_flush1,
  output logic [31:0]                    cnt_flush2,
  output logic [31:0]                    cnt_agg,
  output logic [31:0]                    cnt_evict
);
  localparam int unsigned L3K_W = $clog2(L3K);
  localparam int unsigned W2K_W = (W2K > 1) ? $clog2(W2K) : 1;

  typedef enum logic [3:0] {
    S_IDLE, S_LOOK, S_M1, S_F1, S_F2RD, S_F2WAIT, S_F2WR, S_CHK, S_AGGRD, S_WB
  } state_e;
  state_e state;

  tuple_t            tup;
  logic [SLOT_W-1:0] slot;
  logic [TAIL_W-1:0] tail_n;      // tail after the insert
  logic [WCNT_W-1:0] cnt_n;       // window count after the insert
  logic [V1*VAL_W-1:0] blk;       // level-1 block after the insert
  logic [LINE_W-1:0] line;        // level-2 block being flushed
  logic [W2K_W:0]    f2_issued, f2_got;
  logic [L3K_W:0]    n3l, i3;     // level-3 lines to read / issued
  logic [L3K_W-1:0]  l0;
  logic [W2K_W:0]    n2w, i2;     // level-2 words to read / issued
  logic [W2K_W-1:0]  w0;

  // Channel of this key in each level.
  logic [$clog2(CH2+1)-1:0] ch2;
  logic [$clog2(CH3+1)-1:0] ch3;
  assign ch2 = ($clog2(CH2+1))'(slot % CH2);
  assign ch3 = ($clog2(CH3+1))'(slot % CH3);

  // Positions derived from the new tail.
  logic [TAIL_W-1:0] c1, inblk2, c2;
  assign c1     = TAIL_W'(tail_n % V1);
  assign inblk2 = TAIL_W'(tail_n % V2);
  assign c2     = inblk2 - c1;

  // Aggregation split of the window over the levels.
  logic [WCNT_W-1:0] a1, a2, a3, rest1;
  logic [TAIL_W-1:0] p2, p3, last2;
  always_comb begin
    a1    = (cnt_n < WCNT_W'(c1)) ? cnt_n : WCNT_W'(c1);
    rest1 = cnt_n - a1;
    a2    = (rest1 < WCNT_W'(c2)) ? rest1 : WCNT_W'(c2);
    a3    = rest1 - a2;
    p2    = c2 - TAIL_W'(a2);
    last2 = c2 - 1'b1;
    p3    = tail_n - inblk2 - TAIL_W'(a3);
  end

  logic m2_fire, m3_fire;
  assign m2_fire = |(m2_cmd_valid & m2_cmd_ready);
  assign m3_fire = |(m3_cmd_valid & m3_cmd_ready);

  // Command outputs.
  logic              m2_req, m3_req;
  always_comb begin
    m2_req       = 1'b0;
    m2_cmd_we    = 1'b0;
    m2_cmd_addr  = '0;
    m2_cmd_wdata = '0;
    m2_cmd_be    = '0;
    m2_cmd_tag   = TAG_FLUSH;
    m3_req       = 1'b0;
    m3_cmd_we    = 1'b0;
    m3_cmd_addr  = '0;
    m3_cmd_wdata = line;
    unique case (state)
      S_F1: begin
        // The full level-1 block goes to value positions
        // (tail_n - V1) mod V2 .. +V1-1 of the level-2 block.
        m2_req       = 1'b1;
        m2_cmd_we    = 1'b1;
        m2_cmd_addr  = M2_ADDR_W'(slot) * M2_ADDR_W'(W2K)
                     + M2_ADDR_W'(TAIL_W'(tail_n - TAIL_W'(V1)) % V2 / M2_VPW);
        m2_cmd_wdata = M2_W'(blk) << (VAL_W * (TAIL_W'(tail_n - TAIL_W'(V1)) % M2_VPW));
        m2_cmd_be    = (M2_W/8)'({(V1*VAL_W/8){1'b1}}) << ((VAL_W/8) * (TAIL_W'(tail_n - TAIL_W'(V1)) % M2_VPW));
      end
      S_F2RD: begin
        m2_req      = 1'b1;
        m2_cmd_addr = M2_ADDR_W'(slot) * M2_ADDR_W'(W2K) + M2_ADDR_W'(f2_issued);
      end
      S_F2WR: begin
        m3_req      = 1'b1;
        m3_cmd_we   = 1'b1;
        m3_cmd_addr = M3_ADDR_W'(slot) * M3_ADDR_W'(L3K)
                    + M3_ADDR_W'(TAIL_W'(tail_n - TAIL_W'(V2)) / M3_VPL);
      end
      S_AGGRD: begin
        m2_req      = (i2 != n2w);
        m2_cmd_tag  = TAG_AGG;
        m2_cmd_addr = M2_ADDR_W'(slot) * M2_ADDR_W'(W2K) + M2_ADDR_W'(w0) + M2_ADDR_W'(i2);
        m3_req      = (i3 != n3l);
        m3_cmd_addr = M3_ADDR_W'(slot) * M3_ADDR_W'(L3K) + M3_ADDR_W'(L3K_W'(l0 + L3K_W'(i3)));
      end
      default: ;
    endcase
    for (int c = 0; c < CH2; c++) m2_cmd_valid[c] = m2_req && (ch2 == ($clog2(CH2+1))'(c));
    for (int c = 0; c < CH3; c++) m3_cmd_valid[c] = m3_req && (ch3 == ($clog2(CH3+1))'(c));
  end

  // Hash table and level-1 ports.
  assign in_ready    = (state == S_IDLE) && ht_init_done;
  assign ht_lk_valid = in_valid && in_ready;
  assign ht_lk_key   = in_tuple.key;
  assign ht_lk_idx   = in_idx;
  assign m1_rd_en    = (state == S_LOOK) && ht_rsp_valid && !ht_rsp_fail;
  assign m1_rd_addr  = ht_rsp_slot;
  assign ht_wr_en    = (state == S_WB);
  assign ht_wr_slot  = slot;
  assign ht_wr_tail  = tail_n;
  assign ht_wr_cnt   = cnt_n;

  logic [$clog2(V1)-1:0] lane;
  always_comb begin
    lane          = ($clog2(V1))'((tail_n - 1'b1) % V1);
    m1_wr_en      = (state == S_M1);
    m1_wr_addr    = slot;
    m1_wr_lane_en = V1'(1) << ((TAIL_W'(tail_n - 1'b1)) % V1);
    m1_wr_data    = {V1{tup.value}};
  end

  // Aggregation descriptor.
  assign agg_valid  = (state == S_CHK) && (cnt_n >= cfg_ws);
  assign agg_key    = tup.key;
  assign agg_ts     = tup.ts;
  assign agg_cnt    = cnt_n;
  assign agg_a3     = a3;
  assign agg_skip3  = ($clog2(M3_VPL))'(p3 % M3_VPL);
  assign agg_a2     = a2;
  assign agg_skip2  = ($clog2(M2_VPW))'(p2 % M2_VPW);
  assign agg_a1     = a1;
  assign agg_first1 = ($clog2(V1+1))'(c1 - TAIL_W'(a1));
  assign agg_m1     = blk;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state      <= S_IDLE;
      tup        <= '0;
      slot       <= '0;
      tail_n     <= '0;
      cnt_n      <= '0;
      blk        <= '0;
      line       <= '0;
      f2_issued  <= '0;
      f2_got     <= '0;
      n3l        <= '0;
      i3         <= '0;
      l0         <= '0;
      n2w        <= '0;
      i2         <= '0;
      w0         <= '0;
      cnt_insert <= '0;
      cnt_fail   <= '0;
      cnt_flush1 <= '0;
      cnt_flush2 <= '0;
      cnt_agg    <= '0;
      cnt_evict  <= '0;
    end else begin
      unique case (state)
        S_IDLE: if (ht_lk_valid) begin
          tup   <= in_tuple;
          state <= S_LOOK;
        end
        S_LOOK: if (ht_rsp_valid) begin
          if (ht_rsp_fail) begin
            cnt_fail <= cnt_fail + 1;
            state    <= S_IDLE;
          end else begin
            slot   <= ht_rsp_slot;
            tail_n <= ht_rsp_hit ? ht_rsp_tail + 1'b1 : TAIL_W'(1);
            cnt_n  <= ht_rsp_hit ? ht_rsp_cnt + 1'b1 : WCNT_W'(1);
            state  <= S_M1;
          end
        end
        S_M1: begin
          // Insert: the new value joins the level-1 block read from BRAM.
          for (int j = 0; j < V1; j++)
            blk[j*VAL_W +: VAL_W] <= (j == int'(lane)) ? tup.value : m1_rd_data[j*VAL_W +: VAL_W];
          cnt_insert <= cnt_insert + 1;
          state      <= (c1 == '0) ? S_F1 : S_CHK;
        end
        S_F1: if (m2_fire) begin
          cnt_flush1 <= cnt_flush1 + 1;
          f2_issued  <= '0;
          f2_got     <= '0;
          state      <= (inblk2 == '0) ? S_F2RD : S_CHK;
        end
        S_F2RD: if (m2_fire) begin
          f2_issued <= f2_issued + 1'b1;
          if (f2_issued == (W2K_W+1)'(W2K - 1)) state <= S_F2WAIT;
        end
        S_F2WAIT: if (f2_got == (W2K_W+1)'(W2K)) state <= S_F2WR;
        S_F2WR: if (m3_fire) begin
          cnt_flush2 <= cnt_flush2 + 1;
          state      <= S_CHK;
        end
        S_CHK: begin
          if (cnt_n < cfg_ws) begin
            state <= S_WB;
          end else if (agg_ready) begin
            // Aggregate, then bulk-evict the cfg_wa oldest values.
            cnt_agg   <= cnt_agg + 1;
            cnt_evict <= cnt_evict + 1;
            cnt_n     <= (cnt_n > cfg_wa) ? cnt_n - cfg_wa : '0;
            l0  <= L3K_W'(p3 / M3_VPL);
            n3l <= (a3 == '0) ? '0
                 : (L3K_W+1)'((WCNT_W'(p3 % M3_VPL) + a3 + WCNT_W'(M3_VPL - 1)) / M3_VPL);
            w0  <= W2K_W'(p2 / M2_VPW);
            n2w <= (a2 == '0) ? '0 : (W2K_W+1)'(last2 / M2_VPW - p2 / M2_VPW + 1);
            i3  <= '0;
            i2  <= '0;
            state <= S_AGGRD;
          end
        end
        S_AGGRD: begin
          // Reads of all levels are issued in parallel.
          if (m3_fire) i3 <= i3 + 1'b1;
          if (m2_fire) i2 <= i2 + 1'b1;
          if ((i3 == n3l || (i3 + 1'b1 == n3l && m3_fire)) &&
              (i2 == n2w || (i2 + 1'b1 == n2w && m2_fire)))
            state <= S_WB;
        end
        S_WB: state <= S_IDLE;
        default: state <= S_IDLE;
      endcase

      // Flush data from level 2, gathered into one level-3 line.
      if (m2f_valid) begin
        for (int w = 0; w < W2K; w++)
          if (f2_got == (W2K_W+1)'(w)) line[w*M2_W +: M2_W] <= m2f_data;
        f2_got <= f2_got + 1'b1;
      end
    end
  end

  initial begin
    assert (V2 == M3_VPL) else $error("a level-2 block must be one level-3 line");
    assert (V2 % V1 == 0 && V2 % M2_VPW == 0) else $error("block sizes must nest");
  end
endmodule
