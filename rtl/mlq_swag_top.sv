// mlq_swag_top: single-window stream-aggregation engine built on a
// 3-level multi-level queue (MLQ): on-chip BRAM, off-chip QDR-SRAM and
// off-chip DRAM.
//
// Tuples (ts, key, value) arrive one per 64-bit network word. The receiver
// unpacks them, a FIFO absorbs bursts, the hash functions give each key its
// candidate hash-table entries, and the memory command generator keeps
// every key's window as a logical queue spread over the three levels: the
// tail is always in BRAM, full BRAM blocks are flushed to QDR-SRAM and
// full QDR-SRAM blocks to DRAM lines. Every time a key's window holds
// cfg_ws values it is read from all levels in parallel, put back in order
// by the data collector, reduced by the compute kernel (average, minimum,
// maximum, median) and sent out by the transmitter; then the cfg_wa oldest
// values are dropped. Stages are decoupled by valid/ready handshakes and
// FIFOs (back-pressure); only the receiver, facing the network, drops.
//
// The off-chip memories are outside: each QDR-SRAM channel has separate
// read and write ports with byte enables and returns read data in order;
// each DRAM channel has a command port that may stall and returns read
// lines in order. cfg_ws (1..WS_MAX) and cfg_wa (1..cfg_ws) may be chosen
// at run time below the design-time maximum; they must be held steady
// while tuples flow. Defaults are the main configuration: 128K keys,
// windows up to 4096 16-bit values, 2 values per key in BRAM, 32 in
// QDR-SRAM, 2 QDR-SRAM and 3 DRAM channels.
module mlq_swag_top
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
  parameter int unsigned HI_W      = 8,
  localparam int unsigned BANK_W   = (NUM_HASH > 1) ? $clog2(NUM_HASH) : 1,
  localparam int unsigned SLOT_W   = BANK_W + IDX_W,
  localparam int unsigned WCNT_W   = $clog2(WS_MAX) + 1,
  localparam int unsigned M2_W     = M2_VPW * VAL_W,
  localparam int unsigned LINE_W   = M3_VPL * VAL_W
) (
  input  logic                                clk,
  input  logic                                rst_n,
  input  logic [WCNT_W-1:0]                   cfg_ws,
  input  logic [WCNT_W-1:0]                   cfg_wa,
  // network receive side
  input  logic                                rx_valid,
  input  logic [63:0]                         rx_data,
  input  logic [7:0]                          rx_keep,
  // network transmit side
  output logic                                tx_valid,
  input  logic                                tx_ready,
  output logic [63:0]                         tx_data,
  output logic                                tx_sop,
  output logic                                tx_eop,
  // QDR-SRAM channels (level 2)
  output logic [CH2-1:0]                      qdr_rd_en,
  output logic [CH2-1:0][M2_ADDR_W-1:0]       qdr_rd_addr,
  output logic [CH2-1:0]                      qdr_wr_en,
  output logic [CH2-1:0][M2_ADDR_W-1:0]       qdr_wr_addr,
  output logic [CH2-1:0][M2_W-1:0]            qdr_wr_data,
  output logic [CH2-1:0][M2_W/8-1:0]          qdr_wr_be,
  input  logic [CH2-1:0]                      qdr_rd_valid,
  input  logic [CH2-1:0][M2_W-1:0]            qdr_rd_data,
  // DRAM channels (level 3)
  output logic [CH3-1:0]                      dram_cmd_valid,
  input  logic [CH3-1:0]                      dram_cmd_ready,
  output logic [CH3-1:0]                      dram_cmd_we,
  output logic [CH3-1:0][M3_ADDR_W-1:0]       dram_cmd_addr,
  output logic [CH3-1:0][LINE_W-1:0]          dram_cmd_wdata,
  input  logic [CH3-1:0]                      dram_rd_valid,
  input  logic [CH3-1:0][LINE_W-1:0]          dram_rd_data,
  // status
  output logic                                ready,        // hash table cleared
  output logic [31:0]                         rx_drops,
  output logic [31:0]                         rx_tuples,
  output logic [31:0]                         ev_insert,
  output logic [31:0]                         ev_fail,
  output logic [31:0]                         ev_flush1,
  output logic [31:0]                         ev_flush2,
  output logic [31:0]                         ev_agg,
  output logic [31:0]                         ev_evict,
  output logic [31:0]                         tx_results
);
  // ---------------- receive, buffer, hash ----------------
  logic   rx_v, rx_r, fq_v, fq_r, h_v, h_r;
  tuple_t rx_t, fq_t, h_t;
  logic [NUM_HASH-1:0][IDX_W-1:0] h_idx;

  rx_unpack u_rx (
    .clk, .rst_n, .net_valid(rx_valid), .net_data(rx_data), .net_keep(rx_keep),
    .out_valid(rx_v), .out_ready(rx_r), .out_tuple(rx_t),
    .drop_count(rx_drops), .tuple_count(rx_tuples));

  logic [$clog2(64):0] inq_count;
  sync_fifo #(.WIDTH($bits(tuple_t)), .DEPTH(64)) u_inq (
    .clk, .rst_n, .in_valid(rx_v), .in_ready(rx_r), .in_data(rx_t),
    .out_valid(fq_v), .out_ready(fq_r), .out_data(fq_t), .count(inq_count));

  hash_functions #(.NUM_HASH(NUM_HASH), .IDX_W(IDX_W)) u_hash (
    .clk, .rst_n, .in_valid(fq_v), .in_ready(fq_r), .in_tuple(fq_t),
    .out_valid(h_v), .out_ready(h_r), .out_tuple(h_t), .out_idx(h_idx));

  // ---------------- hash table and level 1 ----------------
  logic                           ht_init_done, ht_lk_valid, ht_rsp_valid;
  logic                           ht_rsp_hit, ht_rsp_new, ht_rsp_fail, ht_wr_en;
  logic [KEY_W-1:0]               ht_lk_key;
  logic [NUM_HASH-1:0][IDX_W-1:0] ht_lk_idx;
  logic [SLOT_W-1:0]              ht_rsp_slot, ht_wr_slot;
  logic [WCNT_W-2:0]              ht_rsp_tail, ht_wr_tail;
  logic [WCNT_W-1:0]              ht_rsp_cnt, ht_wr_cnt;

  hash_table #(.NUM_HASH(NUM_HASH), .IDX_W(IDX_W), .TAIL_W(WCNT_W-1), .WCNT_W(WCNT_W)) u_ht (
    .clk, .rst_n, .init_done(ht_init_done),
    .lk_valid(ht_lk_valid), .lk_key(ht_lk_key), .lk_idx(ht_lk_idx),
    .rsp_valid(ht_rsp_valid), .rsp_hit(ht_rsp_hit), .rsp_new(ht_rsp_new),
    .rsp_fail(ht_rsp_fail), .rsp_slot(ht_rsp_slot), .rsp_tail(ht_rsp_tail),
    .rsp_cnt(ht_rsp_cnt), .wr_en(ht_wr_en), .wr_slot(ht_wr_slot),
    .wr_tail(ht_wr_tail), .wr_cnt(ht_wr_cnt));
  assign ready = ht_init_done;

  logic                m1_rd_en, m1_wr_en;
  logic [SLOT_W-1:0]   m1_rd_addr, m1_wr_addr;
  logic [V1*VAL_W-1:0] m1_rd_data, m1_wr_data;
  logic [V1-1:0]       m1_wr_lane_en;

  m1_bram #(.NUM_KEYS(2**SLOT_W), .V1(V1), .VAL_W(VAL_W)) u_m1 (
    .clk, .rd_en(m1_rd_en), .rd_addr(m1_rd_addr), .rd_data(m1_rd_data),
    .wr_en(m1_wr_en), .wr_addr(m1_wr_addr), .wr_lane_en(m1_wr_lane_en), .wr_data(m1_wr_data));

  // ---------------- command generator ----------------
  logic [CH2-1:0]        m2_cmd_valid, m2_cmd_ready;
  logic                  m2_cmd_we;
  logic [M2_ADDR_W-1:0]  m2_cmd_addr;
  logic [M2_W-1:0]       m2_cmd_wdata;
  logic [M2_W/8-1:0]     m2_cmd_be;
  rd_tag_e               m2_cmd_tag;
  logic                  m2f_valid, m2a_valid;
  logic [M2_W-1:0]       m2f_data, m2a_data;
  logic [CH3-1:0]        m3_cmd_valid, m3_cmd_ready;
  logic                  m3_cmd_we;
  logic [M3_ADDR_W-1:0]  m3_cmd_addr;
  logic [LINE_W-1:0]     m3_cmd_wdata;

  logic                      agg_valid, agg_ready;
  logic [KEY_W-1:0]          agg_key;
  logic [TS_W-1:0]           agg_ts;
  logic [WCNT_W-1:0]         agg_cnt, agg_a3, agg_a2, agg_a1;
  logic [$clog2(M3_VPL)-1:0] agg_skip3;
  logic [$clog2(M2_VPW)-1:0] agg_skip2;
  logic [$clog2(V1+1)-1:0]   agg_first1;
  logic [V1*VAL_W-1:0]       agg_m1;

  mem_cmd_gen #(
    .NUM_HASH(NUM_HASH), .IDX_W(IDX_W), .WS_MAX(WS_MAX), .V1(V1), .V2(V2),
    .M2_VPW(M2_VPW), .M3_VPL(M3_VPL), .CH2(CH2), .CH3(CH3),
    .M2_ADDR_W(M2_ADDR_W), .M3_ADDR_W(M3_ADDR_W)
  ) u_gen (
    .clk, .rst_n, .cfg_ws, .cfg_wa,
    .in_valid(h_v), .in_ready(h_r), .in_tuple(h_t), .in_idx(h_idx),
    .ht_init_done, .ht_lk_valid, .ht_lk_key, .ht_lk_idx,
    .ht_rsp_valid, .ht_rsp_hit, .ht_rsp_new, .ht_rsp_fail, .ht_rsp_slot,
    .ht_rsp_tail, .ht_rsp_cnt, .ht_wr_en, .ht_wr_slot, .ht_wr_tail, .ht_wr_cnt,
    .m1_rd_en, .m1_rd_addr, .m1_rd_data, .m1_wr_en, .m1_wr_addr, .m1_wr_lane_en, .m1_wr_data,
    .m2_cmd_valid, .m2_cmd_ready, .m2_cmd_we, .m2_cmd_addr, .m2_cmd_wdata, .m2_cmd_be, .m2_cmd_tag,
    .m2f_valid, .m2f_data,
    .m3_cmd_valid, .m3_cmd_ready, .m3_cmd_we, .m3_cmd_addr, .m3_cmd_wdata,
    .agg_valid, .agg_ready, .agg_key, .agg_ts, .agg_cnt, .agg_a3, .agg_skip3,
    .agg_a2, .agg_skip2, .agg_a1, .agg_first1, .agg_m1,
    .cnt_insert(ev_insert), .cnt_fail(ev_fail), .cnt_flush1(ev_flush1),
    .cnt_flush2(ev_flush2), .cnt_agg(ev_agg), .cnt_evict(ev_evict));

  // ---------------- level 2: QDR-SRAM controllers ----------------
  logic [CH2-1:0]            q_rsp_valid;
  logic [CH2-1:0][M2_W-1:0]  q_rsp_data;
  logic [CH2-1:0]            q_rsp_tag;

  for (genvar c = 0; c < CH2; c++) begin : g_qdr
    qdr_ctrl #(.ADDR_W(M2_ADDR_W), .DATA_W(M2_W), .TAG_W(1)) u_qdr (
      .clk, .rst_n,
      .cmd_valid(m2_cmd_valid[c]), .cmd_ready(m2_cmd_ready[c]), .cmd_we(m2_cmd_we),
      .cmd_addr(m2_cmd_addr), .cmd_wdata(m2_cmd_wdata), .cmd_be(m2_cmd_be),
      .cmd_tag(m2_cmd_tag),
      .rsp_valid(q_rsp_valid[c]), .rsp_data(q_rsp_data[c]), .rsp_tag(q_rsp_tag[c]),
      .mem_rd_en(qdr_rd_en[c]), .mem_rd_addr(qdr_rd_addr[c]),
      .mem_wr_en(qdr_wr_en[c]), .mem_wr_addr(qdr_wr_addr[c]),
      .mem_wr_data(qdr_wr_data[c]), .mem_wr_be(qdr_wr_be[c]),
      .mem_rd_valid(qdr_rd_valid[c]), .mem_rd_data(qdr_rd_data[c]));
  end

  // Steer level-2 read data by tag: flushes to the generator, window
  // reads to the collector. At most one channel returns each kind at once.
  always_comb begin
    m2f_valid = 1'b0;
    m2f_data  = '0;
    m2a_valid = 1'b0;
    m2a_data  = '0;
    for (int c = 0; c < CH2; c++) begin
      if (q_rsp_valid[c] && q_rsp_tag[c] == TAG_FLUSH) begin
        m2f_valid = 1'b1;
        m2f_data  = q_rsp_data[c];
      end
      if (q_rsp_valid[c] && q_rsp_tag[c] == TAG_AGG) begin
        m2a_valid = 1'b1;
        m2a_data  = q_rsp_data[c];
      end
    end
  end

  // ---------------- level 3: DRAM controllers ----------------
  logic [CH3-1:0]              d_rsp_valid, d_rsp_ready;
  logic [CH3-1:0][LINE_W-1:0]  d_rsp_data;
  logic                        m3_valid, m3_ready;
  logic [LINE_W-1:0]           m3_data;

  for (genvar c = 0; c < CH3; c++) begin : g_dram
    dram_ctrl #(.ADDR_W(M3_ADDR_W), .LINE_W(LINE_W)) u_dram (
      .clk, .rst_n,
      .cmd_valid(m3_cmd_valid[c]), .cmd_ready(m3_cmd_ready[c]), .cmd_we(m3_cmd_we),
      .cmd_addr(m3_cmd_addr), .cmd_wdata(m3_cmd_wdata),
      .rsp_valid(d_rsp_valid[c]), .rsp_ready(d_rsp_ready[c]), .rsp_data(d_rsp_data[c]),
      .mem_cmd_valid(dram_cmd_valid[c]), .mem_cmd_ready(dram_cmd_ready[c]),
      .mem_cmd_we(dram_cmd_we[c]), .mem_cmd_addr(dram_cmd_addr[c]),
      .mem_cmd_wdata(dram_cmd_wdata[c]),
      .mem_rd_valid(dram_rd_valid[c]), .mem_rd_data(dram_rd_data[c]));
  end

  // Window lines come from the key's channel only; take the first ready.
  always_comb begin
    m3_valid    = 1'b0;
    m3_data     = '0;
    d_rsp_ready = '0;
    for (int c = CH3 - 1; c >= 0; c--) begin
      if (d_rsp_valid[c]) begin
        m3_valid    = 1'b1;
        m3_data     = d_rsp_data[c];
        d_rsp_ready = '0;
        d_rsp_ready[c] = m3_ready;
      end
    end
  end

  // ---------------- collect, compute, transmit ----------------
  logic              dc_v, dc_r, dc_first, dc_last;
  logic [VAL_W-1:0]  dc_val;
  logic [KEY_W-1:0]  dc_key;
  logic [TS_W-1:0]   dc_ts;
  logic [WCNT_W-1:0] dc_cnt;

  data_collector #(.WS_MAX(WS_MAX), .V1(V1), .V2(V2), .M2_VPW(M2_VPW), .M3_VPL(M3_VPL)) u_dc (
    .clk, .rst_n,
    .desc_valid(agg_valid), .desc_ready(agg_ready), .desc_key(agg_key), .desc_ts(agg_ts),
    .desc_cnt(agg_cnt), .desc_a3(agg_a3), .desc_skip3(agg_skip3), .desc_a2(agg_a2),
    .desc_skip2(agg_skip2), .desc_a1(agg_a1), .desc_first1(agg_first1), .desc_m1(agg_m1),
    .m2_valid(m2a_valid), .m2_data(m2a_data),
    .m3_valid, .m3_ready, .m3_data,
    .out_valid(dc_v), .out_ready(dc_r), .out_value(dc_val), .out_first(dc_first),
    .out_last(dc_last), .out_key(dc_key), .out_ts(dc_ts), .out_cnt(dc_cnt));

  logic    ck_v, ck_r, rq_v, rq_r;
  result_t ck_res, rq_res;

  compute_kernel #(.WS_MAX(WS_MAX), .HI_W(HI_W)) u_ck (
    .clk, .rst_n, .in_valid(dc_v), .in_ready(dc_r), .in_value(dc_val),
    .in_first(dc_first), .in_last(dc_last), .in_key(dc_key), .in_ts(dc_ts),
    .res_valid(ck_v), .res_ready(ck_r), .res(ck_res));

  logic [$clog2(16):0] resq_count;
  sync_fifo #(.WIDTH($bits(result_t)), .DEPTH(16)) u_resq (
    .clk, .rst_n, .in_valid(ck_v), .in_ready(ck_r), .in_data(ck_res),
    .out_valid(rq_v), .out_ready(rq_r), .out_data(rq_res), .count(resq_count));

  tx_pack u_tx (
    .clk, .rst_n, .res_valid(rq_v), .res_ready(rq_r), .res(rq_res),
    .net_valid(tx_valid), .net_ready(tx_ready), .net_data(tx_data),
    .net_sop(tx_sop), .net_eop(tx_eop), .sent_count(tx_results));
endmodule
