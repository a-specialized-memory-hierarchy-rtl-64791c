// tb_mem_cmd_gen: the command generator with a small hash table and
// level-1 RAM. The level-2 and level-3 command ports are served by the
// bench: it stalls them at random, applies writes to reference memories
// and answers flush reads in order. For every aggregation the window is
// rebuilt from the descriptor, the lines and words the generator read and
// its level-1 block, and compared with a per-key reference queue; every
// level-3 line write must be the key's 32 values in order, and commands
// must go to the key's channel. Runs several (ws, wa) settings.
module tb_mem_cmd_gen;
  import mlq_pkg::*;
  localparam int WS = 256, L3K = 8;
  logic clk = 1'b0, rst_n = 1'b1;
  always #5 clk = !clk;
  logic [8:0] cfg_ws, cfg_wa;
  logic in_valid = 1'b0, in_ready;
  tuple_t in_tuple = '0;
  logic [1:0][2:0] in_idx = '0;
  logic ht_init_done, ht_lk_valid, ht_rsp_valid, ht_rsp_hit, ht_rsp_new, ht_rsp_fail, ht_wr_en;
  logic [KEY_W-1:0] ht_lk_key;
  logic [1:0][2:0] ht_lk_idx;
  logic [3:0] ht_rsp_slot, ht_wr_slot;
  logic [7:0] ht_rsp_tail, ht_wr_tail;
  logic [8:0] ht_rsp_cnt, ht_wr_cnt;
  logic m1_rd_en, m1_wr_en;
  logic [3:0] m1_rd_addr, m1_wr_addr;
  logic [31:0] m1_rd_data, m1_wr_data;
  logic [1:0] m1_wr_lane_en;
  logic [1:0] m2_cmd_valid, m2_cmd_ready = '0;
  logic m2_cmd_we;
  logic [9:0] m2_cmd_addr;
  logic [127:0] m2_cmd_wdata;
  logic [15:0] m2_cmd_be;
  rd_tag_e m2_cmd_tag;
  logic m2f_valid = 1'b0;
  logic [127:0] m2f_data = '0;
  logic [2:0] m3_cmd_valid, m3_cmd_ready = '0;
  logic m3_cmd_we;
  logic [9:0] m3_cmd_addr;
  logic [511:0] m3_cmd_wdata;
  logic agg_valid, agg_ready = 1'b0;
  logic [KEY_W-1:0] agg_key;
  logic [TS_W-1:0] agg_ts;
  logic [8:0] agg_cnt, agg_a3, agg_a2, agg_a1;
  logic [4:0] agg_skip3;
  logic [2:0] agg_skip2;
  logic [1:0] agg_first1;
  logic [31:0] agg_m1;
  logic [31:0] cnt_insert, cnt_fail, cnt_flush1, cnt_flush2, cnt_agg, cnt_evict;

  mem_cmd_gen #(.NUM_HASH(2), .IDX_W(3), .WS_MAX(WS), .V1(2), .V2(32), .M2_VPW(8),
                .M3_VPL(32), .CH2(2), .CH3(3), .M2_ADDR_W(10), .M3_ADDR_W(10)) dut (.*);
  hash_table #(.NUM_HASH(2), .IDX_W(3), .TAIL_W(8), .WCNT_W(9)) u_ht (
    .clk, .rst_n, .init_done(ht_init_done), .lk_valid(ht_lk_valid), .lk_key(ht_lk_key),
    .lk_idx(ht_lk_idx), .rsp_valid(ht_rsp_valid), .rsp_hit(ht_rsp_hit), .rsp_new(ht_rsp_new),
    .rsp_fail(ht_rsp_fail), .rsp_slot(ht_rsp_slot), .rsp_tail(ht_rsp_tail), .rsp_cnt(ht_rsp_cnt),
    .wr_en(ht_wr_en), .wr_slot(ht_wr_slot), .wr_tail(ht_wr_tail), .wr_cnt(ht_wr_cnt));
  m1_bram #(.NUM_KEYS(16), .V1(2), .VAL_W(16)) u_m1 (
    .clk, .rd_en(m1_rd_en), .rd_addr(m1_rd_addr), .rd_data(m1_rd_data), .wr_en(m1_wr_en),
    .wr_addr(m1_wr_addr), .wr_lane_en(m1_wr_lane_en), .wr_data(m1_wr_data));

  logic [127:0] qmem [1024];
  logic [511:0] dmem [1024];
  logic [127:0] frsp [$];
  int unsigned  rdw [$];
  int unsigned  rdl [$];
  logic [15:0]  win [4][$];
  int unsigned  total [4];
  int unsigned  checks = 0, failures = 0, n_agg = 0, n_f2 = 0, exp_agg = 0;
  logic         pending = 1'b0;
  logic [15:0]  pend_win [$];
  logic [8:0]   d_a3, d_a2, d_a1;
  logic [4:0]   d_s3;
  logic [2:0]   d_s2;
  logic [1:0]   d_f1;
  logic [31:0]  d_m1;
  int unsigned  cur_k;

  // Level-2 / level-3 port service, flush-read answers and checks.
  always @(posedge clk) begin
    if (|(m2_cmd_valid & m2_cmd_ready)) begin
      checks++;
      if (m2_cmd_valid != (2'b01 << (dut.slot % 2))) begin failures++; $display("m2 wrong channel"); end
      if (m2_cmd_we) begin
        for (int b = 0; b < 16; b++) if (m2_cmd_be[b]) qmem[m2_cmd_addr][b*8 +: 8] = m2_cmd_wdata[b*8 +: 8];
      end else if (m2_cmd_tag == TAG_FLUSH) frsp.push_back(qmem[m2_cmd_addr]);
      else rdw.push_back(m2_cmd_addr);
    end
    if (|(m3_cmd_valid & m3_cmd_ready)) begin
      checks++;
      if (m3_cmd_valid != (3'b001 << (dut.slot % 3))) begin failures++; $display("m3 wrong channel"); end
      if (m3_cmd_we) begin
        int unsigned t;
        logic [511:0] e;
        dmem[m3_cmd_addr] = m3_cmd_wdata;
        n_f2++;
        // the line must hold the key's 32 values before the current tail
        t = total[cur_k];
        for (int v = 0; v < 32; v++) e[v*16 +: 16] = hist[cur_k][t - (t % 32) - 32 + v];
        checks++;
        if (m3_cmd_addr != 10'(dut.slot * L3K + ((t - (t % 32) - 32) % WS) / 32) || m3_cmd_wdata != e) begin
          failures++; $display("bad level-3 line write for key %0d at %0d", cur_k, t);
        end
      end else rdl.push_back(m3_cmd_addr);
    end
    if (agg_valid && agg_ready) begin
      pending <= 1'b1;
      d_a3 <= agg_a3; d_a2 <= agg_a2; d_a1 <= agg_a1; d_s3 <= agg_skip3; d_s2 <= agg_skip2;
      d_f1 <= agg_first1; d_m1 <= agg_m1;
      checks++;
      if (agg_cnt != 9'(pend_win.size())) begin failures++; $display("agg count %0d exp %0d", agg_cnt, pend_win.size()); end
    end
  end
  always @(negedge clk) begin
    m2_cmd_ready = 2'($urandom);
    m3_cmd_ready = 3'($urandom);
    agg_ready    = ($urandom_range(1) == 1);
    m2f_valid    = (frsp.size() > 0) && ($urandom_range(1) == 1);
    if (m2f_valid) m2f_data = frsp.pop_front();
  end

  logic [15:0] hist [4][$];   // every value of each key, in order

  task automatic check_window();
    logic [15:0] got [$];
    int unsigned p;
    p = 0;
    foreach (rdl[i]) for (int v = 0; v < 32; v++) begin
      if (p >= d_s3 && p < d_s3 + d_a3) got.push_back(dmem[rdl[i]][v*16 +: 16]);
      p++;
    end
    p = 0;
    foreach (rdw[i]) for (int v = 0; v < 8; v++) begin
      if (p >= d_s2 && p < d_s2 + d_a2) got.push_back(qmem[rdw[i]][v*16 +: 16]);
      p++;
    end
    for (int v = 0; v < d_a1; v++) got.push_back(d_m1[(d_f1 + v)*16 +: 16]);
    checks++;
    n_agg++;
    if (got != pend_win) begin
      failures++;
      $display("window mismatch: key %0d size %0d/%0d a3=%0d a2=%0d a1=%0d", cur_k, got.size(), pend_win.size(), d_a3, d_a2, d_a1);
    end
    rdl.delete(); rdw.delete();
    pending = 1'b0;
  endtask

  task automatic run(input int ws, input int wa, input int ntup);
    rst_n = 1'b0;
    cfg_ws = 9'(ws); cfg_wa = 9'(wa);
    #20 rst_n = 1'b1;
    for (int k = 0; k < 4; k++) begin win[k].delete(); hist[k].delete(); total[k] = 0; end
    while (!ht_init_done) @(negedge clk);
    for (int t = 0; t < ntup; t++) begin
      int unsigned k;
      k = $urandom_range(3);
      @(negedge clk);
      while (!in_ready) @(negedge clk);
      if (pending) check_window();
      cur_k = k;
      in_valid = 1'b1;
      in_tuple = '{ts: 24'(t), key: 24'(50 + k), value: 16'($urandom)};
      in_idx[0] = 3'(k); in_idx[1] = 3'(k + 4);
      win[k].push_back(in_tuple.value);
      hist[k].push_back(in_tuple.value);
      total[k]++;
      if (win[k].size() >= ws) begin
        pend_win = win[k];
        exp_agg++;
        for (int e = 0; e < wa; e++) void'(win[k].pop_front());
      end
      @(negedge clk);
      in_valid = 1'b0;
    end
    while (!in_ready) @(negedge clk);
    if (pending) check_window();
  endtask

  initial begin
    run(100, 7, 1500);
    run(256, 1, 1200);
    run(5, 3, 300);
    run(64, 64, 600);
    checks++;
    if (n_agg != exp_agg || n_agg < 100 || n_f2 < 20 || cnt_fail != 0) failures++;
    $display("aggregations %0d, level-3 line writes %0d", n_agg, n_f2);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (2000000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
