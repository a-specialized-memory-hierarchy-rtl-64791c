// tb_hash_table: small table (2 banks of 8 entries). Waits for the
// clearing sweep, then looks up random keys at random candidate indexes
// and writes entries back; a reference array of owners predicts hit, new
// entry (first empty candidate, bank 0 first) or failure, the slot and the
// stored tail/count. Checks the one-cycle response latency.
module tb_hash_table;
  import mlq_pkg::*;
  logic clk = 1'b0, rst_n = 1'b1;
  always #5 clk = !clk;
  logic init_done, lk_valid = 1'b0, rsp_valid, rsp_hit, rsp_new, rsp_fail, wr_en = 1'b0;
  logic [KEY_W-1:0] lk_key = '0;
  logic [1:0][2:0] lk_idx = '0;
  logic [3:0] rsp_slot, wr_slot = '0;
  logic [11:0] rsp_tail, wr_tail = '0;
  logic [12:0] rsp_cnt, wr_cnt = '0;
  int unsigned checks = 0, failures = 0, n_hit = 0, n_new = 0, n_fail = 0, init_cycles = 0;
  logic        own_v [16];
  logic [23:0] own_k [16];
  logic [11:0] own_t [16];
  logic [12:0] own_c [16];

  hash_table #(.NUM_HASH(2), .IDX_W(3), .TAIL_W(12), .WCNT_W(13)) dut (.*);

  initial begin
    for (int s = 0; s < 16; s++) own_v[s] = 1'b0;
    #2 rst_n = 1'b0;
    #20 rst_n = 1'b1;
    while (!init_done) begin @(posedge clk); init_cycles++; end
    checks++;
    if (init_cycles < 8 || init_cycles > 10) begin failures++; $display("init took %0d", init_cycles); end
    for (int i = 0; i < 600; i++) begin
      logic e_hit, e_new;
      logic [3:0] e_slot;
      @(negedge clk);
      lk_valid  = 1'b1;
      lk_key    = 24'($urandom_range(23));
      lk_idx[0] = 3'($urandom);
      lk_idx[1] = 3'($urandom);
      e_hit = 1'b0; e_new = 1'b0; e_slot = '0;
      for (int b = 1; b >= 0; b--) if (!own_v[{1'(b), lk_idx[b]}]) begin e_new = 1'b1; e_slot = {1'(b), lk_idx[b]}; end
      for (int b = 1; b >= 0; b--)
        if (own_v[{1'(b), lk_idx[b]}] && own_k[{1'(b), lk_idx[b]}] == lk_key) begin
          e_hit = 1'b1; e_slot = {1'(b), lk_idx[b]};
        end
      if (e_hit) e_new = 1'b0;
      @(negedge clk);
      lk_valid = 1'b0;
      checks++;
      if (!rsp_valid || rsp_hit != e_hit || rsp_new != e_new || rsp_fail != (!e_hit && !e_new) ||
          (!rsp_fail && rsp_slot != e_slot) ||
          (e_hit && (rsp_tail != own_t[e_slot] || rsp_cnt != own_c[e_slot]))) begin
        failures++;
        $display("lookup key %0d: hit %0d/%0d new %0d/%0d slot %0d/%0d", lk_key, rsp_hit, e_hit, rsp_new, e_new, rsp_slot, e_slot);
      end
      if (e_hit) n_hit++; else if (e_new) n_new++; else n_fail++;
      if (e_hit || e_new) begin
        // write back the entry, claiming it when new
        wr_en = 1'b1; wr_slot = e_slot; wr_tail = 12'($urandom); wr_cnt = 13'($urandom);
        own_v[e_slot] = 1'b1; own_k[e_slot] = lk_key; own_t[e_slot] = wr_tail; own_c[e_slot] = wr_cnt;
        @(negedge clk);
        wr_en = 1'b0;
      end
    end
    checks++;
    if (n_hit == 0 || n_new == 0 || n_fail == 0) failures++;
    $display("hits %0d new %0d fails %0d", n_hit, n_new, n_fail);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
