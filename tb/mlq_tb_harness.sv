// mlq_tb_harness: end-to-end test bench body for mlq_swag_top, shared by
// the reduced-size and the full-size test benches.
//
// It drives tuples into the network port, models the QDR-SRAM and DRAM
// channels, and checks every result packet against a reference model
// written independently of the RTL: a plain queue per key, aggregated when
// it holds ws values (average = floor(sum/n), min, max, lower median of the
// sorted window) and then shortened by wa values. Each phase resets the
// engine and runs with its own ws/wa. The transmit port is stalled at
// random to exercise back-pressure. FULL selects the top at its default
// parameters (no parameter override); otherwise IDX_W and WS_MAX are
// reduced. With FAIL_PHASE the bench ends by flooding the hash table with
// new keys until lookups fail. It counts how often each mechanism
// happened and fails if one never did (when CHECK_MECH is set).
module mlq_tb_harness
  import mlq_pkg::*;
#(
  parameter bit          FULL       = 1'b0,
  parameter int unsigned IDX_W      = 4,
  parameter int unsigned WS_MAX     = 256,
  parameter bit          CHECK_MECH = 1'b1,
  parameter bit          FAIL_PHASE = 1'b1,
  parameter longint unsigned MAX_CYCLES = 3_000_000,
  parameter bit          WORKLOAD   = 1'b0
) ();
  localparam int unsigned IDX_W_E  = FULL ? 16 : IDX_W;
  localparam int unsigned WS_E     = FULL ? 4096 : WS_MAX;
  localparam int unsigned WCNT_W   = $clog2(WS_E) + 1;
  localparam int unsigned CH2 = 2, CH3 = 3, M2_W = 128, LINE_W = 512;
  localparam int unsigned M2_ADDR_W = 22, M3_ADDR_W = 27;
  localparam int unsigned NKMAX = 16;

  logic clk = 1'b0, rst_n = 1'b1;   // falls at the start of each phase
  always #5 clk = !clk;

  logic [WCNT_W-1:0] cfg_ws, cfg_wa;
  logic        rx_valid = 1'b0;
  logic [63:0] rx_data = '0;
  logic [7:0]  rx_keep = '0;
  logic        tx_valid, tx_ready, tx_sop, tx_eop;
  logic [63:0] tx_data;
  logic [CH2-1:0]                 qdr_rd_en, qdr_wr_en, qdr_rd_valid;
  logic [CH2-1:0][M2_ADDR_W-1:0]  qdr_rd_addr, qdr_wr_addr;
  logic [CH2-1:0][M2_W-1:0]       qdr_wr_data, qdr_rd_data;
  logic [CH2-1:0][M2_W/8-1:0]     qdr_wr_be;
  logic [CH3-1:0]                 dram_cmd_valid, dram_cmd_ready, dram_cmd_we, dram_rd_valid;
  logic [CH3-1:0][M3_ADDR_W-1:0]  dram_cmd_addr;
  logic [CH3-1:0][LINE_W-1:0]     dram_cmd_wdata, dram_rd_data;
  logic        ready;
  logic [31:0] rx_drops, rx_tuples, ev_insert, ev_fail, ev_flush1, ev_flush2;
  logic [31:0] ev_agg, ev_evict, tx_results;
  logic [6:0]  inq_level;

  if (FULL) begin : g_dut
    mlq_swag_top dut (.*);
    assign inq_level = 7'(dut.inq_count);
  end else begin : g_dut
    mlq_swag_top #(.IDX_W(IDX_W), .WS_MAX(WS_MAX)) dut (.*);
    assign inq_level = 7'(dut.inq_count);
  end

  for (genvar c = 0; c < CH2; c++) begin : g_qdr
    qdr_sram_model #(.ADDR_W(M2_ADDR_W), .DATA_W(M2_W)) u_q (
      .clk, .rd_en(qdr_rd_en[c]), .rd_addr(qdr_rd_addr[c]), .wr_en(qdr_wr_en[c]),
      .wr_addr(qdr_wr_addr[c]), .wr_data(qdr_wr_data[c]), .wr_be(qdr_wr_be[c]),
      .rd_valid(qdr_rd_valid[c]), .rd_data(qdr_rd_data[c]));
  end
  for (genvar c = 0; c < CH3; c++) begin : g_dram
    dram_model #(.ADDR_W(M3_ADDR_W), .LINE_W(LINE_W)) u_d (
      .clk, .cmd_valid(dram_cmd_valid[c]), .cmd_ready(dram_cmd_ready[c]),
      .cmd_we(dram_cmd_we[c]), .cmd_addr(dram_cmd_addr[c]), .cmd_wdata(dram_cmd_wdata[c]),
      .rd_valid(dram_rd_valid[c]), .rd_data(dram_rd_data[c]));
  end

  // ---------------- reference model ----------------
  logic [15:0] win [NKMAX][$];
  result_t     expq [$];
  int unsigned checks = 0, failures = 0;
  longint unsigned cycles = 0;
  int unsigned n_bp = 0, n_dstall = 0, n_results = 0, n_three_level = 0;
  int unsigned tot_flush1 = 0, tot_flush2 = 0, tot_agg = 0, tot_evict = 0;
  int unsigned tot_fail = 0, tot_drop = 0, tot_insert = 0;

  function automatic result_t reference(input logic [23:0] key, input logic [23:0] ts,
                                        input logic [15:0] w [$]);
    result_t r;
    logic [15:0] s [$];
    longint unsigned sum = 0;
    s = w;
    s.sort();
    foreach (w[i]) sum += w[i];
    r.key    = key;
    r.ts     = ts;
    r.count  = 16'(w.size());
    r.avg    = 16'(sum / w.size());
    r.vmin   = s[0];
    r.vmax   = s[s.size() - 1];
    r.median = s[(s.size() - 1) / 2];
    return r;
  endfunction

  always @(posedge clk) begin
    cycles <= cycles + 1;
    if (tx_valid && !tx_ready) n_bp <= n_bp + 1;
    if ((dram_cmd_valid & ~dram_cmd_ready) != '0) n_dstall <= n_dstall + 1;
    if (g_dut.dut.agg_valid && g_dut.dut.agg_ready && g_dut.dut.agg_a1 != '0 &&
        g_dut.dut.agg_a2 != '0 && g_dut.dut.agg_a3 != '0)
      n_three_level <= n_three_level + 1;
  end

  // Transmit side: random stalls, result check.
  logic [63:0] hdr;
  always @(posedge clk) begin
    tx_ready <= WORKLOAD || ($urandom_range(99) < 70);
    if (tx_valid && tx_ready) begin
      if (tx_sop) hdr <= tx_data;
      if (tx_eop) begin
        result_t got, exp;
        got = {hdr, tx_data};
        n_results <= n_results + 1;
        checks++;
        if (expq.size() == 0) begin
          failures++;
          $display("unexpected result key=%h", got.key);
        end else begin
          exp = expq.pop_front();
          if (got !== exp) begin
            failures++;
            $display("MISMATCH exp key=%h ts=%0d", exp.key, exp.ts);
            $display("MISMATCH key=%h ts=%0d: got cnt=%0d avg=%0d min=%0d max=%0d med=%0d exp cnt=%0d avg=%0d min=%0d max=%0d med=%0d",
                     got.key, got.ts, got.count, got.avg, got.vmin, got.vmax, got.median,
                     exp.count, exp.avg, exp.vmin, exp.vmax, exp.median);
          end
        end
      end
    end
  end

  // Inputs change on the falling edge, away from the sampling edge.
  task automatic send_word(input logic [63:0] d, input logic [7:0] keep);
    @(negedge clk);
    while (inq_level > 7'd48) @(negedge clk);
    rx_valid = 1'b1;
    rx_data  = d;
    rx_keep  = keep;
    @(negedge clk);
    rx_valid = 1'b0;
    if (!WORKLOAD) repeat ($urandom_range(2)) @(negedge clk);
  endtask

  task automatic run_phase(input int unsigned ws, input int unsigned wa, input int unsigned nk,
                           input int unsigned ntup, input int unsigned vmax_range);
    int unsigned k, guard;
    longint unsigned t0, dt, bound;
    logic [23:0] key;
    logic [15:0] v;
    rst_n  <= 1'b0;
    cfg_ws <= WCNT_W'(ws);
    cfg_wa <= WCNT_W'(wa);
    repeat (5) @(posedge clk);
    rst_n <= 1'b1;
    for (int i = 0; i < NKMAX; i++) win[i].delete();
    while (!ready) @(posedge clk);
    t0 = cycles;
    for (int t = 0; t < ntup; t++) begin
      k   = $urandom_range(nk - 1);
      key = 24'h100 + 24'(k * 7919);
      v   = 16'($urandom_range(vmax_range));
      // A partial word now and then: the receiver must drop it.
      if (!WORKLOAD && $urandom_range(199) == 0) send_word({24'(t), key, v}, 8'h0F);
      send_word({24'(t), key, v}, 8'hFF);
      win[k].push_back(v);
      if (win[k].size() >= ws) begin
        expq.push_back(reference(key, 24'(t), win[k]));
        for (int e = 0; e < wa && win[k].size() > 0; e++) void'(win[k].pop_front());
      end
    end
    guard = 0;
    while ((expq.size() != 0 || ev_insert + ev_fail != rx_tuples) && guard < 2_000_000) begin
      @(posedge clk);
      guard++;
    end
    dt = cycles - t0;
    repeat (20) @(posedge clk);
    checks++;
    if (expq.size() != 0) begin
      failures++;
      $display("phase ws=%0d wa=%0d: %0d results missing", ws, wa, expq.size());
    end
    checks++;
    if (ev_insert != ntup) failures++;
    tot_flush1 += ev_flush1; tot_flush2 += ev_flush2; tot_agg += ev_agg;
    tot_evict += ev_evict; tot_drop += rx_drops; tot_insert += ev_insert;
    $display("phase ws=%0d wa=%0d keys=%0d tuples=%0d: inserts=%0d flush1=%0d flush2=%0d agg=%0d drops=%0d cycles=%0d",
             ws, wa, nk, ntup, ev_insert, ev_flush1, ev_flush2, ev_agg, rx_drops, cycles);
    if (WORKLOAD) begin
      // Timing of this implementation: a tuple costs the command generator
      // 5 cycles plus 3 per level-1 flush and 12 per level-2 flush, and a
      // window costs the kernel about 2*ws + 128 cycles; the phase must
      // not take longer than that sum plus a margin for the memory latency.
      bound = 64'(ntup) * 8 + 64'(ev_flush2) * 16 + 64'(ev_agg) * (2 * ws + 200) + 2000;
      checks++;
      if (dt > bound) begin
        failures++;
        $display("phase ws=%0d wa=%0d too slow: %0d cycles, bound %0d", ws, wa, dt, bound);
      end
      $display("throughput ws=%0d wa=%0d: %0d tuples in %0d cycles = %0d.%02d cycles/tuple (%0d ktuples/s at 156.25 MHz)",
               ws, wa, ntup, dt, dt / ntup, (dt * 100 / ntup) % 100, 156_250 * ntup / dt);
    end
  endtask

  task automatic flood_phase(input int unsigned ntup);
    int unsigned guard;
    for (int t = 0; t < ntup; t++)
      send_word({24'(t), 24'h800000 + 24'(t * 104729), 16'(t)}, 8'hFF);
    guard = 0;
    while (ev_insert + ev_fail != rx_tuples && guard < 100000) begin
      @(posedge clk);
      guard++;
    end
    tot_fail += ev_fail;
    $display("flood: tuples=%0d inserts=%0d failed lookups=%0d", rx_tuples, ev_insert, ev_fail);
  endtask

  task automatic mech(input string name, input int unsigned n);
    checks++;
    $display("mechanism %-28s : %0d", name, n);
    if (n == 0) begin
      failures++;
      $display("mechanism %s never happened", name);
    end
  endtask

  initial begin
    if (FULL && WORKLOAD) begin
      // Window size / advance sweep at the default size, input paced
      // only by the input FIFO and the transmit side never stalled.
      run_phase(64, 1, 16, 3000, 65535);
      run_phase(64, 16, 16, 3000, 65535);
      run_phase(64, 64, 16, 3000, 65535);
      run_phase(256, 1, 4, 1200, 65535);
      run_phase(256, 64, 8, 4000, 65535);
      run_phase(256, 256, 8, 4000, 65535);
      run_phase(1024, 1, 2, 2 * 1024 + 200, 65535);
      run_phase(1024, 256, 4, 6000, 65535);
      run_phase(1024, 1024, 4, 9000, 65535);
      run_phase(4096, 1, 1, 4096 + 100, 65535);
      run_phase(4096, 4096, 2, 2 * 4096 * 2 + 100, 65535);
    end else if (FULL) begin
      run_phase(4096, 1024, 1, 2 * 4096 + 1024 + 300, 65535);
      run_phase(64, 8, 6, 700, 300);
    end else begin
      run_phase(100, 7, 6, 900, 65535);
      run_phase(40, 40, 5, 500, 200);
      run_phase(WS_MAX, 1, 3, WS_MAX * 3 + 60, 1000);
      run_phase(3, 2, 4, 200, 50);
      if (FAIL_PHASE) begin
        // keep the windows from completing so only lookups are exercised
        cfg_ws <= WCNT_W'(WS_MAX);
        flood_phase(4 * (2 ** (IDX_W + 1)));
      end
    end
    if (CHECK_MECH) begin
      mech("insert", tot_insert);
      mech("flush level 1 to 2", tot_flush1);
      mech("flush level 2 to 3", tot_flush2);
      mech("aggregation", tot_agg);
      mech("bulk evict", tot_evict);
      mech("window spanning 3 levels", n_three_level);
      mech("tx back-pressure stall", n_bp);
      mech("DRAM command stall", n_dstall);
      mech("rx partial-word drop", tot_drop);
      if (FAIL_PHASE) mech("hash table full (lookup fail)", tot_fail);
    end
    checks++;
    if (n_results == 0) failures++;
    $display("results checked: %0d, cycles: %0d", n_results, cycles);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    while (cycles < MAX_CYCLES) @(posedge clk);
    failures++;
    $display("watchdog expired: gen state %0d, collector phase %0d, kernel state %0d, results %0d",
             g_dut.dut.u_gen.state, g_dut.dut.u_dc.phase, g_dut.dut.u_ck.st, n_results);
    $display("rx_tuples=%0d drops=%0d insert=%0d fail=%0d", rx_tuples, rx_drops, ev_insert, ev_fail);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
