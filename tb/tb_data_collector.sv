// tb_data_collector: random aggregation descriptors with random splits of
// the window over the three levels (including empty levels and windows
// that start inside a line or word). Level-3 lines and level-2 words are
// fed at random times, the consumer stalls at random; the output must be
// exactly the level-3 values, then level-2, then level-1, with correct
// first/last marks and window description.
module tb_data_collector;
  import mlq_pkg::*;
  logic clk = 1'b0, rst_n = 1'b1;
  always #5 clk = !clk;
  logic desc_valid = 1'b0, desc_ready;
  logic [KEY_W-1:0] desc_key = '0;
  logic [TS_W-1:0]  desc_ts = '0;
  logic [12:0] desc_cnt = '0, desc_a3 = '0, desc_a2 = '0, desc_a1 = '0;
  logic [4:0]  desc_skip3 = '0;
  logic [2:0]  desc_skip2 = '0;
  logic [1:0]  desc_first1 = '0;
  logic [31:0] desc_m1 = '0;
  logic m2_valid = 1'b0, m3_valid = 1'b0, m3_ready;
  logic [127:0] m2_data = '0;
  logic [511:0] m3_data = '0;
  logic out_valid, out_ready = 1'b0, out_first, out_last;
  logic [15:0] out_value;
  logic [KEY_W-1:0] out_key;
  logic [TS_W-1:0] out_ts;
  logic [12:0] out_cnt;
  int unsigned checks = 0, failures = 0, nwin = 0;
  logic [15:0] expv [$];
  logic [511:0] lines [$];
  logic [127:0] words [$];
  int unsigned got;
  logic started = 1'b0;

  data_collector #(.WS_MAX(4096), .V1(2), .V2(32), .M2_VPW(8), .M3_VPL(32)) dut (.*);

  // level-3 line source with random gaps
  always @(negedge clk) begin
    if (m3_valid && m3_ready_q) begin void'(lines.pop_front()); end
    m3_valid = started && (lines.size() > 0) && ($urandom_range(99) < 50);
    if (lines.size() > 0) m3_data = lines[0];
    // reads are only issued once the descriptor has been taken
    m2_valid = started && (words.size() > 0) && ($urandom_range(99) < 40);
    if (m2_valid) m2_data = words.pop_front();
    out_ready = ($urandom_range(99) < 70);
  end
  logic m3_ready_q = 1'b0;
  always @(posedge clk) m3_ready_q <= m3_ready;

  always @(posedge clk) begin
    if (out_valid && out_ready) begin
      checks++;
      if (expv.size() == 0 || out_value != expv[0] || out_first != (got == 0) ||
          out_last != (expv.size() == 1) || out_key != desc_key || out_cnt != desc_cnt) begin
        failures++;
        $display("win %0d value %0d: got %h exp %h first %0d last %0d", nwin, got, out_value,
                 expv.size() ? expv[0] : 16'hx, out_first, out_last);
      end
      if (expv.size() > 0) void'(expv.pop_front());
      got++;
    end
  end

  initial begin
    #2 rst_n = 1'b0;
    #20 rst_n = 1'b1;
    for (int w = 0; w < 200; w++) begin
      int unsigned a3, s3, a2, s2, a1, f1, nl, nw;
      logic [511:0] ln;
      logic [127:0] wd;
      a3 = ($urandom_range(3) == 0) ? 0 : $urandom_range(1, 130);
      s3 = $urandom_range(31);
      s2 = $urandom_range(7);
      a2 = ($urandom_range(3) == 0) ? 0 : $urandom_range(1, 32 - s2);
      f1 = $urandom_range(1);
      a1 = $urandom_range(0, 2 - f1);
      if (a3 + a2 + a1 == 0) a1 = 1;
      if (f1 + a1 > 2) f1 = 0;
      while (!desc_ready) @(negedge clk);
      @(negedge clk);
      desc_key = 24'($urandom); desc_ts = 24'(w);
      desc_a3 = 13'(a3); desc_skip3 = 5'(s3); desc_a2 = 13'(a2); desc_skip2 = 3'(s2);
      desc_a1 = 13'(a1); desc_first1 = 2'(f1); desc_m1 = $urandom;
      desc_cnt = 13'(a3 + a2 + a1);
      got = 0;
      // build the data each level returns and the expected order
      nl = (a3 == 0) ? 0 : (s3 + a3 + 31) / 32;
      for (int l = 0; l < nl; l++) begin
        for (int j = 0; j < 16; j++) ln[j*32 +: 32] = $urandom;
        lines.push_back(ln);
        for (int v = 0; v < 32; v++) begin
          int unsigned p;
          p = l * 32 + v;
          if (p >= s3 && p < s3 + a3) expv.push_back(ln[v*16 +: 16]);
        end
      end
      nw = (a2 == 0) ? 0 : (s2 + a2 + 7) / 8;
      for (int k = 0; k < nw; k++) begin
        wd = {$urandom, $urandom, $urandom, $urandom};
        words.push_back(wd);
        for (int v = 0; v < 8; v++) begin
          int unsigned p;
          p = k * 8 + v;
          if (p >= s2 && p < s2 + a2) expv.push_back(wd[v*16 +: 16]);
        end
      end
      for (int v = 0; v < a1; v++) expv.push_back(desc_m1[(f1 + v)*16 +: 16]);
      desc_valid = 1'b1;
      @(negedge clk);
      desc_valid = 1'b0;
      started = 1'b1;
      while (expv.size() > 0) @(negedge clk);
      nwin++;
      repeat (2) @(negedge clk);
      checks++;
      if (lines.size() != 0 || words.size() != 0) begin failures++; $display("data left over"); end
      lines.delete(); words.delete();
      started = 1'b0;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
