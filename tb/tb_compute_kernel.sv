// tb_compute_kernel: random windows (1 to 300 values; wide, narrow and
// constant value ranges) streamed with random gaps; checks average
// (floor), minimum, maximum and lower median against a sorted reference,
// and the cycles from the last value to the result against the
// two-histogram-scan timing (n + 2*2**HI_W/SCAN_P + small constant).
module tb_compute_kernel;
  import mlq_pkg::*;
  logic clk = 1'b0, rst_n = 1'b1;
  always #5 clk = !clk;
  logic in_valid = 1'b0, in_ready, in_first = 1'b0, in_last = 1'b0;
  logic [15:0] in_value = '0;
  logic [KEY_W-1:0] in_key = '0;
  logic [TS_W-1:0] in_ts = '0;
  logic res_valid, res_ready = 1'b0;
  result_t res;
  int unsigned checks = 0, failures = 0;
  longint unsigned cyc = 0, t_last;

  compute_kernel #(.WS_MAX(512), .HI_W(8)) dut (.*);
  always @(posedge clk) cyc <= cyc + 1;

  initial begin
    #2 rst_n = 1'b0;
    #20 rst_n = 1'b1;
    for (int w = 0; w < 60; w++) begin
      int unsigned n, mode;
      logic [15:0] v [$];
      logic [15:0] s [$];
      longint unsigned sum;
      n = (w < 3) ? w + 1 : $urandom_range(1, 300);
      mode = w % 3;
      v.delete();
      sum = 0;
      for (int i = 0; i < n; i++) begin
        logic [15:0] x;
        x = (mode == 0) ? 16'($urandom) : (mode == 1) ? 16'(1000 + $urandom_range(40)) : 16'(777);
        v.push_back(x);
        sum += x;
      end
      s = v; s.sort();
      for (int i = 0; i < n; i++) begin
        @(negedge clk);
        while (!in_ready) @(negedge clk);
        in_valid = 1'b1; in_value = v[i]; in_first = (i == 0); in_last = (i == n - 1);
        in_key = 24'(w); in_ts = 24'(w * 3);
        @(negedge clk);
        in_valid = 1'b0;
        t_last = cyc;
        if ($urandom_range(3) == 0) @(negedge clk);
      end
      while (!res_valid) @(negedge clk);
      checks++;
      if (cyc - t_last > n + 2 * 256 / 4 + 8 || cyc - t_last < 2 * 256 / 4) begin
        failures++; $display("window %0d of %0d values took %0d cycles", w, n, cyc - t_last);
      end
      repeat ($urandom_range(3)) @(negedge clk);
      checks++;
      if (res.key != 24'(w) || res.ts != 24'(w * 3) || res.count != 16'(n) ||
          res.avg != 16'(sum / n) || res.vmin != s[0] || res.vmax != s[n-1] ||
          res.median != s[(n-1)/2]) begin
        failures++;
        $display("window %0d n=%0d: avg %0d/%0d min %0d/%0d max %0d/%0d med %0d/%0d", w, n,
                 res.avg, sum / n, res.vmin, s[0], res.vmax, s[n-1], res.median, s[(n-1)/2]);
      end
      res_ready = 1'b1;
      @(negedge clk);
      res_ready = 1'b0;
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
