// tb_tx_pack: random results with random port stalls; checks the two-word
// packet layout, sop/eop and that each result is taken exactly once.
module tb_tx_pack;
  import mlq_pkg::*;
  logic clk = 1'b0, rst_n = 1'b1;
  always #5 clk = !clk;
  logic res_valid = 1'b0, res_ready, net_valid, net_ready = 1'b0, net_sop, net_eop;
  result_t res = '0;
  logic [63:0] net_data;
  logic [31:0] sent_count;
  int unsigned checks = 0, failures = 0, nsent = 0, ngot = 0;
  result_t q [$];
  logic [63:0] w0;
  logic taken = 1'b1;

  tx_pack dut (.*);

  initial begin
    #2 rst_n = 1'b0;
    #20 rst_n = 1'b1;
    for (int i = 0; i < 3000; i++) begin
      @(negedge clk);
      if (!res_valid || taken) begin
        res_valid = ($urandom_range(1) == 1);
        res = result_t'({$urandom, $urandom, $urandom, $urandom, $urandom});
      end
      net_ready = ($urandom_range(99) < 60);
      @(posedge clk);
      taken = res_valid && res_ready;
      if (taken) begin q.push_back(res); nsent++; end
      if (net_valid && net_ready) begin
        if (net_sop) w0 = net_data;
        if (net_eop) begin
          result_t e;
          e = q.pop_front();
          ngot++;
          checks++;
          if (w0 != {e.key, e.ts, e.count} || net_data != {e.avg, e.vmin, e.vmax, e.median}) begin
            failures++; $display("packet mismatch");
          end
        end
        checks++;
        if (net_sop == net_eop) failures++;
      end
    end
    #1;
    checks++;
    if (sent_count != ngot || ngot == 0) failures++;
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
