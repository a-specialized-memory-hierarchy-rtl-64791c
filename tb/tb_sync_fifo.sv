// tb_sync_fifo: random push/pop traffic against a queue reference; checks
// data order, the full/empty flags and the occupancy count.
module tb_sync_fifo;
  logic clk = 1'b0, rst_n = 1'b1;
  always #5 clk = !clk;
  logic in_valid = 1'b0, in_ready, out_valid, out_ready = 1'b0;
  logic [15:0] in_data = '0, out_data;
  logic [3:0] count;
  int unsigned checks = 0, failures = 0;
  logic [15:0] ref_q [$];

  sync_fifo #(.WIDTH(16), .DEPTH(8)) dut (.*);

  initial begin
    #2 rst_n = 1'b0;
    #20 rst_n = 1'b1;
    for (int i = 0; i < 3000; i++) begin
      @(negedge clk);
      checks++;
      if (count != 4'(ref_q.size()) || in_ready != (ref_q.size() < 8) || out_valid != (ref_q.size() > 0)) begin
        failures++;
        $display("flags wrong: count=%0d ref=%0d", count, ref_q.size());
      end
      if (out_valid) begin
        checks++;
        if (out_data != ref_q[0]) begin failures++; $display("data %h exp %h", out_data, ref_q[0]); end
      end
      in_valid  = ($urandom_range(99) < (i < 1500 ? 70 : 30));
      in_data   = 16'($urandom);
      out_ready = ($urandom_range(99) < (i < 1500 ? 30 : 70));
      @(posedge clk);
      if (out_valid && out_ready) void'(ref_q.pop_front());
      if (in_valid && in_ready) ref_q.push_back(in_data);
    end
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
