// tb_rx_unpack: drives full and partial words with random downstream
// stalls; checks each tuple's fields, that partial words and words that
// meet a stalled output are dropped and counted, and the one-cycle latency.
module tb_rx_unpack;
  import mlq_pkg::*;
  logic clk = 1'b0, rst_n = 1'b1;
  always #5 clk = !clk;
  logic net_valid = 1'b0, out_valid, out_ready = 1'b0;
  logic [63:0] net_data = '0;
  logic [7:0]  net_keep = '0;
  tuple_t out_tuple;
  logic [31:0] drop_count, tuple_count;
  int unsigned checks = 0, failures = 0, exp_drops = 0, exp_tuples = 0;
  tuple_t exp_q [$];

  rx_unpack dut (.*);

  initial begin
    #2 rst_n = 1'b0;
    #20 rst_n = 1'b1;
    for (int i = 0; i < 2000; i++) begin
      @(negedge clk);
      net_valid = ($urandom_range(99) < 60);
      net_data  = {$urandom, $urandom};
      net_keep  = ($urandom_range(9) == 0) ? 8'h3F : 8'hFF;
      out_ready = ($urandom_range(99) < 75);
      @(posedge clk);
      // reference: output register free if empty or being emptied
      if (out_valid && out_ready) begin
        checks++;
        if (exp_q.size() == 0 || out_tuple != exp_q[0]) begin
          failures++;
          $display("tuple mismatch");
        end
        if (exp_q.size() > 0) void'(exp_q.pop_front());
      end
      if (net_valid) begin
        if (net_keep == 8'hFF && (!out_valid || out_ready)) begin
          exp_q.push_back(tuple_t'(net_data));
          exp_tuples++;
        end else exp_drops++;
      end
      #1;
      checks++;
      if (drop_count != exp_drops || tuple_count != exp_tuples) begin
        failures++;
        $display("counts: drops %0d/%0d tuples %0d/%0d", drop_count, exp_drops, tuple_count, exp_tuples);
      end
      // a tuple accepted this edge is visible now, one cycle after its word
      if (exp_q.size() > 0) begin
        checks++;
        if (!out_valid || out_tuple.ts != exp_q[0].ts || out_tuple.key != exp_q[0].key ||
            out_tuple.value != exp_q[0].value) failures++;
      end
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
