// tb_hash_functions: checks the indexes of known keys against hand-worked
// values and random keys against the multiplicative-hash formula, with
// downstream stalls (the output must hold while not ready).
module tb_hash_functions;
  import mlq_pkg::*;
  logic clk = 1'b0, rst_n = 1'b1;
  always #5 clk = !clk;
  logic in_valid = 1'b0, in_ready, out_valid, out_ready = 1'b1;
  tuple_t in_tuple = '0, out_tuple;
  logic [1:0][15:0] out_idx;
  int unsigned checks = 0, failures = 0;
  tuple_t sent [$];
  logic taken = 1'b1;

  hash_functions #(.NUM_HASH(2), .IDX_W(16)) dut (.*);

  function automatic logic [15:0] h(input logic [23:0] k, input int f);
    logic [47:0] p;
    p = 48'(k) * (f == 0 ? 48'h9E3779 : 48'h7FEB35);
    return p[23:8];
  endfunction

  initial begin
    #2 rst_n = 1'b0;
    #20 rst_n = 1'b1;
    // key 1: h0 = 0x9E37, h1 = 0x7FEB (the constants' upper 16 bits)
    @(negedge clk);
    in_valid = 1'b1; in_tuple = '{ts: 24'd5, key: 24'd1, value: 16'd9};
    @(negedge clk);
    in_valid = 1'b0;
    checks++;
    if (!out_valid || out_idx[0] != 16'h9E37 || out_idx[1] != 16'h7FEB || out_tuple.value != 16'd9) begin
      failures++; $display("key 1: %h %h", out_idx[0], out_idx[1]);
    end
    // key 2: 2*0x9E3779 = 0x13C6EF2 -> 0x3C6E ; 2*0x7FEB35 = 0xFFD66A -> 0xFFD6
    in_valid = 1'b1; in_tuple.key = 24'd2;
    @(negedge clk);
    in_valid = 1'b0;
    checks++;
    if (out_idx[0] != 16'h3C6E || out_idx[1] != 16'hFFD6) begin
      failures++; $display("key 2: %h %h", out_idx[0], out_idx[1]);
    end
    // random keys with stalls
    for (int i = 0; i < 500; i++) begin
      @(negedge clk);
      out_ready = ($urandom_range(3) != 0);
      if (!in_valid || taken) begin
        in_valid = ($urandom_range(1) == 1);
        in_tuple = tuple_t'({$urandom, $urandom});
      end
      @(posedge clk);
      taken = in_valid && in_ready;
      #1;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Every output transfer must be the next input in order, with its hashes.
  always @(posedge clk) begin
    if (in_valid && in_ready && rst_n) sent.push_back(in_tuple);
    if (out_valid && out_ready && rst_n) begin
      tuple_t e;
      e = sent.pop_front();
      checks++;
      if (out_tuple != e || out_idx[0] != h(e.key, 0) || out_idx[1] != h(e.key, 1)) begin
        failures++; $display("stream mismatch key %h", e.key);
      end
    end
  end

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
