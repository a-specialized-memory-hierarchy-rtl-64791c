// hash_functions: NUM_HASH independent hash functions of a tuple's key.
//
// Several hash functions give each key several candidate entries in the
// hash table, which reduces collisions. Function h uses multiplicative
// hashing: the key is multiplied by an odd constant, the product is kept
// to KEY_W bits and its top IDX_W bits are the index. The constants are
// this design's choice. One register stage: the indexes and the tuple
// appear one cycle after they are accepted; valid/ready with a single
// output register.
module hash_functions
  import mlq_pkg::*;
#(
  parameter int unsigned NUM_HASH = 2,
  parameter int unsigned IDX_W    = 16
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         in_valid,
  output logic         in_ready,
  input  tuple_t       in_tuple,
  output logic         out_valid,
  input  logic         out_ready,
  output tuple_t       out_tuple,
  output logic [NUM_HASH-1:0][IDX_W-1:0] out_idx
);
  localparam logic [23:0] MULT [4] = '{24'h9E3779, 24'h7FEB35, 24'hC2B2AF, 24'h27D4EB};

  function automatic logic [IDX_W-1:0] hash_of(input logic [KEY_W-1:0] key, input int unsigned h);
    logic [KEY_W-1:0] prod;
    prod = KEY_W'(key * MULT[h % 4] + KEY_W'(h / 4));
    return prod[KEY_W-1 -: IDX_W];
  endfunction

  assign in_ready = !out_valid || out_ready;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      out_valid <= 1'b0;
      out_tuple <= '0;
      out_idx   <= '0;
    end else if (in_ready) begin
      out_valid <= in_valid;
      if (in_valid) begin
        out_tuple <= in_tuple;
        for (int unsigned h = 0; h < NUM_HASH; h++)
          out_idx[h] <= hash_of(in_tuple.key, h);
      end
    end
  end
endmodule
