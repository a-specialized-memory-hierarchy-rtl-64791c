// rx_unpack: receiver stage. Turns the 64-bit word stream of the network
// port into tuples.
//
// Each packet payload is a sequence of 8-byte tuples, one per 64-bit word,
// laid out as {ts[63:40], key[39:16], value[15:0]}. A word whose byte-keep
// mask is not all ones is a partial tuple and is dropped. The network side
// cannot be stalled, so a word that arrives while the next stage is not
// ready is dropped and counted; an output register holds one tuple.
// Timing: a tuple appears on out_* one cycle after its word.
// The packet layout and drop policy are this design's choice.
module rx_unpack
  import mlq_pkg::*;
(
  input  logic         clk,
  input  logic         rst_n,
  input  logic         net_valid,
  input  logic [63:0]  net_data,
  input  logic [7:0]   net_keep,
  output logic         out_valid,
  input  logic         out_ready,
  output tuple_t       out_tuple,
  output logic [31:0]  drop_count,
  output logic [31:0]  tuple_count
);
  logic full_word, can_take;
  assign full_word = (net_keep == 8'hFF);
  assign can_take  = !out_valid || out_ready;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      out_valid   <= 1'b0;
      out_tuple   <= '0;
      drop_count  <= '0;
      tuple_count <= '0;
    end else begin
      if (out_valid && out_ready) out_valid <= 1'b0;
      if (net_valid) begin
        if (full_word && can_take) begin
          out_valid   <= 1'b1;
          out_tuple   <= tuple_t'(net_data);
          tuple_count <= tuple_count + 1;
        end else begin
          drop_count <= drop_count + 1;
        end
      end
    end
  end
endmodule
