// tx_pack: transmitter stage. Sends each aggregation result to the
// network as a two-word packet of 64-bit words:
//   word 0 (sop): {key[63:40], ts[39:16], count[15:0]}
//   word 1 (eop): {avg[63:48], min[47:32], max[31:16], median[15:0]}
// Results arrive with valid/ready; a result is taken when its second word
// leaves, so the port can stall the engine. The result format is this
// design's choice; the document only places Tx after the compute kernels.
module tx_pack
  import mlq_pkg::*;
(
  input  logic        clk,
  input  logic        rst_n,
  input  logic        res_valid,
  output logic        res_ready,
  input  result_t     res,
  output logic        net_valid,
  input  logic        net_ready,
  output logic [63:0] net_data,
  output logic        net_sop,
  output logic        net_eop,
  output logic [31:0] sent_count
);
  logic beat;   // 0: header word, 1: function word

  assign net_valid = res_valid;
  assign net_sop   = !beat;
  assign net_eop   = beat;
  assign net_data  = beat ? {res.avg, res.vmin, res.vmax, res.median}
                          : {res.key, res.ts, res.count};
  assign res_ready = beat && net_ready;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      beat       <= 1'b0;
      sent_count <= '0;
    end else if (net_valid && net_ready) begin
      beat <= !beat;
      if (beat) sent_count <= sent_count + 1;
    end
  end
endmodule
