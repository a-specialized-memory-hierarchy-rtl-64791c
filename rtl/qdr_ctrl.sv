// qdr_ctrl: controller of one level-2 (QDR-SRAM) channel.
//
// Accepts read and write commands from the memory command generator,
// queues them and issues them in order, one per cycle, to the separate
// read and write ports of a QDR-SRAM device. A word is 16 data bytes
// (eight 16-bit values; the device's 18-byte read granularity includes
// two parity bytes that this design leaves unused), and writes carry a
// byte enable per byte, the device's 1-byte write granularity, so a
// 2-value level-1 block is written without a read-modify-write.
// Each read carries a tag that comes back with its data, in order, so the
// response can be steered to the flush path or to the data collector.
// Reads are issued only while the tag queue has room; the device must
// return read data in order (mem_rd_valid) some cycles after the read.
// Responses have no ready: both consumers always accept them.
// The command queue, the tag queue and their depths are this design's.
module qdr_ctrl #(
  parameter int unsigned ADDR_W   = 22,
  parameter int unsigned DATA_W   = 128,
  parameter int unsigned TAG_W    = 1,
  parameter int unsigned Q_DEPTH  = 8,
  parameter int unsigned RD_DEPTH = 16,
  localparam int unsigned BE_W    = DATA_W / 8
) (
  input  logic              clk,
  input  logic              rst_n,
  // commands
  input  logic              cmd_valid,
  output logic              cmd_ready,
  input  logic              cmd_we,
  input  logic [ADDR_W-1:0] cmd_addr,
  input  logic [DATA_W-1:0] cmd_wdata,
  input  logic [BE_W-1:0]   cmd_be,
  input  logic [TAG_W-1:0]  cmd_tag,
  // read responses
  output logic              rsp_valid,
  output logic [DATA_W-1:0] rsp_data,
  output logic [TAG_W-1:0]  rsp_tag,
  // QDR-SRAM device ports
  output logic              mem_rd_en,
  output logic [ADDR_W-1:0] mem_rd_addr,
  output logic              mem_wr_en,
  output logic [ADDR_W-1:0] mem_wr_addr,
  output logic [DATA_W-1:0] mem_wr_data,
  output logic [BE_W-1:0]   mem_wr_be,
  input  logic              mem_rd_valid,
  input  logic [DATA_W-1:0] mem_rd_data
);
  localparam int unsigned CW = 1 + ADDR_W + DATA_W + BE_W + TAG_W;

  logic          q_valid, q_ready;
  logic [CW-1:0] q_data;
  logic              q_we;
  logic [ADDR_W-1:0] q_addr;
  logic [DATA_W-1:0] q_wdata;
  logic [BE_W-1:0]   q_be;
  logic [TAG_W-1:0]  q_tag;
  logic              tq_in_ready, tq_out_valid;
  logic [TAG_W-1:0]  tq_out;

  sync_fifo #(.WIDTH(CW), .DEPTH(Q_DEPTH)) u_cmdq (
    .clk, .rst_n,
    .in_valid(cmd_valid), .in_ready(cmd_ready),
    .in_data({cmd_we, cmd_addr, cmd_wdata, cmd_be, cmd_tag}),
    .out_valid(q_valid), .out_ready(q_ready), .out_data(q_data), .count());

  assign {q_we, q_addr, q_wdata, q_be, q_tag} = q_data;
  // A write always issues; a read needs room to remember its tag.
  assign q_ready = q_we || tq_in_ready;

  sync_fifo #(.WIDTH(TAG_W), .DEPTH(RD_DEPTH)) u_tagq (
    .clk, .rst_n,
    .in_valid(q_valid && !q_we), .in_ready(tq_in_ready), .in_data(q_tag),
    .out_valid(tq_out_valid), .out_ready(mem_rd_valid), .out_data(tq_out), .count());

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      mem_rd_en   <= 1'b0;
      mem_wr_en   <= 1'b0;
      mem_rd_addr <= '0;
      mem_wr_addr <= '0;
      mem_wr_data <= '0;
      mem_wr_be   <= '0;
    end else begin
      mem_rd_en <= q_valid && !q_we && tq_in_ready;
      mem_wr_en <= q_valid && q_we;
      if (q_valid && !q_we) mem_rd_addr <= q_addr;
      if (q_valid && q_we) begin
        mem_wr_addr <= q_addr;
        mem_wr_data <= q_wdata;
        mem_wr_be   <= q_be;
      end
    end
  end

  assign rsp_valid = mem_rd_valid;
  assign rsp_data  = mem_rd_data;
  assign rsp_tag   = tq_out;

  // Every returned word must match a read that was issued.
  a_rd_has_tag: assert property (@(posedge clk) disable iff (!rst_n)
    mem_rd_valid |-> tq_out_valid);
endmodule
