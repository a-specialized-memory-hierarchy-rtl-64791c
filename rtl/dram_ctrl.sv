// dram_ctrl: controller of one level-3 (DRAM) channel.
//
// Level 3 is accessed in whole 64-byte lines (32 values): a level-2 block
// of 32 values is flushed as one line write, so no read-modify-write is
// ever needed, and aggregation reads whole lines. Commands from the memory
// command generator are queued and passed in order to the device port,
// which may stall (mem_cmd_ready). The device returns read lines in order
// (mem_rd_valid); they go into a response queue that the data collector
// drains with valid/ready. A read is issued only while the lines already
// requested fit in the response queue, so the device never has to be
// stalled on its read-data side.
// The queueing and credit scheme are this design's choice; the document
// names the controller and gives the 64-byte access granularity.
module dram_ctrl #(
  parameter int unsigned ADDR_W    = 27,
  parameter int unsigned LINE_W    = 512,
  parameter int unsigned Q_DEPTH   = 8,
  parameter int unsigned RSP_DEPTH = 8
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              cmd_valid,
  output logic              cmd_ready,
  input  logic              cmd_we,
  input  logic [ADDR_W-1:0] cmd_addr,
  input  logic [LINE_W-1:0] cmd_wdata,
  output logic              rsp_valid,
  input  logic              rsp_ready,
  output logic [LINE_W-1:0] rsp_data,
  output logic              mem_cmd_valid,
  input  logic              mem_cmd_ready,
  output logic              mem_cmd_we,
  output logic [ADDR_W-1:0] mem_cmd_addr,
  output logic [LINE_W-1:0] mem_cmd_wdata,
  input  logic              mem_rd_valid,
  input  logic [LINE_W-1:0] mem_rd_data
);
  localparam int unsigned CW = 1 + ADDR_W + LINE_W;
  localparam int unsigned OW = $clog2(RSP_DEPTH) + 1;

  logic          q_valid, q_ready;
  logic [CW-1:0] q_data;
  logic [OW-1:0] outstanding;
  logic [$clog2(RSP_DEPTH):0] rsp_count;
  logic issue_rd, credit_ok, rspq_in_ready;

  sync_fifo #(.WIDTH(CW), .DEPTH(Q_DEPTH)) u_cmdq (
    .clk, .rst_n,
    .in_valid(cmd_valid), .in_ready(cmd_ready),
    .in_data({cmd_we, cmd_addr, cmd_wdata}),
    .out_valid(q_valid), .out_ready(q_ready), .out_data(q_data), .count());

  assign {mem_cmd_we, mem_cmd_addr, mem_cmd_wdata} = q_data;
  assign credit_ok     = (OW'(outstanding) + OW'(rsp_count)) < OW'(RSP_DEPTH);
  assign mem_cmd_valid = q_valid && (mem_cmd_we || credit_ok);
  assign q_ready       = mem_cmd_valid && mem_cmd_ready;
  assign issue_rd      = q_ready && !mem_cmd_we;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) outstanding <= '0;
    else outstanding <= outstanding + OW'(issue_rd) - OW'(mem_rd_valid);
  end

  sync_fifo #(.WIDTH(LINE_W), .DEPTH(RSP_DEPTH)) u_rspq (
    .clk, .rst_n,
    .in_valid(mem_rd_valid), .in_ready(rspq_in_ready), .in_data(mem_rd_data),
    .out_valid(rsp_valid), .out_ready(rsp_ready), .out_data(rsp_data), .count(rsp_count));

  a_no_rsp_overflow: assert property (@(posedge clk) disable iff (!rst_n)
    mem_rd_valid |-> rspq_in_ready);
endmodule
