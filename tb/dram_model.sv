// dram_model: behavioural model of one off-chip DRAM channel, for
// simulation only (not synthesizable: sparse storage and queues).
// Whole-line commands with valid/ready; ready drops at random for
// STALL_PCT percent of cycles. Reads return their line in order, RD_LAT
// cycles after the command, with rd_valid. Unwritten lines read as zero.
module dram_model #(
  parameter int unsigned ADDR_W    = 27,
  parameter int unsigned LINE_W    = 512,
  parameter int unsigned RD_LAT    = 12,
  parameter int unsigned STALL_PCT = 20
) (
  input  logic              clk,
  input  logic              cmd_valid,
  output logic              cmd_ready,
  input  logic              cmd_we,
  input  logic [ADDR_W-1:0] cmd_addr,
  input  logic [LINE_W-1:0] cmd_wdata,
  output logic              rd_valid,
  output logic [LINE_W-1:0] rd_data
);
  logic [LINE_W-1:0] mem [logic [ADDR_W-1:0]];
  logic [LINE_W-1:0] dq [$];
  longint unsigned   tq [$];
  longint unsigned   now = 0;

  initial cmd_ready = 1'b1;
  initial rd_valid  = 1'b0;
  initial rd_data   = '0;

  always @(posedge clk) begin
    now <= now + 1;
    rd_valid <= 1'b0;
    if (tq.size() > 0 && tq[0] <= now) begin
      rd_valid <= 1'b1;
      rd_data  <= dq.pop_front();
      void'(tq.pop_front());
    end
    if (cmd_valid && cmd_ready) begin
      if (cmd_we) mem[cmd_addr] = cmd_wdata;
      else begin
        dq.push_back(mem.exists(cmd_addr) ? mem[cmd_addr] : '0);
        tq.push_back(now + RD_LAT);
      end
    end
    cmd_ready <= ($urandom_range(99) >= STALL_PCT);
  end
endmodule
