// qdr_sram_model: behavioural model of one off-chip QDR-SRAM channel, for
// simulation only (not synthesizable: sparse associative storage).
// Separate read and write ports, one access of each kind per cycle, a byte
// enable per byte on writes, read data RD_LAT cycles after the read with
// rd_valid. Unwritten words read as zero. A write and a read of the same
// word in one cycle return the old data.
module qdr_sram_model #(
  parameter int unsigned ADDR_W = 22,
  parameter int unsigned DATA_W = 128,
  parameter int unsigned RD_LAT = 3
) (
  input  logic              clk,
  input  logic              rd_en,
  input  logic [ADDR_W-1:0] rd_addr,
  input  logic              wr_en,
  input  logic [ADDR_W-1:0] wr_addr,
  input  logic [DATA_W-1:0] wr_data,
  input  logic [DATA_W/8-1:0] wr_be,
  output logic              rd_valid,
  output logic [DATA_W-1:0] rd_data
);
  logic [DATA_W-1:0] mem [logic [ADDR_W-1:0]];
  logic [RD_LAT-1:0] vpipe = '0;
  logic [DATA_W-1:0] dpipe [RD_LAT];

  assign rd_valid = vpipe[RD_LAT-1];
  assign rd_data  = dpipe[RD_LAT-1];

  always @(posedge clk) begin
    logic [DATA_W-1:0] w;
    vpipe <= {vpipe[RD_LAT-2:0], rd_en};
    for (int i = RD_LAT - 1; i > 0; i--) dpipe[i] <= dpipe[i-1];
    dpipe[0] <= (rd_en && mem.exists(rd_addr)) ? mem[rd_addr] : '0;
    if (wr_en) begin
      w = mem.exists(wr_addr) ? mem[wr_addr] : '0;
      for (int b = 0; b < DATA_W / 8; b++)
        if (wr_be[b]) w[b*8 +: 8] = wr_data[b*8 +: 8];
      mem[wr_addr] = w;
    end
  end
endmodule
