// m1_bram: level 1 of the multi-level queue, in on-chip block RAM.
//
// One word per key queue holds its V1 newest values, value j of the
// current level-1 block in bits [j*VAL_W +: VAL_W]. The tail of every
// queue lives here, so each incoming value is written at on-chip speed;
// when the block is full the command generator flushes it to level 2.
// One synchronous read port (data one cycle after rd_en) and one write
// port with a per-value enable, so inserting one value never needs a
// read-modify-write. Contents are not reset: only values the queue
// pointers mark as present are ever read. With 128K keys and V1 = 2
// 16-bit values this is 512 KB of BRAM, the size allotted to value storage.
module m1_bram #(
  parameter int unsigned NUM_KEYS = 131072,
  parameter int unsigned V1       = 2,
  parameter int unsigned VAL_W    = 16,
  localparam int unsigned AW      = $clog2(NUM_KEYS)
) (
  input  logic                  clk,
  input  logic                  rd_en,
  input  logic [AW-1:0]         rd_addr,
  output logic [V1*VAL_W-1:0]   rd_data,
  input  logic                  wr_en,
  input  logic [AW-1:0]         wr_addr,
  input  logic [V1-1:0]         wr_lane_en,
  input  logic [V1*VAL_W-1:0]   wr_data
);
  logic [V1-1:0][VAL_W-1:0] mem [NUM_KEYS];

  always_ff @(posedge clk) begin
    if (wr_en)
      for (int j = 0; j < V1; j++)
        if (wr_lane_en[j]) mem[wr_addr][j] <= wr_data[j*VAL_W +: VAL_W];
    if (rd_en) rd_data <= mem[rd_addr];
  end
endmodule
