// hash_table: metadata of the active keys, held in on-chip RAM.
//
// There are NUM_HASH banks of 2**IDX_W entries, one bank per hash function.
// An entry holds a valid bit, the key it belongs to and that key's queue
// state: TAIL, the number of values ever inserted modulo WS_MAX, and CNT,
// the number of values now in the window. The head of the queue is
// TAIL - CNT; together with the fixed per-level block sizes these give the
// read/write pointers of every memory level. The entry's position,
// SLOT = {bank, index}, is the key's queue number in every level.
//
// Lookup: lk_valid with the key and one index per bank reads all banks;
// one cycle later rsp_valid reports a hit (the key owns one of its
// candidate entries), a new entry (no hit, the first empty candidate in
// bank order is given to the key) or a failure (all candidates taken by
// other keys). Nothing is written by a lookup: the owner writes the entry
// back with wr_en, which also claims a new entry. Keys are never removed.
// After reset the module clears all valid bits, one index per cycle in
// every bank, and raises init_done; lookups wait for it.
// The document gives the role of the table and the use of several hash
// functions; the entry layout, the bank-per-function organisation and the
// allocation policy are this design's choice.
module hash_table
  import mlq_pkg::*;
#(
  parameter int unsigned NUM_HASH = 2,
  parameter int unsigned IDX_W    = 16,
  parameter int unsigned TAIL_W   = 12,
  parameter int unsigned WCNT_W   = 13,
  localparam int unsigned BANK_W  = (NUM_HASH > 1) ? $clog2(NUM_HASH) : 1,
  localparam int unsigned SLOT_W  = BANK_W + IDX_W
) (
  input  logic                           clk,
  input  logic                           rst_n,
  output logic                           init_done,
  input  logic                           lk_valid,
  input  logic [KEY_W-1:0]               lk_key,
  input  logic [NUM_HASH-1:0][IDX_W-1:0] lk_idx,
  output logic                           rsp_valid,
  output logic                           rsp_hit,
  output logic                           rsp_new,
  output logic                           rsp_fail,
  output logic [SLOT_W-1:0]              rsp_slot,
  output logic [TAIL_W-1:0]              rsp_tail,
  output logic [WCNT_W-1:0]              rsp_cnt,
  input  logic                           wr_en,
  input  logic [SLOT_W-1:0]              wr_slot,
  input  logic [TAIL_W-1:0]              wr_tail,
  input  logic [WCNT_W-1:0]              wr_cnt
);
  typedef struct packed {
    logic              valid;
    logic [KEY_W-1:0]  key;
    logic [TAIL_W-1:0] tail;
    logic [WCNT_W-1:0] cnt;
  } entry_t;

  entry_t mem [NUM_HASH][2**IDX_W];
  entry_t rd  [NUM_HASH];
  logic [NUM_HASH-1:0][IDX_W-1:0] idx_q;
  logic [KEY_W-1:0] key_q;
  logic [IDX_W-1:0] init_idx;
  logic             init_busy;

  assign init_done = !init_busy;

  // Banks: a synchronous read port and a write port used by write-back and
  // by the clearing sweep.
  for (genvar b = 0; b < NUM_HASH; b++) begin : g_bank
    always_ff @(posedge clk) begin
      if (init_busy)
        mem[b][init_idx] <= '0;
      else if (wr_en && wr_slot[SLOT_W-1:IDX_W] == BANK_W'(b))
        mem[b][wr_slot[IDX_W-1:0]] <= '{valid: 1'b1, key: key_q, tail: wr_tail, cnt: wr_cnt};
      if (lk_valid && !init_busy)
        rd[b] <= mem[b][lk_idx[b]];
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      init_busy <= 1'b1;
      init_idx  <= '0;
      rsp_valid <= 1'b0;
      idx_q     <= '0;
      key_q     <= '0;
    end else begin
      if (init_busy) begin
        init_idx <= init_idx + 1'b1;
        if (init_idx == '1) init_busy <= 1'b0;
      end
      rsp_valid <= lk_valid && !init_busy;
      if (lk_valid && !init_busy) begin
        idx_q <= lk_idx;
        key_q <= lk_key;
      end
    end
  end

  // Resolve hit / new / fail from the candidate entries.
  always_comb begin
    rsp_hit  = 1'b0;
    rsp_new  = 1'b0;
    rsp_slot = '0;
    rsp_tail = '0;
    rsp_cnt  = '0;
    for (int b = NUM_HASH - 1; b >= 0; b--) begin
      if (!rd[b].valid && !rsp_hit) begin
        rsp_new  = 1'b1;
        rsp_slot = {BANK_W'(b), idx_q[b]};
      end
    end
    for (int b = NUM_HASH - 1; b >= 0; b--) begin
      if (rd[b].valid && rd[b].key == key_q) begin
        rsp_hit  = 1'b1;
        rsp_slot = {BANK_W'(b), idx_q[b]};
        rsp_tail = rd[b].tail;
        rsp_cnt  = rd[b].cnt;
      end
    end
    if (rsp_hit) rsp_new = 1'b0;
    rsp_fail = !rsp_hit && !rsp_new;
  end
endmodule
