// mlq_pkg: types and constants shared by the stream-aggregation engine.
//
// A tuple is 64 bits: a 24-bit timestamp, a 24-bit key (vehicle ID) and a
// 16-bit value (speed), the LinearRoad subset the engine is built for. One
// tuple fills one 64-bit word of the 10 Gb/s network path at 156.25 MHz.
// The multi-level queue (MLQ) sizes follow the main 3-level configuration:
// level 1 (on-chip BRAM) keeps 2 values per key (4 bytes), level 2
// (QDR-SRAM) keeps 32 values per key, one full 64-byte DRAM line, and
// level 3 (DRAM) keeps the rest of a window of up to 4096 values.
// The per-level value counts (V1, V2) are this design's reading of the
// configuration; the field widths follow the benchmark tuple format.
package mlq_pkg;
  parameter int unsigned TS_W   = 24;
  parameter int unsigned KEY_W  = 24;
  parameter int unsigned VAL_W  = 16;
  parameter int unsigned CNT_W  = 16;   // window counts carried in results

  typedef struct packed {
    logic [TS_W-1:0]  ts;
    logic [KEY_W-1:0] key;
    logic [VAL_W-1:0] value;
  } tuple_t;

  // Result of one aggregation: the query's average, minimum, maximum and
  // median over the window of one key.
  typedef struct packed {
    logic [KEY_W-1:0] key;
    logic [TS_W-1:0]  ts;
    logic [CNT_W-1:0] count;
    logic [VAL_W-1:0] avg;
    logic [VAL_W-1:0] vmin;
    logic [VAL_W-1:0] vmax;
    logic [VAL_W-1:0] median;
  } result_t;

  // Read-response tags on the level-2 path.
  typedef enum logic {TAG_FLUSH = 1'b0, TAG_AGG = 1'b1} rd_tag_e;
endpackage
