// data_collector: gathers one key's window from the three levels and
// delivers it to the compute kernel in arrival order, oldest value first.
//
// The reads of an aggregation are issued to all levels at once, so their
// data arrive interleaved and at different rates. The collector takes the
// aggregation descriptor (how many values each level holds and where the
// first one sits in the first word/line it returns), then emits
//   a3 values from the level-3 lines, skipping skip3 values of the first,
//   a2 values from the level-2 words, starting skip2 into the first,
//   a1 values from the level-1 block carried in the descriptor,
// one value per cycle with valid/ready. Level-2 words are buffered as they
// come (at most V2/M2_VPW words per window); level-3 lines are taken one
// at a time from the DRAM controller's response queue, which holds the
// rest. out_first/out_last mark the ends of the window and out_key,
// out_ts, out_cnt describe it. desc_ready is high only when idle, so one
// window is in flight at a time.
// Reordering across levels follows the document; the one-value-per-cycle
// output and the buffer organisation are this design's choice.
module data_collector
  import mlq_pkg::*;
#(
  parameter int unsigned WS_MAX = 4096,
  parameter int unsigned V1     = 2,
  parameter int unsigned V2     = 32,
  parameter int unsigned M2_VPW = 8,
  parameter int unsigned M3_VPL = 32,
  localparam int unsigned WCNT_W = $clog2(WS_MAX) + 1,
  localparam int unsigned M2_W   = M2_VPW * VAL_W,
  localparam int unsigned LINE_W = M3_VPL * VAL_W,
  localparam int unsigned W2K    = V2 / M2_VPW
) (
  input  logic                      clk,
  input  logic                      rst_n,
  input  logic                      desc_valid,
  output logic                      desc_ready,
  input  logic [KEY_W-1:0]          desc_key,
  input  logic [TS_W-1:0]           desc_ts,
  input  logic [WCNT_W-1:0]         desc_cnt,
  input  logic [WCNT_W-1:0]         desc_a3,
  input  logic [$clog2(M3_VPL)-1:0] desc_skip3,
  input  logic [WCNT_W-1:0]         desc_a2,
  input  logic [$clog2(M2_VPW)-1:0] desc_skip2,
  input  logic [WCNT_W-1:0]         desc_a1,
  input  logic [$clog2(V1+1)-1:0]   desc_first1,
  input  logic [V1*VAL_W-1:0]       desc_m1,
  input  logic                      m2_valid,
  input  logic [M2_W-1:0]           m2_data,
  input  logic                      m3_valid,
  output logic                      m3_ready,
  input  logic [LINE_W-1:0]         m3_data,
  output logic                      out_valid,
  input  logic                      out_ready,
  output logic [VAL_W-1:0]          out_value,
  output logic                      out_first,
  output logic                      out_last,
  output logic [KEY_W-1:0]          out_key,
  output logic [TS_W-1:0]           out_ts,
  output logic [WCNT_W-1:0]         out_cnt
);
  localparam int unsigned P3_W = $clog2(M3_VPL);
  localparam int unsigned P2_W = $clog2(V2);

  typedef enum logic [1:0] {P_IDLE, P_L3, P_L2, P_L1} phase_e;
  phase_e phase;

  logic [WCNT_W-1:0] rem, a2, a1, emitted;
  logic [P3_W-1:0]   pos3;
  logic              line_ok, first_line;
  logic [LINE_W-1:0] line;
  logic [P2_W-1:0]   pos2;
  logic [M2_W-1:0]   m2buf [W2K];
  logic [$clog2(W2K+1)-1:0] m2_have;
  logic [$clog2(V1+1)-1:0]  pos1;
  logic [V1*VAL_W-1:0]      m1;
  logic [P3_W-1:0]   skip3;

  assign desc_ready = (phase == P_IDLE);
  assign m3_ready   = (phase == P_L3) && !line_ok;

  logic [P2_W-1:0] w2;
  always_comb begin
    w2        = pos2 / M2_VPW;
    out_valid = 1'b0;
    out_value = '0;
    unique case (phase)
      P_L3: begin
        out_valid = line_ok;
        out_value = line[pos3*VAL_W +: VAL_W];
      end
      P_L2: begin
        out_valid = (m2_have > ($clog2(W2K+1))'(w2));
        out_value = m2buf[w2[$clog2(W2K)-1:0]][(pos2 % M2_VPW)*VAL_W +: VAL_W];
      end
      P_L1: begin
        out_valid = 1'b1;
        out_value = m1[pos1*VAL_W +: VAL_W];
      end
      default: ;
    endcase
    out_first = (emitted == '0);
    out_last  = (emitted == out_cnt - 1'b1);
  end

  logic fire;
  assign fire = out_valid && out_ready;

  // Phase after the current one runs out.
  function automatic phase_e next_after(input phase_e p, input logic [WCNT_W-1:0] n2,
                                        input logic [WCNT_W-1:0] n1);
    if (p == P_L3 && n2 != '0) return P_L2;
    if ((p == P_L3 || p == P_L2) && n1 != '0) return P_L1;
    return P_IDLE;
  endfunction

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      phase      <= P_IDLE;
      rem        <= '0;
      a2         <= '0;
      a1         <= '0;
      emitted    <= '0;
      pos3       <= '0;
      skip3      <= '0;
      line_ok    <= 1'b0;
      first_line <= 1'b0;
      line       <= '0;
      pos2       <= '0;
      m2_have    <= '0;
      pos1       <= '0;
      m1         <= '0;
      out_key    <= '0;
      out_ts     <= '0;
      out_cnt    <= '0;
    end else begin
      if (m2_valid) begin
        m2buf[m2_have[$clog2(W2K)-1:0]] <= m2_data;
        m2_have <= m2_have + 1'b1;
      end
      unique case (phase)
        P_IDLE: if (desc_valid) begin
          out_key    <= desc_key;
          out_ts     <= desc_ts;
          out_cnt    <= desc_cnt;
          a2         <= desc_a2;
          a1         <= desc_a1;
          m1         <= desc_m1;
          skip3      <= desc_skip3;
          pos2       <= P2_W'(desc_skip2);
          pos1       <= desc_first1;
          emitted    <= '0;
          first_line <= 1'b1;
          line_ok    <= 1'b0;
          m2_have    <= '0;
          if (desc_a3 != '0) begin
            phase <= P_L3;
            rem   <= desc_a3;
          end else if (desc_a2 != '0) begin
            phase <= P_L2;
            rem   <= desc_a2;
          end else begin
            phase <= P_L1;
            rem   <= desc_a1;
          end
        end
        P_L3: begin
          if (!line_ok && m3_valid) begin
            line       <= m3_data;
            line_ok    <= 1'b1;
            pos3       <= first_line ? skip3 : '0;
            first_line <= 1'b0;
          end
          if (fire) begin
            pos3 <= pos3 + 1'b1;
            if (pos3 == P3_W'(M3_VPL - 1)) line_ok <= 1'b0;
          end
        end
        P_L2: if (fire) pos2 <= pos2 + 1'b1;
        P_L1: if (fire) pos1 <= pos1 + 1'b1;
        default: ;
      endcase
      if (fire) begin
        emitted <= emitted + 1'b1;
        rem     <= rem - 1'b1;
        if (rem == WCNT_W'(1)) begin
          line_ok <= 1'b0;
          phase   <= next_after(phase, a2, a1);
          rem     <= (phase == P_L3 && a2 != '0) ? a2 : a1;
        end
      end
    end
  end
endmodule
