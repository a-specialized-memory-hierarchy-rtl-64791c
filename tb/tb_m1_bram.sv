// tb_m1_bram: writes single values into random lanes of random queues and
// reads words back one cycle later, against a reference array.
module tb_m1_bram;
  logic clk = 1'b0;
  always #5 clk = !clk;
  logic rd_en = 1'b0, wr_en = 1'b0;
  logic [5:0] rd_addr = '0, wr_addr = '0;
  logic [31:0] rd_data, wr_data = '0;
  logic [1:0] wr_lane_en = '0;
  logic [1:0][15:0] refm [64];
  int unsigned checks = 0, failures = 0;

  m1_bram #(.NUM_KEYS(64), .V1(2), .VAL_W(16)) dut (.*);

  initial begin
    // fill every word so nothing read is uninitialised
    for (int a = 0; a < 64; a++) begin
      @(negedge clk);
      wr_en = 1'b1; wr_addr = 6'(a); wr_lane_en = 2'b11; wr_data = {16'(a), 16'(a + 100)};
      refm[a] = wr_data;
    end
    for (int i = 0; i < 2000; i++) begin
      @(negedge clk);
      wr_en      = ($urandom_range(1) == 1);
      wr_addr    = 6'($urandom);
      wr_lane_en = 2'($urandom);
      wr_data    = $urandom;
      rd_en      = 1'b1;
      rd_addr    = 6'($urandom);
      if (wr_addr == rd_addr) rd_addr = rd_addr + 1'b1;
      @(posedge clk);
      if (wr_en) for (int j = 0; j < 2; j++) if (wr_lane_en[j]) refm[wr_addr][j] = wr_data[j*16 +: 16];
      #1;
      checks++;
      if (rd_data != refm[rd_addr]) begin
        failures++; $display("addr %0d: %h exp %h", rd_addr, rd_data, refm[rd_addr]);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
