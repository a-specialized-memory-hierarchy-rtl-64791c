// tb_qdr_ctrl: random byte-masked writes and tagged reads through the
// controller to the QDR-SRAM model; read data must match a reference
// memory, come back in order with their tags, and appear a fixed number
// of cycles after an uncongested read is accepted.
module tb_qdr_ctrl;
  logic clk = 1'b0, rst_n = 1'b1;
  always #5 clk = !clk;
  logic cmd_valid = 1'b0, cmd_ready, cmd_we = 1'b0;
  logic [5:0] cmd_addr = '0;
  logic [127:0] cmd_wdata = '0;
  logic [15:0] cmd_be = '0;
  logic [0:0] cmd_tag = '0;
  logic rsp_valid;
  logic [127:0] rsp_data;
  logic [0:0] rsp_tag;
  logic mem_rd_en, mem_wr_en, mem_rd_valid;
  logic [5:0] mem_rd_addr, mem_wr_addr;
  logic [127:0] mem_wr_data, mem_rd_data;
  logic [15:0] mem_wr_be;
  logic [127:0] refm [64];
  logic [128:0] expq [$];
  int unsigned checks = 0, failures = 0;
  longint unsigned cyc = 0, t_issue = 0;

  qdr_ctrl #(.ADDR_W(6), .DATA_W(128), .TAG_W(1)) dut (.*);
  qdr_sram_model #(.ADDR_W(6), .DATA_W(128), .RD_LAT(3)) mem (
    .clk, .rd_en(mem_rd_en), .rd_addr(mem_rd_addr), .wr_en(mem_wr_en), .wr_addr(mem_wr_addr),
    .wr_data(mem_wr_data), .wr_be(mem_wr_be), .rd_valid(mem_rd_valid), .rd_data(mem_rd_data));

  always @(posedge clk) begin
    cyc <= cyc + 1;
    if (rsp_valid) begin
      checks++;
      if (expq.size() == 0 || {rsp_tag, rsp_data} != expq[0]) begin
        failures++; $display("read mismatch");
      end
      if (expq.size() > 0) void'(expq.pop_front());
    end
  end

  initial begin
    for (int a = 0; a < 64; a++) refm[a] = '0;
    #2 rst_n = 1'b0;
    #20 rst_n = 1'b1;
    // latency of one lone read: queue (1) + issue register (1) + device (3)
    @(negedge clk);
    cmd_valid = 1'b1; cmd_we = 1'b0; cmd_addr = 6'd1; cmd_tag = 1'b1;
    expq.push_back({1'b1, refm[1]});
    t_issue = cyc;
    @(negedge clk);
    cmd_valid = 1'b0;
    while (!rsp_valid) @(negedge clk);
    checks++;
    if (cyc - t_issue != 5) begin failures++; $display("latency %0d", cyc - t_issue); end
    for (int i = 0; i < 3000; i++) begin
      @(negedge clk);
      cmd_valid = ($urandom_range(99) < 80);
      cmd_we    = ($urandom_range(1) == 1);
      cmd_addr  = 6'($urandom);
      cmd_wdata = {$urandom, $urandom, $urandom, $urandom};
      cmd_be    = 16'($urandom);
      cmd_tag   = 1'($urandom);
      @(posedge clk);
      if (cmd_valid && cmd_ready) begin
        if (cmd_we) begin
          for (int b = 0; b < 16; b++) if (cmd_be[b]) refm[cmd_addr][b*8 +: 8] = cmd_wdata[b*8 +: 8];
        end else expq.push_back({cmd_tag, refm[cmd_addr]});
      end
    end
    @(negedge clk);
    cmd_valid = 1'b0;
    repeat (40) @(negedge clk);
    checks++;
    if (expq.size() != 0) begin failures++; $display("%0d reads lost", expq.size()); end
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
