// tb_dram_ctrl: random line writes and reads through the controller to the
// DRAM model (which stalls at random) with a consumer that stalls at
// random; read lines must match a reference memory, in order, and the
// response queue must never overflow (checked by the module's assertion).
module tb_dram_ctrl;
  logic clk = 1'b0, rst_n = 1'b1;
  always #5 clk = !clk;
  logic cmd_valid = 1'b0, cmd_ready, cmd_we = 1'b0;
  logic [4:0] cmd_addr = '0;
  logic [511:0] cmd_wdata = '0;
  logic rsp_valid, rsp_ready = 1'b0;
  logic [511:0] rsp_data;
  logic mem_cmd_valid, mem_cmd_ready, mem_cmd_we, mem_rd_valid;
  logic [4:0] mem_cmd_addr;
  logic [511:0] mem_cmd_wdata, mem_rd_data;
  logic [511:0] refm [32];
  logic [511:0] expq [$];
  int unsigned checks = 0, failures = 0, nreads = 0;

  dram_ctrl #(.ADDR_W(5), .LINE_W(512), .Q_DEPTH(4), .RSP_DEPTH(4)) dut (.*);
  dram_model #(.ADDR_W(5), .LINE_W(512), .RD_LAT(9), .STALL_PCT(30)) mem (
    .clk, .cmd_valid(mem_cmd_valid), .cmd_ready(mem_cmd_ready), .cmd_we(mem_cmd_we),
    .cmd_addr(mem_cmd_addr), .cmd_wdata(mem_cmd_wdata), .rd_valid(mem_rd_valid), .rd_data(mem_rd_data));

  always @(posedge clk) begin
    if (rsp_valid && rsp_ready) begin
      checks++;
      nreads++;
      if (expq.size() == 0 || rsp_data != expq[0]) begin failures++; $display("line mismatch"); end
      if (expq.size() > 0) void'(expq.pop_front());
    end
  end

  initial begin
    for (int a = 0; a < 32; a++) refm[a] = '0;
    #2 rst_n = 1'b0;
    #20 rst_n = 1'b1;
    for (int i = 0; i < 3000; i++) begin
      @(negedge clk);
      cmd_valid = ($urandom_range(99) < 70);
      cmd_we    = ($urandom_range(2) == 0);
      cmd_addr  = 5'($urandom);
      for (int w = 0; w < 16; w++) cmd_wdata[w*32 +: 32] = $urandom;
      rsp_ready = ($urandom_range(99) < (i < 1500 ? 30 : 90));
      @(posedge clk);
      if (cmd_valid && cmd_ready) begin
        if (cmd_we) refm[cmd_addr] = cmd_wdata;
        else expq.push_back(refm[cmd_addr]);
      end
    end
    @(negedge clk);
    cmd_valid = 1'b0;
    rsp_ready = 1'b1;
    repeat (200) @(negedge clk);
    checks++;
    if (expq.size() != 0 || nreads < 100) begin failures++; $display("%0d lines lost", expq.size()); end
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
