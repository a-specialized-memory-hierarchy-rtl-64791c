// tb_mlq_swag_full: end-to-end test of the engine at its default size
// (128K keys, windows of 4096 values), including a full 4096-value window
// read from all three memory levels; see mlq_tb_harness.
module tb_mlq_swag_full;
  mlq_tb_harness #(.FULL(1'b1), .CHECK_MECH(1'b0), .FAIL_PHASE(1'b0), .MAX_CYCLES(4_000_000)) h ();
endmodule
