// tb_mlq_swag_top: end-to-end test of the engine at reduced size (16-entry
// hash banks, windows up to 256 values); see mlq_tb_harness.
module tb_mlq_swag_top;
  mlq_tb_harness #(.FULL(1'b0), .IDX_W(4), .WS_MAX(256)) h ();
endmodule
