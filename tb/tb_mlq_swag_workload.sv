// tb_mlq_swag_workload: window size / window advance sweep of the engine
// at its default size (128K keys, windows up to 4096 values): ws from 64
// to 4096, wa from 1 to ws, with up to 16 active keys. The input is sent
// as fast as the input FIFO accepts it and the transmit side never
// stalls, so each phase also reports the sustained rate in cycles per
// tuple and checks it against this implementation's own timing. Every
// result is checked against the reference model; see mlq_tb_harness,
// which also holds the cycle watchdog. The block below is a last-resort
// time limit above that watchdog.
module tb_mlq_swag_workload;
  mlq_tb_harness #(.FULL(1'b1), .CHECK_MECH(1'b0), .FAIL_PHASE(1'b0),
                   .MAX_CYCLES(8_000_000), .WORKLOAD(1'b1)) h ();

  initial begin
    #100_000_000;
    $display("time limit reached");
    $display("TB_RESULT checks=%0d failures=%0d", h.checks, h.failures + 1);
    $finish;
  end
endmodule
