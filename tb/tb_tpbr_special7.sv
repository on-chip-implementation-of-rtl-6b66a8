// tb_tpbr_special7: end-to-end run of the TPBR protocol on a 7-router network
// (links 0-1, 0-2, 0-3, 1-5, 2-3, 2-4, 3-4, 5-6). Node 1 runs early and is a
// cut node, so its neighbours 0 and 5 become special nodes; node 0 also lies
// on the 3-cycle 0-2-3. The harness checks that the special flags are set,
// that every turn matrix matches its reference and, above all, that the
// channel dependency graph stays free of cycles. The network is this
// testbench's own choice. Chips are built for 7 nodes with a 256-cycle I/O
// operation for the timeout.
module tb_tpbr_special7;
  tb_net_harness #(.N(7), .TOPO(3), .FULL(1'b0), .IO_CYC(256), .WATCHDOG(300000)) h ();
  // outer watchdog, a little later than the harness's own
  initial begin
    repeat (301000) @(posedge h.clk);
    $display("TB_RESULT checks=%0d failures=%0d", h.checks, h.failures + 1);
    $finish;
  end
endmodule
