// tb_tpbr_ring10: end-to-end run of the TPBR protocol on a 10-router network
// with 17 links and 44 turns (a ring of ten with seven chords, node degrees
// 4,4,4,4,4,4,3,3,2,2), the size of the example network that the document
// uses for its lower bound on prohibited turns. The link layout itself is
// this testbench's own choice. Chips are built for 10 nodes with a 256-cycle
// I/O operation for the timeout; the harness checks every table against its
// reference, deadlock freedom and the event counts.
module tb_tpbr_ring10;
  tb_net_harness #(.N(10), .TOPO(2), .FULL(1'b0), .IO_CYC(256), .WATCHDOG(600000)) h ();
  // outer watchdog, a little later than the harness's own
  initial begin
    repeat (601000) @(posedge h.clk);
    $display("TB_RESULT checks=%0d failures=%0d", h.checks, h.failures + 1);
    $finish;
  end
endmodule
