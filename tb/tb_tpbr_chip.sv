// tb_tpbr_chip: end-to-end run of the TPBR protocol on a 7-router network
// (two triangles joined through a cut node), which exercises special nodes.
// Chips are built for 7 nodes with a 256-cycle I/O operation for the timeout.
module tb_tpbr_chip;
  tb_net_harness #(.N(7), .TOPO(0), .FULL(1'b0), .IO_CYC(256), .WATCHDOG(300000)) h ();
endmodule
