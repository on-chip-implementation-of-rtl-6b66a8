// tb_tpbr_full: the TPBR protocol on a 16-router 4x4 mesh with the chip at
// its default parameters (16 nodes, 6 x 256-cycle timeout, 15 table steps).
module tb_tpbr_full;
  tb_net_harness #(.N(16), .TOPO(1), .FULL(1'b1), .WATCHDOG(2000000)) h ();
endmodule
