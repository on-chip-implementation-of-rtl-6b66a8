// tb_bus_arbiter: checks that the receive and transmit units never hold the
// bus together, that waiting units alternate, and that address, write data,
// rw and the per-port chip selects come from the granted unit.
module tb_bus_arbiter;
  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;
  logic rx_req, rx_gnt, rx_cs, tx_req, tx_gnt, tx_cs, bus_rw;
  logic [1:0] rx_port, tx_port;
  logic [15:0] rx_addr, tx_addr, tx_wdata, bus_addr, bus_dout;
  logic [3:0] bus_cs_n;
  int checks = 0, failures = 0;

  bus_arbiter dut (.*);

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  always @(posedge clk) if (rst_n) begin
    checks++;
    if (rx_gnt && tx_gnt) begin failures++; $display("FAIL: both granted"); end
  end

  initial begin
    rx_req = 0; tx_req = 0; rx_cs = 0; tx_cs = 0;
    rx_port = 2'd2; tx_port = 2'd1; rx_addr = 16'h0005; tx_addr = 16'h0003; tx_wdata = 16'hBEEF;
    repeat (2) @(posedge clk);
    rst_n = 1'b1;
    // both request at once: receive first (nobody served yet)
    rx_req = 1; tx_req = 1;
    @(posedge clk); #1;
    check(rx_gnt && !tx_gnt, "first grant should go to rx");
    rx_cs = 1;
    #1;
    check(bus_cs_n == 4'b1011 && bus_addr == 16'h0005 && !bus_rw, "rx bus drive");
    repeat (3) @(posedge clk); #1;
    check(rx_gnt && !tx_gnt, "grant must hold while requested");
    rx_cs = 0; rx_req = 0;
    @(posedge clk); #1;
    check(tx_gnt && !rx_gnt, "tx granted after rx releases");
    tx_cs = 1; rx_req = 1;
    #1;
    check(bus_cs_n == 4'b1101 && bus_addr == 16'h0003 && bus_dout == 16'hBEEF && bus_rw, "tx bus drive");
    @(posedge clk); #1;
    tx_cs = 0; tx_req = 0;
    @(posedge clk); #1;
    check(rx_gnt, "rx granted after tx releases");
    // tx waiting while rx releases, rx asks again: tx goes first (alternation)
    tx_req = 1; rx_req = 0;
    @(posedge clk); #1;
    rx_req = 1;
    check(tx_gnt && !rx_gnt, "alternation: tx after rx");
    tx_req = 0;
    @(posedge clk); #1;
    @(posedge clk); #1;
    check(rx_gnt, "rx after tx");
    check(bus_cs_n == 4'b1111, "no chip select without cs");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (1000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
