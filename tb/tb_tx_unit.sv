// tb_tx_unit: the transmit unit must write the packet, with its crc byte
// filled in, to every port of the mask (lowest first), one word per cycle at
// addresses 0..7, and be ready again afterwards.
module tb_tx_unit import tpbr_pkg::*;;
  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;
  logic req_valid, req_ready, bus_req, bus_gnt, cs, pkt_sent;
  pkt_t req_pkt;
  logic [3:0] req_mask;
  logic [1:0] port;
  logic [15:0] addr, wdata;
  int checks = 0, failures = 0;
  logic [127:0] got [4];
  int words [4];
  int order [$];
  int sent;

  tx_unit dut (.*);

  always @(posedge clk) bus_gnt <= bus_req;
  always @(posedge clk) if (cs) begin
    got[port][127 - 16*addr[2:0] -: 16] <= wdata;
    words[port]++;
    if (addr == 0) order.push_back(int'(port));
  end
  always @(posedge clk) if (pkt_sent) sent++;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    pkt_t p, e;
    int n;
    req_valid = 0; req_mask = 0; sent = 0;
    for (int i = 0; i < 4; i++) begin words[i] = 0; got[i] = '0; end
    p = '0; p.src = 8'd4; p.hop = 8'd4; p.dest = BCAST; p.ptype = PT_RELEASE;
    p.counter = 8'd6; p.data = 64'hDEAD_BEEF_0000_F400; p.time_left = TTL_INIT; p.crc = 8'h00;
    e = p; e.crc = pkt_crc(p);
    repeat (2) @(posedge clk);
    rst_n = 1;
    @(posedge clk); #1;
    check(req_ready, "not ready after reset");
    req_pkt = p; req_mask = 4'b1010; req_valid = 1;
    @(posedge clk); #1;
    req_valid = 0;
    check(!req_ready, "ready while sending");
    n = 1;
    while (!req_ready && n < 100) begin @(posedge clk); #1; n++; end
    check(n == 19, $sformatf("two copies took %0d cycles, expected 19", n));
    @(posedge clk); #1;
    check(words[1] == 8 && words[3] == 8 && words[0] == 0 && words[2] == 0, "words per port");
    check(got[1] == e && got[3] == e, "packet contents or crc");
    check(order.size() == 2 && order[0] == 1 && order[1] == 3, "port order");
    check(sent == 2, "pkt_sent count");
    // a single-port packet
    req_pkt = p; req_pkt.counter = 8'd9; req_mask = 4'b0001; req_valid = 1;
    @(posedge clk); #1; req_valid = 0;
    while (!req_ready) begin @(posedge clk); #1; end
    e = req_pkt; e.crc = pkt_crc(req_pkt);
    check(got[0] == e && words[0] == 8, "single-port packet");
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
