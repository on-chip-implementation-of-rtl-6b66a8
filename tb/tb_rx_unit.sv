// tb_rx_unit: a port buffer model holds a packet; the receive unit must read
// its eight words from the right port in 2 cycles per word, acknowledge,
// deliver the packet with its port and hold it until accepted, and drop a
// packet with a bad crc byte or with no time left.
module tb_rx_unit import tpbr_pkg::*;;
  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;
  logic intr, rx_ack, bus_req, bus_gnt, cs, pkt_valid, pkt_ready, crc_drop, ttl_drop;
  logic [1:0] port_num, port, pkt_port;
  logic [15:0] addr, din;
  pkt_t pkt;
  int checks = 0, failures = 0;
  logic [127:0] buffer;
  int reads;

  rx_unit dut (.*);

  // port buffer: combinational read of the selected word
  assign din = buffer[127 - 16*addr[2:0] -: 16];
  always @(posedge clk) if (cs) begin
    reads++;
    if (port != port_num) begin failures++; $display("FAIL: read from wrong port"); end
  end
  assign bus_gnt = bus_req;   // bus always free

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  function automatic pkt_t mk(input logic [7:0] ttl, input logic [7:0] flip);
    pkt_t p;
    p.src = 8'd3; p.hop = 8'd7; p.dest = BCAST; p.ptype = PT_PROBE; p.sub = 8'd2;
    p.counter = 8'h11; p.data = 64'h0123_4567_89AB_CDEF; p.time_left = ttl; p.crc = '0;
    p.crc = pkt_crc(p) ^ flip;
    return p;
  endfunction

  task automatic deliver(input pkt_t p, input logic [1:0] prt, input int kind);
    int n, acks, crcs, ttls;
    bit got;
    @(negedge clk);
    buffer = p; port_num = prt; intr = 1; reads = 0;
    n = 0; acks = 0; crcs = 0; ttls = 0; got = 0;
    pkt_ready = 0;
    while (n < 60 && !got) begin
      @(posedge clk); #1; n++;
      if (rx_ack) begin acks++; intr = 0; end
      if (crc_drop) crcs++;
      if (ttl_drop) ttls++;
      if (pkt_valid) got = 1;
      if ((crcs + ttls) > 0 && n > 25) break;
    end
    check(acks == 1 && reads == 16, $sformatf("acks %0d reads %0d", acks, reads));
    if (kind == 0) begin
      check(got && pkt == p && pkt_port == prt, "packet or port differs");
      check(n == 19, $sformatf("intr to pkt_valid %0d cycles, expected 19", n));   // 1 request + 1 grant + 16 word + 1 check
      repeat (3) @(posedge clk);
      #1 check(pkt_valid, "packet not held");
      pkt_ready = 1;
      @(posedge clk); #1;
      pkt_ready = 0;
      check(!pkt_valid, "packet not released");
    end else begin
      check(!got, "bad packet delivered");
      check(kind == 1 ? crcs == 1 : ttls == 1, "drop not reported");
    end
  endtask

  initial begin
    intr = 0; port_num = 0; pkt_ready = 0; buffer = '0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    deliver(mk(8'h20, 8'h00), 2'd2, 0);
    deliver(mk(8'h01, 8'h00), 2'd0, 0);
    deliver(mk(8'h20, 8'h40), 2'd1, 1);
    deliver(mk(8'h00, 8'h00), 2'd3, 2);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
