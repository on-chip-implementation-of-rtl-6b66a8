// tb_token_unit: degree claiming in a 3-node network, seen from node 1
// (ports 0 and 1 connected, degree 2) and from node 0 (one port).
// Node 0 must send its claim at once; node 1 must merge received copies,
// claim its slot, resend only when its copy changed, set its R bit when all
// three slots are claimed and then report its rank by degree.
// A third instance (node 2, degree 2, equal to node 1) is handed a packet in
// which the other two nodes have already claimed, to check that equal degrees
// are ranked by node id (node 1 before node 2).
module tb_token_unit import tpbr_pkg::*;;
  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  // node 1 under test
  logic rx_valid, rx_ready, tx_valid, tx_ready, enable, ev_merge, ev_drop;
  pkt_t rx_pkt, tx_pkt;
  logic [1:0] rx_port;
  logic [3:0] tx_mask;
  logic [7:0] order;
  logic [MAX_NODES-1:0][2:0] degrees;
  // node 0
  logic tx_valid0, enable0, rx_ready0, ev_m0, ev_d0;
  pkt_t tx_pkt0;
  logic [3:0] tx_mask0;
  logic [7:0] order0;
  logic [MAX_NODES-1:0][2:0] degrees0;

  token_unit #(.NUM_NODES(3)) dut (
    .clk, .rst_n, .node_id(4'd1), .pstat(4'b0011),
    .rx_valid, .rx_pkt, .rx_port, .rx_ready,
    .tx_valid, .tx_pkt, .tx_mask, .tx_ready,
    .enable, .order, .degrees, .ev_merge, .ev_drop
  );

  token_unit #(.NUM_NODES(3)) dut0 (
    .clk, .rst_n, .node_id(4'd0), .pstat(4'b0100),
    .rx_valid(1'b0), .rx_pkt('0), .rx_port(2'd0), .rx_ready(rx_ready0),
    .tx_valid(tx_valid0), .tx_pkt(tx_pkt0), .tx_mask(tx_mask0), .tx_ready(1'b1),
    .enable(enable0), .order(order0), .degrees(degrees0), .ev_merge(ev_m0), .ev_drop(ev_d0)
  );

  // node 2: same degree as node 1, for the tie-break
  logic rx_valid2, rx_ready2, tx_valid2, enable2, ev_m2, ev_d2;
  pkt_t tx_pkt2;
  logic [3:0] tx_mask2;
  logic [7:0] order2;
  logic [MAX_NODES-1:0][2:0] degrees2;
  token_unit #(.NUM_NODES(3)) dut2 (
    .clk, .rst_n, .node_id(4'd2), .pstat(4'b1001),
    .rx_valid(rx_valid2), .rx_pkt(deg_pkt(slot(0, 1, 0) | slot(1, 2, 0))), .rx_port(2'd3),
    .rx_ready(rx_ready2),
    .tx_valid(tx_valid2), .tx_pkt(tx_pkt2), .tx_mask(tx_mask2), .tx_ready(1'b1),
    .enable(enable2), .order(order2), .degrees(degrees2), .ev_merge(ev_m2), .ev_drop(ev_d2)
  );

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  // slot value for node n claiming degree d, with R bit r
  function automatic logic [63:0] slot(input int n, input int d, input bit r);
    logic [63:0] s;
    s = '0;
    s[63 - 4*n -: 4] = {r, 1'b1, 2'(d - 1)};
    return s;
  endfunction

  function automatic pkt_t deg_pkt(input logic [63:0] data);
    pkt_t p;
    p = '0; p.src = 8'd0; p.hop = 8'd0; p.dest = BCAST; p.ptype = PT_DEGREE;
    p.data = data; p.time_left = TTL_INIT;
    return p;
  endfunction

  // offer a packet, then see whether node 1 sends one (within 10 cycles)
  task automatic offer(input pkt_t p, input bit exp_send, input logic [63:0] exp_data,
                       input logic [7:0] exp_count);
    int n;
    bit sent;
    rx_pkt = p; rx_valid = 1; rx_port = 2'd0;
    while (!rx_ready) begin @(posedge clk); #1; end
    @(posedge clk); #1;              // accepted at this edge
    rx_valid = 0;
    sent = 0;
    n = 0;
    tx_ready = 1;
    while (n < 10) begin
      if (tx_valid) begin
        sent = 1;
        check(tx_pkt.data == exp_data, $sformatf("sent data %h expected %h", tx_pkt.data, exp_data));
        check(tx_pkt.counter == exp_count, $sformatf("counter %0d expected %0d", tx_pkt.counter, exp_count));
        check(tx_mask == 4'b0011 && tx_pkt.ptype == PT_DEGREE && tx_pkt.src == 8'd1, "header/mask");
      end
      @(posedge clk); #1;
      n++;
      if (sent) break;
    end
    check(sent == exp_send, $sformatf("sent=%0b expected %0b", sent, exp_send));
  endtask

  // node 0's first transmission, captured when it happens
  int n0_sends;
  pkt_t n0_pkt;
  logic [3:0] n0_mask;
  always @(posedge clk) if (rst_n && tx_valid0) begin
    n0_sends++; n0_pkt <= tx_pkt0; n0_mask <= tx_mask0;
  end

  int drops;
  always @(posedge clk) if (rst_n && ev_drop) drops++;

  initial begin
    rx_valid2 = 0;
    rx_valid = 0; tx_ready = 1; rx_pkt = '0; rx_port = 0; drops = 0; n0_sends = 0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    @(posedge clk); #1;
    @(posedge clk); #1;
    // node 0 starts on its own
    check(n0_sends == 1 && n0_pkt.data == slot(0, 1, 0) && n0_pkt.counter == 8'd1 &&
          n0_mask == 4'b0100, "node 0 initial claim");
    check(!tx_valid, "node 1 must wait");
    // node 1 receives node 0's claim
    offer(deg_pkt(slot(0, 1, 0)), 1, slot(0, 1, 0) | slot(1, 2, 0), 8'd2);
    check(!enable, "enable before all claimed");
    // the same information again: dropped
    offer(deg_pkt(slot(0, 1, 0)), 0, '0, 8'd0);
    check(drops == 1, "drop not reported");
    // node 2 (degree 4) has claimed: all known, R bit of node 1 set
    offer(deg_pkt(slot(0, 1, 0) | slot(2, 4, 0)), 1,
          slot(0, 1, 0) | slot(1, 2, 1) | slot(2, 4, 0), 8'd3);
    repeat (2) @(posedge clk); #1;
    check(enable && order == 8'd1, $sformatf("enable %0b order %0d, expected 1", enable, order));
    check(degrees[0] == 3'd1 && degrees[1] == 3'd2 && degrees[2] == 3'd4, "degree table");
    // tie-break: node 2 has degree 2 like node 1, so it ranks after nodes 0 and 1
    rx_valid2 = 1;
    while (!rx_ready2) begin @(posedge clk); #1; end
    @(posedge clk); #1;
    rx_valid2 = 0;
    repeat (4) @(posedge clk); #1;
    check(enable2 && order2 == 8'd2, $sformatf("tie: enable %0b order %0d, expected 2", enable2, order2));
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
