// tb_prohibit_unit: node 2 with ports 0, 1, 2 connected.
// First, as a bystander, it must forward a foreign probe once (to its other
// ports, hop set to 2, time_left - 1) and drop the repeat. Then it runs with
// token 0: it must send a probe on each port, record that the probe from
// port 0 returns on port 1, and after the timeout find two components
// {0,1} and {2}: tree edges 0 and 2, so only the turn between ports 0 and 2
// is permitted, both neighbours on those ports get a special packet, the P
// word goes to memory and the token is released as 1. Finally it must
// forward a later release, mark the sender's port and take a special packet.
module tb_prohibit_unit import tpbr_pkg::*;;
  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic enable, rx_valid, rx_ready, tx_valid, tx_ready;
  logic [7:0] order, token;
  pkt_t rx_pkt, tx_pkt;
  logic [1:0] rx_port;
  logic [3:0] tx_mask;
  logic mem_cs, mem_we, special, done, all_done;
  logic [15:0] mem_addr, mem_data;
  logic [PMAT-1:0][PMAT-1:0] p_mat;
  logic ev_probe_fwd, ev_probe_drop, ev_probe_ret, ev_special_tx, ev_release_fwd;

  prohibit_unit #(.NUM_NODES(8), .TIMEOUT_IO_OPS(6), .IO_OP_CYCLES(4)) dut (
    .clk, .rst_n, .node_id(4'd2), .pstat(4'b0111), .enable, .order,
    .rx_valid, .rx_pkt, .rx_port, .rx_ready, .tx_valid, .tx_pkt, .tx_mask, .tx_ready,
    .mem_cs, .mem_we, .mem_addr, .mem_data, .p_mat, .special, .done, .all_done, .token,
    .ev_probe_fwd, .ev_probe_drop, .ev_probe_ret, .ev_special_tx, .ev_release_fwd
  );

  pkt_t sent [$];
  logic [3:0] masks [$];
  always @(posedge clk) if (rst_n && tx_valid && tx_ready) begin
    sent.push_back(tx_pkt);
    masks.push_back(tx_mask);
  end
  logic [15:0] memword;
  int memw;
  always @(posedge clk) if (mem_cs && mem_we) begin memword <= mem_data; memw++; end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  task automatic give(input pkt_t p, input logic [1:0] prt);
    rx_pkt = p; rx_port = prt; rx_valid = 1;
    @(posedge clk); #1;
    while (!rx_ready) begin @(posedge clk); #1; end
    @(posedge clk); #1;
    rx_valid = 0;
    repeat (4) @(posedge clk); #1;
  endtask

  function automatic pkt_t mk(input ptype_e t, input int src, input int hop, input int sub, input int cnt);
    pkt_t p;
    p = '0; p.src = 8'(src); p.hop = 8'(hop); p.dest = BCAST; p.ptype = t;
    p.sub = 8'(sub); p.counter = 8'(cnt); p.time_left = 8'd5;
    return p;
  endfunction

  initial begin
    int n;
    enable = 0; order = 8'd0; rx_valid = 0; tx_ready = 1; rx_pkt = '0; rx_port = 0; memw = 0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    @(posedge clk); #1;
    // bystander: forward a probe of node 5 once
    give(mk(PT_PROBE, 5, 7, 1, 0), 2'd0);
    check(sent.size() == 1 && masks[0] == 4'b0110 && sent[0].hop == 8'd2 &&
          sent[0].src == 8'd5 && sent[0].time_left == 8'd4 && sent[0].sub == 8'd1, "probe forward");
    give(mk(PT_PROBE, 5, 3, 1, 0), 2'd1);
    check(sent.size() == 1, "repeated probe must be dropped");
    sent.delete(); masks.delete();
    // run with token 0
    enable = 1;
    repeat (8) @(posedge clk); #1;
    check(sent.size() == 3, $sformatf("%0d probes sent, expected 3", sent.size()));
    for (int i = 0; i < 3 && i < sent.size(); i++)
      check(sent[i].ptype == PT_PROBE && sent[i].src == 8'd2 && sent[i].sub == 8'(i) &&
            masks[i] == (4'b0001 << i), $sformatf("probe %0d", i));
    give(mk(PT_PROBE, 2, 6, 0, 0), 2'd1);       // left on 0, back on 1
    sent.delete(); masks.delete();
    // quiet time: 6 I/O operations of 4 cycles after the returned probe, then
    // the decision and the first special packet
    n = 0;
    while (sent.size() == 0 && n < 200) begin @(posedge clk); #1; n++; end
    $display("returned probe to first special packet: %0d cycles", n);
    // counted from the cycle after the probe was taken
    check(n >= 6 * 4 - 1 && n <= 6 * 4 + 3, $sformatf("timeout took %0d cycles, expected 23..27", n));
    while (!done && n < 200) begin @(posedge clk); #1; n++; end
    check(done && token == 8'd1, "token not released");
    // permitted: local row/column, and the turn between ports 0 and 2 (rows 1 and 3)
    check(p_mat[1][3] && p_mat[3][1] && !p_mat[1][2] && !p_mat[2][1] && !p_mat[2][3] &&
          !p_mat[3][2] && !p_mat[1][1] && !p_mat[4][1] && p_mat[0][4] && p_mat[2][0],
          $sformatf("P matrix %h", p_mat));
    check(sent.size() == 3, $sformatf("%0d packets after run, expected 3", sent.size()));
    if (sent.size() == 3) begin
      check(sent[0].ptype == PT_SPECIAL && masks[0] == 4'b0001, "special to port 0");
      check(sent[1].ptype == PT_SPECIAL && masks[1] == 4'b0100, "special to port 2");
      check(sent[2].ptype == PT_RELEASE && sent[2].counter == 8'd1 && masks[2] == 4'b0111, "release");
    end
    repeat (3) @(posedge clk); #1;
    check(memw == 1 && memword == 16'b0010_0000_1000_0000, $sformatf("memory word %b", memword));
    // later: a release from neighbour 6 on port 1, then a special packet
    sent.delete(); masks.delete();
    give(mk(PT_RELEASE, 6, 6, 0, 5), 2'd1);
    check(token == 8'd5 && sent.size() == 1 && masks[0] == 4'b0101, "release forward");
    give(mk(PT_RELEASE, 6, 3, 0, 5), 2'd0);
    check(sent.size() == 1, "old release must not be forwarded");
    check(!special, "special too early");
    give(mk(PT_SPECIAL, 1, 1, 0, 0), 2'd0);
    check(special, "special not taken");
    give(mk(PT_RELEASE, 7, 7, 0, 8), 2'd2);
    check(all_done, "all_done at token 8");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
