// tb_route_unit: node 0 of a 4-node network, ports 0..2 connected, with the
// turn between ports 0 and 2 (rows 1 and 3) prohibited. The neighbours' T
// vectors are scripted for three steps; the step-2 vector of port 0 arrives
// before the step-1 vector of port 2 to exercise the two banks. Expected
// tables and the node's own T vectors were worked out by hand from the
// update rule (first lowest permitted port whose neighbour reports t-1 hops).
module tb_route_unit import tpbr_pkg::*;;
  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic start, rx_valid, rx_ready, tx_valid, tx_ready, done, ev_step, ev_rwrite;
  logic [PMAT-1:0][PMAT-1:0] p_mat;
  pkt_t rx_pkt, tx_pkt;
  logic [1:0] rx_port;
  logic [3:0] tx_mask;
  logic [2:0] tbl_row;
  logic [3:0] tbl_col;
  logic [7:0] tbl_r, tbl_d;

  route_unit #(.NUM_NODES(4), .MAX_STEPS(3)) dut (
    .clk, .rst_n, .node_id(4'd0), .pstat(4'b0111), .start, .p_mat,
    .rx_valid, .rx_pkt, .rx_port, .rx_ready, .tx_valid, .tx_pkt, .tx_mask, .tx_ready,
    .tbl_row, .tbl_col, .tbl_r, .tbl_d, .done, .ev_step, .ev_rwrite
  );

  // own T vectors per step, by port
  logic [15:0] sent [4][3];
  int nsent;
  always @(posedge clk) if (rst_n && tx_valid && tx_ready) begin
    for (int y = 0; y < 3; y++) if (tx_mask == (4'b0001 << y)) sent[tx_pkt.counter[1:0]][y] = tx_pkt.data[15:0];
    nsent++;
  end
  int steps, writes;
  always @(posedge clk) begin
    if (rst_n && ev_step) steps++;
    if (rst_n && ev_rwrite) writes++;
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  task automatic give(input int step, input logic [1:0] prt, input logic [3:0] t);
    pkt_t p;
    p = '0; p.src = 8'(prt + 1); p.hop = p.src; p.dest = BCAST; p.ptype = PT_TABLE;
    p.counter = 8'(step); p.data = {60'd0, t}; p.time_left = TTL_INIT;
    @(negedge clk);
    rx_pkt = p; rx_port = prt; rx_valid = 1;
    @(negedge clk);
    rx_valid = 0;
  endtask

  // expected R and D: rows 0..4, destinations 0..3; 255 = none
  int er [5][4] = '{'{0, 1, 2, 3}, '{0, 2, 2, 2}, '{0, 1, 3, 3}, '{0, 2, 2, 2}, '{0, 255, 255, 255}};
  int ed [5][4] = '{'{0, 1, 1, 1}, '{0, 2, 1, 2}, '{0, 1, 2, 1}, '{0, 2, 1, 2}, '{0, 255, 255, 255}};

  initial begin
    start = 0; rx_valid = 0; tx_ready = 1; rx_pkt = '0; rx_port = 0; tbl_row = 0; tbl_col = 0;
    nsent = 0; steps = 0; writes = 0;
    p_mat = '0;
    for (int k = 0; k < PMAT; k++) begin p_mat[0][k] = 1; p_mat[k][0] = 1; end
    p_mat[1][2] = 1; p_mat[2][1] = 1; p_mat[2][3] = 1; p_mat[3][2] = 1;
    repeat (2) @(posedge clk);
    rst_n = 1;
    @(posedge clk);
    start = 1;
    give(1, 2'd0, 4'b0010);
    give(1, 2'd1, 4'b0100);
    give(2, 2'd0, 4'b1000);       // early: step 2 before the last step-1 vector
    repeat (20) @(posedge clk);
    check(steps == 0, "updated before all step-1 vectors");
    give(1, 2'd2, 4'b1000);
    give(2, 2'd1, 4'b1010);
    give(2, 2'd2, 4'b0110);
    give(3, 2'd0, 4'b0100);
    give(3, 2'd1, 4'b0000);
    give(3, 2'd2, 4'b0000);
    while (!done) @(posedge clk);
    check(steps == 3 && writes == 2, $sformatf("steps %0d writes %0d", steps, writes));
    check(nsent == 9, $sformatf("%0d T packets sent, expected 9", nsent));
    check(sent[1][0] == 16'h0001 && sent[1][1] == 16'h0001 && sent[1][2] == 16'h0001, "step-1 T");
    check(sent[2][0] == 16'b0100 && sent[2][1] == 16'b1010 && sent[2][2] == 16'b0100, "step-2 T");
    check(sent[3][0] == 16'b1010 && sent[3][1] == 16'b0100 && sent[3][2] == 16'b1010, "step-3 T");
    for (int i = 0; i < 5; i++)
      for (int k = 0; k < 4; k++) begin
        tbl_row = 3'(i); tbl_col = 4'(k);
        #1;
        check(tbl_r == 8'(er[i][k]) && tbl_d == 8'(ed[i][k]),
              $sformatf("R/D(%0d,%0d) = %0d/%0d expected %0d/%0d", i, k, tbl_r, tbl_d, er[i][k], ed[i][k]));
      end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (3000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
