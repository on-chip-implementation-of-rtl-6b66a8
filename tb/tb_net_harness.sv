// tb_net_harness: a network of TPBR chips run through the whole protocol.
//
// Builds a network of N routers (topology TOPO: 0 = two triangles joined
// through a degree-2 cut node, 1 = 4x4 mesh, 2 = 10 nodes and 17 edges with
// 44 turns, the size of the worked example of the turn-prohibition bound,
// 3 = 7 nodes where a cut node makes special nodes next to a 3-cycle),
// gives every router a tpbr_chip and four port buffers, and models each link
// as an in-order packet FIFO:
// a packet written to word 7 of a port buffer lands in the receive FIFO of
// the neighbour's port, whose int_req stays high while the FIFO is not empty.
// After reset it waits until every chip has built its tables, then checks,
// against a reference worked out here on the whole graph:
//   - each chip's order (rank by degree, ties by id) and degree table;
//   - each chip's turn matrix and special flag, from a central run of the
//     turn-prohibition rule (components found by graph search);
//   - the P-matrix word written to memory;
//   - every R and D entry, from shortest permitted paths found by relaxation;
//   - that every node reaches every other from its CPU, and that the channel
//     dependency graph of the permitted turns has no cycle (deadlock free);
//   - for the mesh and the 10-node network, that the number of prohibited
//     turns is at least the lower bound for a deadlock-free turn set.
// It also injects one packet with a bad crc and one with no time left, and
// counts every protocol mechanism; one that never happens is a failure.
module tb_net_harness
  import tpbr_pkg::*;
#(
  parameter int N         = 7,
  parameter int TOPO      = 0,
  parameter bit FULL      = 1'b0,    // instantiate the chip with its defaults
  parameter int IO_CYC    = 256,
  parameter int WATCHDOG  = 400000
) ();

  localparam int DEPTH = 64;

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  always #5 clk = ~clk;

  int checks = 0, failures = 0;

  // ---------------- topology ----------------
  int nb  [N][4];    // neighbour on port p, -1 if none
  int nbp [N][4];    // port of that neighbour that leads back
  int ne;
  int ea [32];
  int eb [32];

  task automatic add_edge(input int a, input int b);
    ea[ne] = a;
    eb[ne] = b;
    ne++;
  endtask

  initial begin
    ne = 0;
    if (TOPO == 0) begin
      add_edge(1, 0); add_edge(1, 2); add_edge(0, 3); add_edge(0, 4);
      add_edge(3, 4); add_edge(2, 5); add_edge(2, 6); add_edge(5, 6);
    end else if (TOPO == 3) begin
      // 7 nodes: a degree-2 node 1 joins node 0 (on the cycle 0-2-3) to the
      // chain 5-6, so its neighbours 0 and 5 become special; if special nodes
      // permitted all their turns, the cycle 0-2-3 would keep a dependency cycle
      add_edge(0, 1); add_edge(0, 2); add_edge(0, 3); add_edge(1, 5);
      add_edge(2, 3); add_edge(2, 4); add_edge(3, 4); add_edge(5, 6);
    end else if (TOPO == 2) begin
      // 10 nodes, 17 edges, degrees 4,4,4,4,4,4,3,3,2,2: a ring with seven chords
      for (int n = 0; n < 10; n++) add_edge(n, (n + 1) % 10);
      add_edge(0, 3); add_edge(0, 6); add_edge(1, 4); add_edge(1, 7);
      add_edge(2, 5); add_edge(2, 4); add_edge(3, 5);
    end else begin
      for (int r = 0; r < 4; r++)
        for (int c = 0; c < 4; c++) begin
          if (c < 3) add_edge(r*4 + c, r*4 + c + 1);
          if (r < 3) add_edge(r*4 + c, (r+1)*4 + c);
        end
    end
    for (int n = 0; n < N; n++)
      for (int p = 0; p < 4; p++) begin
        nb[n][p]  = -1;
        nbp[n][p] = -1;
      end
    for (int e = 0; e < ne; e++) begin
      int pa, pb;
      pa = 0; while (nb[ea[e]][pa] != -1) pa++;
      pb = 0; while (nb[eb[e]][pb] != -1) pb++;
      nb[ea[e]][pa]  = eb[e]; nbp[ea[e]][pa] = pb;
      nb[eb[e]][pb]  = ea[e]; nbp[eb[e]][pb] = pa;
    end
  end

  // ---------------- chips ----------------
  logic [3:0]  pstat    [N];
  logic [15:0] bus_addr [N];
  logic [15:0] bus_dout [N];
  logic [15:0] bus_din  [N];
  logic        bus_rw   [N];
  logic [3:0]  bus_cs_n [N];
  logic [3:0]  int_req  [N];
  logic [3:0]  int_ack  [N];
  logic        mem_cs   [N];
  logic        mem_we   [N];
  logic [15:0] mem_addr [N];
  logic [15:0] mem_data [N];
  logic [2:0]  tbl_row  [N];
  logic [3:0]  tbl_col  [N];
  logic [7:0]  tbl_r    [N];
  logic [7:0]  tbl_d    [N];
  logic        token_done [N];
  logic [7:0]  order    [N];
  logic [MAX_NODES-1:0][2:0] degrees [N];
  logic [7:0]  token    [N];
  logic        prohibit_done [N];
  logic        special  [N];
  logic        all_pdone [N];
  logic        route_done [N];
  logic [PMAT-1:0][PMAT-1:0] p_mat [N];
  chip_ev_t    events   [N];

  for (genvar g = 0; g < N; g++) begin : node
    always_comb for (int p = 0; p < 4; p++) pstat[g][p] = (nb[g][p] >= 0);
    if (FULL) begin : dflt
      tpbr_chip u (
        .clk, .rst_n, .node_id(4'(g)), .pstat(pstat[g]),
        .bus_addr(bus_addr[g]), .bus_dout(bus_dout[g]), .bus_din(bus_din[g]),
        .bus_rw(bus_rw[g]), .bus_cs_n(bus_cs_n[g]), .int_req(int_req[g]), .int_ack(int_ack[g]),
        .mem_cs(mem_cs[g]), .mem_we(mem_we[g]), .mem_addr(mem_addr[g]), .mem_data(mem_data[g]),
        .tbl_row(tbl_row[g]), .tbl_col(tbl_col[g]), .tbl_r(tbl_r[g]), .tbl_d(tbl_d[g]),
        .token_done(token_done[g]), .order(order[g]), .degrees(degrees[g]), .token(token[g]),
        .prohibit_done(prohibit_done[g]), .special(special[g]),
        .all_prohibit_done(all_pdone[g]), .route_done(route_done[g]), .p_mat(p_mat[g]),
        .events(events[g])
      );
    end else begin : reduced
      tpbr_chip #(.NUM_NODES(N), .IO_OP_CYCLES(IO_CYC)) u (
        .clk, .rst_n, .node_id(4'(g)), .pstat(pstat[g]),
        .bus_addr(bus_addr[g]), .bus_dout(bus_dout[g]), .bus_din(bus_din[g]),
        .bus_rw(bus_rw[g]), .bus_cs_n(bus_cs_n[g]), .int_req(int_req[g]), .int_ack(int_ack[g]),
        .mem_cs(mem_cs[g]), .mem_we(mem_we[g]), .mem_addr(mem_addr[g]), .mem_data(mem_data[g]),
        .tbl_row(tbl_row[g]), .tbl_col(tbl_col[g]), .tbl_r(tbl_r[g]), .tbl_d(tbl_d[g]),
        .token_done(token_done[g]), .order(order[g]), .degrees(degrees[g]), .token(token[g]),
        .prohibit_done(prohibit_done[g]), .special(special[g]),
        .all_prohibit_done(all_pdone[g]), .route_done(route_done[g]), .p_mat(p_mat[g]),
        .events(events[g])
      );
    end
  end

  // ---------------- port buffers and links ----------------
  logic [127:0] fifo [N][4][DEPTH];
  int           head [N][4];
  int           cnt  [N][4];
  logic [127:0] wbuf [N][4];
  logic [15:0]  memword [N];
  int           memwrites [N];
  int           cycle = 0;
  int           overflow = 0;

  // packets with a bad crc byte and with no time left, placed in node 1, port 0
  function automatic logic [127:0] bad_pkt(input bit bad_crc);
    pkt_t p;
    p = '0;
    p.src = 8'd9; p.hop = 8'd9; p.dest = BCAST; p.ptype = PT_DEGREE;
    p.time_left = bad_crc ? TTL_INIT : 8'd0;
    p.crc = pkt_crc(p) ^ (bad_crc ? 8'h5A : 8'h00);
    return p;
  endfunction

  always_comb
    for (int n = 0; n < N; n++) begin
      bus_din[n] = '0;
      for (int p = 0; p < 4; p++) begin
        int_req[n][p] = (cnt[n][p] > 0);
        if (!bus_cs_n[n][p] && !bus_rw[n])
          bus_din[n] = fifo[n][p][head[n][p]][127 - 16*bus_addr[n][2:0] -: 16];
      end
    end

  always @(posedge clk) begin
    cycle <= cycle + 1;
    if (!rst_n) begin
      for (int n = 0; n < N; n++)
        for (int p = 0; p < 4; p++) begin
          head[n][p] <= 0;
          cnt[n][p]  <= 0;
        end
    end else begin
      for (int n = 0; n < N; n++) begin
        for (int p = 0; p < 4; p++) begin
          int d, dp, tail;
          int inc;
          inc = 0;
          // a packet sent by the neighbour on this port
          d  = nb[n][p];
          dp = nbp[n][p];
          if (d >= 0 && !bus_cs_n[d][dp] && bus_rw[d] && bus_addr[d][2:0] == 3'd7) begin
            logic [127:0] pk;
            pk = wbuf[d][dp];
            pk[15:0] = bus_dout[d];
            tail = (head[n][p] + cnt[n][p]) % DEPTH;
            fifo[n][p][tail] <= pk;
            inc = 1;
            if (cnt[n][p] >= DEPTH) overflow++;
          end
          if (cycle == 20 && n == 1 && p == 0) begin
            fifo[n][p][(head[n][p] + cnt[n][p]) % DEPTH]     <= bad_pkt(1'b1);
            fifo[n][p][(head[n][p] + cnt[n][p] + 1) % DEPTH] <= bad_pkt(1'b0);
            inc = 2;
          end
          if (int_ack[n][p]) begin
            head[n][p] <= (head[n][p] + 1) % DEPTH;
            cnt[n][p]  <= cnt[n][p] + inc - 1;
          end else begin
            cnt[n][p]  <= cnt[n][p] + inc;
          end
          // words written by this chip
          if (!bus_cs_n[n][p] && bus_rw[n])
            wbuf[n][p][127 - 16*bus_addr[n][2:0] -: 16] <= bus_dout[n];
        end
        if (mem_cs[n] && mem_we[n] && mem_addr[n] == 16'd1) begin
          memword[n]   <= mem_data[n];
          memwrites[n] <= memwrites[n] + 1;
        end
      end
    end
  end

  // ---------------- event counters ----------------
  localparam int NEV = $bits(chip_ev_t);
  int evcount [NEV];
  always @(posedge clk)
    if (rst_n)
      for (int n = 0; n < N; n++)
        for (int e = 0; e < NEV; e++)
          if (events[n][e]) evcount[e] <= evcount[e] + 1;

  // ---------------- reference model ----------------
  int ref_deg   [N];
  int ref_rank  [N];
  bit ref_spec  [N];
  bit any_spec;
  bit ref_p     [N][PMAT][PMAT];
  int ref_d     [N][PMAT][N];
  int ref_r     [N][PMAT][N];

  task automatic build_reference();
    bit processed [N];
    int byrank [N];
    for (int n = 0; n < N; n++) begin
      ref_deg[n] = 0;
      for (int p = 0; p < 4; p++) if (nb[n][p] >= 0) ref_deg[n]++;
    end
    for (int n = 0; n < N; n++) begin
      ref_rank[n] = 0;
      for (int m = 0; m < N; m++)
        if (ref_deg[m] < ref_deg[n] || (ref_deg[m] == ref_deg[n] && m < n)) ref_rank[n]++;
      byrank[ref_rank[n]] = n;
      processed[n] = 0;
      ref_spec[n]  = 0;
    end
    // turn prohibition, one node at a time
    for (int r = 0; r < N; r++) begin
      int a;
      bit act [4];
      bit tree [4];
      int comp [N];
      int ncomp;
      a = byrank[r];
      for (int m = 0; m < N; m++) comp[m] = -1;
      // components of the graph without a and the processed nodes
      for (int p = 0; p < 4; p++) begin
        act[p] = (nb[a][p] >= 0) && !processed[nb[a][p]];
        if (act[p] && comp[nb[a][p]] < 0) begin
          int queue [N];
          int qh, qt;
          qh = 0; qt = 0;
          queue[qt++] = nb[a][p];
          comp[nb[a][p]] = p;
          while (qh < qt) begin
            int u;
            u = queue[qh++];
            for (int q = 0; q < 4; q++) begin
              int v;
              v = nb[u][q];
              if (v >= 0 && v != a && !processed[v] && comp[v] < 0) begin
                comp[v] = p;
                queue[qt++] = v;
              end
            end
          end
        end
      end
      ncomp = 0;
      for (int p = 0; p < 4; p++) begin
        tree[p] = act[p] && (comp[nb[a][p]] == p);
        if (tree[p]) ncomp++;
      end
      for (int i = 0; i < PMAT; i++)
        for (int j = 0; j < PMAT; j++) begin
          if (i == 0 || j == 0) ref_p[a][i][j] = 1;
          else if (i == j || nb[a][i-1] < 0 || nb[a][j-1] < 0) ref_p[a][i][j] = 0;
          else ref_p[a][i][j] = !act[i-1] || !act[j-1] || (tree[i-1] && tree[j-1]);
        end
      if (ncomp > 1 && !ref_spec[a])
        for (int p = 0; p < 4; p++) if (tree[p]) ref_spec[nb[a][p]] = 1;
      processed[a] = 1;
    end
    // shortest permitted paths by relaxation
    for (int a = 0; a < N; a++)
      for (int i = 0; i < PMAT; i++)
        for (int k = 0; k < N; k++) begin
          ref_d[a][i][k] = (k == a) ? 0 : 255;
          ref_r[a][i][k] = (k == a) ? 0 : 255;
        end
    for (int t = 1; t < N; t++) begin
      int nd [N][PMAT][N];
      int nr [N][PMAT][N];
      nd = ref_d;
      nr = ref_r;
      for (int a = 0; a < N; a++)
        for (int i = 0; i < PMAT; i++)
          for (int k = 0; k < N; k++)
            if (ref_d[a][i][k] == 255)
              for (int m = 1; m < PMAT; m++)
                if (nr[a][i][k] == 255 && nb[a][m-1] >= 0 && ref_p[a][i][m] &&
                    ref_d[nb[a][m-1]][nbp[a][m-1] + 1][k] == t - 1) begin
                  nd[a][i][k] = t;
                  nr[a][i][k] = m;
                end
      ref_d = nd;
      ref_r = nr;
    end
  endtask

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures <= 20) $display("FAIL: %s", what);
    end
  endtask

  // channel dependency graph of the chips' permitted turns: channel c = (n,p),
  // n sends on its port p. c -> (nb, q) when the turn from input nbp+1 to
  // output q+1 is permitted at nb.
  function automatic bit cdg_acyclic();
    int indeg [N*4];
    int queue [N*4];
    int qh, qt, seen, nch;
    nch = 0;
    for (int c = 0; c < N*4; c++) indeg[c] = 0;
    for (int n = 0; n < N; n++)
      for (int p = 0; p < 4; p++) if (nb[n][p] >= 0) begin
        int b;
        nch++;
        b = nb[n][p];
        for (int q = 0; q < 4; q++)
          if (nb[b][q] >= 0 && p_mat[b][nbp[n][p] + 1][q + 1]) indeg[b*4 + q]++;
      end
    qh = 0; qt = 0; seen = 0;
    for (int n = 0; n < N; n++)
      for (int p = 0; p < 4; p++)
        if (nb[n][p] >= 0 && indeg[n*4 + p] == 0) queue[qt++] = n*4 + p;
    while (qh < qt) begin
      int c, n, p, b;
      c = queue[qh++];
      seen++;
      n = c / 4; p = c % 4; b = nb[n][p];
      for (int q = 0; q < 4; q++)
        if (nb[b][q] >= 0 && p_mat[b][nbp[n][p] + 1][q + 1]) begin
          indeg[b*4 + q]--;
          if (indeg[b*4 + q] == 0) queue[qt++] = b*4 + q;
        end
    end
    return seen == nch;
  endfunction

  // ---------------- run ----------------
  initial begin
    bit all;
    for (int e = 0; e < NEV; e++) evcount[e] = 0;
    for (int n = 0; n < N; n++) begin
      memwrites[n] = 0;
      tbl_row[n] = '0;
      tbl_col[n] = '0;
    end
    repeat (5) @(posedge clk);
    rst_n = 1'b1;
    build_reference();
    all = 0;
    while (!all) begin
      @(posedge clk);
      all = 1;
      for (int n = 0; n < N; n++) if (!route_done[n]) all = 0;
    end
    repeat (5) @(posedge clk);
    $display("all tables built after %0d cycles", cycle);

    for (int n = 0; n < N; n++) begin
      logic [15:0] pw;
      check(order[n] == 8'(ref_rank[n]), $sformatf("node %0d order %0d, expected %0d", n, order[n], ref_rank[n]));
      for (int m = 0; m < N; m++)
        check(degrees[n][m] == 3'(ref_deg[m]), $sformatf("node %0d degree of %0d", n, m));
      check(special[n] == ref_spec[n], $sformatf("node %0d special %0b expected %0b", n, special[n], ref_spec[n]));
      for (int i = 0; i < PMAT; i++)
        for (int j = 0; j < PMAT; j++)
          check(p_mat[n][i][j] == ref_p[n][i][j],
                $sformatf("node %0d P(%0d,%0d)=%0b expected %0b", n, i, j, p_mat[n][i][j], ref_p[n][i][j]));
      for (int i = 0; i < 4; i++)
        for (int j = 0; j < 4; j++) pw[15 - 4*i - j] = ref_p[n][i+1][j+1];
      check(memwrites[n] == 1 && memword[n] == pw, $sformatf("node %0d P-matrix memory word %h", n, memword[n]));
      check(all_pdone[n] && token[n] == 8'(N), $sformatf("node %0d final token %0d", n, token[n]));
    end
    // tables, through the read port
    for (int n = 0; n < N; n++)
      for (int i = 0; i < PMAT; i++)
        for (int k = 0; k < N; k++) begin
          tbl_row[n] = 3'(i);
          tbl_col[n] = 4'(k);
          #1;
          check(tbl_r[n] == 8'(ref_r[n][i][k]) && tbl_d[n] == 8'(ref_d[n][i][k]),
                $sformatf("node %0d R/D(%0d,%0d) = %0d/%0d expected %0d/%0d", n, i, k,
                          tbl_r[n], tbl_d[n], ref_r[n][i][k], ref_d[n][i][k]));
          if (i == 0)
            check(tbl_d[n] != NO_ROUTE, $sformatf("node %0d cannot reach %0d", n, k));
        end
    check(cdg_acyclic(), "channel dependency graph has a cycle");

    // fraction of prohibited turns against the lower bound that any
    // deadlock-free turn set must meet: 8/44 for the 10-node, 17-link
    // example, (p^2-2p+1)/(6p^2-12p+4) = 9/52 for the 4x4 mesh
    begin
      int nturn, nprohib;
      nturn = 0; nprohib = 0;
      for (int n = 0; n < N; n++)
        for (int i = 0; i < 4; i++)
          for (int j = i + 1; j < 4; j++)
            if (nb[n][i] >= 0 && nb[n][j] >= 0) begin
              nturn++;
              if (!p_mat[n][i+1][j+1]) nprohib++;
            end
      $display("prohibited turns: %0d of %0d", nprohib, nturn);
      if (TOPO == 2) check(nturn == 44 && nprohib >= 8, "prohibited turns below the bound 8/44");
      if (TOPO == 1) check(nturn == 52 && nprohib >= 9, "prohibited turns below the bound 9/52");
    end
    check(overflow == 0, "port buffer overflow");

    // every mechanism happened
    $display("events: deg_merge=%0d deg_drop=%0d probe_fwd=%0d probe_drop=%0d probe_ret=%0d special_tx=%0d",
             evcount[12], evcount[11], evcount[10], evcount[9], evcount[8], evcount[7]);
    $display("        release_fwd=%0d rt_step=%0d rt_write=%0d crc_drop=%0d ttl_drop=%0d bus_wait=%0d pkt_sent=%0d",
             evcount[6], evcount[5], evcount[4], evcount[3], evcount[2], evcount[1], evcount[0]);
    any_spec = 0;
    for (int n = 0; n < N; n++) any_spec |= ref_spec[n];
    for (int e = 0; e < NEV; e++)
      if (!(e == 7 && !any_spec))   // a graph that never splits has no special node
        check(evcount[e] > 0, $sformatf("event %0d never happened", e));
    check(evcount[3] == 1 && evcount[2] == 1, "injected bad packets not dropped exactly once");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (WATCHDOG) @(posedge clk);
    failures++;
    $display("watchdog: tables not built after %0d cycles", WATCHDOG);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
