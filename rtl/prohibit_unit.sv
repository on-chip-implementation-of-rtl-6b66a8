// prohibit_unit: turn prohibition unit (protocol step 2).
//
// Nodes run turn prohibition one at a time, in the order found by the token
// unit: the node whose order equals the current token value runs, then
// releases the token (token value + 1) with a release packet flooded to all
// nodes. A node that has run counts as removed from the network graph.
//
// When it runs, a node finds the components of connectivity of the remaining
// graph without itself: it sends a flat (probe) packet out of every port that
// leads to a neighbour that has not run yet, tagged with the port it left on.
// Nodes that have not run forward each probe once on all their other ports;
// nodes that have run drop it. A probe that comes back in on port j after
// leaving on port i shows that the neighbours on i and j are connected
// without this node. After a quiet period of TIMEOUT_IO_OPS * IO_OP_CYCLES
// cycles (restarted by every returning probe) the node takes the transitive
// closure, picks the lowest port of each component as its tree edge and
// builds its turn matrix P (row/column 0 = local CPU, k = port k-1):
//   - P(0,k) = P(k,0) = 1;
//   - a turn that uses a port to a neighbour that has already run is allowed;
//   - a turn between two ports to neighbours that have not run is allowed only
//     if both are tree edges (so they lie in different components);
//   - U-turns and turns through unconnected ports are 0.
// If there is more than one component (a discontinuity), the neighbours on
// the tree edges are special nodes: each is sent a special packet. A special
// node flags itself (`special`) and does not mark further special nodes when
// its own turn comes, but it still probes and applies the turn rule above:
// letting it permit all its turns leaves cycles of channel dependencies in
// some graphs, so the rule is kept for deadlock freedom.
// The P matrix of the four network ports is then written to memory as one
// 16-bit word (row-major, port 0 first) at address 1, and the token released.
//
// Interface: packets in (rx_valid/rx_ready) and out with a port mask
// (tx_valid/tx_ready); `enable`/`order` from the token unit. all_done rises
// when the token value reaches NUM_NODES, i.e. every node has run.
// The document gives the probe flood, the special nodes, the token release,
// the 6-I/O-operation timeout and the memory write of P; the cycle length of
// one I/O operation and the tree-edge rule (taken from the TPBR algorithm of
// the document's chapter 3) are this design's reading.
module prohibit_unit
  import tpbr_pkg::*;
#(
  parameter int NUM_NODES      = 16,
  parameter int TIMEOUT_IO_OPS = 6,    // quiet time before the components are final
  parameter int IO_OP_CYCLES   = 256   // clock cycles counted as one I/O operation
) (
  input  logic       clk,
  input  logic       rst_n,
  input  logic [3:0] node_id,
  input  logic [3:0] pstat,
  input  logic       enable,
  input  logic [7:0] order,
  // packets in
  input  logic       rx_valid,
  input  pkt_t       rx_pkt,
  input  logic [1:0] rx_port,
  output logic       rx_ready,
  // packets out
  output logic       tx_valid,
  output pkt_t       tx_pkt,
  output logic [3:0] tx_mask,
  input  logic       tx_ready,
  // P-matrix memory write
  output logic        mem_cs,
  output logic        mem_we,
  output logic [15:0] mem_addr,
  output logic [15:0] mem_data,
  // results
  output logic [PMAT-1:0][PMAT-1:0] p_mat,
  output logic       special,
  output logic       done,        // this node has run and released the token
  output logic       all_done,    // every node has run
  output logic [7:0] token,       // current token value
  // events
  output logic       ev_probe_fwd,
  output logic       ev_probe_drop,
  output logic       ev_probe_ret,
  output logic       ev_special_tx,
  output logic       ev_release_fwd
);

  localparam int TIMEOUT = TIMEOUT_IO_OPS * IO_OP_CYCLES;

  typedef enum logic [2:0] {P_IDLE, P_FWD, P_PROBE, P_WAIT, P_DECIDE, P_SPECIAL,
                            P_RELEASE, P_MEMWR} pstate_e;
  pstate_e st, ret_st;

  logic [3:0]   proc_port;    // neighbour on this port has run
  logic [7:0]   seen_src;     // probe flood currently being forwarded
  logic [3:0]   seen;         // its probes (by start port) already forwarded
  logic [3:0][3:0] conn;      // probe left on i came back on j
  logic [3:0]   spec_mask;    // tree-edge ports to notify
  logic [1:0]   pi;           // port index for probe / special loops
  logic [$clog2(TIMEOUT+1)-1:0] timer;
  pkt_t         fwd_pkt;
  logic [3:0]   fwd_mask;

  logic [7:0] me;
  assign me = {4'd0, node_id};
  assign all_done = (token >= 8'(NUM_NODES));

  // ---------------- components and turn matrix ----------------
  logic [3:0]      act;       // connected ports to neighbours that have not run
  logic [3:0][3:0] reach;
  logic [3:0]      tree;
  logic [2:0]      ncomp;
  logic [PMAT-1:0][PMAT-1:0] p_new;

  always_comb begin
    act = pstat & ~proc_port;
    for (int i = 0; i < 4; i++)
      for (int j = 0; j < 4; j++)
        reach[i][j] = (i == j) || conn[i][j] || conn[j][i];
    for (int k = 0; k < 4; k++)
      for (int i = 0; i < 4; i++)
        for (int j = 0; j < 4; j++)
          if (reach[i][k] && reach[k][j]) reach[i][j] = 1'b1;
    tree  = '0;
    ncomp = '0;
    for (int i = 0; i < 4; i++) begin
      tree[i] = act[i];
      for (int j = 0; j < i; j++)
        if (act[j] && reach[i][j]) tree[i] = 1'b0;
      ncomp += 3'(tree[i]);
    end
    p_new = '0;
    for (int k = 0; k < PMAT; k++) begin
      p_new[0][k] = 1'b1;
      p_new[k][0] = 1'b1;
    end
    for (int i = 0; i < 4; i++)
      for (int j = 0; j < 4; j++)
        if (i != j && pstat[i] && pstat[j])
          p_new[i+1][j+1] = !act[i] || !act[j] || (tree[i] && tree[j]);
  end

  // ---------------- outputs ----------------
  assign rx_ready = (st == P_IDLE) || (st == P_WAIT);
  assign tx_valid = (st == P_FWD) || (st == P_PROBE && act[pi]) ||
                    (st == P_SPECIAL && spec_mask[pi]) || (st == P_RELEASE);

  always_comb begin
    tx_pkt           = '0;
    tx_pkt.src       = me;
    tx_pkt.hop       = me;
    tx_pkt.dest      = BCAST;
    tx_pkt.time_left = TTL_INIT;
    tx_mask          = '0;
    unique case (st)
      P_FWD: begin
        tx_pkt  = fwd_pkt;
        tx_mask = fwd_mask;
      end
      P_PROBE: begin
        tx_pkt.ptype = PT_PROBE;
        tx_pkt.sub   = {6'd0, pi};
        tx_mask      = 4'b0001 << pi;
      end
      P_SPECIAL: begin
        tx_pkt.ptype = PT_SPECIAL;
        tx_pkt.sub   = {6'd0, pi};
        tx_mask      = 4'b0001 << pi;
      end
      P_RELEASE: begin
        tx_pkt.ptype   = PT_RELEASE;
        tx_pkt.counter = order + 8'd1;
        tx_pkt.data    = {48'd0, 4'hF, node_id, 8'd0};
        tx_mask        = pstat;
      end
      default: ;
    endcase
  end

  // ---------------- control ----------------
  logic [3:0] in_bit;
  assign in_bit = 4'b0001 << rx_port;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      st        <= P_IDLE;
      ret_st    <= P_IDLE;
      proc_port <= '0;
      seen_src  <= BCAST;
      seen      <= '0;
      conn      <= '0;
      spec_mask <= '0;
      pi        <= '0;
      timer     <= '0;
      fwd_pkt   <= '0;
      fwd_mask  <= '0;
      p_mat     <= '0;
      special   <= 1'b0;
      done      <= 1'b0;
      token     <= '0;
      mem_cs    <= 1'b0;
      mem_we    <= 1'b0;
      mem_addr  <= '0;
      mem_data  <= '0;
      ev_probe_fwd   <= 1'b0;
      ev_probe_drop  <= 1'b0;
      ev_probe_ret   <= 1'b0;
      ev_special_tx  <= 1'b0;
      ev_release_fwd <= 1'b0;
    end else begin
      ev_probe_fwd   <= 1'b0;
      ev_probe_drop  <= 1'b0;
      ev_probe_ret   <= 1'b0;
      ev_special_tx  <= 1'b0;
      ev_release_fwd <= 1'b0;
      mem_cs         <= 1'b0;
      mem_we         <= 1'b0;

      if (st == P_WAIT) timer <= timer + 1'b1;

      // packets from the other nodes, handled in IDLE and while waiting
      if (rx_ready && rx_valid) begin
        fwd_pkt           <= rx_pkt;
        fwd_pkt.hop       <= me;
        fwd_pkt.time_left <= rx_pkt.time_left - 8'd1;
        fwd_mask          <= pstat & ~in_bit;
        unique case (rx_pkt.ptype)
          PT_PROBE: begin
            if (rx_pkt.src == me) begin
              if (st == P_WAIT) begin
                conn[rx_pkt.sub[1:0]][rx_port] <= 1'b1;
                timer        <= '0;
                ev_probe_ret <= 1'b1;
              end
            end else if (done || (seen_src == rx_pkt.src && seen[rx_pkt.sub[1:0]])) begin
              ev_probe_drop <= 1'b1;
            end else begin
              if (seen_src != rx_pkt.src) begin
                seen_src <= rx_pkt.src;
                seen     <= 4'b0001 << rx_pkt.sub[1:0];
              end else begin
                seen[rx_pkt.sub[1:0]] <= 1'b1;
              end
              if ((pstat & ~in_bit) != 4'b0000) begin
                ev_probe_fwd <= 1'b1;
                ret_st       <= st;
                st           <= P_FWD;
              end
            end
          end
          PT_RELEASE: begin
            if (rx_pkt.hop == rx_pkt.src) proc_port[rx_port] <= 1'b1;
            if (rx_pkt.counter > token) begin
              token <= rx_pkt.counter;
              if ((pstat & ~in_bit) != 4'b0000) begin
                ev_release_fwd <= 1'b1;
                ret_st         <= st;
                st             <= P_FWD;
              end
            end
          end
          PT_SPECIAL: special <= 1'b1;
          default: ;
        endcase
      end else begin
        unique case (st)
          P_IDLE: begin
            if (enable && !done && token == order) begin
              conn <= '0;
              pi   <= '0;
              st   <= P_PROBE;
            end
          end
          P_FWD: if (tx_ready) st <= ret_st;
          P_PROBE: begin
            if (!act[pi] || tx_ready) begin
              pi <= pi + 2'd1;
              if (pi == 2'd3) begin
                timer <= '0;
                st    <= P_WAIT;
              end
            end
          end
          P_WAIT: if (timer >= TIMEOUT[$bits(timer)-1:0]) st <= P_DECIDE;
          P_DECIDE: begin
            p_mat     <= p_new;
            spec_mask <= (ncomp > 3'd1 && !special) ? tree : 4'b0000;
            pi        <= '0;
            st        <= P_SPECIAL;
          end
          P_SPECIAL: begin
            if (!spec_mask[pi] || tx_ready) begin
              if (spec_mask[pi]) ev_special_tx <= 1'b1;
              pi <= pi + 2'd1;
              if (pi == 2'd3) st <= P_RELEASE;
            end
          end
          P_RELEASE: if (tx_ready || pstat == 4'b0000) begin
            done  <= 1'b1;
            token <= order + 8'd1;
            st    <= P_MEMWR;
          end
          P_MEMWR: begin
            mem_cs   <= 1'b1;
            mem_we   <= 1'b1;
            mem_addr <= 16'd1;
            for (int i = 0; i < 4; i++)
              for (int j = 0; j < 4; j++)
                mem_data[15 - 4*i - j] <= p_mat[i+1][j+1];
            st <= P_IDLE;
          end
          default: st <= P_IDLE;
        endcase
      end
    end
  end

  // The turn matrix is symmetric once written.
  a_p_sym: assert property (@(posedge clk) disable iff (!rst_n)
                            done |-> (p_mat[1][2] == p_mat[2][1]) && (p_mat[3][4] == p_mat[4][3]));

endmodule
