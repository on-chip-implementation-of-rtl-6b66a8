// tpbr_chip: Turn Prohibition Based Routing (TPBR) controller chip.
//
// One chip sits in every 4-port router of an irregular wormhole network and,
// together with the chips of the other routers, works out a deadlock-free
// routing table by prohibiting turns. It runs three units one after another:
//   token_unit    - all nodes share their degrees and each node finds its
//                   order (rank by degree), which is the token value at which
//                   it will run turn prohibition;
//   prohibit_unit - one node at a time finds the turns through it that have
//                   to be prohibited, writes its turn matrix P to memory and
//                   passes the token on;
//   route_unit    - when every node has run, all nodes build shortest
//                   permitted-path tables R and D in synchronous steps.
// The control packets of all three units go through one receive path
// (intr_unit -> rx_unit -> dispatch by packet type) and one transmit path
// (fixed-priority request select -> tx_unit), which share the bus to the four
// port buffers through bus_arbiter.
//
// Interface: node_id and pstat (which ports have a neighbour) are static
// inputs; the port buffers sit on a 16-bit address/data bus with rw and an
// active-low chip select per port, and raise int_req[p] while they hold a
// received packet (int_ack[p] pops it). The P matrix is written out on the
// mem_* strobe; the CPU reads the tables through tbl_row/tbl_col. The
// document's single bidirectional data bus is split here into bus_dout and
// bus_din. All state is reset by rst_n (active low, asynchronous).
module tpbr_chip
  import tpbr_pkg::*;
#(
  parameter int NUM_NODES      = 16,
  parameter int TIMEOUT_IO_OPS = 6,
  parameter int IO_OP_CYCLES   = 256,
  parameter int MAX_STEPS      = NUM_NODES - 1
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic [3:0]  node_id,
  input  logic [3:0]  pstat,
  // port-buffer bus
  output logic [15:0] bus_addr,
  output logic [15:0] bus_dout,
  input  logic [15:0] bus_din,
  output logic        bus_rw,
  output logic [3:0]  bus_cs_n,
  input  logic [3:0]  int_req,
  output logic [3:0]  int_ack,
  // P-matrix memory write
  output logic        mem_cs,
  output logic        mem_we,
  output logic [15:0] mem_addr,
  output logic [15:0] mem_data,
  // routing table read port
  input  logic [2:0]  tbl_row,
  input  logic [3:0]  tbl_col,
  output logic [7:0]  tbl_r,
  output logic [7:0]  tbl_d,
  // status
  output logic        token_done,
  output logic [7:0]  order,
  output logic [MAX_NODES-1:0][2:0] degrees,   // degree of every node, from the token unit
  output logic [7:0]  token,                   // current token value
  output logic        prohibit_done,
  output logic        special,
  output logic        all_prohibit_done,
  output logic        route_done,
  output logic [PMAT-1:0][PMAT-1:0] p_mat,
  output chip_ev_t    events
);

  // ---------------- receive path ----------------
  logic       intr, rx_ack;
  logic [1:0] intr_port;
  logic       rxb_req, rxb_gnt, rxb_cs;
  logic [1:0] rxb_port;
  logic [15:0] rxb_addr;
  logic       pkt_valid, pkt_ready;
  pkt_t       pkt;
  logic [1:0] pkt_port;
  logic       crc_drop, ttl_drop;

  intr_unit u_intr (
    .clk, .rst_n, .int_req, .int_ack,
    .intr, .port_num(intr_port), .rx_ack
  );

  rx_unit u_rx (
    .clk, .rst_n, .intr, .port_num(intr_port), .rx_ack,
    .bus_req(rxb_req), .bus_gnt(rxb_gnt), .cs(rxb_cs), .port(rxb_port),
    .addr(rxb_addr), .din(bus_din),
    .pkt_valid, .pkt, .pkt_port, .pkt_ready, .crc_drop, .ttl_drop
  );

  // dispatch by packet type
  logic tok_rx_valid, pro_rx_valid, rte_rx_valid;
  logic tok_rx_ready, pro_rx_ready, rte_rx_ready;
  always_comb begin
    tok_rx_valid = 1'b0;
    pro_rx_valid = 1'b0;
    rte_rx_valid = 1'b0;
    pkt_ready    = 1'b1;       // unknown types are dropped
    unique case (pkt.ptype)
      PT_DEGREE: begin
        tok_rx_valid = pkt_valid;
        pkt_ready    = tok_rx_ready;
      end
      PT_PROBE, PT_RELEASE, PT_SPECIAL: begin
        pro_rx_valid = pkt_valid;
        pkt_ready    = pro_rx_ready;
      end
      PT_TABLE: begin
        rte_rx_valid = pkt_valid;
        pkt_ready    = rte_rx_ready;
      end
      default: ;
    endcase
  end

  // ---------------- units ----------------
  logic       tok_tx_valid, pro_tx_valid, rte_tx_valid;
  logic       tok_tx_ready, pro_tx_ready, rte_tx_ready;
  pkt_t       tok_tx_pkt, pro_tx_pkt, rte_tx_pkt;
  logic [3:0] tok_tx_mask, pro_tx_mask, rte_tx_mask;
  logic       tok_ev_merge, tok_ev_drop;
  logic       ev_probe_fwd, ev_probe_drop, ev_probe_ret, ev_special_tx, ev_release_fwd;
  logic       ev_step, ev_rwrite;

  token_unit #(.NUM_NODES(NUM_NODES)) u_token (
    .clk, .rst_n, .node_id, .pstat,
    .rx_valid(tok_rx_valid), .rx_pkt(pkt), .rx_port(pkt_port), .rx_ready(tok_rx_ready),
    .tx_valid(tok_tx_valid), .tx_pkt(tok_tx_pkt), .tx_mask(tok_tx_mask), .tx_ready(tok_tx_ready),
    .enable(token_done), .order, .degrees, .ev_merge(tok_ev_merge), .ev_drop(tok_ev_drop)
  );

  prohibit_unit #(.NUM_NODES(NUM_NODES), .TIMEOUT_IO_OPS(TIMEOUT_IO_OPS),
                  .IO_OP_CYCLES(IO_OP_CYCLES)) u_prohibit (
    .clk, .rst_n, .node_id, .pstat, .enable(token_done), .order,
    .rx_valid(pro_rx_valid), .rx_pkt(pkt), .rx_port(pkt_port), .rx_ready(pro_rx_ready),
    .tx_valid(pro_tx_valid), .tx_pkt(pro_tx_pkt), .tx_mask(pro_tx_mask), .tx_ready(pro_tx_ready),
    .mem_cs, .mem_we, .mem_addr, .mem_data,
    .p_mat, .special, .done(prohibit_done), .all_done(all_prohibit_done), .token,
    .ev_probe_fwd, .ev_probe_drop, .ev_probe_ret, .ev_special_tx, .ev_release_fwd
  );

  route_unit #(.NUM_NODES(NUM_NODES), .MAX_STEPS(MAX_STEPS)) u_route (
    .clk, .rst_n, .node_id, .pstat, .start(all_prohibit_done), .p_mat,
    .rx_valid(rte_rx_valid), .rx_pkt(pkt), .rx_port(pkt_port), .rx_ready(rte_rx_ready),
    .tx_valid(rte_tx_valid), .tx_pkt(rte_tx_pkt), .tx_mask(rte_tx_mask), .tx_ready(rte_tx_ready),
    .tbl_row, .tbl_col, .tbl_r, .tbl_d, .done(route_done), .ev_step, .ev_rwrite
  );

  // ---------------- transmit path ----------------
  logic       txu_valid, txu_ready;
  pkt_t       txu_pkt;
  logic [3:0] txu_mask;
  logic       txb_req, txb_gnt, txb_cs;
  logic [1:0] txb_port;
  logic [15:0] txb_addr, txb_wdata;
  logic       pkt_sent;

  // fixed priority: prohibition, then routing table, then token unit
  always_comb begin
    tok_tx_ready = 1'b0;
    pro_tx_ready = 1'b0;
    rte_tx_ready = 1'b0;
    txu_valid    = 1'b0;
    txu_pkt      = tok_tx_pkt;
    txu_mask     = tok_tx_mask;
    if (pro_tx_valid) begin
      txu_valid    = 1'b1;
      txu_pkt      = pro_tx_pkt;
      txu_mask     = pro_tx_mask;
      pro_tx_ready = txu_ready;
    end else if (rte_tx_valid) begin
      txu_valid    = 1'b1;
      txu_pkt      = rte_tx_pkt;
      txu_mask     = rte_tx_mask;
      rte_tx_ready = txu_ready;
    end else if (tok_tx_valid) begin
      txu_valid    = 1'b1;
      tok_tx_ready = txu_ready;
    end
  end

  tx_unit u_tx (
    .clk, .rst_n, .req_valid(txu_valid), .req_pkt(txu_pkt), .req_mask(txu_mask),
    .req_ready(txu_ready),
    .bus_req(txb_req), .bus_gnt(txb_gnt), .cs(txb_cs), .port(txb_port),
    .addr(txb_addr), .wdata(txb_wdata), .pkt_sent
  );

  bus_arbiter u_bus (
    .clk, .rst_n,
    .rx_req(rxb_req), .rx_gnt(rxb_gnt), .rx_cs(rxb_cs), .rx_port(rxb_port), .rx_addr(rxb_addr),
    .tx_req(txb_req), .tx_gnt(txb_gnt), .tx_cs(txb_cs), .tx_port(txb_port), .tx_addr(txb_addr),
    .tx_wdata(txb_wdata),
    .bus_addr, .bus_dout, .bus_rw, .bus_cs_n
  );

  assign events = '{deg_merge: tok_ev_merge, deg_drop: tok_ev_drop, probe_fwd: ev_probe_fwd,
                    probe_drop: ev_probe_drop, probe_ret: ev_probe_ret,
                    special_tx: ev_special_tx, release_fwd: ev_release_fwd,
                    rt_step: ev_step, rt_write: ev_rwrite, crc_drop: crc_drop,
                    ttl_drop: ttl_drop, bus_wait: rxb_req && !rxb_gnt && txb_gnt,
                    pkt_sent: pkt_sent};

endmodule
