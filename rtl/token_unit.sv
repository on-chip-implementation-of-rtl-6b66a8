// token_unit: core logic of the token unit (protocol step 1).
//
// Every node claims its degree (number of connected ports, from pstat) in a
// degree packet that holds one 4-bit slot per node: {R, W, degree-1}, plus a
// counter of claimed slots. Node 0 starts by sending a packet with its own
// slot written to all its connected ports; every other node waits for one.
// On each degree packet a node merges what it receives into its own copy
// (slot bits are only ever set), writes its own slot if it has not yet, and
// recounts the claimed slots. When all NUM_NODES slots are claimed it sets
// the R bit of its own slot. Whenever its copy changed it sends the copy on
// all connected ports; a packet that brings nothing new is dropped, which
// ends the flood. With all degrees known it sorts the nodes by degree (ties
// by node id) and outputs its own rank as `order`, with `enable` high: this
// is the token value at which the node will run turn prohibition.
//
// States follow the document's diagram: START, INI_TX (node 0 only), WAITING,
// RECEIVE, TRANSMIT, ENDING. Merging copies instead of passing one packet
// around, and storing degree-1 in the 2-bit field so that degree 4 fits, are
// this design's choices. Interface: packet in (rx_valid/rx_ready, accepted in
// WAITING) and packet out with a port mask (tx_valid/tx_ready).
module token_unit
  import tpbr_pkg::*;
#(
  parameter int NUM_NODES = 16    // nodes in the network, node ids 0..NUM_NODES-1
) (
  input  logic       clk,
  input  logic       rst_n,
  input  logic [3:0] node_id,
  input  logic [3:0] pstat,       // 1 = port connected to a neighbour router
  // received degree packets
  input  logic       rx_valid,
  input  pkt_t       rx_pkt,
  input  logic [1:0] rx_port,
  output logic       rx_ready,
  // packets to send
  output logic       tx_valid,
  output pkt_t       tx_pkt,
  output logic [3:0] tx_mask,
  input  logic       tx_ready,
  // results
  output logic       enable,      // order is valid; starts turn prohibition
  output logic [7:0] order,
  output logic [MAX_NODES-1:0][2:0] degrees, // degree of every node (0..4)
  // events
  output logic       ev_merge,    // a received packet changed this node's copy
  output logic       ev_drop      // a received packet brought nothing new
);

  typedef enum logic [2:0] {S_START, S_INI_TX, S_WAITING, S_RECEIVE, S_TRANSMIT, S_ENDING} tstate_e;
  tstate_e st;

  logic [63:0] slots;     // this node's copy of the data field
  pkt_t        inp;       // packet being merged
  logic [2:0]  my_deg;

  // degree of this node
  always_comb begin
    my_deg = '0;
    for (int i = 0; i < 4; i++) my_deg += 3'(pstat[i]);
  end

  function automatic logic [63:0] claim(input logic [63:0] s, input logic [3:0] id,
                                        input logic [2:0] d);
    logic [63:0] r;
    r = s;
    r[63 - 4*id - 1]          = 1'b1;          // W
    r[63 - 4*id - 2 -: 2]     = 2'(d - 3'd1);  // degree-1
    return r;
  endfunction

  function automatic logic [7:0] claimed(input logic [63:0] s);
    logic [7:0] c;
    c = '0;
    for (int n = 0; n < MAX_NODES; n++) c += 8'(s[63 - 4*n - 1]);
    return c;
  endfunction

  // merge of the received copy into ours
  logic [63:0] merged;
  always_comb begin
    merged = slots | inp.data;
    merged = claim(merged, node_id, my_deg);
    if (claimed(merged) >= 8'(NUM_NODES)) merged[63 - 4*node_id] = 1'b1;  // R
  end

  // degree table and rank
  always_comb begin
    for (int n = 0; n < MAX_NODES; n++)
      degrees[n] = slots[63 - 4*n - 1] ? 3'(slots[63 - 4*n - 2 -: 2]) + 3'd1 : 3'd0;
  end

  logic [7:0] rank;
  always_comb begin
    rank = '0;
    for (int n = 0; n < NUM_NODES; n++)
      if (degrees[n] < my_deg || (degrees[n] == my_deg && 4'(n) < node_id)) rank += 8'd1;
  end

  assign rx_ready = (st == S_WAITING);
  assign tx_valid = (st == S_INI_TX) || (st == S_TRANSMIT);
  assign tx_mask  = pstat;

  always_comb begin
    tx_pkt           = '0;
    tx_pkt.src       = {4'd0, node_id};
    tx_pkt.hop       = {4'd0, node_id};
    tx_pkt.dest      = BCAST;
    tx_pkt.ptype     = PT_DEGREE;
    tx_pkt.counter   = claimed(slots);
    tx_pkt.data      = slots;
    tx_pkt.time_left = TTL_INIT;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      st       <= S_START;
      slots    <= '0;
      inp      <= '0;
      enable   <= 1'b0;
      order    <= '0;
      ev_merge <= 1'b0;
      ev_drop  <= 1'b0;
    end else begin
      ev_merge <= 1'b0;
      ev_drop  <= 1'b0;
      unique case (st)
        S_START: begin
          if (node_id == 4'd0) begin
            slots <= claim('0, node_id, my_deg);
            st    <= S_INI_TX;
          end else begin
            st    <= S_WAITING;
          end
        end
        S_INI_TX: if (tx_ready) st <= S_WAITING;
        S_WAITING: if (rx_valid) begin
          inp <= rx_pkt;
          st  <= S_RECEIVE;
        end
        S_RECEIVE: begin
          if (merged != slots) begin
            slots    <= merged;
            ev_merge <= 1'b1;
            st       <= S_TRANSMIT;
          end else begin
            ev_drop  <= 1'b1;
            st       <= S_WAITING;
          end
        end
        S_TRANSMIT: if (tx_ready) st <= (slots[63 - 4*node_id] && !enable) ? S_ENDING : S_WAITING;
        S_ENDING: begin
          enable <= 1'b1;
          order  <= rank;
          st     <= S_WAITING;
        end
        default: st <= S_START;
      endcase
    end
  end

  // rx_port is part of the common packet interface; a degree copy goes to all ports.
  logic unused_ok;
  assign unused_ok = ^rx_port;

endmodule
