// route_unit: routing table construction unit (protocol step 3).
//
// Builds, for this node a, the tables R(i,k) and D(i,k): for a message that
// enters on input i (0 = local CPU, 1..4 = ports 0..3) for destination node k,
// R is the output to use (0 = deliver locally) and D the number of hops of the
// shortest path that uses no prohibited turn. Entries start at 8'hFF
// (undetermined), except D(i,a) = R(i,a) = 0. The tables are filled in steps,
// a distributed Bellman-Ford extended with the turn matrix P:
//   step t, transmit: on every connected port y send a table packet holding
//     T_y(k) = 1 for each k with D(y,k) = t-1 (a message that comes in on y
//     reaches k in t-1 hops);
//   step t, receive: wait for the step-t packet of every connected port;
//   step t, update: for each k, and input i with R(i,k) undetermined, take the
//     first port m (lowest) whose neighbour sent T(k) = 1 and with P(i,m) = 1,
//     and set R(i,k) = m, D(i,k) = t. Only the first write to an entry counts,
//     so it is a shortest path.
// After MAX_STEPS steps (the longest possible shortest path) `done` rises.
// A neighbour can be at most one step ahead, so received vectors are kept in
// two banks selected by the step's parity.
//
// The tables are registers, read through tbl_row/tbl_col (combinational) by
// the CPU. Initialisation writes one column per cycle. The update rule, the
// 5 x 16 tables, 8-bit entries with 255 as "undetermined" and the T message
// follow the document; the per-port T vector, the parity banks and the fixed
// step count are this design's choices.
module route_unit
  import tpbr_pkg::*;
#(
  parameter int NUM_NODES = 16,
  parameter int MAX_STEPS = NUM_NODES - 1
) (
  input  logic       clk,
  input  logic       rst_n,
  input  logic [3:0] node_id,
  input  logic [3:0] pstat,
  input  logic       start,       // all nodes have their turn matrix
  input  logic [PMAT-1:0][PMAT-1:0] p_mat,
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
  // table read port
  input  logic [2:0] tbl_row,
  input  logic [3:0] tbl_col,
  output logic [7:0] tbl_r,
  output logic [7:0] tbl_d,
  output logic       done,
  // events
  output logic       ev_step,     // a step's update was applied
  output logic       ev_rwrite    // that update wrote at least one R entry
);

  typedef enum logic [2:0] {T_IDLE, T_INIT, T_BUILD, T_COLLECT, T_UPDATE, T_DONE} rstate_e;
  rstate_e st;

  logic [7:0] rtab [PMAT][NUM_NODES];
  logic [7:0] dtab [PMAT][NUM_NODES];
  logic [1:0][3:0][NUM_NODES-1:0] tbuf;   // [parity][port] received T vectors
  logic [1:0][3:0]                tval;
  localparam int CW = (NUM_NODES > 1) ? $clog2(NUM_NODES) : 1;  // table column index width

  logic [7:0] t;
  logic [3:0] col;
  logic [1:0] y;

  assign tbl_r = (int'(tbl_col) < NUM_NODES && int'(tbl_row) < PMAT) ? rtab[tbl_row][tbl_col[CW-1:0]] : NO_ROUTE;
  assign tbl_d = (int'(tbl_col) < NUM_NODES && int'(tbl_row) < PMAT) ? dtab[tbl_row][tbl_col[CW-1:0]] : NO_ROUTE;

  assign rx_ready = 1'b1;
  assign tx_valid = (st == T_BUILD) && pstat[y];
  assign tx_mask  = 4'b0001 << y;

  // T vector for port y at the current step
  always_comb begin
    tx_pkt           = '0;
    tx_pkt.src       = {4'd0, node_id};
    tx_pkt.hop       = {4'd0, node_id};
    tx_pkt.dest      = BCAST;
    tx_pkt.ptype     = PT_TABLE;
    tx_pkt.counter   = t;
    tx_pkt.time_left = TTL_INIT;
    for (int k = 0; k < NUM_NODES; k++)
      tx_pkt.data[k] = (dtab[int'(y) + 1][k] == t - 8'd1);
  end

  logic par;
  assign par = t[0];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      st        <= T_IDLE;
      t         <= '0;
      col       <= '0;
      y         <= '0;
      tbuf      <= '0;
      tval      <= '0;
      done      <= 1'b0;
      ev_step   <= 1'b0;
      ev_rwrite <= 1'b0;
      for (int i = 0; i < PMAT; i++)
        for (int k = 0; k < NUM_NODES; k++) begin
          rtab[i][k] <= NO_ROUTE;
          dtab[i][k] <= NO_ROUTE;
        end
    end else begin
      ev_step   <= 1'b0;
      ev_rwrite <= 1'b0;

      // step-t vectors from the neighbours, accepted at any time
      if (rx_valid && rx_pkt.ptype == PT_TABLE) begin
        tbuf[rx_pkt.counter[0]][rx_port] <= rx_pkt.data[NUM_NODES-1:0];
        tval[rx_pkt.counter[0]][rx_port] <= 1'b1;
      end

      unique case (st)
        T_IDLE: if (start) begin
          col <= '0;
          st  <= T_INIT;
        end
        T_INIT: begin
          for (int i = 0; i < PMAT; i++) begin
            rtab[i][col[CW-1:0]] <= (col == node_id) ? 8'd0 : NO_ROUTE;
            dtab[i][col[CW-1:0]] <= (col == node_id) ? 8'd0 : NO_ROUTE;
          end
          col <= col + 4'd1;
          if (int'(col) == NUM_NODES - 1) begin
            t  <= 8'd1;
            y  <= '0;
            st <= (MAX_STEPS > 0) ? T_BUILD : T_DONE;
          end
        end
        T_BUILD: if (!pstat[y] || tx_ready) begin
          y <= y + 2'd1;
          if (y == 2'd3) st <= T_COLLECT;
        end
        T_COLLECT: if ((tval[par] & pstat) == pstat) st <= T_UPDATE;
        T_UPDATE: begin
          logic any;
          any = 1'b0;
          for (int k = 0; k < NUM_NODES; k++)
            for (int i = 0; i < PMAT; i++)
              if (rtab[i][k] == NO_ROUTE) begin
                logic hit;
                hit = 1'b0;
                for (int m = 1; m < PMAT; m++)
                  if (!hit && pstat[m-1] && tbuf[par][m-1][k] && p_mat[i][m]) begin
                    hit = 1'b1;
                    rtab[i][k] <= 8'(m);
                    dtab[i][k] <= t;
                  end
                any |= hit;
              end
          tval[par] <= '0;
          ev_step   <= 1'b1;
          ev_rwrite <= any;
          if (int'(t) >= MAX_STEPS) begin
            st <= T_DONE;
          end else begin
            t  <= t + 8'd1;
            y  <= '0;
            st <= T_BUILD;
          end
        end
        T_DONE: done <= 1'b1;
        default: st <= T_IDLE;
      endcase
    end
  end

endmodule
