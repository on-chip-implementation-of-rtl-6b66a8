// tx_unit: transmit unit.
//
// Takes one packet and a mask of output ports from the core logic
// (req_valid/req_ready). It fills in the crc byte, requests the bus and, for
// each port set in the mask (lowest first), writes the eight 16-bit words to
// that port buffer at addresses 0..7, one word per cycle. Writing word 7 hands
// the packet to the port buffer for sending. When all ports are written it
// releases the bus and is ready for the next packet; req_ready is the
// document's txd_ack.
//
// Timing: req_ready is high only when idle; a packet to k ports takes about
// 2 + 8k cycles. The word-by-word write follows the document; the
// one-word-per-cycle timing and "word 7 sends" are this design's choice.
module tx_unit
  import tpbr_pkg::*;
(
  input  logic        clk,
  input  logic        rst_n,
  input  logic        req_valid,
  input  pkt_t        req_pkt,
  input  logic [3:0]  req_mask,
  output logic        req_ready,
  // bus
  output logic        bus_req,
  input  logic        bus_gnt,
  output logic        cs,
  output logic [1:0]  port,
  output logic [15:0] addr,
  output logic [15:0] wdata,
  // events
  output logic        pkt_sent    // one pulse per packet copy written
);

  typedef enum logic [1:0] {T_IDLE, T_REQ, T_WRITE} tstate_e;
  tstate_e    st;
  pkt_t       p;
  logic [3:0] mask;
  logic [2:0] w;

  assign req_ready = (st == T_IDLE);
  assign cs        = (st == T_WRITE);
  assign addr      = {13'd0, w};
  assign wdata     = pkt_word(p, w);

  always_comb begin
    port = 2'd3;
    for (int i = 3; i >= 0; i--) if (mask[i]) port = 2'(i);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      st       <= T_IDLE;
      p        <= '0;
      mask     <= '0;
      w        <= '0;
      bus_req  <= 1'b0;
      pkt_sent <= 1'b0;
    end else begin
      pkt_sent <= 1'b0;
      unique case (st)
        T_IDLE: if (req_valid && req_mask != 4'b0000) begin
          p       <= req_pkt;
          p.crc   <= pkt_crc(req_pkt);
          mask    <= req_mask;
          w       <= '0;
          bus_req <= 1'b1;
          st      <= T_REQ;
        end
        T_REQ: if (bus_gnt) st <= T_WRITE;
        T_WRITE: begin
          w <= w + 3'd1;
          if (w == 3'd7) begin
            pkt_sent   <= 1'b1;
            mask[port] <= 1'b0;
            if ((mask & ~(4'b0001 << port)) == 4'b0000) begin
              bus_req <= 1'b0;
              st      <= T_IDLE;
            end
          end
        end
        default: st <= T_IDLE;
      endcase
    end
  end

  a_cs_has_bus: assert property (@(posedge clk) disable iff (!rst_n) cs |-> bus_gnt);

endmodule
