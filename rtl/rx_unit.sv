// rx_unit: receive unit.
//
// When the interrupt unit reports a waiting packet (intr, port_num), the
// receive unit requests the bus, then reads the eight 16-bit words of the
// packet from that port buffer at addresses 0..7. Each word takes two cycles:
// the address and chip select are driven in the first and the data is sampled
// at the end of the second. Once all words are in, it pulses rx_ack to the
// interrupt unit (which acknowledges the port buffer), releases the bus and
// checks the packet: a packet whose crc byte does not match, or whose
// time_left has run out, is dropped (crc_drop / ttl_drop pulse). A good packet
// is offered to the core logic with pkt_valid/pkt_port and held until
// pkt_ready, as the document's receive unit waits for rxd_ack.
//
// Timing: about 2 + 16 cycles from intr to pkt_valid. The word-by-word read
// over a shared bus follows the document; the two-cycle word access and the
// drop rules are this design's choice.
module rx_unit
  import tpbr_pkg::*;
(
  input  logic        clk,
  input  logic        rst_n,
  // interrupt unit
  input  logic        intr,
  input  logic [1:0]  port_num,
  output logic        rx_ack,
  // bus
  output logic        bus_req,
  input  logic        bus_gnt,
  output logic        cs,
  output logic [1:0]  port,
  output logic [15:0] addr,
  input  logic [15:0] din,
  // to core logic
  output logic        pkt_valid,
  output pkt_t        pkt,
  output logic [1:0]  pkt_port,
  input  logic        pkt_ready,
  // events
  output logic        crc_drop,
  output logic        ttl_drop
);

  typedef enum logic [2:0] {R_IDLE, R_REQ, R_ADDR, R_DATA, R_CHECK, R_HOLD} rstate_e;
  rstate_e      st;
  logic [2:0]   w;
  logic [127:0] sh;

  assign port = port_num;
  assign cs   = (st == R_ADDR) || (st == R_DATA);
  assign addr = {13'd0, w};

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      st        <= R_IDLE;
      w         <= '0;
      sh        <= '0;
      bus_req   <= 1'b0;
      rx_ack    <= 1'b0;
      pkt_valid <= 1'b0;
      pkt       <= '0;
      pkt_port  <= '0;
      crc_drop  <= 1'b0;
      ttl_drop  <= 1'b0;
    end else begin
      rx_ack   <= 1'b0;
      crc_drop <= 1'b0;
      ttl_drop <= 1'b0;
      unique case (st)
        R_IDLE: if (intr) begin
          bus_req <= 1'b1;
          w       <= '0;
          st      <= R_REQ;
        end
        R_REQ:  if (bus_gnt) st <= R_ADDR;
        R_ADDR: st <= R_DATA;
        R_DATA: begin
          sh[127 - 16*w -: 16] <= din;
          if (w == 3'd7) begin
            bus_req <= 1'b0;
            rx_ack  <= 1'b1;
            st      <= R_CHECK;
          end else begin
            w  <= w + 3'd1;
            st <= R_ADDR;
          end
        end
        R_CHECK: begin
          if (pkt_crc(pkt_t'(sh)) != sh[7:0]) begin
            crc_drop <= 1'b1;
            st       <= R_IDLE;
          end else if (sh[15:8] == 8'd0) begin
            ttl_drop <= 1'b1;
            st       <= R_IDLE;
          end else begin
            pkt       <= pkt_t'(sh);
            pkt_port  <= port_num;
            pkt_valid <= 1'b1;
            st        <= R_HOLD;
          end
        end
        R_HOLD: if (pkt_ready) begin
          pkt_valid <= 1'b0;
          st        <= R_IDLE;
        end
        default: st <= R_IDLE;
      endcase
    end
  end

  a_cs_has_bus: assert property (@(posedge clk) disable iff (!rst_n) cs |-> bus_gnt);

endmodule
