// intr_unit: interrupt unit of the token unit / chip I/O.
//
// Each of the four port buffers raises int_req[p] while it holds a received
// packet. When idle, this unit picks the requesting port with the highest
// priority (port 0 highest, as the document orders them), and presents it to
// the receive unit as intr/port_num. When the receive unit has read the packet
// it pulses rx_ack; this unit then pulses int_ack[port_num] for one cycle so
// that the port buffer drops the packet, and waits one more cycle (for the
// buffer's int_req to settle) before it grants again.
//
// Timing: grant registered, one cycle after int_req; int_ack in the cycle
// after rx_ack. Fixed priority follows the document; the one-cycle settle gap
// is this design's choice.
module intr_unit (
  input  logic       clk,
  input  logic       rst_n,
  input  logic [3:0] int_req,   // from port buffers
  output logic [3:0] int_ack,   // to port buffers, one-cycle pulse
  output logic       intr,      // to receive unit: a packet is waiting
  output logic [1:0] port_num,  // its port
  input  logic       rx_ack     // from receive unit: packet read
);

  typedef enum logic [1:0] {I_IDLE, I_BUSY, I_ACK, I_GAP} istate_e;
  istate_e st;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      st       <= I_IDLE;
      intr     <= 1'b0;
      port_num <= '0;
      int_ack  <= '0;
    end else begin
      int_ack <= '0;
      unique case (st)
        I_IDLE: begin
          if (int_req != 4'b0000) begin
            intr <= 1'b1;
            st   <= I_BUSY;
            if      (int_req[0]) port_num <= 2'd0;
            else if (int_req[1]) port_num <= 2'd1;
            else if (int_req[2]) port_num <= 2'd2;
            else                 port_num <= 2'd3;
          end
        end
        I_BUSY: if (rx_ack) begin
          intr <= 1'b0;
          int_ack[port_num] <= 1'b1;
          st   <= I_ACK;
        end
        I_ACK: st <= I_GAP;
        I_GAP: st <= I_IDLE;
        default: st <= I_IDLE;
      endcase
    end
  end

  // An acknowledge only ever goes to the port being served.
  a_ack_onehot: assert property (@(posedge clk) disable iff (!rst_n) $onehot0(int_ack));

endmodule
