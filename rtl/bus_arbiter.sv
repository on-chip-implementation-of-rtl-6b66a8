// bus_arbiter: data-bus arbitration and chip-select generation.
//
// The receive unit and the transmit unit share one 16-bit address/data bus to
// the four port buffers. Each raises a request and holds it for a whole packet
// transfer; the arbiter grants one of them at a time and keeps the grant until
// the request drops. When both wait, the grant alternates (the one not served
// last goes first), so neither can starve. The granted unit's address, write
// data, rw and port number reach the bus; the chip-select of that port
// (active low, one per port buffer as in the document) is driven low while the
// unit asserts its cs.
//
// Timing: grant registered, one cycle after the request; bus outputs are
// combinational from the granted unit. The document names bus arbitration and
// one chip select per port; the alternating priority is this design's choice.
module bus_arbiter (
  input  logic        clk,
  input  logic        rst_n,
  // receive unit
  input  logic        rx_req,
  output logic        rx_gnt,
  input  logic        rx_cs,
  input  logic [1:0]  rx_port,
  input  logic [15:0] rx_addr,
  // transmit unit
  input  logic        tx_req,
  output logic        tx_gnt,
  input  logic        tx_cs,
  input  logic [1:0]  tx_port,
  input  logic [15:0] tx_addr,
  input  logic [15:0] tx_wdata,
  // bus to the port buffers
  output logic [15:0] bus_addr,
  output logic [15:0] bus_dout,
  output logic        bus_rw,     // 1 = write, 0 = read
  output logic [3:0]  bus_cs_n
);

  logic last_tx;  // 1 when the transmit unit was the last one granted

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      rx_gnt  <= 1'b0;
      tx_gnt  <= 1'b0;
      last_tx <= 1'b1;   // receive unit first after reset
    end else begin
      if (rx_gnt && !rx_req) rx_gnt <= 1'b0;
      if (tx_gnt && !tx_req) tx_gnt <= 1'b0;
      if ((!rx_gnt || !rx_req) && (!tx_gnt || !tx_req)) begin
        // bus free (or being released this cycle): grant a waiting unit
        if (rx_req && !rx_gnt && (!tx_req || tx_gnt || last_tx)) begin
          rx_gnt  <= 1'b1;
          last_tx <= 1'b0;
        end else if (tx_req && !tx_gnt) begin
          tx_gnt  <= 1'b1;
          last_tx <= 1'b1;
        end
      end
    end
  end

  always_comb begin
    bus_addr = '0;
    bus_dout = '0;
    bus_rw   = 1'b0;
    bus_cs_n = 4'b1111;
    if (tx_gnt) begin
      bus_addr = tx_addr;
      bus_dout = tx_wdata;
      bus_rw   = 1'b1;
      if (tx_cs) bus_cs_n[tx_port] = 1'b0;
    end else if (rx_gnt) begin
      bus_addr = rx_addr;
      if (rx_cs) bus_cs_n[rx_port] = 1'b0;
    end
  end

  a_one_master: assert property (@(posedge clk) disable iff (!rst_n) !(rx_gnt && tx_gnt));

endmodule
