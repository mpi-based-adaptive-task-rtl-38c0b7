// net_if: network interface (NI) between the router's Local port and the
// NPU's processor.
//
// Flits the router delivers to this NPU are buffered in a small receive FIFO;
// while it holds data the NI raises its interrupt line, on which the operating
// system copies the flits out into the software FIFO of the task they belong
// to. Packets are assembled entirely in software, so the transmit side is a
// second FIFO the processor writes flit by flit (header, size, payload) and
// the router's Local input drains.
//
// Register map on the peripheral bus (word addresses, addr[3:0]):
//   0 RX_DATA  read: head flit of the receive FIFO, popped by the read
//   1 STATUS   read: [7:0] flits in RX FIFO, [15:8] free TX slots,
//                    [16] RX not empty, [17] TX full
//   2 TX_DATA  write: flit pushed into the TX FIFO (dropped when full)
//   3 CTRL     read/write: [0] interrupt enable (1 after reset)
// Bus timing: single cycle, combinational read data, side effects on the edge.
// The receive FIFO with an interrupt follows HS-Scale; the transmit FIFO,
// the depths and the register map are this design's choices.
module net_if
  import hs_pkg::*;
#(
  parameter int RX_DEPTH = 16,
  parameter int TX_DEPTH = 16
) (
  input  logic              clk,
  input  logic              rst_n,
  // peripheral bus
  input  bus_req_t          bus,
  output logic [BUS_DW-1:0] rdata,
  output logic              irq,
  // from router Local output
  input  logic              rx_valid,
  output logic              rx_ready,
  input  flit_t             rx_data,
  // to router Local input
  output logic              tx_valid,
  input  logic              tx_ready,
  output flit_t             tx_data
);

  localparam int RXC_W = $clog2(RX_DEPTH + 1);
  localparam int TXC_W = $clog2(TX_DEPTH + 1);

  logic              rxq_valid, rxq_pop;
  flit_t             rxq_data;
  logic [RXC_W-1:0]  rx_count;
  logic              txq_ready, txq_push;
  logic [TXC_W-1:0]  tx_count;
  logic              irq_en;
  logic [3:0]        reg_addr;

  assign reg_addr = bus.addr[3:0];
  assign rxq_pop  = bus.sel && bus.re && (reg_addr == 4'd0) && rxq_valid;
  assign txq_push = bus.sel && bus.we && (reg_addr == 4'd2);

  flit_fifo #(.WIDTH(FLIT_W), .DEPTH(RX_DEPTH)) u_rxq (
    .clk, .rst_n,
    .in_valid (rx_valid), .in_ready(rx_ready), .in_data(rx_data),
    .out_valid(rxq_valid), .out_ready(rxq_pop), .out_data(rxq_data),
    .count    (rx_count)
  );

  flit_fifo #(.WIDTH(FLIT_W), .DEPTH(TX_DEPTH)) u_txq (
    .clk, .rst_n,
    .in_valid (txq_push), .in_ready(txq_ready), .in_data(bus.wdata[FLIT_W-1:0]),
    .out_valid(tx_valid), .out_ready(tx_ready), .out_data(tx_data),
    .count    (tx_count)
  );

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)                                       irq_en <= 1'b1;
    else if (bus.sel && bus.we && reg_addr == 4'd3)   irq_en <= bus.wdata[0];
  end

  always_comb begin
    rdata = '0;
    unique case (reg_addr)
      4'd0: rdata = BUS_DW'(rxq_data);
      4'd1: begin
        rdata[7:0]  = 8'(rx_count);
        rdata[15:8] = 8'(TX_DEPTH - int'(tx_count));
        rdata[16]   = rxq_valid;
        rdata[17]   = !txq_ready;
      end
      4'd3:    rdata[0] = irq_en;
      default: rdata = '0;
    endcase
  end

  assign irq = irq_en && rxq_valid;

endmodule
