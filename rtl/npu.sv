// npu: one Network Processing Unit, the tile HS-Scale is made of.
//
// Network layer: a five-port router whose four mesh ports leave the tile
// through asynchronous toggle-protocol links (toggle_tx / toggle_rx per
// direction), so neighbouring tiles may run from unrelated clocks, and whose
// Local port feeds the network interface. Processing layer: the peripherals a
// small RISC processor sees on its bus, the network interface, a timer, an
// interrupt controller and a UART. The processor and its static memory are
// outside this module: the processor's peripheral bus (bus / bus_rdata) and
// its interrupt line (cpu_irq) are ports.
//
// Address map of the peripheral bus (addr[7:4]): 0 network interface,
// 1 timer, 2 interrupt controller, 3 UART (register maps in those modules).
// Mesh link arrays are indexed by direction: 0 East, 1 West, 2 North, 3 South.
// link_out_* is this tile's sending side of a link, link_in_* its receiving
// side. The structure follows HS-Scale; the address map, the link wiring and
// all sizes are this design's choices.
module npu
  import hs_pkg::*;
#(
  parameter logic [COORD_W-1:0] MY_X         = '0,
  parameter logic [COORD_W-1:0] MY_Y         = '0,
  parameter int                 BUF_DEPTH    = 8,
  parameter int                 NI_DEPTH     = 16,
  parameter int unsigned        TIMER_PERIOD = 70000,
  parameter int unsigned        UART_DIV     = 7_000_000 / 115_200
) (
  input  logic              clk,
  input  logic              rst_n,
  // processor side
  input  bus_req_t          bus,
  output logic [BUS_DW-1:0] bus_rdata,
  output logic              cpu_irq,
  // serial port
  input  logic              uart_rxd,
  output logic              uart_txd,
  // mesh links, index = direction (E, W, N, S)
  output flit_t [3:0]       link_out_data,
  output logic  [3:0]       link_out_req,
  input  logic  [3:0]       link_out_ack,
  input  flit_t [3:0]       link_in_data,
  input  logic  [3:0]       link_in_req,
  output logic  [3:0]       link_in_ack
);

  // ---------------- network layer ----------------
  logic  [NPORTS-1:0] r_in_valid, r_in_ready, r_out_valid, r_out_ready;
  flit_t [NPORTS-1:0] r_in_data, r_out_data;

  router #(.MY_X(MY_X), .MY_Y(MY_Y), .BUF_DEPTH(BUF_DEPTH)) u_router (
    .clk, .rst_n,
    .in_valid (r_in_valid),  .in_ready (r_in_ready),  .in_data (r_in_data),
    .out_valid(r_out_valid), .out_ready(r_out_ready), .out_data(r_out_data)
  );

  for (genvar d = 0; d < 4; d++) begin : g_link
    toggle_rx #(.WIDTH(FLIT_W)) u_rx (
      .clk, .rst_n,
      .link_data(link_in_data[d]), .link_req(link_in_req[d]), .link_ack(link_in_ack[d]),
      .out_valid(r_in_valid[d]),   .out_ready(r_in_ready[d]), .out_data(r_in_data[d])
    );
    toggle_tx #(.WIDTH(FLIT_W)) u_tx (
      .clk, .rst_n,
      .in_valid (r_out_valid[d]),   .in_ready(r_out_ready[d]), .in_data(r_out_data[d]),
      .link_data(link_out_data[d]), .link_req(link_out_req[d]), .link_ack(link_out_ack[d])
    );
  end

  // ---------------- processing layer peripherals ----------------
  bus_req_t          bus_ni, bus_tmr, bus_intc, bus_uart;
  logic [BUS_DW-1:0] rd_ni, rd_tmr, rd_intc, rd_uart;
  logic [NIRQ-1:0]   irq_src;

  always_comb begin
    bus_ni       = bus;
    bus_tmr      = bus;
    bus_intc     = bus;
    bus_uart     = bus;
    bus_ni.sel   = bus.sel && (bus.addr[7:4] == PERIPH_NI);
    bus_tmr.sel  = bus.sel && (bus.addr[7:4] == PERIPH_TIMER);
    bus_intc.sel = bus.sel && (bus.addr[7:4] == PERIPH_INTC);
    bus_uart.sel = bus.sel && (bus.addr[7:4] == PERIPH_UART);
    unique case (bus.addr[7:4])
      PERIPH_NI:    bus_rdata = rd_ni;
      PERIPH_TIMER: bus_rdata = rd_tmr;
      PERIPH_INTC:  bus_rdata = rd_intc;
      PERIPH_UART:  bus_rdata = rd_uart;
      default:      bus_rdata = '0;
    endcase
  end

  net_if #(.RX_DEPTH(NI_DEPTH), .TX_DEPTH(NI_DEPTH)) u_ni (
    .clk, .rst_n,
    .bus(bus_ni), .rdata(rd_ni), .irq(irq_src[IRQ_NI]),
    .rx_valid(r_out_valid[PORT_LOCAL]), .rx_ready(r_out_ready[PORT_LOCAL]), .rx_data(r_out_data[PORT_LOCAL]),
    .tx_valid(r_in_valid[PORT_LOCAL]),  .tx_ready(r_in_ready[PORT_LOCAL]),  .tx_data(r_in_data[PORT_LOCAL])
  );

  timer #(.RESET_PERIOD(TIMER_PERIOD)) u_timer (
    .clk, .rst_n, .bus(bus_tmr), .rdata(rd_tmr), .irq(irq_src[IRQ_TIMER])
  );

  uart #(.DIVISOR(UART_DIV)) u_uart (
    .clk, .rst_n, .bus(bus_uart), .rdata(rd_uart), .irq(irq_src[IRQ_UART]),
    .rxd(uart_rxd), .txd(uart_txd)
  );

  irq_ctrl u_intc (
    .clk, .rst_n, .bus(bus_intc), .rdata(rd_intc), .src(irq_src), .irq(cpu_irq)
  );

endmodule
