// hs_pkg: types and constants shared by the HS-Scale network and NPU tile.
//
// Flits are FLIT_W bits wide. A packet follows the Hermes-style format used
// throughout this design: flit 0 is the header and carries the destination
// address ({x, y}, one half of the flit each), flit 1 carries the number of
// payload flits that follow, then come the payload flits. The flit width and
// the size flit are this design's choices (Hermes defaults); XY routing,
// wormhole switching and the header-carries-destination rule follow the
// HS-Scale description.
//
// The processor-side peripheral bus is a simple single-cycle bus: a request
// (sel/we/re/addr/wdata) is sampled on the rising clock edge, read data is
// combinational in the same cycle, and read side effects (FIFO pops) take
// place on that edge.
package hs_pkg;

  parameter int FLIT_W  = 16;
  parameter int COORD_W = FLIT_W / 2;

  typedef logic [FLIT_W-1:0] flit_t;

  // Router port numbering (Hermes order)
  typedef enum logic [2:0] {
    PORT_EAST  = 3'd0,
    PORT_WEST  = 3'd1,
    PORT_NORTH = 3'd2,
    PORT_SOUTH = 3'd3,
    PORT_LOCAL = 3'd4
  } port_e;

  parameter int NPORTS = 5;

  // Peripheral bus
  parameter int BUS_AW = 8;
  parameter int BUS_DW = 32;

  typedef struct packed {
    logic              sel;
    logic              we;
    logic              re;
    logic [BUS_AW-1:0] addr;
    logic [BUS_DW-1:0] wdata;
  } bus_req_t;

  // Peripheral address map (addr[7:4] selects the peripheral, addr[3:0] the register)
  parameter logic [3:0] PERIPH_NI    = 4'h0;
  parameter logic [3:0] PERIPH_TIMER = 4'h1;
  parameter logic [3:0] PERIPH_INTC  = 4'h2;
  parameter logic [3:0] PERIPH_UART  = 4'h3;

  // Interrupt source numbering in the interrupt controller
  parameter int IRQ_UART  = 0;
  parameter int IRQ_TIMER = 1;
  parameter int IRQ_NI    = 2;
  parameter int NIRQ      = 3;

  function automatic flit_t make_header(input logic [COORD_W-1:0] x, input logic [COORD_W-1:0] y);
    return {x, y};
  endfunction

endpackage
