// hs_scale: the H-Scale hardware array, COLS x ROWS Network Processing Units
// joined only to their nearest neighbours.
//
// NPU(x, y) sits at column x, row y; East is +x and North is +y. Each NPU has
// its own clock and reset input, and every link between two tiles uses the
// toggle protocol, so the tiles may run from completely unrelated clocks (on
// the prototype each tile is a separate FPGA board). Packets are routed XY
// from tile to tile. Links that would leave the array are tied off: nothing
// arrives on them, and XY routing with in-range addresses never sends there.
//
// Ports are per-tile arrays indexed n = y*COLS + x: the processor's
// peripheral bus and interrupt line, and the UART pins. The processors and
// their memories are not part of this module. The 4x4 size is that of the
// prototype array; the flat port arrays are this design's choice.
module hs_scale
  import hs_pkg::*;
#(
  parameter int          COLS         = 4,
  parameter int          ROWS         = 4,
  parameter int          BUF_DEPTH    = 8,
  parameter int          NI_DEPTH     = 16,
  parameter int unsigned TIMER_PERIOD = 70000,
  parameter int unsigned UART_DIV     = 7_000_000 / 115_200
) (
  input  logic [COLS*ROWS-1:0] clk,
  input  logic [COLS*ROWS-1:0] rst_n,
  input  bus_req_t             bus       [COLS*ROWS],
  output logic [BUS_DW-1:0]    bus_rdata [COLS*ROWS],
  output logic [COLS*ROWS-1:0] cpu_irq,
  input  logic [COLS*ROWS-1:0] uart_rxd,
  output logic [COLS*ROWS-1:0] uart_txd
);

  localparam int N = COLS * ROWS;
  // link direction indices (same order as the router ports)
  localparam int D_E = 0, D_W = 1, D_N = 2, D_S = 3;

  flit_t [3:0] out_data [N];
  logic  [3:0] out_req  [N];
  logic  [3:0] out_ack  [N];
  flit_t [3:0] in_data  [N];
  logic  [3:0] in_req   [N];
  logic  [3:0] in_ack   [N];

  for (genvar y = 0; y < ROWS; y++) begin : g_row
    for (genvar x = 0; x < COLS; x++) begin : g_col
      localparam int n = y * COLS + x;

      npu #(
        .MY_X(COORD_W'(x)), .MY_Y(COORD_W'(y)),
        .BUF_DEPTH(BUF_DEPTH), .NI_DEPTH(NI_DEPTH),
        .TIMER_PERIOD(TIMER_PERIOD), .UART_DIV(UART_DIV)
      ) u_npu (
        .clk          (clk[n]),
        .rst_n        (rst_n[n]),
        .bus          (bus[n]),
        .bus_rdata    (bus_rdata[n]),
        .cpu_irq      (cpu_irq[n]),
        .uart_rxd     (uart_rxd[n]),
        .uart_txd     (uart_txd[n]),
        .link_out_data(out_data[n]),
        .link_out_req (out_req[n]),
        .link_out_ack (out_ack[n]),
        .link_in_data (in_data[n]),
        .link_in_req  (in_req[n]),
        .link_in_ack  (in_ack[n])
      );

      // East neighbour (direction 0) sends into our East input and receives our East output
      if (x < COLS - 1) begin : g_e
        assign in_data[n][D_E] = out_data[n+1][D_W];
        assign in_req[n][D_E]  = out_req[n+1][D_W];
        assign out_ack[n][D_E] = in_ack[n+1][D_W];
      end else begin : g_e_edge
        assign in_data[n][D_E] = '0;
        assign in_req[n][D_E]  = 1'b0;
        assign out_ack[n][D_E] = out_req[n][D_E];
      end
      if (x > 0) begin : g_w
        assign in_data[n][D_W] = out_data[n-1][D_E];
        assign in_req[n][D_W]  = out_req[n-1][D_E];
        assign out_ack[n][D_W] = in_ack[n-1][D_E];
      end else begin : g_w_edge
        assign in_data[n][D_W] = '0;
        assign in_req[n][D_W]  = 1'b0;
        assign out_ack[n][D_W] = out_req[n][D_W];
      end
      if (y < ROWS - 1) begin : g_n
        assign in_data[n][D_N] = out_data[n+COLS][D_S];
        assign in_req[n][D_N]  = out_req[n+COLS][D_S];
        assign out_ack[n][D_N] = in_ack[n+COLS][D_S];
      end else begin : g_n_edge
        assign in_data[n][D_N] = '0;
        assign in_req[n][D_N]  = 1'b0;
        assign out_ack[n][D_N] = out_req[n][D_N];
      end
      if (y > 0) begin : g_s
        assign in_data[n][D_S] = out_data[n-COLS][D_N];
        assign in_req[n][D_S]  = out_req[n-COLS][D_N];
        assign out_ack[n][D_S] = in_ack[n-COLS][D_N];
      end else begin : g_s_edge
        assign in_data[n][D_S] = '0;
        assign in_req[n][D_S]  = 1'b0;
        assign out_ack[n][D_S] = out_req[n][D_S];
      end
    end
  end

endmodule
