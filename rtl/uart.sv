// uart: the NPU's serial port (8 data bits, no parity, one stop bit).
//
// On the prototype one NPU's UART links the array to a host computer that
// loads kernel and task code, sends input data and shows debug messages.
// The transmitter shifts a written byte out LSB first, framed by a start and
// a stop bit, one bit every DIVISOR clock cycles. The receiver synchronises
// the line, waits for a falling edge, checks the start bit half a bit later
// and then samples each data bit and the stop bit in the middle of its bit
// time. A received byte sets rx_valid and raises the interrupt until software
// reads it; a byte that arrives before that is lost and sets the overrun flag.
// Register map (addr[3:0]):
//   0 DATA    write: byte to send (ignored while busy); read: received byte,
//             clears rx_valid and overrun
//   1 STATUS  read: [0] rx_valid, [1] tx busy, [2] overrun
// Bus timing as in hs_pkg. Frame format, baud rate (115200 at the 7 MHz
// prototype clock) and register map are this design's choices.
module uart
  import hs_pkg::*;
#(
  parameter int unsigned CLK_HZ  = 7_000_000,
  parameter int unsigned BAUD    = 115_200,
  parameter int unsigned DIVISOR = CLK_HZ / BAUD
) (
  input  logic              clk,
  input  logic              rst_n,
  input  bus_req_t          bus,
  output logic [BUS_DW-1:0] rdata,
  output logic              irq,
  input  logic              rxd,
  output logic              txd
);

  localparam int DW = $clog2(DIVISOR + 1);

  logic [3:0] reg_addr;
  assign reg_addr = bus.addr[3:0];

  // ---------------- transmitter ----------------
  logic [9:0]    tx_shift;
  logic [3:0]    tx_bits;     // bits left to send
  logic [DW-1:0] tx_cnt;
  logic          tx_busy;

  assign tx_busy = (tx_bits != 0);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      tx_shift <= '1;
      tx_bits  <= '0;
      tx_cnt   <= '0;
      txd      <= 1'b1;
    end else if (!tx_busy) begin
      txd <= 1'b1;
      if (bus.sel && bus.we && reg_addr == 4'd0) begin
        tx_shift <= {1'b1, bus.wdata[7:0], 1'b0};
        tx_bits  <= 4'd10;
        tx_cnt   <= '0;
      end
    end else begin
      txd <= tx_shift[0];
      if (tx_cnt == DW'(DIVISOR - 1)) begin
        tx_cnt   <= '0;
        tx_shift <= {1'b1, tx_shift[9:1]};
        tx_bits  <= tx_bits - 1'b1;
      end else begin
        tx_cnt <= tx_cnt + 1'b1;
      end
    end
  end

  // ---------------- receiver ----------------
  typedef enum logic [1:0] {RX_IDLE, RX_START, RX_DATA, RX_STOP} rx_state_e;

  rx_state_e     rx_state;
  logic [2:0]    rx_sync;
  logic          rx_s, rx_prev;
  logic [DW-1:0] rx_cnt;
  logic [2:0]    rx_bit;
  logic [7:0]    rx_shift, rx_byte;
  logic          rx_valid, overrun;
  logic          rd_data;

  assign rx_s    = rx_sync[2];
  assign rd_data = bus.sel && bus.re && reg_addr == 4'd0;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      rx_sync  <= '1;
      rx_prev  <= 1'b1;
      rx_state <= RX_IDLE;
      rx_cnt   <= '0;
      rx_bit   <= '0;
      rx_shift <= '0;
      rx_byte  <= '0;
      rx_valid <= 1'b0;
      overrun  <= 1'b0;
    end else begin
      rx_sync <= {rx_sync[1:0], rxd};
      rx_prev <= rx_s;
      if (rd_data) begin
        rx_valid <= 1'b0;
        overrun  <= 1'b0;
      end
      unique case (rx_state)
        RX_IDLE:
          if (rx_prev && !rx_s) begin
            rx_state <= RX_START;
            rx_cnt   <= '0;
          end
        RX_START:
          if (rx_cnt == DW'(DIVISOR / 2 - 1)) begin
            rx_cnt   <= '0;
            rx_bit   <= '0;
            rx_state <= rx_s ? RX_IDLE : RX_DATA;  // glitch, not a start bit
          end else rx_cnt <= rx_cnt + 1'b1;
        RX_DATA:
          if (rx_cnt == DW'(DIVISOR - 1)) begin
            rx_cnt   <= '0;
            rx_shift <= {rx_s, rx_shift[7:1]};
            rx_bit   <= rx_bit + 1'b1;
            if (rx_bit == 3'd7) rx_state <= RX_STOP;
          end else rx_cnt <= rx_cnt + 1'b1;
        RX_STOP:
          if (rx_cnt == DW'(DIVISOR - 1)) begin
            rx_state <= RX_IDLE;
            if (rx_s) begin
              rx_byte  <= rx_shift;
              rx_valid <= 1'b1;
              if (rx_valid && !rd_data) overrun <= 1'b1;
            end
          end else rx_cnt <= rx_cnt + 1'b1;
        default: rx_state <= RX_IDLE;
      endcase
    end
  end

  always_comb begin
    unique case (reg_addr)
      4'd0:    rdata = BUS_DW'(rx_byte);
      4'd1:    rdata = BUS_DW'({overrun, tx_busy, rx_valid});
      default: rdata = '0;
    endcase
  end

  assign irq = rx_valid;

endmodule
