// timer: the NPU's periodic timer, whose interrupt drives the operating
// system's round-robin task scheduler (one time slice per period).
//
// A free-running counter counts clock cycles while enabled; when it reaches
// PERIOD-1 it wraps to zero and sets the interrupt flag, which stays set until
// software clears it. Register map (addr[3:0]):
//   0 PERIOD  read/write: slice length in cycles (RESET_PERIOD after reset)
//   1 COUNT   read: current count
//   2 CTRL    read/write: [0] enable (1 after reset)
//   3 STATUS  read: [0] interrupt flag; write 1 to bit 0 to clear it
// Bus timing as in hs_pkg. The timer and its scheduling role follow HS-Scale;
// the register map and the default slice (10 ms at 7 MHz) are this design's.
module timer
  import hs_pkg::*;
#(
  parameter int unsigned RESET_PERIOD = 70000
) (
  input  logic              clk,
  input  logic              rst_n,
  input  bus_req_t          bus,
  output logic [BUS_DW-1:0] rdata,
  output logic              irq
);

  logic [31:0] period, count;
  logic        enable, flag;
  logic [3:0]  reg_addr;
  logic        wr;

  assign reg_addr = bus.addr[3:0];
  assign wr       = bus.sel && bus.we;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      period <= RESET_PERIOD;
      count  <= '0;
      enable <= 1'b1;
      flag   <= 1'b0;
    end else begin
      if (enable) begin
        if (count >= period - 1) begin
          count <= '0;
          flag  <= 1'b1;
        end else begin
          count <= count + 1;
        end
      end
      if (wr && reg_addr == 4'd0) begin
        period <= bus.wdata;
        count  <= '0;
      end
      if (wr && reg_addr == 4'd2) enable <= bus.wdata[0];
      if (wr && reg_addr == 4'd3 && bus.wdata[0]) flag <= 1'b0;
    end
  end

  always_comb begin
    unique case (reg_addr)
      4'd0:    rdata = period;
      4'd1:    rdata = count;
      4'd2:    rdata = {31'd0, enable};
      4'd3:    rdata = {31'd0, flag};
      default: rdata = '0;
    endcase
  end

  assign irq = flag;

endmodule
