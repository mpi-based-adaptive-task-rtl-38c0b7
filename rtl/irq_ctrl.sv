// irq_ctrl: the NPU's interrupt controller.
//
// Gathers the three interrupt sources of an NPU (UART, timer, network
// interface; numbering in hs_pkg) into the processor's single interrupt
// request. Sources are level sensitive and are acknowledged at the source.
// Each source has a mask bit; a global enable lets the kernel disable all
// interrupts while it saves and restores the processor context, as the
// HS-Scale kernel does around every interrupt. PRIORITY reports the
// lowest-numbered pending source so the kernel can dispatch directly.
// Register map (addr[3:0]):
//   0 PENDING  read: raw sources AND mask
//   1 MASK     read/write (all enabled after reset)
//   2 RAW      read: raw source levels
//   3 ENABLE   read/write: [0] global enable (1 after reset)
//   4 PRIORITY read: [1:0] lowest pending source, [31] none pending
// irq is registered: it follows a source by one cycle.
// The three sources follow HS-Scale; the rest is this design's choice.
module irq_ctrl
  import hs_pkg::*;
(
  input  logic              clk,
  input  logic              rst_n,
  input  bus_req_t          bus,
  output logic [BUS_DW-1:0] rdata,
  input  logic [NIRQ-1:0]   src,
  output logic              irq
);

  logic [NIRQ-1:0] mask, pending;
  logic            gie;
  logic [3:0]      reg_addr;
  logic            wr;
  logic [BUS_DW-1:0] prio;

  assign reg_addr = bus.addr[3:0];
  assign wr       = bus.sel && bus.we;
  assign pending  = src & mask;

  always_comb begin
    prio = {1'b1, {(BUS_DW-1){1'b0}}};
    for (int k = NIRQ - 1; k >= 0; k--)
      if (pending[k]) prio = BUS_DW'(k);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      mask <= '1;
      gie  <= 1'b1;
      irq  <= 1'b0;
    end else begin
      if (wr && reg_addr == 4'd1) mask <= bus.wdata[NIRQ-1:0];
      if (wr && reg_addr == 4'd3) gie  <= bus.wdata[0];
      irq <= gie && (|pending);
    end
  end

  always_comb begin
    unique case (reg_addr)
      4'd0:    rdata = BUS_DW'(pending);
      4'd1:    rdata = BUS_DW'(mask);
      4'd2:    rdata = BUS_DW'(src);
      4'd3:    rdata = BUS_DW'(gie);
      4'd4:    rdata = prio;
      default: rdata = '0;
    endcase
  end

endmodule
