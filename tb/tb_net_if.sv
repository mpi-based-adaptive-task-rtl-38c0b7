// tb_net_if: self-checking test of the network interface.
// Receive path: flits pushed from the router side must raise the interrupt,
// show up in STATUS and come out of RX_DATA in order; the FIFO must refuse
// flits when full (back-pressure to the router) and the interrupt must obey
// the enable bit. Transmit path: flits written to TX_DATA must appear on the
// router side in order, and STATUS must report free slots and fullness.
module tb_net_if;
  import hs_pkg::*;
  localparam int D = 16;
  logic clk = 0, rst_n = 0;
  bus_req_t bus;
  logic [31:0] rdata;
  logic irq, rx_valid, rx_ready, tx_valid, tx_ready;
  flit_t rx_data, tx_data;
  int checks = 0, failures = 0;

  net_if #(.RX_DEPTH(D), .TX_DEPTH(D)) dut (.*);
  always #5 clk = ~clk;
  `include "tb/tb_bus_util.svh"

  initial begin
    repeat (100000) @(posedge clk);
    failures++; $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  task automatic router_push(input flit_t f);
    @(negedge clk); rx_valid = 1; rx_data = f;
    @(posedge clk); #1 rx_valid = 0;
  endtask

  initial begin
    logic [31:0] d;
    bus = '0; rx_valid = 0; rx_data = 0; tx_ready = 0;
    repeat (3) @(posedge clk); rst_n = 1;
    @(negedge clk);
    check(!irq, "no interrupt when empty");
    bus_read(8'h01, d);
    check(d[7:0] == 0 && d[15:8] == D && !d[16] && !d[17], "STATUS after reset");
    // receive
    for (int k = 0; k < 5; k++) router_push(flit_t'(16'h100 + k));
    #1 check(irq, "interrupt raised by received data");
    bus_read(8'h01, d);
    check(d[7:0] == 5 && d[16], "STATUS counts five flits");
    for (int k = 0; k < 5; k++) begin
      bus_read(8'h00, d);
      check(d[15:0] == 16'h100 + k, $sformatf("RX flit %0d", k));
    end
    @(negedge clk);
    check(!irq, "interrupt cleared when drained");
    // fill: back-pressure
    for (int k = 0; k < D; k++) router_push(flit_t'(k));
    @(negedge clk);
    check(!rx_ready, "rx_ready low when RX FIFO full");
    // interrupt enable
    bus_write(8'h03, 0);
    @(negedge clk); check(!irq, "interrupt masked by CTRL");
    bus_write(8'h03, 1);
    @(negedge clk); check(irq, "interrupt back when enabled");
    for (int k = 0; k < D; k++) begin
      bus_read(8'h00, d);
      check(d[15:0] == k, $sformatf("RX full-drain flit %0d", k));
    end
    // transmit with router stalled
    for (int k = 0; k < D; k++) bus_write(8'h02, 32'hA000 + k);
    bus_read(8'h01, d);
    check(d[15:8] == 0 && d[17], "TX full reported");
    bus_write(8'h02, 32'hDEAD);      // dropped
    @(negedge clk);
    tx_ready = 1;
    for (int k = 0; k < D; k++) begin
      #1 check(tx_valid && tx_data == 16'hA000 + k, $sformatf("TX flit %0d", k));
      @(negedge clk);
    end
    check(!tx_valid, "write to full TX FIFO was dropped");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
