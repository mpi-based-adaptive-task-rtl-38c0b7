// tb_uart: self-checking test of the UART with DIVISOR = 16.
// Transmit: each written byte must appear on txd as start bit, eight data
// bits LSB first and a stop bit, each exactly 16 cycles long (checked in the
// middle of every bit). Receive: frames driven by the testbench must be
// received, raise the interrupt and read back; a second frame before the read
// must set the overrun flag.
module tb_uart;
  import hs_pkg::*;
  localparam int DIV = 16;
  logic clk = 0, rst_n = 0;
  bus_req_t bus;
  logic [31:0] rdata;
  logic irq, rxd, txd;
  int checks = 0, failures = 0;

  uart #(.DIVISOR(DIV)) dut (.*);
  always #5 clk = ~clk;
  `include "tb/tb_bus_util.svh"

  initial begin
    repeat (200000) @(posedge clk);
    failures++; $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  task automatic send_frame(input logic [7:0] b);
    logic [9:0] fr = {1'b1, b, 1'b0};
    for (int k = 0; k < 10; k++) begin
      rxd = fr[k];
      repeat (DIV) @(posedge clk);
    end
  endtask

  initial begin
    logic [31:0] d;
    bus = '0; rxd = 1;
    repeat (3) @(posedge clk); rst_n = 1;
    // ---- transmit
    for (int n = 0; n < 4; n++) begin
      logic [7:0] b = 8'($urandom);
      logic [9:0] fr = {1'b1, b, 1'b0};
      bus_write(8'h30, 32'(b));
      // start bit begins within two cycles of the write
      begin
        int w = 0;
        while (txd && w < 4) begin @(posedge clk); #1 w++; end
        check(!txd, "start bit");
      end
      repeat (DIV / 2) @(posedge clk);
      for (int k = 0; k < 10; k++) begin
        #1 check(txd == fr[k], $sformatf("tx byte %h bit %0d", b, k));
        if (k == 0) begin bus_read(8'h31, d); check(d[1], "tx busy"); end
        else repeat (DIV) @(posedge clk);
        if (k == 0) repeat (DIV - 1) @(posedge clk);
      end
      repeat (DIV) @(posedge clk);
      bus_read(8'h31, d); check(!d[1], "tx idle after frame");
    end
    // ---- receive
    for (int n = 0; n < 4; n++) begin
      logic [7:0] b = 8'($urandom);
      send_frame(b);
      repeat (4) @(posedge clk);
      check(irq, "rx interrupt");
      bus_read(8'h31, d); check(d[0] && !d[2], "rx_valid, no overrun");
      bus_read(8'h30, d); check(d[7:0] == b, $sformatf("rx byte %h got %h", b, d[7:0]));
      @(negedge clk); check(!irq, "rx interrupt cleared by read");
    end
    send_frame(8'h55);
    send_frame(8'hA3);
    repeat (4) @(posedge clk);
    bus_read(8'h31, d); check(d[0] && d[2], "overrun flagged");
    bus_read(8'h30, d); check(d[7:0] == 8'hA3, "latest byte kept");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
