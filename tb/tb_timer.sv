// tb_timer: self-checking test of the scheduling timer.
// Checks the reset period, that the interrupt flag sets exactly every PERIOD
// cycles, that it stays set until cleared by software, the enable bit and
// the COUNT register.
module tb_timer;
  import hs_pkg::*;
  logic clk = 0, rst_n = 0;
  bus_req_t bus;
  logic [31:0] rdata;
  logic irq;
  int checks = 0, failures = 0;

  timer #(.RESET_PERIOD(50)) dut (.*);
  always #5 clk = ~clk;
  `include "tb/tb_bus_util.svh"

  initial begin
    repeat (100000) @(posedge clk);
    failures++; $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    logic [31:0] d;
    int t_prev, t, cyc;
    bus = '0;
    repeat (3) @(posedge clk); rst_n = 1;
    bus_read(8'h10, d); check(d == 50, "reset period");
    // first flag after 50 cycles from reset
    cyc = 0;
    while (!irq) begin @(posedge clk); #1 cyc++; end
    check(cyc >= 48 && cyc <= 50, $sformatf("first interrupt after ~50 cycles (%0d)", cyc));
    // new period: flag every 20 cycles
    bus_write(8'h10, 20);
    bus_write(8'h13, 1);
    @(negedge clk); check(!irq, "flag cleared by software");
    t_prev = -1; cyc = 0;
    for (int n = 0; n < 4; n++) begin
      while (!irq) begin @(posedge clk); #1 cyc++; end
      t = cyc;
      if (t_prev >= 0) check(t - t_prev == 20, $sformatf("period of 20 cycles (%0d)", t - t_prev));
      t_prev = t;
      repeat (3) begin @(posedge clk); #1 cyc++; end
      check(irq, "flag held until cleared");
      bus_write(8'h13, 1); cyc++;
    end
    bus_read(8'h11, d); check(d < 20, "COUNT below PERIOD");
    // disable
    bus_write(8'h12, 0);
    bus_write(8'h13, 1);
    repeat (60) @(posedge clk);
    #1 check(!irq, "no interrupt when disabled");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
