// tb_npu: self-checking test of one NPU tile at mesh position (1,1).
// The testbench plays the tile's processor on the peripheral bus and its four
// neighbours on the toggle links (neighbours run from an unrelated 13 ns
// clock, the tile from 10 ns). Checked:
//  - a packet the processor addresses to its own tile comes back through the
//    router's Local port, raises the NI interrupt through the interrupt
//    controller, and reads back intact;
//  - packets to (2,1), (0,1), (1,2), (1,0) leave on the East, West, North and
//    South links respectively, intact;
//  - packets arriving on each link for (1,1) reach the processor, and a packet
//    arriving from the West for (2,1) passes through to the East link;
//  - the timer interrupt and the UART (txd looped to rxd) interrupt arrive
//    through the interrupt controller with the right PRIORITY code.
module tb_npu;
  import hs_pkg::*;
  logic clk = 0, clk_nb = 0, rst_n = 0;
  bus_req_t bus;
  logic [31:0] rdata;
  logic cpu_irq, uart_rxd, uart_txd;
  flit_t [3:0] link_out_data, link_in_data;
  logic  [3:0] link_out_req, link_out_ack, link_in_req, link_in_ack;
  int checks = 0, failures = 0;
  flit_t nb_rx[4][$];

  npu #(.MY_X(8'd1), .MY_Y(8'd1), .TIMER_PERIOD(1_000_000), .UART_DIV(8)) dut (
    .clk, .rst_n, .bus, .bus_rdata(rdata), .cpu_irq, .uart_rxd, .uart_txd,
    .link_out_data, .link_out_req, .link_out_ack, .link_in_data, .link_in_req, .link_in_ack
  );
  assign uart_rxd = uart_txd;

  always #5   clk    = ~clk;
  always #6.5 clk_nb = ~clk_nb;
  `include "tb/tb_bus_util.svh"

  initial begin
    #3ms;
    failures++; $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  // neighbour receivers: take every flit the tile sends on each link
  for (genvar d = 0; d < 4; d++) begin : g_nb
    logic [2:0] s = 0;
    logic last = 0;
    initial link_out_ack[d] = 0;
    always @(posedge clk_nb) begin
      s <= {s[1:0], link_out_req[d]};
      if (s[2] != last) begin
        last <= s[2];
        nb_rx[d].push_back(link_out_data[d]);
        link_out_ack[d] <= ~link_out_ack[d];
      end
    end
  end

  // neighbour sender on link d
  task automatic nb_send(input int d, input flit_t f);
    logic [2:0] s;
    @(posedge clk_nb);
    s = {3{link_in_req[d]}};   // acknowledge currently equals request
    link_in_data[d] = f;
    link_in_req[d]  = ~link_in_req[d];
    do begin @(posedge clk_nb); s = {s[1:0], link_in_ack[d]}; end while (s[2] != link_in_req[d]);
  endtask

  task automatic cpu_send(input flit_t f[$]);
    logic [31:0] st;
    foreach (f[k]) begin
      do bus_read(8'h01, st); while (st[17]);
      bus_write(8'h02, 32'(f[k]));
    end
  endtask

  // wait for the NI interrupt, then read one packet of known length
  task automatic cpu_recv(input flit_t f[$], input string what);
    logic [31:0] d;
    int w = 0;
    while (!cpu_irq && w < 2000) begin @(posedge clk); w++; end
    check(cpu_irq, {what, ": interrupt"});
    bus_read(8'h24, d); check(d == IRQ_NI, {what, ": PRIORITY says NI"});
    foreach (f[k]) begin
      do bus_read(8'h01, d); while (d[7:0] == 0);
      bus_read(8'h00, d);
      check(d[15:0] == f[k], $sformatf("%s: flit %0d %h got %h", what, k, f[k], d[15:0]));
    end
  endtask

  function automatic flit_t q_of(input int x, input int y, input int n, input int tag, output flit_t f[$]);
    f.delete();
    f.push_back({8'(x), 8'(y)});
    f.push_back(flit_t'(n));
    for (int k = 0; k < n; k++) f.push_back(flit_t'(tag * 256 + k));
    return f[0];
  endfunction

  initial begin
    flit_t p[$];
    logic [31:0] d;
    int dx[4] = '{2, 0, 1, 1};
    int dy[4] = '{1, 1, 2, 0};
    bus = '0; link_in_req = 0; link_in_data = 0;
    repeat (4) @(posedge clk); rst_n = 1;
    repeat (4) @(posedge clk);
    // ---- local loopback
    void'(q_of(1, 1, 5, 8'hC0, p));
    cpu_send(p);
    cpu_recv(p, "loopback");
    // ---- outgoing in every direction
    for (int dir = 0; dir < 4; dir++) begin
      void'(q_of(dx[dir], dy[dir], 4, 8'hD0 + dir, p));
      cpu_send(p);
      begin
        int w = 0;
        while (nb_rx[dir].size() < p.size() && w < 3000) begin @(posedge clk); w++; end
      end
      check(nb_rx[dir].size() == p.size(), $sformatf("dir %0d: all flits left", dir));
      foreach (p[k]) if (nb_rx[dir].size() > 0) begin
        check(nb_rx[dir].pop_front() == p[k], $sformatf("dir %0d flit %0d", dir, k));
      end
    end
    // ---- incoming on every link, for this tile
    for (int dir = 0; dir < 4; dir++) begin
      void'(q_of(1, 1, 3, 8'hE0 + dir, p));
      foreach (p[k]) nb_send(dir, p[k]);
      cpu_recv(p, $sformatf("from link %0d", dir));
    end
    // ---- pass-through West -> East
    void'(q_of(2, 1, 6, 8'hF0, p));
    foreach (p[k]) nb_send(1, p[k]);
    repeat (200) @(posedge clk);
    check(nb_rx[0].size() == p.size(), "pass-through: all flits on East");
    foreach (p[k]) if (nb_rx[0].size() > 0) check(nb_rx[0].pop_front() == p[k], "pass-through flit");
    // ---- timer interrupt
    bus_write(8'h10, 40);
    begin
      int w = 0;
      while (!cpu_irq && w < 200) begin @(posedge clk); w++; end
      check(cpu_irq && w >= 35, $sformatf("timer interrupt after ~40 cycles (%0d)", w));
    end
    bus_read(8'h24, d); check(d == IRQ_TIMER, "PRIORITY says timer");
    bus_write(8'h12, 0); bus_write(8'h13, 1);
    repeat (3) @(posedge clk);
    #1 check(!cpu_irq, "timer interrupt acknowledged");
    // ---- UART loop
    bus_write(8'h30, 32'h5A);
    begin
      int w = 0;
      while (!cpu_irq && w < 400) begin @(posedge clk); w++; end
      check(cpu_irq, "UART interrupt");
    end
    bus_read(8'h24, d); check(d == IRQ_UART, "PRIORITY says UART");
    bus_read(8'h30, d); check(d[7:0] == 8'h5A, "UART byte looped back");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
