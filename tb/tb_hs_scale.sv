// tb_hs_scale: end-to-end test of the full 4x4 HS-Scale array at its default
// parameters.
//
// Every tile runs from its own clock (periods from 10 ns to about 21 ns) and
// is driven by a processor model on its peripheral bus. The processor model
// sends the packets queued for it through the network interface, and on an
// interrupt reads the interrupt controller's PRIORITY register and serves the
// source: it reads a whole packet from the NI, acknowledges the timer, or
// reads a UART byte. Every packet carries its source tile in its payload and
// is checked on arrival against the oldest packet that source sent to this
// tile (XY routing keeps packets between one pair of tiles in order).
//
// Phase 1, random traffic: every tile sends packets of 1..12 payload flits to
// random tiles (itself included). Its first packet goes to tile (1,1), whose
// processor does not read for the first 4000 cycles, so the NI receive FIFO
// fills and back-pressure spreads through routers and links.
// Phase 2, task migration traffic of the MJPEG case study: a three-task
// pipeline IVLC -> IQ -> IDCT starts on tile (1,1); then IVLC moves to (2,0)
// and IQ to (2,1) and later to (1,2). Each move sends the task's code and
// control block (MIG_FLITS flits in 32-flit packets) to the new tile, which
// then announces itself to every other tile; pipeline data packets flow
// between the current hosts after each move.
//
// Mechanisms counted, each must occur at least once: flits over toggle links,
// arbitration among several inputs, headers waiting for a busy output, full
// NI receive FIFO, link stalled by a full router buffer, processor seeing a
// full NI transmit FIFO, NI / timer / UART interrupts, and completed
// migrations.
module tb_hs_scale;
  import hs_pkg::*;
  localparam int COLS = 4, ROWS = 4, N = COLS * ROWS;
  localparam int NRAND = 10;          // random packets per tile
  localparam int MIG_FLITS = 512;     // task image + control block, in flits
  localparam int UART_DIV = 7_000_000 / 115_200;

  logic [N-1:0] clk = '0, rst_n = '0, cpu_irq, uart_rxd, uart_txd;
  bus_req_t    bus   [N];
  logic [31:0] rdata [N];
  int checks = 0, failures = 0;
  realtime half [N];

  hs_scale dut (
    .clk, .rst_n, .bus, .bus_rdata(rdata), .cpu_irq, .uart_rxd, .uart_txd
  );

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  // ---------------- scoreboard ----------------
  flit_t sendq [N][$];            // packets waiting to be sent, flit by flit
  flit_t expq  [N][N][$];         // [src][dst] flits expected, in order
  int queued = 0, delivered = 0;
  int seq [N];
  bit hold_rx [N];

  function automatic flit_t hdr(input int n);
    return {8'(n % COLS), 8'(n / COLS)};
  endfunction

  function automatic void enqueue(input int src, input int dst, input int len);
    flit_t f[$];
    f.push_back(hdr(dst));
    f.push_back(flit_t'(len));
    for (int k = 0; k < len; k++) begin
      f.push_back({4'(src), 12'(seq[src])});
      seq[src]++;
    end
    foreach (f[k]) begin
      sendq[src].push_back(f[k]);
      expq[src][dst].push_back(f[k]);
    end
    queued++;
  endfunction

  // ---------------- mechanism counters ----------------
  int link_flits = 0, contention = 0, blocked = 0, ni_full = 0, link_stall = 0;
  int tx_full_seen = 0, ni_irqs = 0, timer_irqs = 0, uart_bytes = 0, migrations = 0;

  for (genvar gy = 0; gy < ROWS; gy++) begin : g_my
    for (genvar gx = 0; gx < COLS; gx++) begin : g_mx
      localparam int n = gy * COLS + gx;
      logic [3:0] req_q = '0;
      always @(posedge clk[n]) if (rst_n[n]) begin
        req_q <= dut.g_row[gy].g_col[gx].u_npu.link_out_req;
        link_flits += $countones(req_q ^ dut.g_row[gy].g_col[gx].u_npu.link_out_req);
        if ($countones(dut.g_row[gy].g_col[gx].u_npu.u_router.req) > 1) contention++;
        for (int i = 0; i < NPORTS; i++) begin
          if (dut.g_row[gy].g_col[gx].u_npu.u_router.buf_valid[i] &&
              !dut.g_row[gy].g_col[gx].u_npu.u_router.alloc[i] &&
              dut.g_row[gy].g_col[gx].u_npu.u_router.state[i] == 0 &&
              dut.g_row[gy].g_col[gx].u_npu.u_router.out_busy[dut.g_row[gy].g_col[gx].u_npu.u_router.want[i]])
            blocked++;
          if (i < 4 && dut.g_row[gy].g_col[gx].u_npu.r_in_valid[i] && !dut.g_row[gy].g_col[gx].u_npu.r_in_ready[i])
            link_stall++;
        end
        if (dut.g_row[gy].g_col[gx].u_npu.u_ni.rx_valid && !dut.g_row[gy].g_col[gx].u_npu.u_ni.rx_ready)
          ni_full++;
      end
    end
  end

  // ---------------- clocks and processor models ----------------
  for (genvar g = 0; g < N; g++) begin : g_cpu
    initial begin
      half[g] = 5.0 + 0.37 * g;
      forever #(half[g]) clk[g] = ~clk[g];
    end

    task automatic wr(input logic [7:0] a, input logic [31:0] d);
      @(negedge clk[g]);
      bus[g] = '{sel: 1'b1, we: 1'b1, re: 1'b0, addr: a, wdata: d};
      @(posedge clk[g]);
      #0.1 bus[g] = '0;
    endtask

    task automatic rd(input logic [7:0] a, output logic [31:0] d);
      @(negedge clk[g]);
      bus[g] = '{sel: 1'b1, we: 1'b0, re: 1'b1, addr: a, wdata: '0};
      #1 d = rdata[g];
      @(posedge clk[g]);
      #0.1 bus[g] = '0;
    endtask

    // software reassembly of the packet being received: on an NI interrupt
    // the processor moves whatever the receive FIFO holds into it and checks
    // each packet once it is complete; it never waits for a missing flit
    flit_t pkt[$];
    task automatic drain_ni();
      logic [31:0] st, d;
      rd(8'h01, st);
      for (int c = 0; c < int'(st[7:0]); c++) begin
        rd(8'h00, d);
        pkt.push_back(d[15:0]);
        if (pkt.size() >= 2 && pkt.size() == int'(pkt[1]) + 2) check_packet();
      end
    endtask

    task automatic check_packet();
      int src;
      bit ok;
      check(pkt[0] == hdr(g), $sformatf("tile %0d: header %h is for this tile", g, pkt[0]));
      src = (pkt[1] == 0) ? 0 : int'(pkt[2][15:12]);
      ok = 1;
      foreach (pkt[k]) begin
        if (expq[src][g].size() == 0 || expq[src][g][0] != pkt[k]) ok = 0;
        if (expq[src][g].size() != 0) void'(expq[src][g].pop_front());
      end
      check(ok && pkt[1] != 0, $sformatf("tile %0d: packet from tile %0d intact and in order", g, src));
      delivered++;
      pkt.delete();
    endtask

    task automatic serve_irq();
      logic [31:0] p, d;
      rd(8'h24, p);
      case (p)
        IRQ_NI:    begin ni_irqs++; drain_ni(); end
        IRQ_TIMER: begin timer_irqs++; wr(8'h13, 1); end
        IRQ_UART:  begin
          rd(8'h30, d);
          check(d[7:0] == 8'(8'hA0 + uart_bytes), $sformatf("UART byte %0d", uart_bytes));
          uart_bytes++;
        end
        default: ;
      endcase
    endtask

    initial begin
      logic [31:0] st;
      bus[g] = '0;
      seq[g] = 0;
      repeat (4) @(posedge clk[g]);
      rst_n[g] = 1;
      if (g == 0) wr(8'h10, 3000);     // short time slice on tile 0
      forever begin
        if (cpu_irq[g] && !hold_rx[g]) serve_irq();
        else if (sendq[g].size() != 0) begin
          // send one packet, serving interrupts while the TX FIFO is full
          automatic int len = int'(sendq[g][1]) + 2;
          for (int k = 0; k < len; k++) begin
            rd(8'h01, st);
            while (st[17]) begin
              tx_full_seen++;
              if (cpu_irq[g] && !hold_rx[g]) serve_irq();
              rd(8'h01, st);
            end
            wr(8'h02, 32'(sendq[g].pop_front()));
          end
        end else @(posedge clk[g]);
      end
    end
  end

  // ---------------- host PC on tile 0's UART ----------------
  initial begin
    uart_rxd = '1;
    wait (rst_n[0]);
    repeat (50) @(posedge clk[0]);
    for (int b = 0; b < 3; b++) begin
      // the host sends the next byte once the tile has read the last one
      automatic logic [9:0] fr = {1'b1, 8'(8'hA0 + b), 1'b0};
      wait (uart_bytes == b);
      for (int k = 0; k < 10; k++) begin
        uart_rxd[0] = fr[k];
        repeat (UART_DIV) @(posedge clk[0]);
      end
    end
  end

  // ---------------- watchdog ----------------
  initial begin
    #2ms;
    failures++; $display("watchdog expired: queued=%0d delivered=%0d", queued, delivered);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  task automatic quiesce(input string what);
    wait (delivered == queued);
    check(1, what);
  endtask

  task automatic migrate(input int from, input int to);
    int left = MIG_FLITS;
    while (left > 0) begin
      int len = (left > 32) ? 32 : left;
      enqueue(from, to, len);
      left -= len;
    end
    quiesce("task image transferred");
    for (int n = 0; n < N; n++) if (n != to) enqueue(to, n, 2);   // new location announced
    quiesce("new host announced");
    migrations++;
  endtask

  task automatic pipeline(input int ivlc, input int iq, input int idct);
    for (int k = 0; k < 4; k++) begin
      enqueue(ivlc, iq, 16);
      enqueue(iq, idct, 16);
    end
    quiesce("pipeline data delivered");
  endtask

  localparam int T11 = 1 * COLS + 1, T20 = 0 * COLS + 2, T21 = 1 * COLS + 2, T12 = 2 * COLS + 1;

  initial begin
    foreach (hold_rx[n]) hold_rx[n] = 0;
    hold_rx[T11] = 1;
    #200;
    // ---- phase 1: random traffic with a hot spot at (1,1)
    for (int n = 0; n < N; n++) enqueue(n, T11, 12);
    for (int p = 0; p < NRAND; p++)
      for (int n = 0; n < N; n++) enqueue(n, $urandom_range(0, N - 1), $urandom_range(1, 12));
    repeat (4000) @(posedge clk[T11]);
    hold_rx[T11] = 0;
    quiesce("random traffic delivered");
    $display("phase 1 done at %0t: %0d packets", $realtime, delivered);
    // ---- phase 2: MJPEG pipeline and task migrations
    pipeline(T11, T11, T11);
    migrate(T11, T20);                 // IVLC -> (2,0)
    pipeline(T20, T11, T11);
    migrate(T11, T21);                 // IQ -> (2,1)
    pipeline(T20, T21, T11);
    migrate(T21, T12);                 // IQ -> (1,2)
    pipeline(T20, T12, T11);
    $display("phase 2 done at %0t: %0d packets", $realtime, delivered);
    // wait for the UART bytes and a timer slice on tile 0
    wait (uart_bytes == 3 && timer_irqs > 0);
    for (int s = 0; s < N; s++) for (int d = 0; d < N; d++)
      check(expq[s][d].size() == 0, "nothing left undelivered");
    $display("links=%0d contention=%0d blocked=%0d ni_full=%0d link_stall=%0d tx_full=%0d ni_irq=%0d timer_irq=%0d uart=%0d migrations=%0d",
             link_flits, contention, blocked, ni_full, link_stall, tx_full_seen, ni_irqs, timer_irqs, uart_bytes, migrations);
    check(link_flits > 0, "flits crossed toggle links");
    check(contention > 0, "round-robin arbitration among inputs");
    check(blocked > 0, "header waited for a busy output (wormhole)");
    check(ni_full > 0, "NI receive FIFO full");
    check(link_stall > 0, "link stalled by a full router buffer");
    check(tx_full_seen > 0, "NI transmit FIFO full");
    check(ni_irqs > 0, "NI interrupts");
    check(timer_irqs > 0, "timer interrupts");
    check(uart_bytes == 3, "UART bytes from host");
    check(migrations == 3, "three migrations");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
