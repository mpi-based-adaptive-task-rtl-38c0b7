// tb_router: self-checking test of the five-port wormhole router at (1,1).
// 1. Latency: a lone packet entering West for the Local port shows its header
//    on the Local output two cycles after it was accepted, then one flit per
//    cycle.
// 2. Random traffic: every input sends packets to random addresses in a 3x3
//    neighbourhood while outputs apply random back-pressure. Each output
//    monitor checks that packets arrive whole and uninterleaved (wormhole),
//    that the header's XY route is this output, and that the packet equals the
//    oldest one its source sent to this output. Contention (several inputs
//    requesting in one cycle) and blocking on a busy output must both occur.
module tb_router;
  import hs_pkg::*;
  localparam int NPKT = 60;
  logic clk = 0, rst_n = 0;
  logic  [NPORTS-1:0] in_valid, in_ready, out_valid, out_ready;
  flit_t [NPORTS-1:0] in_data, out_data;
  int checks = 0, failures = 0;
  flit_t exp_q [NPORTS][NPORTS][$];
  int sent_pkts = 0, recv_pkts = 0;
  int contention = 0, blocked = 0;
  bit random_phase = 0;

  router #(.MY_X(8'd1), .MY_Y(8'd1)) dut (.*);
  always #5 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  function automatic int xy(input flit_t h);
    int x = int'(h[15:8]), y = int'(h[7:0]);
    if (x > 1) return 0;
    if (x < 1) return 1;
    if (y > 1) return 2;
    if (y < 1) return 3;
    return 4;
  endfunction

  initial begin
    repeat (200000) @(posedge clk);
    failures++; $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  // mechanism counters
  always @(posedge clk) if (rst_n && random_phase) begin
    if ($countones(dut.req) > 1) contention++;
    for (int i = 0; i < NPORTS; i++)
      if (dut.buf_valid[i] && !dut.alloc[i] && dut.state[i] == 0 && dut.out_busy[dut.want[i]]) blocked++;
  end

  // output monitors
  for (genvar o = 0; o < NPORTS; o++) begin : g_mon
    flit_t pkt[$];
    int need;
    initial need = -1;
    always @(negedge clk) out_ready[o] = random_phase ? ($urandom_range(0, 3) != 0) : 1'b1;
    always @(posedge clk) if (rst_n && random_phase && out_valid[o] && out_ready[o]) begin
      pkt.push_back(out_data[o]);
      if (pkt.size() == 1) check(xy(out_data[o]) == o, $sformatf("out %0d: header %h routed here", o, out_data[o]));
      if (pkt.size() == 2) need = int'(out_data[o]) + 2;
      if (pkt.size() == need) begin
        automatic int src = int'(pkt[2][15:13]);
        automatic bit ok = 1;
        for (int k = 0; k < need; k++) begin
          if (exp_q[src][o].size() == 0 || exp_q[src][o][0] != pkt[k]) ok = 0;
          if (exp_q[src][o].size() != 0) void'(exp_q[src][o].pop_front());
        end
        check(ok, $sformatf("out %0d: packet from %0d intact and in order", o, src));
        recv_pkts++;
        pkt.delete(); need = -1;
      end
    end
  end

  task automatic send_flit(input int i, input flit_t f);
    @(negedge clk);
    in_valid[i] = 1; in_data[i] = f;
    while (!in_ready[i]) @(negedge clk);
    @(posedge clk);
    #1 in_valid[i] = 0;
  endtask

  initial begin
    in_valid = 0; in_data = 0;
    repeat (3) @(posedge clk); rst_n = 1;
    // ---- 1: latency of a lone packet, West -> Local
    begin
      int t0, t1;
      flit_t seq[4] = '{16'h0101, 16'd2, 16'hA001, 16'hA002};
      fork
        begin
          for (int k = 0; k < 4; k++) begin
            @(negedge clk); in_valid[1] = 1; in_data[1] = seq[k];
          end
          @(negedge clk); in_valid[1] = 0;
        end
        begin
          int cyc = 0, got = 0;
          @(posedge clk); t0 = 0;   // header accepted at this edge
          while (got < 4) begin
            @(posedge clk); cyc++;
            if (out_valid[4]) begin
              check(out_data[4] == seq[got], $sformatf("latency packet flit %0d", got));
              if (got == 0) t1 = cyc;
              got++;
            end
          end
          check(t1 == 2, $sformatf("header leaves two cycles after entry (got %0d)", t1));
          check(cyc == t1 + 3, "then one flit per cycle");
        end
      join
    end
    repeat (5) @(negedge clk);
    random_phase = 1;
    // ---- 2: random traffic on all inputs
    for (int i0 = 0; i0 < NPORTS; i0++) begin
      fork
        automatic int i = i0;
        for (int p = 0; p < NPKT; p++) begin
          automatic flit_t f[$];
          automatic int dx = $urandom_range(0, 2);
          automatic int dy = $urandom_range(0, 2);
          automatic int sz = $urandom_range(1, 6);
          automatic int o;
          // XY never sends a packet back where it came from
          o = xy({8'(dx), 8'(dy)});
          if (o == i) begin dx = 1; dy = 1; o = 4; end
          if (i == 4 && o == 4) begin dx = 2; o = 0; end
          f.push_back({8'(dx), 8'(dy)});
          f.push_back(flit_t'(sz));
          for (int k = 0; k < sz; k++) f.push_back({3'(i), 5'(p), 8'(k)});
          foreach (f[k]) exp_q[i][o].push_back(f[k]);
          sent_pkts++;
          foreach (f[k]) send_flit(i, f[k]);
          repeat ($urandom_range(0, 3)) @(negedge clk);
        end
      join_none
    end
    wait (recv_pkts == NPORTS * NPKT);
    repeat (10) @(posedge clk);
    check(sent_pkts == NPORTS * NPKT, "all packets sent");
    for (int i = 0; i < NPORTS; i++) for (int o = 0; o < NPORTS; o++)
      check(exp_q[i][o].size() == 0, "no packet left undelivered");
    check(contention > 0, $sformatf("arbitration between inputs happened (%0d)", contention));
    check(blocked > 0, $sformatf("header blocked by busy output happened (%0d)", blocked));
    $display("contention=%0d blocked=%0d", contention, blocked);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
