// tb_toggle_tx: self-checking test of toggle_tx.
// The sender runs on a 10 ns clock; a receiver model on an unrelated 17 ns
// clock synchronises link_req, checks the flit against the expected sequence,
// and toggles link_ack back after a random delay. Checked: every flit arrives
// once and in order, link_req never toggles while a flit is unacknowledged,
// link_data is stable while a flit is outstanding, and in_ready returns within
// three sender cycles of the acknowledge toggle.
module tb_toggle_tx;
  localparam int W = 16;
  logic clk = 0, clk_rx = 0, rst_n = 0;
  logic in_valid, in_ready;
  logic [W-1:0] in_data, link_data;
  logic link_req, link_ack;
  int checks = 0, failures = 0;
  logic [W-1:0] sent[$];
  int received = 0, nsent = 0;
  localparam int NFLITS = 300;

  toggle_tx #(.WIDTH(W)) dut (.*);
  always #5   clk    = ~clk;
  always #8.5 clk_rx = ~clk_rx;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    #2ms;
    failures++; $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  // sender side: offer a flit at a falling edge, hold it until in_ready
  initial begin
    in_valid = 0; in_data = 0;
    #30 rst_n = 1;
    for (int k = 0; k < NFLITS; k++) begin
      @(negedge clk);
      in_valid = 1; in_data = W'($urandom);
      while (!in_ready) @(negedge clk);
      sent.push_back(in_data);
      nsent++;
      @(posedge clk);
      #1 in_valid = 0;
      repeat ($urandom_range(0, 2)) @(negedge clk);
    end
  end

  // link rules: req toggles only when not pending; data stable while pending
  logic prev_req = 0, prev_ack = 0;
  logic [W-1:0] prev_data;
  always @(link_req) if (rst_n) begin
    check(prev_ack == prev_req, "req toggled while a flit was outstanding");
    prev_req = link_req;
  end
  always @(link_ack) prev_ack = link_ack;
  always @(link_data) if (rst_n && prev_ack != prev_req && link_req == prev_req)
    check(0, "link_data changed while outstanding");

  // receiver model
  initial begin
    logic [2:0] s;
    logic last;
    int d;
    link_ack = 0; s = 0; last = 0;
    forever begin
      @(posedge clk_rx);
      s = {s[1:0], link_req};
      if (s[2] != last) begin
        last = s[2];
        check(sent.size() > 0 && link_data == sent[0], $sformatf("flit %0d data", received));
        if (sent.size() > 0) void'(sent.pop_front());
        received++;
        d = $urandom_range(0, 4);
        repeat (d) @(posedge clk_rx);
        link_ack = ~link_ack;
        // in_ready must come back within three sender cycles
        fork begin
          automatic int n = 0;
          while (!in_ready && n < 4) begin @(posedge clk); n++; end
          check(in_ready, "in_ready returned after acknowledge");
        end join_none
      end
    end
  end

  initial begin
    wait (received == NFLITS);
    repeat (20) @(posedge clk);
    check(received == NFLITS && nsent == NFLITS, "all flits delivered");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
