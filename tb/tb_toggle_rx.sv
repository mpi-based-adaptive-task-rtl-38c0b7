// tb_toggle_rx: self-checking test of toggle_rx.
// A sender model on a 13 ns clock places a flit on link_data, toggles
// link_req and waits for link_ack to toggle back; toggle_rx runs on an
// unrelated 10 ns clock and its local side accepts with random back-pressure.
// Checked: flits come out once and in order, link_ack toggles only on the
// edge after a local acceptance, out_valid drops after acceptance, and a flit
// is offered within three receiver cycles of the request toggle.
module tb_toggle_rx;
  localparam int W = 16;
  localparam int NFLITS = 300;
  logic clk = 0, clk_tx = 0, rst_n = 0;
  logic [W-1:0] link_data, out_data;
  logic link_req, link_ack, out_valid, out_ready;
  int checks = 0, failures = 0;
  logic [W-1:0] sent[$];
  int received = 0;
  bit accepted_last_edge = 0;

  toggle_rx #(.WIDTH(W)) dut (.*);
  always #5   clk    = ~clk;
  always #6.5 clk_tx = ~clk_tx;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    #2ms;
    failures++; $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  // sender model
  initial begin
    logic [2:0] s;
    link_req = 0; link_data = 0; s = 0;
    #30 rst_n = 1;
    for (int k = 0; k < NFLITS; k++) begin
      @(posedge clk_tx);
      link_data = W'($urandom);
      sent.push_back(link_data);
      link_req = ~link_req;
      fork begin
        automatic int n = 0;
        while (!out_valid && n < 4) begin @(posedge clk); n++; end
        check(out_valid, "flit offered within three cycles of the request");
      end join_none
      do begin @(posedge clk_tx); s = {s[1:0], link_ack}; end while (s[2] != link_req);
    end
  end

  // local side with random back-pressure
  always @(negedge clk) out_ready = ($urandom_range(0, 2) != 0);
  logic prev_ack = 0;
  always @(posedge clk) begin
    if (rst_n) begin
      // ack register changes on this edge only if there was an acceptance
      #1;
      check((link_ack != prev_ack) == accepted_last_edge, "ack toggles exactly on acceptance");
      if (accepted_last_edge) check(!out_valid, "out_valid drops after acceptance");
      prev_ack = link_ack;
    end
  end
  always @(negedge clk) begin
    accepted_last_edge = 0;
    #3;
    if (rst_n && out_valid && out_ready) begin
      accepted_last_edge = 1;
      check(sent.size() > 0 && out_data == sent[0], $sformatf("flit %0d data", received));
      if (sent.size() > 0) void'(sent.pop_front());
      received++;
    end
  end

  initial begin
    out_ready = 0;
    wait (received == NFLITS);
    repeat (20) @(posedge clk);
    check(sent.size() == 0, "nothing left undelivered");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
