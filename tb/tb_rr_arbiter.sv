// tb_rr_arbiter: self-checking test of rr_arbiter.
// A reference model keeps the index of the last grant and expects the first
// requester after it (wrapping). With all inputs requesting, grants must
// rotate 0,1,2,3,4,0,... Random request patterns are compared every cycle.
module tb_rr_arbiter;
  localparam int N = 5;
  logic clk = 0, rst_n = 0;
  logic [N-1:0] req, grant;
  logic advance;
  logic [$clog2(N)-1:0] grant_idx;
  logic grant_valid;
  int checks = 0, failures = 0;
  int last_m;

  rr_arbiter #(.N(N)) dut (.*);
  always #5 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  function automatic int expect_idx(input logic [N-1:0] r, input int last);
    for (int k = 1; k <= N; k++) if (r[(last + k) % N]) return (last + k) % N;
    return -1;
  endfunction

  initial begin
    repeat (100000) @(posedge clk);
    failures++; $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    int e;
    req = 0; advance = 1; last_m = N - 1;
    repeat (2) @(posedge clk); rst_n = 1;
    @(negedge clk);
    // all requesting: strict rotation
    req = '1;
    for (int k = 0; k < 2 * N; k++) begin
      #1 check(grant_valid && int'(grant_idx) == k % N && grant == N'(1 << (k % N)), $sformatf("rotation step %0d", k));
      @(negedge clk);
    end
    last_m = (2 * N - 1) % N;
    for (int c = 0; c < 3000; c++) begin
      req = N'($urandom);
      advance = ($urandom_range(0, 3) != 0);
      #1;
      e = expect_idx(req, last_m);
      if (e < 0) check(!grant_valid && grant == 0, "no grant without request");
      else check(grant_valid && int'(grant_idx) == e && grant == N'(1 << e), $sformatf("grant exp %0d got %0d", e, grant_idx));
      @(posedge clk);
      if (advance && e >= 0) last_m = e;
      @(negedge clk);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
