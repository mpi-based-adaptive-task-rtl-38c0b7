// tb_flit_fifo: self-checking test of flit_fifo.
// Random pushes and pops against a queue model: every popped word must be the
// oldest one pushed, in_ready must fall exactly when DEPTH words are held, and
// count must match the model. Also checks that a word written into an empty
// FIFO is visible on the next cycle.
module tb_flit_fifo;
  localparam int W = 16, D = 8;
  logic clk = 0, rst_n = 0;
  logic in_valid, in_ready, out_valid, out_ready;
  logic [W-1:0] in_data, out_data;
  logic [$clog2(D+1)-1:0] count;
  int checks = 0, failures = 0;
  logic [W-1:0] model[$];

  flit_fifo #(.WIDTH(W), .DEPTH(D)) dut (.*);

  always #5 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    repeat (200000) @(posedge clk);
    failures++; $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    in_valid = 0; out_ready = 0; in_data = 0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    @(negedge clk);
    check(!out_valid && in_ready && count == 0, "empty after reset");
    // single write, visible next cycle
    in_valid = 1; in_data = 16'hBEEF;
    @(negedge clk); in_valid = 0;
    check(out_valid && out_data == 16'hBEEF && count == 1, "write visible after one cycle");
    out_ready = 1; @(negedge clk); out_ready = 0;
    check(!out_valid, "empty after pop");
    // fill completely
    for (int k = 0; k < D; k++) begin
      in_valid = 1; in_data = W'(k + 100); @(negedge clk);
    end
    in_valid = 1; in_data = 16'h1234;
    #1 check(!in_ready && count == D, "full after DEPTH writes");
    @(negedge clk); in_valid = 0;
    check(count == D, "write to full FIFO refused");
    for (int k = 0; k < D; k++) begin
      check(out_data == W'(k + 100), $sformatf("fill order %0d", k));
      out_ready = 1; @(negedge clk); out_ready = 0;
    end
    check(count == 0, "drained");
    // random traffic
    for (int c = 0; c < 4000; c++) begin
      in_valid  = ($urandom_range(0, 99) < 55);
      out_ready = ($urandom_range(0, 99) < 50);
      in_data   = W'($urandom);
      #1;
      if (out_valid) check(model.size() > 0 && out_data == model[0], "random order");
      check(int'(count) == model.size(), "count matches model");
      check(in_ready == (model.size() < D), "in_ready matches model");
      @(posedge clk);
      if (out_valid && out_ready) void'(model.pop_front());
      if (in_valid && in_ready) model.push_back(in_data);
      @(negedge clk);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
