// Shared helpers for testbenches that drive the peripheral bus of hs_pkg.
// Expects in the including module: clk, a bus_req_t `bus`, read data
// `rdata`, and the counters `checks` and `failures`.
// A bus cycle is driven on a falling edge, read data is sampled 1 ns later
// and the access takes effect on the following rising edge.

task automatic check(input bit ok, input string what);
  checks++;
  if (!ok) begin failures++; $display("FAIL: %s", what); end
endtask

task automatic bus_write(input logic [7:0] a, input logic [31:0] d);
  @(negedge clk);
  bus = '{sel: 1'b1, we: 1'b1, re: 1'b0, addr: a, wdata: d};
  @(posedge clk);
  #1 bus = '0;
endtask

task automatic bus_read(input logic [7:0] a, output logic [31:0] d);
  @(negedge clk);
  bus = '{sel: 1'b1, we: 1'b0, re: 1'b1, addr: a, wdata: '0};
  #1 d = rdata;
  @(posedge clk);
  #1 bus = '0;
endtask
