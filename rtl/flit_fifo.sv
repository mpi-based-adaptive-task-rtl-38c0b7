// flit_fifo: synchronous FIFO used as the router's per-port input buffer and
// as the network interface's receive and transmit buffers.
//
// Storage is a DEPTH-entry register array with read and write pointers and an
// occupancy counter. Both sides use a valid/ready handshake: a word enters on
// a clock edge where in_valid && in_ready (in_ready = not full), and leaves on
// an edge where out_valid && out_ready (out_valid = not empty). The head word
// is presented combinationally on out_data, so a word written into an empty
// FIFO is visible one cycle after the write. A full FIFO refuses a push even
// when it pops in the same cycle, so in_ready never depends on out_ready.
// One buffer per router input port follows the HS-Scale (Hermes) router;
// the depth is this design's choice.
module flit_fifo #(
  parameter int WIDTH = hs_pkg::FLIT_W,
  parameter int DEPTH = 8
) (
  input  logic                     clk,
  input  logic                     rst_n,
  input  logic                     in_valid,
  output logic                     in_ready,
  input  logic [WIDTH-1:0]         in_data,
  output logic                     out_valid,
  input  logic                     out_ready,
  output logic [WIDTH-1:0]         out_data,
  output logic [$clog2(DEPTH+1)-1:0] count
);

  localparam int PW = (DEPTH > 1) ? $clog2(DEPTH) : 1;

  logic [WIDTH-1:0] mem [DEPTH];
  logic [PW-1:0]    rd_ptr, wr_ptr;
  logic             push, pop;

  assign in_ready  = (count != DEPTH[$clog2(DEPTH+1)-1:0]);
  assign out_valid = (count != '0);
  assign out_data  = mem[rd_ptr];
  assign push      = in_valid && in_ready;
  assign pop       = out_valid && out_ready;

  function automatic logic [PW-1:0] inc(input logic [PW-1:0] p);
    return (p == PW'(DEPTH - 1)) ? '0 : p + 1'b1;
  endfunction

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      rd_ptr <= '0;
      wr_ptr <= '0;
      count  <= '0;
    end else begin
      if (push) wr_ptr <= inc(wr_ptr);
      if (pop)  rd_ptr <= inc(rd_ptr);
      case ({push, pop})
        2'b10:   count <= count + 1'b1;
        2'b01:   count <= count - 1'b1;
        default: count <= count;
      endcase
    end
  end

  always_ff @(posedge clk) begin
    if (push) mem[wr_ptr] <= in_data;
  end

  // A FIFO never reports more entries than it holds
  assert property (@(posedge clk) disable iff (!rst_n) int'(count) <= DEPTH);

endmodule
