// toggle_tx: sending end of an asynchronous inter-NPU link (toggle protocol).
//
// Each NPU of HS-Scale may run from its own, unrelated clock. A flit crosses
// between neighbours with two toggle wires: the sender places the flit on
// link_data and inverts link_req; the receiver, on seeing the change, latches
// the flit and inverts link_ack back. A new flit may be sent only once
// link_ack equals link_req again.
//
// Interface: the local side is a valid/ready stream in the sender's clock
// domain (in_ready is high while no flit is outstanding). link_data and
// link_req come straight from flip-flops and change on the same edge, so the
// data is stable long before the receiver's two-flop synchroniser reports the
// toggle (bundled data). link_ack is asynchronous and passes through a
// SYNC_STAGES-flop synchroniser here.
// Timing: one flit per round trip, about 2*SYNC_STAGES+2 cycles of the slower
// clock. Two toggle wires and the accept-then-toggle-back rule follow the
// HS-Scale link; synchroniser depth and the local handshake are this design's.
module toggle_tx #(
  parameter int WIDTH       = hs_pkg::FLIT_W,
  parameter int SYNC_STAGES = 2
) (
  input  logic             clk,
  input  logic             rst_n,
  // local stream
  input  logic             in_valid,
  output logic             in_ready,
  input  logic [WIDTH-1:0] in_data,
  // link to the neighbour
  output logic [WIDTH-1:0] link_data,
  output logic             link_req,
  input  logic             link_ack
);

  logic [SYNC_STAGES-1:0] ack_sync;
  logic                   ack_s;
  logic                   pending;

  assign ack_s    = ack_sync[SYNC_STAGES-1];
  assign pending  = (ack_s != link_req);
  assign in_ready = !pending;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      ack_sync  <= '0;
      link_req  <= 1'b0;
      link_data <= '0;
    end else begin
      ack_sync <= {ack_sync[SYNC_STAGES-2:0], link_ack};
      if (in_valid && in_ready) begin
        link_data <= in_data;
        link_req  <= ~link_req;
      end
    end
  end

endmodule
