// toggle_rx: receiving end of an asynchronous inter-NPU link (toggle protocol).
//
// link_req is synchronised into the receiver's clock with SYNC_STAGES flops.
// When the synchronised request differs from the last acknowledge, a flit is
// waiting on link_data; it is offered to the local side (out_valid) and, on
// the edge where the local side takes it (out_valid && out_ready), link_ack is
// inverted to tell the sender that the flit was latched. Until then the sender
// holds link_data, so a full router input buffer simply delays the
// acknowledge (back-pressure across the link).
// Interface: out_* is a valid/ready stream in the receiver's clock domain;
// link_ack comes from a flip-flop. The two-toggle handshake is the HS-Scale
// link; the synchroniser depth is this design's choice.
module toggle_rx #(
  parameter int WIDTH       = hs_pkg::FLIT_W,
  parameter int SYNC_STAGES = 2
) (
  input  logic             clk,
  input  logic             rst_n,
  // link from the neighbour
  input  logic [WIDTH-1:0] link_data,
  input  logic             link_req,
  output logic             link_ack,
  // local stream
  output logic             out_valid,
  input  logic             out_ready,
  output logic [WIDTH-1:0] out_data
);

  logic [SYNC_STAGES-1:0] req_sync;
  logic                   req_s;

  assign req_s     = req_sync[SYNC_STAGES-1];
  assign out_valid = (req_s != link_ack);
  assign out_data  = link_data;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      req_sync <= '0;
      link_ack <= 1'b0;
    end else begin
      req_sync <= {req_sync[SYNC_STAGES-2:0], link_req};
      if (out_valid && out_ready) link_ack <= ~link_ack;
    end
  end

endmodule
