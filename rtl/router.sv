// router: the network layer of an HS-Scale NPU, a five-port wormhole router
// derived from the Hermes network on chip.
//
// Ports are East, West, North, South and Local (hs_pkg::port_e). Every input
// port has its own flit_fifo input buffer. When the flit at the head of an
// idle input is a packet header, the input computes its output port with XY
// routing (first along X until the column matches, then along Y; the Local
// port when both match this router's address). Inputs whose wanted output is
// free compete in a single round-robin arbiter; the winner is connected to
// that output and keeps it until its whole packet (header, size flit and
// `size` payload flits) has passed, after which the output is released
// (wormhole switching). Packets that want a busy output wait in their buffer.
//
// All ports use valid/ready streams in the router's clock. Latency: a header
// that reaches the head of an input buffer is granted in that cycle and
// leaves on the next edge on which its output is ready; one flit per cycle per
// connection after that. Buffer depth, flit format and the single-grant-per-
// cycle arbiter are this design's choices; XY routing, wormhole switching,
// one input buffer per port and round-robin priority follow HS-Scale.
module router
  import hs_pkg::*;
#(
  parameter logic [COORD_W-1:0] MY_X      = '0,
  parameter logic [COORD_W-1:0] MY_Y      = '0,
  parameter int                 BUF_DEPTH = 8
) (
  input  logic                clk,
  input  logic                rst_n,
  input  logic  [NPORTS-1:0]  in_valid,
  output logic  [NPORTS-1:0]  in_ready,
  input  flit_t [NPORTS-1:0]  in_data,
  output logic  [NPORTS-1:0]  out_valid,
  input  logic  [NPORTS-1:0]  out_ready,
  output flit_t [NPORTS-1:0]  out_data
);

  typedef enum logic [1:0] {S_HEADER, S_SIZE, S_PAYLOAD} in_state_e;

  localparam int CNT_W = $clog2(BUF_DEPTH + 1);

  // input buffers
  logic  [NPORTS-1:0] buf_valid, buf_pop;
  flit_t [NPORTS-1:0] buf_data;
  logic  [CNT_W-1:0]  buf_count [NPORTS];

  for (genvar i = 0; i < NPORTS; i++) begin : g_buf
    flit_fifo #(.WIDTH(FLIT_W), .DEPTH(BUF_DEPTH)) u_buf (
      .clk, .rst_n,
      .in_valid (in_valid[i]),
      .in_ready (in_ready[i]),
      .in_data  (in_data[i]),
      .out_valid(buf_valid[i]),
      .out_ready(buf_pop[i]),
      .out_data (buf_data[i]),
      .count    (buf_count[i])
    );
  end

  function automatic port_e xy_route(input flit_t header);
    logic [COORD_W-1:0] dx, dy;
    dx = header[FLIT_W-1:COORD_W];
    dy = header[COORD_W-1:0];
    if      (dx > MY_X) return PORT_EAST;
    else if (dx < MY_X) return PORT_WEST;
    else if (dy > MY_Y) return PORT_NORTH;
    else if (dy < MY_Y) return PORT_SOUTH;
    else                return PORT_LOCAL;
  endfunction

  // per-input packet state
  in_state_e [NPORTS-1:0] state;
  logic      [NPORTS-1:0] alloc;       // input owns an output
  port_e                  dest  [NPORTS];
  flit_t                  remain[NPORTS];

  // per-output ownership
  logic  [NPORTS-1:0] out_busy;
  logic  [2:0]        owner [NPORTS];

  // arbitration
  logic  [NPORTS-1:0] req;
  port_e              want [NPORTS];
  logic  [NPORTS-1:0] grant;
  logic  [2:0]        grant_idx;
  logic               grant_valid;

  always_comb begin
    for (int i = 0; i < NPORTS; i++) begin
      want[i] = xy_route(buf_data[i]);
      req[i]  = buf_valid[i] && !alloc[i] && (state[i] == S_HEADER) && !out_busy[want[i]];
    end
  end

  rr_arbiter #(.N(NPORTS)) u_arb (
    .clk, .rst_n,
    .req        (req),
    .advance    (1'b1),
    .grant      (grant),
    .grant_idx  (grant_idx),
    .grant_valid(grant_valid)
  );

  // crossbar
  always_comb begin
    buf_pop = '0;
    for (int o = 0; o < NPORTS; o++) begin
      out_valid[o] = out_busy[o] && buf_valid[owner[o]];
      out_data[o]  = buf_data[owner[o]];
      if (out_valid[o] && out_ready[o]) buf_pop[owner[o]] = 1'b1;
    end
  end

  // packet tracking and release
  logic [NPORTS-1:0] release_in;

  always_comb begin
    for (int i = 0; i < NPORTS; i++) begin
      release_in[i] = 1'b0;
      if (buf_pop[i]) begin
        unique case (state[i])
          S_SIZE:    release_in[i] = (buf_data[i] == '0);
          S_PAYLOAD: release_in[i] = (remain[i] == flit_t'(1));
          default:   release_in[i] = 1'b0;
        endcase
      end
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state    <= {NPORTS{S_HEADER}};
      alloc    <= '0;
      out_busy <= '0;
      for (int i = 0; i < NPORTS; i++) begin
        dest[i]   <= PORT_LOCAL;
        remain[i] <= '0;
        owner[i]  <= '0;
      end
    end else begin
      for (int i = 0; i < NPORTS; i++) begin
        if (buf_pop[i]) begin
          unique case (state[i])
            S_HEADER: state[i] <= S_SIZE;
            S_SIZE: begin
              remain[i] <= buf_data[i];
              state[i]  <= (buf_data[i] == '0) ? S_HEADER : S_PAYLOAD;
            end
            S_PAYLOAD: begin
              remain[i] <= remain[i] - 1'b1;
              if (remain[i] == flit_t'(1)) state[i] <= S_HEADER;
            end
            default: state[i] <= S_HEADER;
          endcase
        end
        if (release_in[i]) begin
          alloc[i]          <= 1'b0;
          out_busy[dest[i]] <= 1'b0;
        end
      end
      if (grant_valid) begin
        alloc[grant_idx]          <= 1'b1;
        dest[grant_idx]           <= want[grant_idx];
        out_busy[want[grant_idx]] <= 1'b1;
        owner[want[grant_idx]]    <= grant_idx;
      end
    end
  end

  // an input only sends while it owns an output
  for (genvar i = 0; i < NPORTS; i++) begin : g_chk
    assert property (@(posedge clk) disable iff (!rst_n) buf_pop[i] |-> alloc[i]);
  end

endmodule
