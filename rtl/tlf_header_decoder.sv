// tlf_header_decoder: routing-computation (RC) stage of one input channel.
//
// The first pipeline stage of the router. A head flit's destination is
// decoded and the output port is computed with XY routing; body and tail
// flits of the same packet reuse the port latched from their head flit
// (wormhole switching). The stage also works out the port the packet will
// take in the next router, which the arbiter uses to order head flits by the
// traffic ahead of them.
//
// Interface: in_valid/in_ready/in_flit from the link, q_* towards the
// data-link scheduler, each a valid/ready handshake. The stage is one
// register deep: a flit accepted at a clock edge is offered on q_* from the
// next cycle on. in_ready is high when the register is empty or is being
// emptied in the same cycle.
//
// The document names this stage (header decoder and routing) and uses XY
// routing in its evaluation; the handshake, the one-entry register and the
// next-hop computation are this design's choices.
module tlf_header_decoder
  import tlf_pkg::*;
(
  input  logic               clk,
  input  logic               rst_n,
  input  logic [COORD_W-1:0] my_x,
  input  logic [COORD_W-1:0] my_y,
  // from the link
  input  logic               in_valid,
  output logic               in_ready,
  input  flit_t              in_flit,
  // towards the scheduler
  output logic               q_valid,
  input  logic               q_ready,
  output flit_t              q_flit,
  output port_e              q_port,
  output port_e              q_next_port
);

  port_e pkt_port_q;       // output port of the packet in progress
  port_e pkt_next_q;       // its port in the next router
  port_e route_now, next_now;
  logic [COORD_W-1:0] dx, dy, nx, ny;

  assign dx = in_flit[COORD_W-1:0];
  assign dy = in_flit[2*COORD_W-1:COORD_W];

  always_comb begin
    route_now = xy_route(my_x, my_y, dx, dy);
    nx = my_x;
    ny = my_y;
    unique case (route_now)
      PORT_E:  nx = my_x + 1'b1;
      PORT_W:  nx = my_x - 1'b1;
      PORT_N:  ny = my_y + 1'b1;
      PORT_S:  ny = my_y - 1'b1;
      default: ;
    endcase
    next_now = (route_now == PORT_P) ? PORT_P : xy_route(nx, ny, dx, dy);
  end

  assign in_ready = !q_valid || q_ready;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      q_valid     <= 1'b0;
      q_flit      <= '0;
      q_port      <= PORT_P;
      q_next_port <= PORT_P;
      pkt_port_q  <= PORT_P;
      pkt_next_q  <= PORT_P;
    end else if (in_ready) begin
      q_valid <= in_valid;
      if (in_valid) begin
        q_flit <= in_flit;
        if (is_head(in_flit)) begin
          q_port      <= route_now;
          q_next_port <= next_now;
          pkt_port_q  <= route_now;
          pkt_next_q  <= next_now;
        end else begin
          q_port      <= pkt_port_q;
          q_next_port <= pkt_next_q;
        end
      end
    end
  end

endmodule
