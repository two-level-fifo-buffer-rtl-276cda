// tlf_level1_fifo: distributed level-1 FIFO, the output queue of one channel.
//
// A shallow queue at each output port. It is fed either from the shared
// level-2 FIFO or directly by the data-link scheduler when the output has
// nothing waiting in level 2, and it keeps the output streaming while the
// level-2 FIFO is busy with other outputs. Storage is Bus-In MUX-Out: the
// incoming flit is offered to every register and only the one at the write
// pointer loads it; the head is chosen by a read multiplexer at the read
// pointer.
//
// Interface: push/push_flit (at most one flit per cycle; the writer must
// check count < DEPTH), out_valid/out_ack/out_flit towards the next router
// (a flit leaves in a cycle where both are high), and count for the
// scheduler's space check. A pushed flit is visible on out_flit in the next
// cycle; a flit and a new one can leave and arrive in the same cycle.
//
// The Bus-In MUX-Out organisation and the default depth of 6 flits follow
// the document's implementation; the handshake names are this design's.
module tlf_level1_fifo
  import tlf_pkg::*;
#(
  parameter int unsigned DEPTH = 6
) (
  input  logic                       clk,
  input  logic                       rst_n,
  input  logic                       push,
  input  flit_t                      push_flit,
  output logic                       out_valid,
  input  logic                       out_ack,
  output flit_t                      out_flit,
  output logic [$clog2(DEPTH+1)-1:0] count
);

  localparam int unsigned PW = (DEPTH > 1) ? $clog2(DEPTH) : 1;
  localparam int unsigned CW = $clog2(DEPTH+1);

  flit_t          regs [DEPTH];
  logic [PW-1:0]  wr_ptr, rd_ptr;
  logic           pop;

  assign out_valid = (count != '0);
  assign out_flit  = regs[rd_ptr];
  assign pop       = out_valid && out_ack;

  function automatic logic [PW-1:0] inc(input logic [PW-1:0] p);
    return (p == PW'(DEPTH-1)) ? '0 : p + 1'b1;
  endfunction

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      wr_ptr <= '0;
      rd_ptr <= '0;
      count  <= '0;
      for (int unsigned d = 0; d < DEPTH; d++) regs[d] <= '0;
    end else begin
      if (push) begin
        regs[wr_ptr] <= push_flit;
        wr_ptr       <= inc(wr_ptr);
      end
      if (pop) rd_ptr <= inc(rd_ptr);
      count <= count + CW'(push) - CW'(pop);
    end
  end

  // the writer must never push into a full queue
  assert property (@(posedge clk) disable iff (!rst_n) push |-> (count < CW'(DEPTH) || pop))
    else $error("level-1 FIFO overflow");

endmodule
