// tlf_router: the buffer and switch of a 5-port mesh router built on a
// two-level FIFO.
//
// Instead of a queue per input (or per virtual channel), every output owns
// a small level-1 FIFO, and all outputs share one centralized level-2 FIFO
// in which each output's flits are chained through linker fields. A flit
// goes straight to its output's level-1 FIFO when that output has nothing
// waiting; otherwise it is written into any empty level-2 slot, so one busy
// output can use the whole shared buffer while the others keep flowing.
// Writing a flit into the slot of its output's chain is also what switches
// it, so there is no separate crossbar.
//
// Pipeline (one flit per input and per output per cycle):
//   RC      tlf_header_decoder, one per input: XY route of head flits
//   W_Gen   tlf_arbiter orders same-cycle head flits; tlf_write_generator
//           picks empty slots; tlf_data_link_scheduler decides bypass or
//           level-2 write and the links
//   Data_W  tlf_level2_fifo writes data and linker fields (or the bypass
//           flit enters the level-1 FIFO)
//   Data_R  tlf_level2_fifo reads each output's next flit and linker into
//           the output's tlf_level1_fifo
// A flit accepted at an input in cycle t is offered at its output from
// cycle t+4 through level 2, or t+3 when it bypasses level 2, if the output
// is free.
//
// Ports: per input a valid/ready link (in_valid, in_ready, in_flit); per
// output a valid/acknowledge link (out_valid, out_ack, out_flit), a flit
// leaving when both are high; next_congested[o][p] is the traffic report of
// the neighbour at output o, high when its output p is congested (it feeds
// the arbiter combinationally, so the sender should drive it from a
// register); my_x and
// my_y are this router's mesh coordinates; l2_occupancy counts the level-2
// slots in use, including the one reserved for each input. Port order is
// E, S, W, N, P. The event strobes inside the scheduler (ev_*) are left for
// observation in simulation.
//
// Association: N_GROUPS level-2 FIFOs of K slots each, each with its own
// write generator and scheduler; PORT_GROUP[o] names the group that holds
// output o's flits. An input offers its flit to every group and it is taken
// by the group of its output. N_GROUPS = 1 is full association; N_GROUPS =
// 2, K = 64 with E and W in one group and S, N, P in the other is the
// document's "2-3" hybrid association. l2_occupancy is the sum over groups
// (each group keeps one slot reserved per input).
//
// Deadlock avoidance (this design's own; see tlf_data_link_scheduler):
// HEAD_RSV level-2 slots are kept for body and tail flits of packets
// already started, and with OUT_RSV each output with nothing in level 2
// keeps one slot. HEAD_RSV = 0 and OUT_RSV = 0 give the plain shared buffer.
//
// Defaults follow the document's implemented router: 128 level-2 slots of
// 64 bits, level-1 FIFOs of 6 flits, 5 ports, full association (one
// level-2 FIFO for all outputs).
module tlf_router
  import tlf_pkg::*;
#(
  parameter int unsigned K          = 128,
  parameter int unsigned L1_DEPTH   = 6,
  parameter int unsigned HEAD_RSV   = 5,
  parameter bit          OUT_RSV    = 1'b1,
  parameter int unsigned N_GROUPS   = 1,
  parameter logic [N_PORTS-1:0][1:0] PORT_GROUP = '0
) (
  input  logic               clk,
  input  logic               rst_n,
  input  logic [COORD_W-1:0] my_x,
  input  logic [COORD_W-1:0] my_y,
  input  logic               in_valid [N_PORTS],
  output logic               in_ready [N_PORTS],
  input  flit_t              in_flit  [N_PORTS],
  output logic               out_valid [N_PORTS],
  input  logic               out_ack   [N_PORTS],
  output flit_t              out_flit  [N_PORTS],
  input  logic [N_PORTS-1:0] next_congested [N_PORTS],
  output logic [$clog2(N_GROUPS*K+1)-1:0] l2_occupancy
);

  localparam int unsigned N  = N_PORTS;
  localparam int unsigned G  = N_GROUPS;
  localparam int unsigned AW = $clog2(K);
  localparam int unsigned LW = $clog2(L1_DEPTH+1);
  localparam int unsigned OW = $clog2(K+1);

  // routing stage outputs
  logic            q_valid [N];
  logic            q_ready [N];
  flit_t           q_flit  [N];
  port_e           q_port  [N];
  port_e           q_next  [N];
  logic [N-1:0]    congested;
  logic [PORT_BITS-1:0] q_port_b [N];
  logic [PORT_BITS-1:0] order [N];
  logic [PORT_BITS-1:0] tdma_ptr;

  // one set per level-2 group
  logic            g_q_valid [G][N];
  logic            g_q_ready [G][N];
  logic [K-1:0]    empty_slots [G];
  logic [K-1:0]    wordline [G][N];
  logic [AW-1:0]   free_slot [G][N];
  logic [N-1:0]    free_slot_ok [G];
  logic            g_rd_fire [G][N], rd_allow [G][N], set_rd [G][N];
  logic [AW-1:0]   set_rd_addr [G][N], rd_addr [G][N];
  logic            alloc_en [G][N];
  logic [AW-1:0]   alloc_slot [G][N];
  logic            wr_en [G][N];
  logic [AW-1:0]   wr_slot [G][N], wr_link [G][N];
  flit_t           wr_flit [G][N];
  logic            pt_en [G][N];
  logic [AW-1:0]   pt_slot [G][N], pt_link [G][N];
  logic            g_byp_en [G][N];
  flit_t           g_byp_flit [G][N];
  flit_t           g_rd_flit [G][N];
  logic [OW-1:0]   g_used [G];
  logic [N-1:0]    g_ev_bypass [G], g_ev_l2_write [G], g_ev_ltab [G], g_ev_patch [G], g_ev_stall [G];

  // per output, from the group that serves it
  logic            rd_fire [N], byp_en [N];
  flit_t           rd_flit [N], byp_flit [N];
  logic [LW-1:0]   l1_count [N];
  logic [N-1:0]    ev_bypass, ev_l2_write, ev_ltab, ev_patch, ev_stall;

  for (genvar i = 0; i < N; i++) begin : g_in
    tlf_header_decoder u_rc (
      .clk, .rst_n, .my_x, .my_y,
      .in_valid    (in_valid[i]),
      .in_ready    (in_ready[i]),
      .in_flit     (in_flit[i]),
      .q_valid     (q_valid[i]),
      .q_ready     (q_ready[i]),
      .q_flit      (q_flit[i]),
      .q_port      (q_port[i]),
      .q_next_port (q_next[i])
    );
    assign q_port_b[i]  = q_port[i];
    assign congested[i] = q_valid[i] && is_head(q_flit[i]) && next_congested[q_port[i]][q_next[i]];
  end

  tlf_arbiter #(.N(N)) u_arb (
    .clk, .rst_n,
    .congested (congested),
    .order     (order),
    .tdma_ptr  (tdma_ptr)
  );

  // a flit is offered only to the group that serves its output
  always_comb begin
    for (int unsigned i = 0; i < N; i++) begin
      q_ready[i] = 1'b0;
      for (int unsigned g = 0; g < G; g++) begin
        g_q_valid[g][i] = q_valid[i] && (32'(PORT_GROUP[q_port_b[i]]) == g);
        q_ready[i]      = q_ready[i] | g_q_ready[g][i];
      end
    end
  end

  for (genvar g = 0; g < G; g++) begin : g_grp
    tlf_write_generator #(.K(K), .NW(N)) u_wgen (
      .empty_slots (empty_slots[g]),
      .wordline    (wordline[g]),
      .slot        (free_slot[g]),
      .slot_ok     (free_slot_ok[g])
    );

    tlf_data_link_scheduler #(.K(K), .N(N), .L1_DEPTH(L1_DEPTH), .HEAD_RSV(HEAD_RSV),
                              .OUT_RSV(OUT_RSV)) u_sched (
      .clk, .rst_n,
      .q_valid      (g_q_valid[g]),
      .q_ready      (g_q_ready[g]),
      .q_flit,
      .q_port       (q_port_b),
      .order,
      .free_slot    (free_slot[g]),
      .free_slot_ok (free_slot_ok[g]),
      .used_slots   (g_used[g]),
      .rd_fire      (g_rd_fire[g]),
      .rd_allow     (rd_allow[g]),
      .set_rd       (set_rd[g]),
      .set_rd_addr  (set_rd_addr[g]),
      .alloc_en     (alloc_en[g]),
      .alloc_slot   (alloc_slot[g]),
      .wr_en        (wr_en[g]),
      .wr_slot      (wr_slot[g]),
      .wr_flit      (wr_flit[g]),
      .wr_link      (wr_link[g]),
      .pt_en        (pt_en[g]),
      .pt_slot      (pt_slot[g]),
      .pt_link      (pt_link[g]),
      .byp_en       (g_byp_en[g]),
      .byp_flit     (g_byp_flit[g]),
      .l1_count,
      .ev_bypass    (g_ev_bypass[g]),
      .ev_l2_write  (g_ev_l2_write[g]),
      .ev_ltab      (g_ev_ltab[g]),
      .ev_patch     (g_ev_patch[g]),
      .ev_stall     (g_ev_stall[g])
    );

    tlf_level2_fifo #(.K(K), .N(N)) u_l2 (
      .clk, .rst_n,
      .empty_slots  (empty_slots[g]),
      .alloc_en     (alloc_en[g]),
      .alloc_slot   (alloc_slot[g]),
      .wr_en        (wr_en[g]),
      .wr_slot      (wr_slot[g]),
      .wr_flit      (wr_flit[g]),
      .wr_link      (wr_link[g]),
      .pt_en        (pt_en[g]),
      .pt_slot      (pt_slot[g]),
      .pt_link      (pt_link[g]),
      .set_rd       (set_rd[g]),
      .set_rd_addr  (set_rd_addr[g]),
      .rd_allow     (rd_allow[g]),
      .rd_fire      (g_rd_fire[g]),
      .rd_flit      (g_rd_flit[g]),
      .rd_addr      (rd_addr[g]),
      .used_slots   (g_used[g])
    );
  end

  always_comb begin
    l2_occupancy = '0;
    ev_bypass = '0; ev_l2_write = '0; ev_ltab = '0; ev_patch = '0; ev_stall = '0;
    for (int unsigned g = 0; g < G; g++) begin
      l2_occupancy = l2_occupancy + g_used[g];
      ev_bypass   |= g_ev_bypass[g];
      ev_l2_write |= g_ev_l2_write[g];
      ev_ltab     |= g_ev_ltab[g];
      ev_patch    |= g_ev_patch[g];
      ev_stall    |= g_ev_stall[g];
    end
    for (int unsigned o = 0; o < N; o++) begin
      rd_fire[o]  = 1'b0;
      rd_flit[o]  = '0;
      byp_en[o]   = 1'b0;
      byp_flit[o] = '0;
      for (int unsigned g = 0; g < G; g++) begin
        if (32'(PORT_GROUP[o]) == g) begin
          rd_fire[o]  = g_rd_fire[g][o];
          rd_flit[o]  = g_rd_flit[g][o];
          byp_en[o]   = g_byp_en[g][o];
          byp_flit[o] = g_byp_flit[g][o];
        end
      end
    end
  end

  for (genvar o = 0; o < N; o++) begin : g_out
    tlf_level1_fifo #(.DEPTH(L1_DEPTH)) u_l1 (
      .clk, .rst_n,
      .push      (rd_fire[o] || byp_en[o]),
      .push_flit (byp_en[o] ? byp_flit[o] : rd_flit[o]),
      .out_valid (out_valid[o]),
      .out_ack   (out_ack[o]),
      .out_flit  (out_flit[o]),
      .count     (l1_count[o])
    );
    // level 2 and the bypass never feed the same level-1 FIFO in one cycle
    assert property (@(posedge clk) disable iff (!rst_n) !(rd_fire[o] && byp_en[o]))
      else $error("two pushes into one level-1 FIFO");
  end

  initial begin
    for (int unsigned o = 0; o < N; o++)
      assert (32'(PORT_GROUP[o]) < G) else $error("output %0d mapped to a missing level-2 group", o);
  end

endmodule
