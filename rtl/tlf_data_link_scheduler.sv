// tlf_data_link_scheduler: decides where every arriving flit goes and links
// the flits of each output into a chain through the shared level-2 FIFO.
//
// This is the arbitration / write-wordline-generation stage (W_Gen) of the
// router pipeline. Each cycle it takes the flits offered by the routing
// stage of every input, in the order given by the arbiter, and for each one
//  * sends it straight to its output's level-1 FIFO (bypass) when nothing
//    for that output waits in level 2, the flit is next in the output's
//    packet order and the level-1 FIFO has room; or
//  * writes it into the level-2 FIFO, in the slot reserved for its input.
//
// Linking. Each input always holds one reserved empty slot; the next flit
// from that input is written there. When a flit is written, a fresh empty
// slot is reserved for the input and, unless the flit is a tail, its
// address goes into the flit's linker field, so a packet's flits form a
// chain as they arrive. A tail flit links to the next packet of the same
// output, which may not be known yet:
//  * if that packet's head arrives while the tail's packet is still arriving,
//    its slot is kept in the linker table entry of the tail's input, and the
//    tail takes it when it is written;
//  * if it arrives after the tail is stored, the tail's linker field is
//    written then (a patch);
//  * if the output has nothing left in level 2, the read controller's
//    address for that output is set to the first slot of the new packet.
// Per output it keeps the number of flits stored in level 2 (cnt), the input
// of the last packet queued (last_src), whether that packet is still
// arriving (last_open) and, if not, the slot of its tail (last_tail).
//
// Timing: acceptance (q_ready) and slot reservation (alloc_*) and read
// address setting (set_rd_*) are combinational and take effect at the next
// edge. The writes of data and linker fields and the bypass pushes are
// registered here and carried out by the level-2 and level-1 FIFOs one cycle
// later (stage Data_W / Link_W). A flit stalls when it needs a level-2 slot
// and none is empty, and a head flit also stalls when taking a slot would
// leave HEAD_RSV or fewer empty slots (head admission reserve).
//
// Head admission reserve. Flits queued in level 2 behind a packet that is
// still arriving can leave only after that packet's remaining flits have
// been written, and those need empty slots too. If new packets may take
// the last slots, level 2 can fill with such flits, the inputs that would
// complete the open packets stall, and routers waiting on each other in a
// mesh lock up. Keeping the last HEAD_RSV slots for body and tail flits
// lets packets already started finish. HEAD_RSV = 0 is the plain shared
// buffer.
//
// Output slot reserve (OUT_RSV). Two neighbours can also fill their shared
// buffers with flits for each other (east-bound in one, west-bound in the
// other) so that neither can accept anything. With OUT_RSV set, a flit for
// an output that already has flits in level 2 may not take one of the last
// slots needed to give every other output with nothing in level 2 one
// slot. An idle direction thus always accepts a flit, and since XY routes
// never turn back, a full queue drains once the queues downstream of it do.
//
// The document gives the linker-field principle, the linker table for tails
// that have not arrived, the reserved slot per input (its example figure)
// and the level-1 bypass when the output is not congested. The exact
// bypass rule, the patch of a stored tail and the per-output bookkeeping
// are this design's own, and so are the head admission and output slot
// reserves (the document does not discuss deadlock).
module tlf_data_link_scheduler
  import tlf_pkg::*;
#(
  parameter int unsigned K        = 128,
  parameter int unsigned N        = 5,
  parameter int unsigned L1_DEPTH = 6,
  parameter int unsigned HEAD_RSV = 0,
  parameter bit          OUT_RSV  = 1'b0
) (
  input  logic                       clk,
  input  logic                       rst_n,
  // from the routing stages
  input  logic                       q_valid [N],
  output logic                       q_ready [N],
  input  flit_t                      q_flit  [N],
  input  logic [$clog2(N)-1:0]       q_port  [N],
  // arbitration order
  input  logic [$clog2(N)-1:0]       order   [N],
  // empty slots from the write generator
  input  logic [$clog2(K)-1:0]       free_slot    [N],
  input  logic [N-1:0]               free_slot_ok,
  input  logic [$clog2(K+1)-1:0]     used_slots,
  // level-2 read side
  input  logic                       rd_fire [N],
  output logic                       rd_allow[N],
  output logic                       set_rd  [N],
  output logic [$clog2(K)-1:0]       set_rd_addr [N],
  // slot reservation (combinational)
  output logic                       alloc_en   [N],
  output logic [$clog2(K)-1:0]       alloc_slot [N],
  // registered write commands for the level-2 FIFO, one per input
  output logic                       wr_en      [N],
  output logic [$clog2(K)-1:0]       wr_slot    [N],
  output flit_t                      wr_flit    [N],
  output logic [$clog2(K)-1:0]       wr_link    [N],
  // registered linker patches, one per input
  output logic                       pt_en      [N],
  output logic [$clog2(K)-1:0]       pt_slot    [N],
  output logic [$clog2(K)-1:0]       pt_link    [N],
  // registered bypass pushes into the level-1 FIFOs, one per output
  output logic                       byp_en     [N],
  output flit_t                      byp_flit   [N],
  // level-1 occupancy
  input  logic [$clog2(L1_DEPTH+1)-1:0] l1_count [N],
  // event strobes for observation
  output logic [N-1:0]               ev_bypass,
  output logic [N-1:0]               ev_l2_write,
  output logic [N-1:0]               ev_ltab,
  output logic [N-1:0]               ev_patch,
  output logic [N-1:0]               ev_stall
);

  localparam int unsigned AW = $clog2(K);
  localparam int unsigned IW = $clog2(N);
  localparam int unsigned CW = $clog2(K+1);
  localparam int unsigned LW = $clog2(L1_DEPTH+1);

  typedef logic [AW-1:0] addr_t;

  // state
  addr_t           res_q       [N];
  addr_t           ltab_q      [N];
  logic            ltab_ok_q   [N];
  logic [IW-1:0]   last_src_q  [N];
  logic            last_open_q [N];
  addr_t           last_tail_q [N];
  logic [CW-1:0]   cnt_q       [N];

  // next state
  addr_t           res_d       [N];
  addr_t           ltab_d      [N];
  logic            ltab_ok_d   [N];
  logic [IW-1:0]   last_src_d  [N];
  logic            last_open_d [N];
  addr_t           last_tail_d [N];
  logic [CW-1:0]   cnt_d       [N];

  // next write commands
  logic            wr_en_d [N];
  addr_t           wr_slot_d [N];
  flit_t           wr_flit_d [N];
  addr_t           wr_link_d [N];
  logic            pt_en_d [N];
  addr_t           pt_slot_d [N];
  addr_t           pt_link_d [N];
  logic            byp_en_d [N];
  flit_t           byp_flit_d [N];

  always_comb begin
    for (int unsigned o = 0; o < N; o++)
      rd_allow[o] = (cnt_q[o] != '0) && (l1_count[o] < LW'(L1_DEPTH));
  end

  // outputs other than o with nothing in level 2 (uses cnt_d as updated so
  // far in this cycle's scheduling loop)
  function automatic int unsigned idle_others(input logic [IW-1:0] o);
    int unsigned z;
    z = 0;
    for (int unsigned p = 0; p < N; p++)
      if (p != 32'(o) && cnt_d[p] == '0) z++;
    return z;
  endfunction

  always_comb begin
    int unsigned nf;
    int unsigned i;
    logic [IW-1:0] o;
    logic [IW-1:0] src;
    logic        head, tail, l1_room;
    addr_t       s, fresh;

    nf      = 0;
    i       = 0;
    o       = '0;
    src     = '0;
    head    = 1'b0;
    tail    = 1'b0;
    l1_room = 1'b0;
    s       = '0;
    fresh   = '0;
    ev_bypass   = '0;
    ev_l2_write = '0;
    ev_ltab     = '0;
    ev_patch    = '0;
    ev_stall    = '0;
    for (int unsigned n = 0; n < N; n++) begin
      res_d[n]       = res_q[n];
      ltab_d[n]      = ltab_q[n];
      ltab_ok_d[n]   = ltab_ok_q[n];
      last_src_d[n]  = last_src_q[n];
      last_open_d[n] = last_open_q[n];
      last_tail_d[n] = last_tail_q[n];
      cnt_d[n]       = cnt_q[n] - CW'(rd_fire[n]);
      q_ready[n]     = 1'b0;
      set_rd[n]      = 1'b0;
      set_rd_addr[n] = '0;
      alloc_en[n]    = 1'b0;
      alloc_slot[n]  = '0;
      wr_en_d[n]     = 1'b0;
      wr_slot_d[n]   = '0;
      wr_flit_d[n]   = '0;
      wr_link_d[n]   = '0;
      pt_en_d[n]     = 1'b0;
      pt_slot_d[n]   = '0;
      pt_link_d[n]   = '0;
      byp_en_d[n]    = 1'b0;
      byp_flit_d[n]  = '0;
    end

    for (int unsigned k = 0; k < N; k++) begin
      i = 32'(order[k]);
      o = q_port[i];
      if (q_valid[i]) begin
        head = is_head(q_flit[i]);
        tail = is_tail(q_flit[i]);
        // room in the level-1 FIFO once this cycle's pushes have landed
        l1_room = (32'(l1_count[o]) + 32'(byp_en[o]) + 32'(rd_fire[o]) + 1) <= L1_DEPTH;
        if (cnt_d[o] == '0 && !byp_en_d[o] && l1_room && !(head && last_open_d[o])) begin
          // bypass: straight into the level-1 FIFO
          q_ready[i]    = 1'b1;
          byp_en_d[o]   = 1'b1;
          byp_flit_d[o] = q_flit[i];
          ev_bypass[i]  = 1'b1;
          if (head) last_src_d[o] = IW'(i);
          last_open_d[o] = !tail;
        end else if (nf < N && free_slot_ok[nf] &&
                     32'(used_slots) + nf + (head ? HEAD_RSV : 0) +
                     ((OUT_RSV && cnt_d[o] != '0) ? idle_others(o) : 0) < K) begin
          // level-2 write into the input's reserved slot
          fresh = free_slot[nf];
          nf    = nf + 1;
          s     = res_d[i];
          q_ready[i]        = 1'b1;
          ev_l2_write[i]    = 1'b1;
          alloc_en[nf-1]    = 1'b1;
          alloc_slot[nf-1]  = fresh;
          res_d[i]          = fresh;
          wr_en_d[i]        = 1'b1;
          wr_slot_d[i]      = s;
          wr_flit_d[i]      = q_flit[i];
          if (!tail) begin
            wr_link_d[i]    = fresh;
          end else if (ltab_ok_d[i]) begin
            wr_link_d[i]    = ltab_d[i];
            ltab_ok_d[i]    = 1'b0;
          end
          if (head) begin
            src = last_src_d[o];
            if (cnt_d[o] == '0) begin
              set_rd[o]      = 1'b1;
              set_rd_addr[o] = last_open_d[o] ? res_d[src] : s;
            end
            if (last_open_d[o]) begin
              // the packet ahead is still arriving: its tail will link here
              ltab_d[src]    = s;
              ltab_ok_d[src] = 1'b1;
              ev_ltab[i]     = 1'b1;
            end else if (cnt_d[o] != '0) begin
              // the packet ahead is stored complete: link its tail now
              pt_en_d[i]   = 1'b1;
              pt_slot_d[i] = last_tail_d[o];
              pt_link_d[i] = s;
              ev_patch[i]  = 1'b1;
            end
            last_src_d[o]  = IW'(i);
            last_open_d[o] = !tail;
            if (tail) last_tail_d[o] = s;
          end else begin
            if (cnt_d[o] == '0) begin
              set_rd[o]      = 1'b1;
              set_rd_addr[o] = s;
            end
            if (tail && 32'(last_src_d[o]) == i && last_open_d[o]) begin
              last_open_d[o] = 1'b0;
              last_tail_d[o] = s;
            end
          end
          cnt_d[o] = cnt_d[o] + 1'b1;
        end else begin
          ev_stall[i] = 1'b1;
        end
      end
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int unsigned n = 0; n < N; n++) begin
        res_q[n]       <= AW'(n);
        ltab_q[n]      <= '0;
        ltab_ok_q[n]   <= 1'b0;
        last_src_q[n]  <= '0;
        last_open_q[n] <= 1'b0;
        last_tail_q[n] <= '0;
        cnt_q[n]       <= '0;
        wr_en[n]       <= 1'b0;
        wr_slot[n]     <= '0;
        wr_flit[n]     <= '0;
        wr_link[n]     <= '0;
        pt_en[n]       <= 1'b0;
        pt_slot[n]     <= '0;
        pt_link[n]     <= '0;
        byp_en[n]      <= 1'b0;
        byp_flit[n]    <= '0;
      end
    end else begin
      res_q       <= res_d;
      ltab_q      <= ltab_d;
      ltab_ok_q   <= ltab_ok_d;
      last_src_q  <= last_src_d;
      last_open_q <= last_open_d;
      last_tail_q <= last_tail_d;
      cnt_q       <= cnt_d;
      wr_en       <= wr_en_d;
      wr_slot     <= wr_slot_d;
      wr_flit     <= wr_flit_d;
      wr_link     <= wr_link_d;
      pt_en       <= pt_en_d;
      pt_slot     <= pt_slot_d;
      pt_link     <= pt_link_d;
      byp_en      <= byp_en_d;
      byp_flit    <= byp_flit_d;
    end
  end

endmodule
