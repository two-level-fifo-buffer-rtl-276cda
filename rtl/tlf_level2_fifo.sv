// tlf_level2_fifo: the centralized level-2 FIFO, a data-link-based buffer
// shared by all outputs.
//
// K slots, each with a data field (one flit) and a linker field (the
// address of the slot that holds the next flit of the same output queue).
// A queue is therefore not a range of adjacent slots but a chain: the read
// controller keeps, per output, the address of the queue's first flit, reads
// data and linker field of that slot in the same cycle, and follows the
// linker to the next slot. Any slot can hold a flit of any output, so the
// whole buffer is shared.
//
// Both fields are Bus-MUX-In MUX-Out registers: every slot has a writing
// multiplexer that selects one of the N input channels' flits under its
// write wordline, so all inputs can write in the same cycle (multiple
// access), and every output has its own reading multiplexer, so all outputs
// can read in the same cycle.
//
// Per slot the block keeps two flags: busy (reserved or holding a flit) and
// full (holding a flit not yet read). The owner of the read address knows
// from its own count whether a linker field is meaningful.
// empty_slots = ~busy goes to the write generator.
//
// Interface and timing:
//  * alloc_en/alloc_slot (one per writer) mark slots busy at the clock edge.
//  * wr_* (one per input) write a flit and its linker field; the
//    slot becomes readable from the next cycle. pt_* (one per input) write
//    only a linker field and take precedence over wr_* on the same slot.
//  * set_rd/set_rd_addr load an output's read address.
//  * rd_fire[o] is high in a cycle where rd_allow[o] is high and the slot at
//    the read address is full; rd_flit[o] is then the flit, to be pushed
//    into the output's level-1 FIFO at the edge, where the slot is freed and
//    the read address moves to the linker field (a patch arriving in the
//    same cycle is forwarded).
//
// The slot organisation, linker width of log2(K) bits, Bus-MUX-In MUX-Out
// registers and read controller follow the document. The flag bits and the
// forwarding of same-cycle patches are this design's own.
module tlf_level2_fifo
  import tlf_pkg::*;
#(
  parameter int unsigned K = 128,
  parameter int unsigned N = 5
) (
  input  logic                 clk,
  input  logic                 rst_n,
  output logic [K-1:0]         empty_slots,
  input  logic                 alloc_en   [N],
  input  logic [$clog2(K)-1:0] alloc_slot [N],
  input  logic                 wr_en      [N],
  input  logic [$clog2(K)-1:0] wr_slot    [N],
  input  flit_t                wr_flit    [N],
  input  logic [$clog2(K)-1:0] wr_link    [N],
  input  logic                 pt_en      [N],
  input  logic [$clog2(K)-1:0] pt_slot    [N],
  input  logic [$clog2(K)-1:0] pt_link    [N],
  input  logic                 set_rd      [N],
  input  logic [$clog2(K)-1:0] set_rd_addr [N],
  input  logic                 rd_allow [N],
  output logic                 rd_fire  [N],
  output flit_t                rd_flit  [N],
  output logic [$clog2(K)-1:0] rd_addr  [N],
  output logic [$clog2(K+1)-1:0] used_slots
);

  localparam int unsigned AW = $clog2(K);
  typedef logic [AW-1:0] addr_t;

  flit_t        data_field   [K];
  addr_t        linker_field [K];
  logic [K-1:0] busy, full;
  addr_t        next_addr [N];

  assign empty_slots = ~busy;

  // read controller and reading multiplexers
  always_comb begin
    for (int unsigned o = 0; o < N; o++) begin
      rd_fire[o]   = rd_allow[o] && full[rd_addr[o]];
      rd_flit[o]   = data_field[rd_addr[o]];
      next_addr[o] = linker_field[rd_addr[o]];
      for (int unsigned p = 0; p < N; p++)
        if (pt_en[p] && pt_slot[p] == rd_addr[o]) next_addr[o] = pt_link[p];
    end
  end

  always_comb begin
    used_slots = '0;
    for (int unsigned s = 0; s < K; s++) used_slots = used_slots + busy[s];
  end

  // data and linker fields: Bus-MUX-In registers
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int unsigned s = 0; s < K; s++) begin
        data_field[s]   <= '0;
        linker_field[s] <= '0;
      end
    end else begin
      for (int unsigned s = 0; s < K; s++) begin
        for (int unsigned w = 0; w < N; w++) begin
          if (wr_en[w] && wr_slot[w] == AW'(s)) begin
            data_field[s]   <= wr_flit[w];
            linker_field[s] <= wr_link[w];
          end
        end
        for (int unsigned w = 0; w < N; w++)
          if (pt_en[w] && pt_slot[w] == AW'(s)) linker_field[s] <= pt_link[w];
      end
    end
  end

  // slot flags and read addresses
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      // one slot reserved for each input from the start
      busy    <= K'((1 << N) - 1);
      full    <= '0;
      for (int unsigned o = 0; o < N; o++) rd_addr[o] <= '0;
    end else begin
      for (int unsigned w = 0; w < N; w++) begin
        if (alloc_en[w]) busy[alloc_slot[w]] <= 1'b1;
        if (wr_en[w]) full[wr_slot[w]] <= 1'b1;
      end
      for (int unsigned o = 0; o < N; o++) begin
        if (rd_fire[o]) begin
          busy[rd_addr[o]] <= 1'b0;
          full[rd_addr[o]] <= 1'b0;
          rd_addr[o]       <= next_addr[o];
        end
        if (set_rd[o]) rd_addr[o] <= set_rd_addr[o];
      end
    end
  end

  // a write must land in a reserved slot that holds no unread flit
  for (genvar w = 0; w < N; w++) begin : g_chk
    assert property (@(posedge clk) disable iff (!rst_n)
                     wr_en[w] |-> busy[wr_slot[w]] && !full[wr_slot[w]])
      else $error("level-2 write into a slot that is not reserved or still full");
    assert property (@(posedge clk) disable iff (!rst_n)
                     alloc_en[w] |-> !busy[alloc_slot[w]])
      else $error("level-2 slot reserved twice");
  end

endmodule
