// tlf_write_generator: picks empty slots of the level-2 FIFO.
//
// Every flit written into the centralized level-2 FIFO needs a slot that is
// not in use. From the map of empty slots this block raises up to NW one-hot
// write wordlines at once, one per possible writer in the cycle: wordline 0
// selects the lowest-numbered empty slot, wordline 1 the next one, and so
// on. Each wordline is also encoded into its slot address for the linker
// fields (tlf_wordline_encoder). Purely combinational.
//
// The document says the write generator generates the writing wordlines of
// the slots; choosing the lowest-numbered empty slots first is this
// design's choice.
module tlf_write_generator #(
  parameter int unsigned K  = 128,
  parameter int unsigned NW = 5
) (
  input  logic [K-1:0]         empty_slots,
  output logic [K-1:0]         wordline [NW],
  output logic [$clog2(K)-1:0] slot     [NW],
  output logic [NW-1:0]        slot_ok
);

  logic [K-1:0] remaining [NW+1];

  always_comb begin
    remaining[0] = empty_slots;
    for (int unsigned j = 0; j < NW; j++) begin
      // isolate the lowest set bit of what is left
      wordline[j]      = remaining[j] & (~remaining[j] + 1'b1);
      remaining[j + 1] = remaining[j] & ~wordline[j];
    end
  end

  for (genvar j = 0; j < NW; j++) begin : g_enc
    tlf_wordline_encoder #(.K(K)) u_enc (
      .wordline (wordline[j]),
      .addr     (slot[j]),
      .valid    (slot_ok[j])
    );
  end

endmodule
