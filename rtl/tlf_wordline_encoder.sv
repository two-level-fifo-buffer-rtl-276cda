// tlf_wordline_encoder: turns a one-hot write wordline into a slot address.
//
// In the level-2 FIFO every slot has its own write wordline. The address of
// the slot a wordline selects is what gets stored in a linker field, so the
// data-link scheduler encodes each wordline it raises. The encoder is an OR
// tree: address bit b is the OR of every wordline whose index has bit b set.
// An all-zero wordline encodes to address 0; valid reports whether any line
// is high. Purely combinational.
//
// The document names the encoder and its purpose; the OR-tree form is the
// plain way to build it.
module tlf_wordline_encoder #(
  parameter int unsigned K = 128
) (
  input  logic [K-1:0]         wordline,
  output logic [$clog2(K)-1:0] addr,
  output logic                 valid
);

  always_comb begin
    addr = '0;
    for (int unsigned s = 0; s < K; s++) begin
      for (int unsigned b = 0; b < $clog2(K); b++) begin
        if (((s >> b) & 1) != 0) addr[b] = addr[b] | wordline[s];
      end
    end
    valid = |wordline;
  end

endmodule
