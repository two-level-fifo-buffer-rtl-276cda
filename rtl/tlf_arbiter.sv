// tlf_arbiter: orders the head flits that arrive in the same cycle.
//
// Because every output has a shared level-2 buffer behind it, the arbiter
// does not grant or refuse anything: it only decides in which order packets
// that start in the same cycle are queued on their outputs. The order is a
// permutation of the input ports, order[0] first.
//
// Two rules make the order. A TDMA counter hands the highest priority to
// each input port in turn, one step per cycle, so no input can starve. On
// top of that, a head flit whose channel in the next router is reported
// congested (traffic input) is placed behind the ones that are not, so a
// packet that can move on is not queued behind one that cannot. With no
// traffic information (congested all zero) the order is the pure TDMA
// rotation.
//
// Timing: order is combinational from the counter and congested; the
// counter advances on every clock edge after reset.
//
// The document gives both rules (traffic-based order for deterministic
// routing, a TDMA counter for adaptive routing); applying them together,
// traffic first and TDMA among equals, is this design's choice.
module tlf_arbiter #(
  parameter int unsigned N = 5
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic [N-1:0]         congested,
  output logic [$clog2(N)-1:0] order [N],
  output logic [$clog2(N)-1:0] tdma_ptr
);

  localparam int unsigned IW = $clog2(N);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)                 tdma_ptr <= '0;
    else if (tdma_ptr == IW'(N-1)) tdma_ptr <= '0;
    else                        tdma_ptr <= tdma_ptr + 1'b1;
  end

  always_comb begin
    int unsigned pos;
    logic [IW-1:0] idx;
    pos = 0;
    for (int unsigned k = 0; k < N; k++) order[k] = '0;
    // uncongested first, then congested, each in rotating order
    for (int unsigned pass = 0; pass < 2; pass++) begin
      for (int unsigned k = 0; k < N; k++) begin
        idx = IW'((32'(tdma_ptr) + k) % N);
        if (congested[idx] == (pass == 1)) begin
          order[pos] = idx;
          pos = pos + 1;
        end
      end
    end
  end

endmodule
