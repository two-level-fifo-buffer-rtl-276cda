// tb_tlf_level1_fifo: random pushes and acknowledges against a queue model
// for the default depth of 6 (not a power of two, so the pointers must wrap
// by hand). Checks the head flit, out_valid, count and that a pushed flit
// is visible one cycle later; the writer never pushes into a full queue
// that is not being emptied, as the router guarantees.
module tb_tlf_level1_fifo;
  import tlf_pkg::*;
  localparam int DEPTH = 6;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic push, out_valid, out_ack;
  flit_t push_flit, out_flit;
  logic [$clog2(DEPTH+1)-1:0] count;
  flit_t model [$];
  int checks = 0, failures = 0, fulls = 0;

  tlf_level1_fifo #(.DEPTH(DEPTH)) dut (.*);

  initial begin : watchdog
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    push = 0; out_ack = 0; push_flit = '0;
    repeat (2) @(posedge clk);
    #1 rst_n = 1;
    for (int t = 0; t < 20000; t++) begin
      int pp, ap;
      pp = (t / 1000) % 3 == 0 ? 80 : (t / 1000) % 3 == 1 ? 40 : 60;
      ap = (t / 1000) % 3 == 0 ? 30 : (t / 1000) % 3 == 1 ? 80 : 60;
      out_ack = (($urandom % 100) < ap);
      push    = (($urandom % 100) < pp) && (model.size() < DEPTH || (out_ack && model.size() > 0));
      push_flit = {$urandom, $urandom};
      #1;
      checks++;
      if (out_valid != (model.size() > 0) || int'(count) != model.size()) begin
        failures++;
        $display("FAIL t=%0d: valid %0b count %0d, model holds %0d", t, out_valid, count, model.size());
      end
      if (model.size() > 0) begin
        checks++;
        if (out_flit != model[0]) begin failures++; $display("FAIL t=%0d: head flit differs", t); end
      end
      if (model.size() == DEPTH) fulls++;
      @(posedge clk);
      if (out_ack && model.size() > 0) void'(model.pop_front());
      if (push) model.push_back(push_flit);
      #1;
    end
    checks++;
    if (fulls == 0) begin failures++; $display("FAIL: the queue never filled"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
