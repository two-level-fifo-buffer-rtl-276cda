// tb_tlf_arbiter: the order must be a permutation of the inputs that starts
// at the TDMA counter, steps by one each cycle, and puts every input whose
// next channel is congested behind every input whose channel is free, each
// group in rotating order from the counter.
module tb_tlf_arbiter;
  localparam int N = 5;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic [N-1:0] congested;
  logic [$clog2(N)-1:0] order [N];
  logic [$clog2(N)-1:0] tdma_ptr;
  int checks = 0, failures = 0;

  tlf_arbiter #(.N(N)) dut (.*);

  initial begin : watchdog
    repeat (10000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int exp_ptr;
    congested = '0;
    repeat (2) @(posedge clk);
    #1 rst_n = 1;
    exp_ptr = 0;
    for (int t = 0; t < 500; t++) begin
      int exp [N];
      int pos;
      congested = (t < 20) ? '0 : N'($urandom);
      #1;
      pos = 0;
      for (int pass = 0; pass < 2; pass++)
        for (int k = 0; k < N; k++) begin
          int idx;
          idx = (exp_ptr + k) % N;
          if ((congested[idx] == 1'b1) == (pass == 1)) begin exp[pos] = idx; pos++; end
        end
      checks++;
      if (int'(tdma_ptr) != exp_ptr) begin failures++; $display("FAIL t=%0d: counter %0d expected %0d", t, tdma_ptr, exp_ptr); end
      for (int k = 0; k < N; k++) begin
        checks++;
        if (int'(order[k]) != exp[k]) begin
          failures++;
          $display("FAIL t=%0d: order[%0d]=%0d expected %0d (congested %b)", t, k, order[k], exp[k], congested);
        end
      end
      @(posedge clk);
      exp_ptr = (exp_ptr + 1) % N;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
