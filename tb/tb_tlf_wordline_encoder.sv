// tb_tlf_wordline_encoder: every one-hot wordline of a 128-slot buffer must
// encode to its own index with valid high; all-zero must give valid low.
module tb_tlf_wordline_encoder;
  localparam int K = 128;
  logic [K-1:0] wl;
  logic [$clog2(K)-1:0] addr;
  logic valid;
  int checks = 0, failures = 0;

  tlf_wordline_encoder #(.K(K)) dut (.wordline(wl), .addr(addr), .valid(valid));

  initial begin : watchdog
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    wl = '0;
    #1;
    checks++; if (valid !== 1'b0) begin failures++; $display("FAIL: valid with no wordline"); end
    for (int s = 0; s < K; s++) begin
      wl = '0;
      wl[s] = 1'b1;
      #1;
      checks++;
      if (!valid || int'(addr) != s) begin
        failures++;
        $display("FAIL: wordline %0d encoded to %0d valid %0b", s, addr, valid);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
