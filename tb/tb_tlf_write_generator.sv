// tb_tlf_write_generator: for random maps of empty slots, wordline j must
// select the j-th lowest empty slot, its address must match, and slot_ok
// must say whether that many empty slots exist. The reference walks the map
// bit by bit.
module tb_tlf_write_generator;
  localparam int K = 128, NW = 5;
  logic [K-1:0] empty_slots;
  logic [K-1:0] wordline [NW];
  logic [$clog2(K)-1:0] slot [NW];
  logic [NW-1:0] slot_ok;
  int checks = 0, failures = 0;

  tlf_write_generator #(.K(K), .NW(NW)) dut (.*);

  initial begin : watchdog
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int t = 0; t < 2000; t++) begin
      int exp_slot [NW];
      int found;
      int density;
      density = (t % 4 == 0) ? 2 : (t % 4 == 1) ? 50 : (t % 4 == 2) ? 98 : 100;
      for (int s = 0; s < K; s++) empty_slots[s] = (($urandom % 100) < density) ? 1'b0 : 1'b1;
      if (t == 0) empty_slots = '0;
      if (t == 1) empty_slots = {K{1'b1}};
      found = 0;
      for (int s = 0; s < K && found < NW; s++)
        if (empty_slots[s]) begin exp_slot[found] = s; found++; end
      #1;
      for (int j = 0; j < NW; j++) begin
        checks++;
        if (j < found) begin
          if (!slot_ok[j] || int'(slot[j]) != exp_slot[j] || wordline[j] != (K'(1) << exp_slot[j])) begin
            failures++;
            $display("FAIL t=%0d j=%0d: slot %0d ok %0b, expected %0d", t, j, slot[j], slot_ok[j], exp_slot[j]);
          end
        end else if (slot_ok[j] || wordline[j] != '0) begin
          failures++;
          $display("FAIL t=%0d j=%0d: wordline raised with only %0d empty slots", t, j, found);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
