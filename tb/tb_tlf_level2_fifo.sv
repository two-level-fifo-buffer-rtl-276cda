// tb_tlf_level2_fifo: drives the level-2 FIFO the way the scheduler does and
// checks that every output reads back exactly its own flits, in order.
//
// Each cycle the testbench may append one flit to each output's queue: it
// reserves a random empty slot (alloc), writes the flit there one cycle
// later with no link, and links the previous flit of that output to it with
// a linker patch in the same cycle; if the output's queue is empty it loads
// the output's read address instead. Reads are allowed at random. The
// reference is a plain queue per output and a map of the slots in use, so
// the test checks the chained reads, the forwarding of a patch to a slot
// being read, freeing of read slots (empty_slots, used_slots) and several
// writes and reads in one cycle.
module tb_tlf_level2_fifo;
  import tlf_pkg::*;
  localparam int K = 128, N = 5, AW = $clog2(K);
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic [K-1:0]   empty_slots;
  logic           alloc_en [N];
  logic [AW-1:0]  alloc_slot [N];
  logic           wr_en [N];
  logic [AW-1:0]  wr_slot [N], wr_link [N];
  flit_t          wr_flit [N];
  logic           pt_en [N];
  logic [AW-1:0]  pt_slot [N], pt_link [N];
  logic           set_rd [N];
  logic [AW-1:0]  set_rd_addr [N];
  logic           rd_allow [N], rd_fire [N];
  flit_t          rd_flit [N];
  logic [AW-1:0]  rd_addr [N];
  logic [$clog2(K+1)-1:0] used_slots;

  tlf_level2_fifo #(.K(K), .N(N)) dut (.*);

  int checks = 0, failures = 0;
  flit_t exp_q [N][$];
  bit    busy_m [K];
  int    cnt [N];
  int    last_slot [N];
  // commands decided this cycle, presented next cycle
  bit    nx_wr [N], nx_pt [N];
  int    nx_wr_slot [N], nx_pt_slot [N], nx_pt_link [N];
  flit_t nx_flit [N];
  int    freed [$];
  int    forwarded = 0, multi_rd = 0, multi_wr = 0, reads = 0, max_used = 0;

  initial begin : watchdog
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int o = 0; o < N; o++) begin
      alloc_en[o] = 0; alloc_slot[o] = '0; wr_en[o] = 0; wr_slot[o] = '0; wr_link[o] = '0;
      wr_flit[o] = '0; pt_en[o] = 0; pt_slot[o] = '0; pt_link[o] = '0; set_rd[o] = 0;
      set_rd_addr[o] = '0; rd_allow[o] = 0; cnt[o] = 0; nx_wr[o] = 0; nx_pt[o] = 0;
    end
    for (int s = 0; s < K; s++) busy_m[s] = (s < N);
    repeat (2) @(posedge clk);
    #1 rst_n = 1;
    for (int t = 0; t < 30000; t++) begin
      int wp, rp, nr, nw;
      wp = ((t / 2000) % 2 == 0) ? 70 : 20;
      rp = ((t / 2000) % 2 == 0) ? 20 : 80;
      // commands decided last cycle
      for (int o = 0; o < N; o++) begin
        wr_en[o] = nx_wr[o]; wr_slot[o] = AW'(nx_wr_slot[o]); wr_flit[o] = nx_flit[o]; wr_link[o] = '0;
        pt_en[o] = nx_pt[o]; pt_slot[o] = AW'(nx_pt_slot[o]); pt_link[o] = AW'(nx_pt_link[o]);
        rd_allow[o] = (cnt[o] > 0) && (($urandom % 100) < rp);
        alloc_en[o] = 0; set_rd[o] = 0;
      end
      #1;
      // free-slot map and occupancy
      checks++;
      for (int s = 0; s < K; s++)
        if (empty_slots[s] == busy_m[s]) begin
          failures++; $display("FAIL t=%0d: slot %0d empty flag wrong", t, s); break;
        end
      checks++;
      begin
        int u; u = 0;
        for (int s = 0; s < K; s++) u += busy_m[s];
        if (u != int'(used_slots)) begin failures++; $display("FAIL t=%0d: used %0d expected %0d", t, used_slots, u); end
        if (u > max_used) max_used = u;
      end
      // reads of this cycle
      nr = 0;
      for (int o = 0; o < N; o++) if (rd_fire[o]) begin
        checks++; nr++; reads++;
        if (exp_q[o].size() == 0 || rd_flit[o] != exp_q[o][0]) begin
          failures++; $display("FAIL t=%0d: output %0d read a wrong flit", t, o);
        end else void'(exp_q[o].pop_front());
        for (int p = 0; p < N; p++) if (pt_en[p] && pt_slot[p] == rd_addr[o]) forwarded++;
        freed.push_back(int'(rd_addr[o]));
        cnt[o]--;
      end
      if (nr > 1) multi_rd++;
      // new appends
      nw = 0;
      for (int o = 0; o < N; o++) begin
        nx_wr[o] = 0; nx_pt[o] = 0;
        if (($urandom % 100) < wp) begin
          int s, tries;
          s = -1; tries = 0;
          while (s < 0 && tries < 400) begin
            int c; c = $urandom % K;
            if (!busy_m[c]) begin
              bit taken; taken = 0;
              for (int p = 0; p < o; p++) if (alloc_en[p] && int'(alloc_slot[p]) == c) taken = 1;
              if (!taken) s = c;
            end
            tries++;
          end
          if (s >= 0) begin
            nw++;
            alloc_en[o] = 1; alloc_slot[o] = AW'(s);
            nx_wr[o] = 1; nx_wr_slot[o] = s; nx_flit[o] = {$urandom, $urandom};
            exp_q[o].push_back(nx_flit[o]);
            if (cnt[o] == 0) begin
              set_rd[o] = 1; set_rd_addr[o] = AW'(s);
            end else begin
              nx_pt[o] = 1; nx_pt_slot[o] = last_slot[o]; nx_pt_link[o] = s;
            end
            last_slot[o] = s;
            cnt[o]++;
          end
        end
      end
      if (nw > 1) multi_wr++;
      @(posedge clk);
      #1;
      for (int o = 0; o < N; o++) if (alloc_en[o]) busy_m[alloc_slot[o]] = 1;
      while (freed.size() > 0) busy_m[freed.pop_front()] = 0;
    end
    // drain
    for (int t = 0; t < 3000; t++) begin
      for (int o = 0; o < N; o++) begin
        wr_en[o] = nx_wr[o]; wr_slot[o] = AW'(nx_wr_slot[o]); wr_flit[o] = nx_flit[o];
        pt_en[o] = nx_pt[o]; pt_slot[o] = AW'(nx_pt_slot[o]); pt_link[o] = AW'(nx_pt_link[o]);
        nx_wr[o] = 0; nx_pt[o] = 0; alloc_en[o] = 0; set_rd[o] = 0;
        rd_allow[o] = cnt[o] > 0;
      end
      #1;
      for (int o = 0; o < N; o++) if (rd_fire[o]) begin
        checks++; reads++;
        if (exp_q[o].size() == 0 || rd_flit[o] != exp_q[o][0]) begin
          failures++; $display("FAIL drain: output %0d read a wrong flit", o);
        end else void'(exp_q[o].pop_front());
        busy_m[rd_addr[o]] = 0;
        cnt[o]--;
      end
      @(posedge clk);
      #1;
    end
    for (int o = 0; o < N; o++) begin
      checks++;
      if (exp_q[o].size() != 0) begin failures++; $display("FAIL: output %0d kept %0d flits", o, exp_q[o].size()); end
    end
    #1;
    checks++;
    if (int'(used_slots) != N) begin failures++; $display("FAIL: %0d slots in use after drain", used_slots); end
    $display("reads=%0d forwarded_patches=%0d multi_read_cycles=%0d multi_write_cycles=%0d max_used=%0d",
             reads, forwarded, multi_rd, multi_wr, max_used);
    checks++;
    if (forwarded == 0 || multi_rd == 0 || multi_wr == 0 || max_used < K - 2) begin
      failures++; $display("FAIL: a case was never exercised");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
