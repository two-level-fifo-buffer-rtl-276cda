// tb_tlf_router_hybrid: the end-to-end test of tb_tlf_router run on the
// 2-3 hybrid association: two level-2 groups of 64 slots, one shared by
// the E and W outputs, the other by S, N and P; 6-flit level-1 FIFOs.
// Besides the checks below it demands that each group fills (up to the
// slots its output reserve keeps for idle outputs) at some point, so the
// groups really are separate buffers.
//
// The router sits at (3,3) of an 8 x 8 mesh. Flits carry a tag the checker
// reads back: source input [47:44], packet number [43:32], flit index
// [31:24], packet length [23:16]; head flits hold the destination in
// [5:0]. At every output the checker demands that
//  * each flit left by the port XY routing gives for its destination
//    (worked out here, not taken from the router);
//  * packets are contiguous (wormhole) and their flits in order;
//  * packets from one input to one output keep their order;
//  * nothing is lost or duplicated.
// Directed tests measure the latency of the bypass path (3 cycles) and of
// the level-2 path (4 cycles), the TDMA rotation of same-cycle heads, the
// traffic-aware order, a packet queued behind one still arriving (linker
// table) and a level-1 FIFO filling up. Random phases with packets of 2, 4
// or 8 flits and outputs held off for long stretches fill the shared
// buffer until inputs stall; the buffer must fill up to the few slots the
// output reserve keeps for idle outputs. Every mechanism must have happened
// at least once.
`timescale 1ns/1ps
module tb_tlf_router_hybrid;
  import tlf_pkg::*;

  localparam int N = N_PORTS;
  localparam int K = 64, G = 2;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic [COORD_W-1:0] my_x = 3, my_y = 3;
  logic in_valid [N];
  logic in_ready [N];
  flit_t in_flit [N];
  logic out_valid [N];
  logic out_ack [N];
  flit_t out_flit [N];
  logic [N-1:0] next_congested [N];
  logic [$clog2(G*K+1)-1:0] l2_occupancy;

  // port order E, S, W, N, P: E and W in group 0, S, N, P in group 1
  tlf_router #(.K(K), .N_GROUPS(G), .PORT_GROUP(10'b01_01_00_01_00)) dut (.*);

  int checks = 0, failures = 0;
  longint cycle = 0;
  always @(posedge clk) cycle <= cycle + 1;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL @%0d: %s", cycle, what);
    end
  endtask

  // ---------------- reference routing ----------------
  function automatic int ref_route(input int dx, input int dy);
    if (dx > 3) return 0;       // E
    if (dx < 3) return 2;       // W
    if (dy > 3) return 3;       // N
    if (dy < 3) return 1;       // S
    return 4;                   // P
  endfunction

  function automatic flit_t mk(input int ft, input int src, input int pid, input int idx,
                               input int len, input int dx, input int dy);
    flit_t f = '0;
    f[63:62] = 2'(ft);
    f[47:44] = 4'(src);
    f[43:32] = 12'(pid);
    f[31:24] = 8'(idx);
    f[23:16] = 8'(len);
    f[5:3]   = 3'(dy);
    f[2:0]   = 3'(dx);
    return f;
  endfunction

  // ---------------- output checker ----------------
  bit     active   [N];
  int     cur_src  [N], cur_pid [N], cur_idx [N], cur_len [N], cur_dst [N];
  int     last_pid [N][N];
  longint sent_flits = 0, recv_flits = 0;
  int     last_out_cycle [N];
  int     out_seq [N][$];     // packet keys in the order they left, per output

  always @(posedge clk) if (rst_n) begin
    for (int o = 0; o < N; o++) if (out_valid[o] && out_ack[o]) begin
      flit_t f;
      int src, pid, idx, len;
      f = out_flit[o];
      src = int'(f[47:44]); pid = int'(f[43:32]); idx = int'(f[31:24]); len = int'(f[23:16]);
      recv_flits++;
      last_out_cycle[o] = int'(cycle);
      if (f[62]) begin
        check(!active[o], $sformatf("out %0d: head while a packet is open", o));
        check(ref_route(int'(f[2:0]), int'(f[5:3])) == o,
              $sformatf("out %0d: head for (%0d,%0d) on wrong port", o, f[2:0], f[5:3]));
        check(idx == 0, "head index");
        check(pid > last_pid[src][o], $sformatf("out %0d: packet order from input %0d", o, src));
        last_pid[src][o] = pid;
        active[o] = 1; cur_src[o] = src; cur_pid[o] = pid; cur_idx[o] = 0; cur_len[o] = len;
        out_seq[o].push_back(src * 4096 + pid);
      end else begin
        check(active[o], $sformatf("out %0d: body without head", o));
        check(src == cur_src[o] && pid == cur_pid[o],
              $sformatf("out %0d: flit of another packet interleaved", o));
        check(idx == cur_idx[o] + 1, $sformatf("out %0d: flit index %0d after %0d", o, idx, cur_idx[o]));
        cur_idx[o] = idx;
      end
      if (f[63]) begin
        check(cur_idx[o] == cur_len[o] - 1, $sformatf("out %0d: tail at wrong index", o));
        active[o] = 0;
      end
    end
  end

  // ---------------- sources ----------------
  int pid_cnt [N];
  int inj_pct = 0;              // probability of offering a flit per cycle
  int ack_pct = 100;            // probability that an output acknowledges
  int col_pct = 0;              // share of packets kept in this router's column (S, N, P)
  bit random_mode = 0;
  int  g_rem [N], g_idx [N], g_len [N], g_dx [N], g_dy [N], g_pid [N];
  bit  g_busy [N];

  // random-mode generators drive in_valid/in_flit
  always @(posedge clk) if (rst_n && random_mode) begin
    for (int i = 0; i < N; i++) begin
      if (in_valid[i] && in_ready[i]) begin
        sent_flits++;
        g_idx[i]++;
        if (g_idx[i] == g_len[i]) g_busy[i] = 0;
        in_valid[i] <= 0;
      end
      if (!(in_valid[i] && !in_ready[i])) begin
        if (!g_busy[i] && ($urandom % 100) < inj_pct) begin
          int lens [3] = '{2, 4, 8};
          g_busy[i] = 1; g_idx[i] = 0; g_len[i] = lens[$urandom % 3];
          g_dx[i] = (($urandom % 100) < col_pct) ? 3 : int'($urandom % 8); g_dy[i] = int'($urandom % 8);
          pid_cnt[i]++; g_pid[i] = pid_cnt[i];
        end
        if (g_busy[i] && ($urandom % 100) < 90) begin
          int ft;
          ft = (g_idx[i] == 0) ? 1 : (g_idx[i] == g_len[i] - 1) ? 2 : 0;
          in_valid[i] <= 1;
          in_flit[i]  <= mk(ft, i, g_pid[i], g_idx[i], g_len[i], g_dx[i], g_dy[i]);
        end
      end
    end
  end

  always @(posedge clk) begin
    for (int o = 0; o < N; o++) out_ack[o] <= (($urandom % 100) < ack_pct);
  end

  // ---------------- mechanism counters ----------------
  int n_bypass = 0, n_l2 = 0, n_ltab = 0, n_patch = 0, n_stall = 0, n_l1_full = 0,
      n_multi_write = 0, n_multi_read = 0, n_same_cycle_heads = 0, n_cong_reorder = 0,
      max_occ = 0, max_g0 = 0, max_g1 = 0;
  always @(posedge clk) if (rst_n) begin
    int w, r;
    n_bypass += $countones(dut.ev_bypass);
    n_l2     += $countones(dut.ev_l2_write);
    n_ltab   += $countones(dut.ev_ltab);
    n_patch  += $countones(dut.ev_patch);
    n_stall  += $countones(dut.ev_stall);
    w = $countones(dut.ev_l2_write);
    r = 0;
    for (int o = 0; o < N; o++) begin
      r += int'(dut.rd_fire[o]);
      if (dut.l1_count[o] == 6) n_l1_full++;
    end
    if (w > 1) n_multi_write++;
    if (r > 1) n_multi_read++;
    if (int'(l2_occupancy) > max_occ) max_occ = int'(l2_occupancy);
    if (int'(dut.g_used[0]) > max_g0) max_g0 = int'(dut.g_used[0]);
    if (int'(dut.g_used[1]) > max_g1) max_g1 = int'(dut.g_used[1]);
  end

  // ---------------- directed helpers ----------------
  task automatic idle_inputs();
    for (int i = 0; i < N; i++) begin in_valid[i] = 0; in_flit[i] = '0; end
  endtask

  task automatic wait_drain(input int max_cycles);
    int c = 0;
    while (c < max_cycles && (recv_flits != sent_flits || l2_occupancy != G * N)) begin
      @(posedge clk); c++;
    end
    check(recv_flits == sent_flits, $sformatf("drain: sent %0d received %0d", sent_flits, recv_flits));
    check(l2_occupancy == G * N, $sformatf("drain: level-2 occupancy %0d, expected %0d reserved", l2_occupancy, G * N));
    #1;
  endtask

  // offer a flit on input i in this cycle, counted as sent when accepted
  task automatic send_one(input int i, input flit_t f);
    #1 in_valid[i] = 1; in_flit[i] = f;
    do @(posedge clk); while (!in_ready[i]);
    sent_flits++;
    #1 in_valid[i] = 0;
  endtask

  // cycles from the acceptance edge until out_valid of port o is seen
  task automatic measure_latency(input int i, input int o, input flit_t f, output int lat);
    longint t0;
    #1 in_valid[i] = 1; in_flit[i] = f;
    @(posedge clk);              // accepted here (router empty, in_ready high)
    t0 = cycle;
    sent_flits++;
    #1 in_valid[i] = 0;
    while (!out_valid[o]) @(posedge clk);
    lat = int'(cycle - t0);
  endtask

  initial begin : watchdog
    repeat (400000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int lat, lat2, first_out;
    longint t0;
    idle_inputs();
    for (int o = 0; o < N; o++) begin next_congested[o] = '0; active[o] = 0; end
    for (int i = 0; i < N; i++) begin
      pid_cnt[i] = 0; g_busy[i] = 0;
      for (int o = 0; o < N; o++) last_pid[i][o] = -1;
    end
    repeat (3) @(posedge clk);
    #1 rst_n = 1;
    @(posedge clk); #1;
    check(l2_occupancy == G * N, "one reserved slot per input and group after reset");

    // ---- 1. latency through the bypass: W input to E output, single flit
    ack_pct = 100;
    pid_cnt[2]++;
    measure_latency(2, 0, mk(3, 2, pid_cnt[2], 0, 1, 6, 3), lat);
    check(lat == 3, $sformatf("bypass latency %0d, expected 3", lat));
    repeat (10) @(posedge clk); #1;

    // ---- 2. two single flits for E in the same cycle: one bypasses,
    //         the other goes through level 2 and leaves right behind it
    pid_cnt[1]++; pid_cnt[3]++;
    in_valid[1] = 1; in_flit[1] = mk(3, 1, pid_cnt[1], 0, 1, 7, 0);
    in_valid[3] = 1; in_flit[3] = mk(3, 3, pid_cnt[3], 0, 1, 7, 7);
    @(posedge clk); t0 = cycle; sent_flits += 2;
    #1 idle_inputs();
    while (!out_valid[0]) @(posedge clk);
    lat = int'(cycle - t0);
    @(posedge clk);
    while (!out_valid[0]) @(posedge clk);
    lat2 = int'(cycle - t0);
    check(lat == 3, $sformatf("first of two: latency %0d, expected 3", lat));
    check(lat2 == 4, $sformatf("level-2 path latency %0d, expected 4", lat2));
    wait_drain(100);

    // ---- 3. TDMA: same-cycle heads from S and N to E, repeated; both
    //         orders must be seen as the counter rotates
    begin
      int s_first = 0, n_first = 0;
      for (int rep = 0; rep < 10; rep++) begin
        int sz;
        sz = out_seq[0].size();
        pid_cnt[1]++; pid_cnt[3]++;
        in_valid[1] = 1; in_flit[1] = mk(3, 1, pid_cnt[1], 0, 1, 7, 0);
        in_valid[3] = 1; in_flit[3] = mk(3, 3, pid_cnt[3], 0, 1, 7, 7);
        @(posedge clk); sent_flits += 2;
        #1 idle_inputs();
        repeat (rep % 3 + 1) @(posedge clk);
        #1;
        wait_drain(100);
        if (out_seq[0].size() == sz + 2) begin
          if (out_seq[0][sz] / 4096 == 1) s_first++; else n_first++;
        end
      end
      n_same_cycle_heads = s_first + n_first;
      check(s_first > 0 && n_first > 0,
            $sformatf("TDMA rotation: S first %0d times, N first %0d times", s_first, n_first));
    end

    // ---- 4. traffic-aware order: the head whose next channel is congested
    //         goes behind. S and N both send to E; beyond E, packet from S
    //         goes to (7,0) -> E again; mark that channel congested.
    begin
      int ok = 0;
      next_congested[0] = 5'b00001;       // neighbour E reports its E output congested
      for (int rep = 0; rep < 5; rep++) begin
        int sz;
        sz = out_seq[0].size();
        pid_cnt[1]++; pid_cnt[3]++;
        in_valid[1] = 1; in_flit[1] = mk(3, 1, pid_cnt[1], 0, 1, 7, 0);  // continues E
        in_valid[3] = 1; in_flit[3] = mk(3, 3, pid_cnt[3], 0, 1, 4, 7);  // turns N next
        @(posedge clk); sent_flits += 2;
        #1 idle_inputs();
        repeat (rep + 1) @(posedge clk);
        #1;
        wait_drain(100);
        if (out_seq[0].size() == sz + 2 && out_seq[0][sz] / 4096 == 3) ok++;
      end
      n_cong_reorder = ok;
      check(ok == 5, $sformatf("congested head placed last in %0d of 5 cases", ok));
      next_congested[0] = '0;
    end

    // ---- 5. linker table: E sends a 4-flit packet to S slowly, N sends a
    //         2-flit packet to S while E's is still arriving; S is held
    //         so everything queues in level 2. E's packet must leave first.
    begin
      int sz;
      ack_pct = 0;
      repeat (2) @(posedge clk);
      sz = out_seq[1].size();
      pid_cnt[0]++; pid_cnt[3]++;
      send_one(0, mk(1, 0, pid_cnt[0], 0, 4, 3, 0));
      repeat (2) @(posedge clk);
      send_one(0, mk(0, 0, pid_cnt[0], 1, 4, 3, 0));
      send_one(3, mk(1, 3, pid_cnt[3], 0, 2, 3, 1));
      send_one(3, mk(2, 3, pid_cnt[3], 1, 2, 3, 1));
      repeat (3) @(posedge clk);
      send_one(0, mk(0, 0, pid_cnt[0], 2, 4, 3, 0));
      send_one(0, mk(2, 0, pid_cnt[0], 3, 4, 3, 0));
      repeat (5) @(posedge clk);
      ack_pct = 100;
      wait_drain(200);
      check(out_seq[1].size() == sz + 2 && out_seq[1][sz] / 4096 == 0 && out_seq[1][sz+1] / 4096 == 3,
            "packet queued behind an arriving one leaves second");
    end

    // ---- 6. random traffic, light then heavy with outputs held off
    random_mode = 1;
    for (int phase = 0; phase < 6; phase++) begin
      inj_pct = (phase % 2 == 0) ? 15 : 60;
      col_pct = (phase >= 4) ? 80 : 0;
      ack_pct = (phase < 2) ? 100 : (phase < 4) ? 50 : 10;
      repeat (4000) @(posedge clk);
      // hold every output for a while: the shared buffer fills up
      if (phase >= 3) begin
        ack_pct = 0;
        repeat (600) @(posedge clk);
      end
    end
    inj_pct = 0;
    ack_pct = 100;
    // let generators finish their packets
    repeat (3000) @(posedge clk);
    random_mode = 0;
    @(posedge clk); #1 idle_inputs();
    wait_drain(5000);
    for (int o = 0; o < N; o++) check(!active[o], $sformatf("out %0d: packet left unfinished", o));

    // ---- mechanisms
    $display("bypass=%0d l2_writes=%0d linker_table=%0d patches=%0d stalls=%0d l1_full=%0d multi_write=%0d multi_read=%0d same_cycle_heads=%0d congestion_reorders=%0d max_l2_occupancy=%0d flits=%0d",
             n_bypass, n_l2, n_ltab, n_patch, n_stall, n_l1_full, n_multi_write, n_multi_read,
             n_same_cycle_heads, n_cong_reorder, max_occ, recv_flits);
    check(n_bypass > 0, "bypass never happened");
    check(n_l2 > 0, "level-2 write never happened");
    check(n_ltab > 0, "linker table never used");
    check(n_patch > 0, "tail patch never happened");
    check(n_stall > 0, "input stall on a full level-2 FIFO never happened");
    check(n_l1_full > 0, "level-1 FIFO never full");
    check(n_multi_write > 0, "multiple level-2 writes in one cycle never happened");
    check(n_multi_read > 0, "multiple level-2 reads in one cycle never happened");
    check(max_g0 >= K - (N_PORTS - 1) && max_g1 >= K - (N_PORTS - 1), $sformatf("a level-2 group never full (max %0d, %0d)", max_g0, max_g1));
    check(max_occ <= G * K, "occupancy above the two groups' size");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
