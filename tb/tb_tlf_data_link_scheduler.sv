// tb_tlf_data_link_scheduler: the scheduler with the level-2 FIFO and the
// write generator it works with, driven directly at the routing-stage
// handshake. The level-1 FIFOs are modelled here as counters with a
// random drain.
//
// Checks:
//  * a flit offered to an idle output is bypassed: it appears on byp_* in
//    the next cycle, not through level 2;
//  * the directed case of a packet whose head arrives while the packet
//    ahead of it on the same output is still arriving: the linker table is
//    used and the packets leave in order;
//  * with random packets (2, 4 or 8 flits) on all inputs and random
//    arbitration orders, every output receives contiguous packets with
//    their flits in order, packets from one input in order, and every flit
//    exactly once; the shared buffer fills and inputs stall;
//  * the level-1 model never overflows;
//  * head admission reserve: no head flit is written into level 2 when
//    HEAD_RSV or fewer slots would stay empty, and heads are seen held
//    back by the reserve while body flits still enter.
module tb_tlf_data_link_scheduler;
  import tlf_pkg::*;
  localparam int K = 128, N = 5, L1 = 6, AW = $clog2(K), RSV = 5;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic q_valid [N], q_ready [N];
  flit_t q_flit [N];
  logic [$clog2(N)-1:0] q_port [N], order [N];
  logic [AW-1:0] free_slot [N];
  logic [N-1:0] free_slot_ok;
  logic [K-1:0] empty_slots, wordline [N];
  logic rd_fire [N], rd_allow [N], set_rd [N];
  logic [AW-1:0] set_rd_addr [N], rd_addr [N];
  logic alloc_en [N];
  logic [AW-1:0] alloc_slot [N];
  logic wr_en [N];
  logic [AW-1:0] wr_slot [N], wr_link [N];
  flit_t wr_flit [N];
  logic pt_en [N];
  logic [AW-1:0] pt_slot [N], pt_link [N];
  logic byp_en [N];
  flit_t byp_flit [N], rd_flit [N];
  logic [$clog2(L1+1)-1:0] l1_count [N];
  logic [N-1:0] ev_bypass, ev_l2_write, ev_ltab, ev_patch, ev_stall;
  logic [$clog2(K+1)-1:0] used_slots;

  tlf_data_link_scheduler #(.K(K), .N(N), .L1_DEPTH(L1), .HEAD_RSV(RSV)) dut (.*);
  tlf_write_generator #(.K(K), .NW(N)) u_wg (.empty_slots, .wordline, .slot(free_slot), .slot_ok(free_slot_ok));
  tlf_level2_fifo #(.K(K), .N(N)) u_l2 (.clk, .rst_n, .empty_slots, .alloc_en, .alloc_slot,
    .wr_en, .wr_slot, .wr_flit, .wr_link, .pt_en, .pt_slot, .pt_link, .set_rd, .set_rd_addr,
    .rd_allow, .rd_fire, .rd_flit, .rd_addr, .used_slots);

  int checks = 0, failures = 0;
  longint cycle = 0;
  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; if (failures < 20) $display("FAIL @%0d: %s", cycle, what); end
  endtask

  // ---- level-1 model and output checker
  int  l1c [N];
  int  drain_pct = 100;
  bit  active [N];
  int  cur_src [N], cur_pid [N], cur_idx [N], cur_len [N];
  int  last_pid [N][N];
  int  seq [N][$];
  longint sent = 0, recv = 0;
  int  n_byp = 0, n_ltab = 0, n_patch = 0, n_stall = 0, n_l2 = 0, n_held = 0;

  always_comb for (int o = 0; o < N; o++) l1_count[o] = ($clog2(L1+1))'(l1c[o]);

  always @(posedge clk) if (rst_n) begin
    cycle <= cycle + 1;
    n_byp += $countones(ev_bypass); n_ltab += $countones(ev_ltab);
    n_patch += $countones(ev_patch); n_stall += $countones(ev_stall); n_l2 += $countones(ev_l2_write);
    for (int i = 0; i < N; i++) if (q_valid[i] && q_ready[i]) sent++;
    begin
      int w;
      w = 0;
      for (int i = 0; i < N; i++) begin
        if (ev_l2_write[i]) begin
          if (is_head(q_flit[i]))
            check(int'(used_slots) + RSV < K, "head written into the head admission reserve");
          w++;
        end
        if (ev_stall[i] && is_head(q_flit[i]) && free_slot_ok[0]) n_held++;
      end
    end
    for (int o = 0; o < N; o++) begin
      bit pop;
      pop = (l1c[o] > 0) && (($urandom % 100) < drain_pct);
      if (byp_en[o] || rd_fire[o]) begin
        flit_t f;
        int src, pid, idx, len;
        check(!(byp_en[o] && rd_fire[o]), "two pushes into one level-1 FIFO");
        f = byp_en[o] ? byp_flit[o] : rd_flit[o];
        src = int'(f[47:44]); pid = int'(f[43:32]); idx = int'(f[31:24]); len = int'(f[23:16]);
        recv++;
        check(int'(f[10:8]) == o, $sformatf("out %0d got a flit for %0d", o, f[10:8]));
        if (f[62]) begin
          check(!active[o], $sformatf("out %0d: head inside a packet", o));
          check(pid > last_pid[src][o], $sformatf("out %0d: order of packets from %0d", o, src));
          last_pid[src][o] = pid;
          active[o] = 1; cur_src[o] = src; cur_pid[o] = pid; cur_idx[o] = 0; cur_len[o] = len;
          seq[o].push_back(src);
        end else begin
          check(active[o] && src == cur_src[o] && pid == cur_pid[o] && idx == cur_idx[o] + 1,
                $sformatf("out %0d: flit out of place", o));
          cur_idx[o] = idx;
        end
        if (f[63]) begin
          check(cur_idx[o] == cur_len[o] - 1, "tail index");
          active[o] = 0;
        end
        l1c[o]++;
        check(l1c[o] - int'(pop) <= L1, $sformatf("level-1 FIFO %0d overflow", o));
      end
      if (pop) l1c[o]--;
    end
  end

  function automatic flit_t mk(int ft, int src, int pid, int idx, int len, int o);
    flit_t f = '0;
    f[63:62] = 2'(ft); f[47:44] = 4'(src); f[43:32] = 12'(pid);
    f[31:24] = 8'(idx); f[23:16] = 8'(len); f[10:8] = 3'(o);
    return f;
  endfunction

  // ---- random sources
  bit random_on = 0;
  int inj = 0;
  int pidc [N];
  bit g_busy [N];
  int g_idx [N], g_len [N], g_o [N], g_pid [N];
  always @(posedge clk) if (rst_n && random_on) begin
    for (int i = 0; i < N; i++) begin
      if (q_valid[i] && q_ready[i]) begin
        g_idx[i]++;
        if (g_idx[i] == g_len[i]) g_busy[i] = 0;
        q_valid[i] <= 0;
      end
      if (!(q_valid[i] && !q_ready[i])) begin
        if (!g_busy[i] && ($urandom % 100) < inj) begin
          int lens [3] = '{2, 4, 8};
          g_busy[i] = 1; g_idx[i] = 0; g_len[i] = lens[$urandom % 3];
          g_o[i] = $urandom % N; pidc[i]++; g_pid[i] = pidc[i];
        end
        if (g_busy[i] && ($urandom % 100) < 85) begin
          int ft;
          ft = (g_idx[i] == 0) ? 1 : (g_idx[i] == g_len[i] - 1) ? 2 : 0;
          q_valid[i] <= 1;
          q_flit[i]  <= mk(ft, i, g_pid[i], g_idx[i], g_len[i], g_o[i]);
          q_port[i]  <= 3'(g_o[i]);
        end
      end
    end
  end

  // random permutation as arbitration order
  always @(posedge clk) begin
    int p [N];
    for (int k = 0; k < N; k++) p[k] = k;
    for (int k = N - 1; k > 0; k--) begin
      int j, tmp;
      j = $urandom % (k + 1); tmp = p[k]; p[k] = p[j]; p[j] = tmp;
    end
    for (int k = 0; k < N; k++) order[k] <= 3'(p[k]);
  end

  task automatic offer(input int i, input flit_t f, input int o);
    #1 q_valid[i] = 1; q_flit[i] = f; q_port[i] = 3'(o);
    do @(posedge clk); while (!q_ready[i]);
    #1 q_valid[i] = 0;
  endtask

  initial begin : watchdog
    repeat (300000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < N; i++) begin
      q_valid[i] = 0; q_flit[i] = '0; q_port[i] = '0; l1c[i] = 0; active[i] = 0;
      pidc[i] = 0; g_busy[i] = 0;
      for (int o = 0; o < N; o++) last_pid[i][o] = -1;
    end
    repeat (2) @(posedge clk);
    #1 rst_n = 1;

    // 1. bypass: a lone flit appears on byp_* one cycle after acceptance
    pidc[2]++;
    offer(2, mk(3, 2, pidc[2], 0, 1, 0), 0);
    check(byp_en[0] && byp_flit[0][43:32] == 12'(pidc[2]), "lone flit bypassed in the next cycle");
    repeat (5) @(posedge clk);

    // 2. linker table (the situation of the document's example): output S
    //    (1) is held; E (0) starts a 3-flit packet to S, N (3) sends a
    //    2-flit packet to S before E's tail arrives
    begin
      int ltab0, sz;
      drain_pct = 0;
      sz = seq[1].size();
      ltab0 = n_ltab;
      pidc[0]++; pidc[3]++;
      for (int k = 0; k < 8; k++) begin     // fill S's level-1 FIFO first
        pidc[4]++;
        offer(4, mk(3, 4, pidc[4], 0, 1, 1), 1);
      end
      offer(0, mk(1, 0, pidc[0], 0, 3, 1), 1);
      offer(0, mk(0, 0, pidc[0], 1, 3, 1), 1);
      offer(3, mk(1, 3, pidc[3], 0, 2, 1), 1);
      offer(3, mk(2, 3, pidc[3], 1, 2, 1), 1);
      offer(0, mk(2, 0, pidc[0], 2, 3, 1), 1);
      check(n_ltab > ltab0, "linker table used for a packet behind an arriving one");
      drain_pct = 100;
      repeat (60) @(posedge clk);
      check(seq[1].size() == sz + 10 && seq[1][sz + 8] == 0 && seq[1][sz + 9] == 3,
            "packet E leaves before packet N on output S");
    end

    // 3. random traffic with phases of slow draining
    random_on = 1;
    for (int ph = 0; ph < 8; ph++) begin
      inj = (ph % 2) ? 70 : 20;
      drain_pct = (ph < 2) ? 100 : (ph % 3 == 0) ? 5 : 40;
      repeat (3000) @(posedge clk);
    end
    inj = 0; drain_pct = 100;
    repeat (2000) @(posedge clk);
    random_on = 0;
    #1;
    for (int i = 0; i < N; i++) q_valid[i] = 0;
    repeat (500) @(posedge clk);
    check(sent == recv, $sformatf("sent %0d flits, received %0d", sent, recv));
    check(used_slots == N, "only the reserved slots in use at the end");
    $display("bypass=%0d l2=%0d linker_table=%0d patches=%0d stalls=%0d held_by_reserve=%0d", n_byp, n_l2, n_ltab, n_patch, n_stall, n_held);
    check(n_byp > 0 && n_l2 > 0 && n_ltab > 0 && n_patch > 0 && n_stall > 0, "every placement case happened");
    check(n_held > 0, "heads held back by the admission reserve");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
