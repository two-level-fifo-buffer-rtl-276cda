// tb_tlf_mesh: an 8 x 8 mesh of two-level FIFO routers under synthetic
// traffic, the network the router was evaluated in.
//
// Every router is built with 30 level-2 slots and 2-flit level-1 FIFOs,
// 40 flits of buffering in all, the size at which the fully associated
// two-level FIFO was found to match a 160-flit virtual-channel router.
// Neighbouring routers are joined port to port (E of one to W of the
// next, N to S); out_ack of a link is the receiver's in_ready, and each
// router's traffic input reports, per neighbour, which of that
// neighbour's outputs held a flit that was not taken in the previous cycle
// (registered on the link, which also keeps the mesh free of
// combinational loops through in_ready). Boundary ports
// stay idle: XY routing never uses them.
//
// Each node has an unbounded source queue feeding its P input. Packets of
// 2, 4 or 8 flits are generated with a probability chosen so that the
// offered load is the given number of flits per node per cycle; the P
// output always accepts. Loads 0.15, 0.25, 0.35 and 0.45 with uniform
// random destinations are run (the last two beyond saturation), then 0.15
// with 30 % of packets sent to six hotspot nodes.
//
// The routers use a head admission reserve of 12 of their 30 level-2
// slots. With the plain shared buffer, or a reserve of 5, this mesh
// deadlocked at 0.35: neighbours filled their buffers with flits for each
// other. For each run the accepted throughput and the mean packet
// latency (generation to tail ejection) are printed.
//
// Checks: every flit is ejected at its destination node, packets arrive
// whole and in order per source, nothing is lost after the network
// drains, and at the low load the accepted throughput is within 10 % of
// the offered load.
module tb_tlf_mesh;
  import tlf_pkg::*;

  localparam int W = 8, H = 8, NODES = W * H;
  localparam int K = 30, L1 = 2, HEAD_RSV = 12;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic  in_valid  [NODES][N_PORTS];
  logic  in_ready  [NODES][N_PORTS];
  flit_t in_flit   [NODES][N_PORTS];
  logic  out_valid [NODES][N_PORTS];
  logic  out_ack   [NODES][N_PORTS];
  flit_t out_flit  [NODES][N_PORTS];
  logic [N_PORTS-1:0] cong [NODES][N_PORTS];
  logic [$clog2(K+1)-1:0] occ [NODES];

  int checks = 0, failures = 0;
  longint cycle = 0;
  always @(posedge clk) cycle <= cycle + 1;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; if (failures < 20) $display("FAIL @%0d: %s", cycle, what); end
  endtask

  function automatic int nb(int n, int port);   // neighbour node, -1 at the edge
    int x, y;
    x = n % W; y = n / W;
    case (port)
      0: return (x < W - 1) ? n + 1 : -1;   // E
      2: return (x > 0)     ? n - 1 : -1;   // W
      3: return (y < H - 1) ? n + W : -1;   // N
      1: return (y > 0)     ? n - W : -1;   // S
      default: return -1;
    endcase
  endfunction

  function automatic int opp(int port);
    case (port) 0: return 2; 2: return 0; 1: return 3; 3: return 1; default: return 4; endcase
  endfunction

  for (genvar n = 0; n < NODES; n++) begin : g_node
    tlf_router #(.K(K), .L1_DEPTH(L1), .HEAD_RSV(HEAD_RSV)) u_r (
      .clk, .rst_n,
      .my_x (COORD_W'(n % W)), .my_y (COORD_W'(n / W)),
      .in_valid (in_valid[n]), .in_ready (in_ready[n]), .in_flit (in_flit[n]),
      .out_valid (out_valid[n]), .out_ack (out_ack[n]), .out_flit (out_flit[n]),
      .next_congested (cong[n]), .l2_occupancy (occ[n])
    );
    for (genvar p = 0; p < 4; p++) begin : g_link
      localparam int M = (p == 0) ? ((n % W < W - 1) ? n + 1 : -1) :
                         (p == 2) ? ((n % W > 0) ? n - 1 : -1) :
                         (p == 3) ? ((n / W < H - 1) ? n + W : -1) :
                                    ((n / W > 0) ? n - W : -1);
      localparam int Q = (p == 0) ? 2 : (p == 2) ? 0 : (p == 1) ? 3 : 1;
      if (M >= 0) begin : g_on
        assign in_valid[M][Q] = out_valid[n][p];
        assign in_flit[M][Q]  = out_flit[n][p];
        assign out_ack[n][p]  = in_ready[M][Q];
        // the traffic report crosses the link through a register
        for (genvar r = 0; r < N_PORTS; r++) begin : g_c
          always_ff @(posedge clk or negedge rst_n)
            if (!rst_n) cong[n][p][r] <= 1'b0;
            else        cong[n][p][r] <= out_valid[M][r] && !out_ack[M][r];
        end
      end else begin : g_off
        assign out_ack[n][p] = 1'b0;
        assign cong[n][p]    = '0;
      end
    end
    assign cong[n][4] = '0;
    assign out_ack[n][4] = 1'b1;
  end
  // inputs at the mesh boundary
  for (genvar n = 0; n < NODES; n++) begin : g_edge
    if (n % W == 0)     begin : g_w assign in_valid[n][2] = 1'b0; assign in_flit[n][2] = '0; end
    if (n % W == W - 1) begin : g_e assign in_valid[n][0] = 1'b0; assign in_flit[n][0] = '0; end
    if (n / W == 0)     begin : g_s assign in_valid[n][1] = 1'b0; assign in_flit[n][1] = '0; end
    if (n / W == H - 1) begin : g_n assign in_valid[n][3] = 1'b0; assign in_flit[n][3] = '0; end
  end

  // ---- sources: flit layout: [47:42] source node, [41:30] packet number,
  //      [29:26] flit index, [25:22] length, [21:6] generation cycle,
  //      [5:0] destination (x in [2:0], y in [5:3])
  flit_t srcq [NODES][$];
  logic  p_valid [NODES];
  flit_t p_flit  [NODES];
  int    pid [NODES];
  int    load_milli = 0;        // offered flits per node per 1000 cycles
  bit    hotspot = 0;
  int    hot [6] = '{2 + 3 * W, 2 + 4 * W, 3 + 3 * W, 3 + 4 * W, 6 + 5 * W, 6 + 6 * W};

  for (genvar n = 0; n < NODES; n++) begin : g_p
    assign in_valid[n][4] = p_valid[n];
    assign in_flit[n][4]  = p_flit[n];
  end

  // ---- measurement
  longint injected = 0, ejected = 0, ej_window = 0, lat_sum = 0, lat_n = 0;
  bit     measuring = 0;
  bit     act [NODES];
  int     a_src [NODES], a_pid [NODES], a_idx [NODES];
  int     last_pid [NODES][NODES];

  always @(posedge clk) if (rst_n) begin
    for (int n = 0; n < NODES; n++) begin
      // accepted at P input
      if (p_valid[n] && in_ready[n][4]) begin
        void'(srcq[n].pop_front());
        injected++;
      end
      // generate packets
      if (load_milli > 0 && ($urandom % (1000 * 14)) < load_milli * 3) begin
        int len, d, dx, dy;
        int lens [3] = '{2, 4, 8};
        len = lens[$urandom % 3];
        if (hotspot && ($urandom % 100) < 30) d = hot[$urandom % 6];
        else d = $urandom % NODES;
        dx = d % W; dy = d / W;
        pid[n]++;
        for (int k = 0; k < len; k++) begin
          flit_t f;
          f = '0;
          f[63] = (k == len - 1); f[62] = (k == 0);
          f[47:42] = 6'(n); f[41:30] = 12'(pid[n]); f[29:26] = 4'(k); f[25:22] = 4'(len);
          f[21:6] = 16'(cycle); f[2:0] = 3'(dx); f[5:3] = 3'(dy);
          srcq[n].push_back(f);
        end
      end
      // ejection at P output
      if (out_valid[n][4]) begin
        flit_t f;
        int s, pk, idx;
        f = out_flit[n][4];
        s = int'(f[47:42]); pk = int'(f[41:30]); idx = int'(f[29:26]);
        ejected++;
        if (measuring) ej_window++;
        check(int'(f[2:0]) + W * int'(f[5:3]) == n, $sformatf("node %0d ejected a flit for another node", n));
        if (f[62]) begin
          check(!act[n], "head inside a packet at ejection");
          check(pk > last_pid[n][s], "packets of one source out of order");
          last_pid[n][s] = pk;
          act[n] = 1; a_src[n] = s; a_pid[n] = pk; a_idx[n] = 0;
        end else begin
          check(act[n] && s == a_src[n] && pk == a_pid[n] && idx == a_idx[n] + 1, "flit out of place at ejection");
          a_idx[n] = idx;
        end
        if (f[63]) begin
          act[n] = 0;
          if (measuring) begin lat_sum += (cycle - longint'(f[21:6])) & 16'hffff; lat_n++; end
        end
      end
    end
  end

  // drive P inputs from the source queues after each edge
  always @(posedge clk) begin
    #1;
    for (int n = 0; n < NODES; n++) begin
      p_valid[n] = (srcq[n].size() > 0) && rst_n;
      p_flit[n]  = (srcq[n].size() > 0) ? srcq[n][0] : '0;
    end
  end

  initial begin : watchdog
    repeat (60000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic run(input int milli, input bit hs, input string name, output real thr);
    load_milli = milli; hotspot = hs;
    repeat (1000) @(posedge clk);          // warm up
    ej_window = 0; lat_sum = 0; lat_n = 0; measuring = 1;
    repeat (3000) @(posedge clk);
    measuring = 0;
    thr = real'(ej_window) / 3000.0 / NODES;
    $display("%s offered %0.3f accepted %0.3f flits/node/cycle, mean latency %0.1f cycles (%0d packets)",
             name, milli / 1000.0, thr, lat_n ? real'(lat_sum) / lat_n : 0.0, lat_n);
    // drain before the next load
    load_milli = 0;
    repeat (4000) @(posedge clk);
    check(injected == ejected, $sformatf("%s: injected %0d ejected %0d after drain", name, injected, ejected));
  endtask

  initial begin
    real thr;
    for (int n = 0; n < NODES; n++) begin
      p_valid[n] = 0; p_flit[n] = '0; pid[n] = 0; act[n] = 0;
      for (int s = 0; s < NODES; s++) last_pid[n][s] = 0;
    end
    repeat (3) @(posedge clk);
    #1 rst_n = 1;
    run(150, 0, "uniform low   ", thr);
    check(thr > 0.135, "accepted throughput at load 0.15 within 10 % of offered");
    run(250, 0, "uniform medium", thr);
    run(350, 0, "uniform high  ", thr);
    run(450, 0, "uniform sat.  ", thr);
    run(150, 1, "hotspot low   ", thr);
    for (int n = 0; n < NODES; n++) begin
      check(srcq[n].size() == 0 && !act[n], "network drained");
      check(occ[n] == N_PORTS, "only reserved level-2 slots in use after drain");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
