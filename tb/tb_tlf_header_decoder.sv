// tb_tlf_header_decoder: random packets from random router positions. Head
// flits must get the XY output port and the next router's port (worked out
// here from the coordinates), body and tail flits the port of their head;
// the stage must hold its flit while q_ready is low and pass every flit
// exactly once, in order.
module tb_tlf_header_decoder;
  import tlf_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic [COORD_W-1:0] my_x, my_y;
  logic in_valid, in_ready, q_valid, q_ready;
  flit_t in_flit, q_flit;
  port_e q_port, q_next_port;
  int checks = 0, failures = 0;

  tlf_header_decoder dut (.*);

  typedef struct { flit_t f; int port; int nxt; } exp_t;
  exp_t exp_q [$];

  function automatic int route(int cx, int cy, int dx, int dy);
    if (dx > cx) return 0;
    if (dx < cx) return 2;
    if (dy > cy) return 3;
    if (dy < cy) return 1;
    return 4;
  endfunction

  initial begin : watchdog
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // consumer with random back-pressure
  always @(posedge clk) if (rst_n) begin
    if (q_valid && q_ready) begin
      exp_t e;
      checks++;
      if (exp_q.size() == 0) begin
        failures++; $display("FAIL: unexpected flit");
      end else begin
        e = exp_q.pop_front();
        if (q_flit != e.f || int'(q_port) != e.port || int'(q_next_port) != e.nxt) begin
          failures++;
          $display("FAIL: port %0d next %0d, expected %0d %0d", q_port, q_next_port, e.port, e.nxt);
        end
      end
    end
    q_ready <= ($urandom % 100) < 60;
  end

  initial begin
    int port, nxt;
    in_valid = 0; in_flit = '0; q_ready = 0; my_x = 0; my_y = 0;
    repeat (2) @(posedge clk);
    #1 rst_n = 1;
    for (int p = 0; p < 3000; p++) begin
      int len, dx, dy, nx, ny;
      my_x = COORD_W'($urandom % 8); my_y = COORD_W'($urandom % 8);
      dx = $urandom % 8; dy = $urandom % 8;
      len = 1 + $urandom % 4;
      port = route(my_x, my_y, dx, dy);
      nx = my_x + (port == 0) - (port == 2);
      ny = my_y + (port == 3) - (port == 1);
      nxt = (port == 4) ? 4 : route(nx, ny, dx, dy);
      for (int k = 0; k < len; k++) begin
        flit_t f;
        f = {$urandom, $urandom};
        f[63] = (k == len - 1);
        f[62] = (k == 0);
        if (k == 0) begin f[2:0] = 3'(dx); f[5:3] = 3'(dy); end
        in_valid = 1; in_flit = f;
        do @(posedge clk); while (!in_ready);
        exp_q.push_back('{f, port, nxt});
        #1 in_valid = ($urandom % 4 == 0) ? 0 : 1;
        if (!in_valid) begin @(posedge clk); #1; end
      end
      in_valid = 0;
    end
    repeat (50) @(posedge clk);
    checks++;
    if (exp_q.size() != 0) begin failures++; $display("FAIL: %0d flits never left", exp_q.size()); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
