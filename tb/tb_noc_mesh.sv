// tb_noc_mesh: 3x3 mesh. First, lone packets between every pair of nodes
// check delivery and the zero-load header latency, 2 cycles per router on
// the XY path (hops + 1 routers). Then every node injects random packets to
// random targets at once, with random back-pressure at the ejection ports:
// every packet must come out, intact and uninterleaved, at its target only.
//
// Timing: 10-unit clock; watchdog after 2,000,000 cycles. The 3x3 size and
// the 4-flit buffers are the document's.
module tb_noc_mesh;
  import openscale_pkg::*;
  localparam int NX = 3, NY = 3, N = NX * NY;
  logic clk = 0, rst_n = 0;
  logic inj_valid [N]; logic inj_ready [N]; flit_t inj_data [N];
  logic ej_valid  [N]; logic ej_ready  [N]; flit_t ej_data  [N];
  int checks = 0, failures = 0;
  bit random_ready = 0;
  int senders_done = 0, sent_total = 0, recv_total = 0;
  int last_eject_time [N];

  noc_mesh #(.NX(NX), .NY(NY), .BUF_DEPTH(4)) dut (.*);
  always #5 clk = ~clk;

  task automatic check(bit c, string what);
    checks++;
    if (!c) begin failures++; $display("FAIL %s at %0t", what, $time); end
  endtask

  typedef flit_t pkt_t[$];
  pkt_t expected [N][$];
  flit_t cur [N][$];

  initial begin
    #20000000; failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  for (genvar n = 0; n < N; n++) begin : g_ej
    always @(negedge clk) ej_ready[n] = random_ready ? (($urandom % 4) != 0) : 1'b1;
    always @(posedge clk) if (rst_n && ej_valid[n] && ej_ready[n]) begin
      if (cur[n].size() == 0) last_eject_time[n] = $time;
      cur[n].push_back(ej_data[n]);
      if (cur[n].size() >= 2 && cur[n].size() == 2 + int'(cur[n][1])) begin
        bit found;
        found = 0;
        for (int k = 0; k < expected[n].size(); k++)
          if (expected[n][k] == cur[n]) begin expected[n].delete(k); found = 1; break; end
        checks++;
        if (!found) begin failures++; $display("FAIL unexpected packet at node %0d", n); end
        recv_total++;
        cur[n] = {};
      end
    end
  end

  task automatic send(int src, int dx, int dy, int len, output int t_inj);
    pkt_t pk;
    pk.push_back(make_header('{x: COORD_W'(dx), y: COORD_W'(dy)}));
    pk.push_back(flit_t'(len));
    for (int i = 0; i < len; i++) pk.push_back({8'(src), 8'(sent_total), 16'($urandom)});
    expected[dy * NX + dx].push_back(pk);
    sent_total++;
    foreach (pk[i]) begin
      @(negedge clk);
      inj_valid[src] = 1; inj_data[src] = pk[i];
      do @(posedge clk); while (!inj_ready[src]);
      if (i == 0) t_inj = $time;
    end
    @(negedge clk); inj_valid[src] = 0;
  endtask

  initial begin
    int t;
    for (int n = 0; n < N; n++) begin inj_valid[n] = 0; inj_data[n] = 0; end
    repeat (3) @(posedge clk); rst_n = 1;
    for (int s = 0; s < N; s++) for (int d = 0; d < N; d++) begin
      int routers;
      routers = (s % NX > d % NX ? s % NX - d % NX : d % NX - s % NX) +
                (s / NX > d / NX ? s / NX - d / NX : d / NX - s / NX) + 1;
      send(s, d % NX, d / NX, 2, t);
      repeat (2 * routers + 6) @(posedge clk);
      check(expected[d].size() == 0, $sformatf("delivered %0d->%0d", s, d));
      check((last_eject_time[d] - t) / 10 == 2 * routers,
            $sformatf("latency %0d->%0d: %0d cycles for %0d routers", s, d, (last_eject_time[d] - t) / 10, routers));
    end
    random_ready = 1;
    for (int s = 0; s < N; s++) begin
      automatic int ss = s;
      fork
        begin
          int tt;
          for (int k = 0; k < 80; k++) send(ss, $urandom % NX, $urandom % NY, $urandom % 9, tt);
          senders_done++;
        end
      join_none
    end
    wait (senders_done == N);
    repeat (500) @(posedge clk);
    check(recv_total == sent_total, $sformatf("all delivered %0d/%0d", recv_total, sent_total));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
