// tb_hermes_router: router at (1,1). All five inputs send random packets
// (random target in a 3x3 mesh, 0 to 6 payload flits) while the outputs are
// randomly back-pressured. Each output's flit stream is cut into packets,
// which must match, whole and uninterleaved, packets sent to a target that
// the XY rule (worked out here independently) sends through that output.
// A lone packet first checks the zero-load timing: its header leaves two
// cycles after it is offered, and the rest follows one flit per cycle.
//
// Timing: 10-unit clock; watchdog after 500,000 cycles. XY routing and
// wormhole locking follow the document; the packet format, the handshake and
// the 2-cycle router latency are this design's.
module tb_hermes_router;
  import openscale_pkg::*;
  logic clk = 0, rst_n = 0;
  logic  in_valid [NPORTS]; logic in_ready [NPORTS]; flit_t in_data [NPORTS];
  logic  out_valid[NPORTS]; logic out_ready[NPORTS]; flit_t out_data[NPORTS];
  int checks = 0, failures = 0;
  bit random_ready = 0;

  hermes_router #(.MY_X(1), .MY_Y(1), .BUF_DEPTH(4)) dut (.*);
  always #5 clk = ~clk;

  task automatic check(bit c, string what);
    checks++;
    if (!c) begin failures++; $display("FAIL %s at %0t", what, $time); end
  endtask

  typedef flit_t pkt_t[$];
  pkt_t expected [NPORTS][$];
  flit_t cur [NPORTS][$];
  int got [NPORTS];
  int sent_total = 0, recv_total = 0;
  int senders_done = 0;

  function automatic bit same(pkt_t a, pkt_t b);
    if (a.size() != b.size()) return 0;
    foreach (a[i]) if (a[i] != b[i]) return 0;
    return 1;
  endfunction

  function automatic int route_of(int x, int y);
    if (x > 1) return 0;       // East
    if (x < 1) return 1;       // West
    if (y < 1) return 2;       // North (y grows southwards)
    if (y > 1) return 3;       // South
    return 4;                  // Local
  endfunction

  initial begin
    #5000000; failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // output collectors
  for (genvar o = 0; o < NPORTS; o++) begin : g_out
    always @(negedge clk) out_ready[o] = random_ready ? (($urandom % 3) != 0) : 1'b1;
    always @(posedge clk) if (rst_n && out_valid[o] && out_ready[o]) begin
      cur[o].push_back(out_data[o]);
      if (cur[o].size() >= 2 && cur[o].size() == 2 + int'(cur[o][1])) begin
        bit found;
        found = 0;
        for (int k = 0; k < expected[o].size(); k++) begin
          if (same(expected[o][k], cur[o])) begin
            expected[o].delete(k); found = 1; break;
          end
        end
        checks++;
        if (!found) begin failures++; $display("FAIL unexpected packet on port %0d", o); end
        recv_total++;
        cur[o] = {};
      end
    end
  end

  task automatic send(int p, int x, int y, int len);
    pkt_t pk;
    pk.push_back(make_header('{x: COORD_W'(x), y: COORD_W'(y)}));
    pk.push_back(flit_t'(len));
    for (int i = 0; i < len; i++) pk.push_back({8'(p), 8'(sent_total), 16'($urandom)});
    expected[route_of(x, y)].push_back(pk);
    sent_total++;
    foreach (pk[i]) begin
      @(negedge clk);
      in_valid[p] = 1; in_data[p] = pk[i];
      do @(posedge clk); while (!in_ready[p]);
    end
    @(negedge clk); in_valid[p] = 0;
  endtask

  initial begin
    int t0;
    for (int p = 0; p < NPORTS; p++) begin in_valid[p] = 0; in_data[p] = 0; end
    repeat (3) @(posedge clk); rst_n = 1;
    // zero-load timing: Local -> East, 3 payload flits
    fork
      send(4, 2, 1, 3);
      begin
        @(posedge clk); t0 = $time;          // edge that writes the header
        wait (out_valid[0]); @(posedge clk);
        check(($time - t0) / 10 == 2, $sformatf("header latency %0d cycles", ($time - t0) / 10));
        repeat (4) @(posedge clk);
        #1 check(expected[0].size() == 0, "packet streamed at one flit per cycle");
      end
    join
    // random traffic on all inputs at once
    random_ready = 1;
    for (int p = 0; p < NPORTS; p++) begin
      automatic int pp = p;
      fork
        begin
          for (int n = 0; n < 150; n++) send(pp, $urandom % 3, $urandom % 3, $urandom % 7);
          senders_done++;
        end
      join_none
    end
    wait (senders_done == NPORTS);
    repeat (200) @(posedge clk);
    check(recv_total == sent_total, $sformatf("all packets delivered %0d/%0d", recv_total, sent_total));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
