// tb_network_interface: node clock 7 ns, NoC clock 5 ns. The three users
// (RMA-Reply, RMA-Send, message module) send random packets at once. On
// the NoC side every injected packet must be header (the user's target),
// size (the user's length), then the user's payload, unmixed with other
// packets. The NoC side loops each packet back into the ejection port with
// random stalls, and the NI must hand each payload, whole and with last on
// its final flit, to the user its command word names: requests to
// RMA-Reply, answers to RMA-Send, messages to the message module.
//
// Timing: the watchdog ends the run after 20,000,000 time units. The three
// users, the command-word steering and the shared FIFO pair are this
// design's reading of the document's network interface.
module tb_network_interface;
  import openscale_pkg::*;
  logic clk_node = 0, clk_noc = 0, rst_n = 0;
  logic u_tx_valid [3]; logic u_tx_ready [3]; flit_t u_tx_data [3]; logic u_tx_last [3];
  coord_t u_tx_dst [3]; logic [7:0] u_tx_len [3];
  logic u_rx_valid [3]; logic u_rx_ready [3]; flit_t u_rx_data; logic u_rx_last;
  logic inj_valid, inj_ready, ej_valid, ej_ready; flit_t inj_data, ej_data;
  int checks = 0, failures = 0;
  int sent = 0, recv = 0, done_users = 0;

  network_interface #(.AFIFO_DEPTH(8)) dut (.*);
  always #3.5 clk_node = ~clk_node;
  always #2.5 clk_noc = ~clk_noc;

  task automatic check(bit c, string what);
    checks++;
    if (!c) begin failures++; $display("FAIL %s at %0t", what, $time); end
  endtask

  initial begin
    #20000000; failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  typedef flit_t pkt_t[$];
  pkt_t exp_noc [$];          // packets expected on the NoC side (any order)
  pkt_t exp_user [3][$];      // payloads expected per user (any order)
  flit_t cur_noc [$];
  flit_t loop_q [$];
  flit_t cur_user [3][$];

  function automatic int user_of(pkt_kind_e k);
    if (k == PK_RD_REQ || k == PK_WR_REQ) return 0;
    if (k == PK_RD_RESP || k == PK_WR_ACK) return 1;
    return 2;
  endfunction

  task automatic user_send(int u, int npk);
    for (int n = 0; n < npk; n++) begin
      pkt_t pl; pkt_t full; pkt_cmd_t c; int len; coord_t d;
      pl = {}; full = {};
      len = 1 + $urandom % 10;
      d = '{x: 4'($urandom % 3), y: 4'($urandom % 3)};
      c = '0;
      case ($urandom % 5)
        0: c.kind = PK_RD_REQ;  1: c.kind = PK_WR_REQ; 2: c.kind = PK_RD_RESP;
        3: c.kind = PK_WR_ACK;  default: c.kind = PK_MSG;
      endcase
      c.len = 8'(len - 1); c.src = '{x: 4'(u), y: 4'(n % 16)};
      pl.push_back(flit_t'(c));
      for (int i = 1; i < len; i++) pl.push_back($urandom);
      full = {make_header(d), flit_t'(len)};
      foreach (pl[i]) full.push_back(pl[i]);
      exp_noc.push_back(full);
      exp_user[user_of(c.kind)].push_back(pl);
      sent++;
      @(negedge clk_node);
      u_tx_dst[u] = d; u_tx_len[u] = 8'(len);
      foreach (pl[i]) begin
        @(negedge clk_node);
        u_tx_valid[u] = 1; u_tx_data[u] = pl[i]; u_tx_last[u] = (i == pl.size() - 1);
        do @(posedge clk_node); while (!u_tx_ready[u]);
        @(negedge clk_node); u_tx_valid[u] = 0;
        if ($urandom % 3 == 0) @(negedge clk_node);
      end
    end
    done_users++;
  endtask

  // NoC side: check injected packets, loop them back
  always @(negedge clk_noc) begin
    inj_ready = ($urandom % 4 != 0);
    ej_valid  = loop_q.size() > 0 && ($urandom % 4 != 0);
    ej_data   = loop_q.size() > 0 ? loop_q[0] : '0;
  end
  always @(posedge clk_noc) if (rst_n) begin
    if (ej_valid && ej_ready) void'(loop_q.pop_front());
    if (inj_valid && inj_ready) begin
      cur_noc.push_back(inj_data);
      loop_q.push_back(inj_data);
      if (cur_noc.size() >= 2 && cur_noc.size() == 2 + int'(cur_noc[1])) begin
        bit found;
        found = 0;
        foreach (exp_noc[k]) if (exp_noc[k] == cur_noc) begin exp_noc.delete(k); found = 1; break; end
        checks++; if (!found) begin failures++; $display("FAIL injected packet not as sent"); end
        cur_noc = {};
      end
    end
  end

  // users' receive side
  for (genvar u = 0; u < 3; u++) begin : g_rx
    always @(negedge clk_node) u_rx_ready[u] = ($urandom % 3 != 0);
    always @(posedge clk_node) if (rst_n && u_rx_valid[u] && u_rx_ready[u]) begin
      cur_user[u].push_back(u_rx_data);
      if (u_rx_last) begin
        bit found;
        found = 0;
        foreach (exp_user[u][k]) if (exp_user[u][k] == cur_user[u]) begin exp_user[u].delete(k); found = 1; break; end
        checks++; if (!found) begin failures++; $display("FAIL user %0d got a payload not meant for it", u); end
        recv++;
        cur_user[u] = {};
      end
    end
  end

  initial begin
    for (int u = 0; u < 3; u++) begin u_tx_valid[u] = 0; u_tx_data[u] = 0; u_tx_last[u] = 0; u_tx_dst[u] = '0; u_tx_len[u] = 0; end
    #40 rst_n = 1;
    for (int u = 0; u < 3; u++) begin
      automatic int uu = u;
      fork user_send(uu, 100); join_none
    end
    wait (done_users == 3);
    #5000;
    check(recv == sent && exp_noc.size() == 0, $sformatf("all packets through: %0d of %0d", recv, sent));
    for (int u = 0; u < 3; u++) check(exp_user[u].size() == 0, "nothing left for a user");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
