// tb_msg_module: sends messages of 0 to 16 words to random nodes through the
// register interface and checks the packet payload ({MSG, this node, n}
// then the words) with tx_dst/tx_len/tx_last under random back-pressure.
// Feeds received messages into the RX side and checks RXDATA pops them in
// order, STATUS counts, the interrupt, and that a full RX FIFO stalls the
// stream instead of dropping words.
//
// Timing: 10-unit clock; watchdog after 500,000 cycles. The register map and
// FIFO depths are this design's; the document gives the message module only
// as a block beside the RMA.
module tb_msg_module;
  import openscale_pkg::*;
  logic clk = 0, rst_n = 0;
  coord_t my_xy = '{x: 0, y: 1};
  wb_req_t wb_req; wb_rsp_t wb_rsp; logic irq;
  logic tx_valid, tx_ready, tx_last; flit_t tx_data; coord_t tx_dst; logic [7:0] tx_len;
  logic rx_valid, rx_ready, rx_last; flit_t rx_data;
  int checks = 0, failures = 0;

  msg_module #(.TX_DEPTH(16), .RX_DEPTH(16)) dut (.*);
  always #5 clk = ~clk;

  task automatic check(bit c, string what);
    checks++;
    if (!c) begin failures++; $display("FAIL %s at %0t", what, $time); end
  endtask

  function automatic pkt_cmd_t as_cmd(flit_t f);
    return pkt_cmd_t'(f);
  endfunction

  task automatic wb(input logic we, input logic [7:0] adr, input logic [31:0] dat, output logic [31:0] rd);
    @(negedge clk);
    wb_req = '{cyc: 1'b1, stb: 1'b1, we: we, adr: adr, dat: dat};
    do @(posedge clk); while (!wb_rsp.ack);
    #1 rd = wb_rsp.dat;
    @(negedge clk); wb_req = '0;
  endtask

  initial begin
    #5000000; failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(negedge clk) tx_ready = ($urandom % 3 != 0);

  initial begin
    logic [31:0] rd;
    wb_req = '0; rx_valid = 0; rx_data = 0; rx_last = 0;
    repeat (3) @(posedge clk); rst_n = 1;
    // ---- sending ----
    for (int it = 0; it < 100; it++) begin
      int n; logic [31:0] w[$]; flit_t pk[$]; coord_t d;
      n = $urandom % 17; w = {}; pk = {};
      d = '{x: 4'($urandom % 3), y: 4'($urandom % 3)};
      for (int i = 0; i < n; i++) begin w.push_back($urandom); wb(1, 8'h00, w[i], rd); end
      wb(0, 8'h0C, 0, rd); check(rd[15:8] == n, "TX count");
      fork
        wb(1, 8'h04, 32'(d), rd);
        forever begin
          @(posedge clk);
          if (tx_valid && tx_ready) begin
            check(tx_dst == d && tx_len == 8'(n + 1), $sformatf("tx_dst / tx_len %0d n=%0d", tx_len, n));
            pk.push_back(tx_data);
            if (tx_last) break;
          end
        end
      join
      check(pk.size() == n + 1, "packet length");
      check(as_cmd(pk[0]).kind == PK_MSG && as_cmd(pk[0]).src == my_xy && as_cmd(pk[0]).len == n, "command word");
      for (int i = 0; i < n; i++) check(pk[1 + i] == w[i], $sformatf("payload word %0d of %0d it=%0d: %h vs %h", i, n, it, pk[1+i], w[i]));
      @(negedge clk);
      wb(0, 8'h0C, 0, rd); check(rd[16] == 0 && rd[15:8] == 0, "idle after send");
    end
    // ---- receiving ----
    check(!irq, "no interrupt while empty");
    for (int it = 0; it < 50; it++) begin
      int n; flit_t m[$]; pkt_cmd_t c; int stalled;
      n = 1 + $urandom % 15; m = {};
      c = '0; c.kind = PK_MSG; c.src = '{x: 2, y: 2}; c.len = 8'(n);
      m.push_back(flit_t'(c));
      for (int i = 0; i < n; i++) m.push_back($urandom);
      foreach (m[i]) begin
        @(negedge clk); rx_valid = 1; rx_data = m[i]; rx_last = (i == m.size() - 1);
        do @(posedge clk); while (!rx_ready);
      end
      @(negedge clk); rx_valid = 0;
      check(irq, "interrupt on message");
      wb(0, 8'h0C, 0, rd); check(rd[7:0] == n + 1, "RX count");
      foreach (m[i]) begin wb(0, 8'h08, 0, rd); check(rd == m[i], "RXDATA order"); end
      check(!irq, "interrupt drops when drained");
      // overfill: 20 words offered, only 16 fit until the CPU reads
      if (it == 49) begin
        stalled = 0;
        fork
          for (int i = 0; i < 20; i++) begin
            @(negedge clk); rx_valid = 1; rx_data = 32'h5000 + i; rx_last = 0;
            do begin @(posedge clk); if (!rx_ready) stalled++; end while (!rx_ready);
          end
          begin
            repeat (40) @(posedge clk);
            for (int i = 0; i < 20; i++) begin wb(0, 8'h08, 0, rd); check(rd == 32'h5000 + i, "no word lost when full"); end
          end
        join
        @(negedge clk); rx_valid = 0;
        check(stalled > 10, "stream stalled while full");
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
