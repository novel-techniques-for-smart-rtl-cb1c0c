// tb_rma_send: issues random line reads and writes to random nodes. The
// request packet payload must be {RD_REQ|WR_REQ, this node, 8}, the address
// and, for a write, the 8 words, with matching tx_dst/tx_len/tx_last. A
// model remote node then answers (after a random delay, with random gaps):
// done must pulse only after the whole answer, and a read must return the
// answered words.
//
// Timing: 10-unit clock; watchdog after 500,000 cycles. Line-sized requests
// follow the document; the write acknowledgement is this design's choice.
module tb_rma_send;
  import openscale_pkg::*;
  logic clk = 0, rst_n = 0;
  coord_t my_xy = '{x: 2, y: 0};
  logic req_valid, req_we, done; coord_t req_dst; logic [31:0] req_addr; line_t req_wdata, rdata;
  logic tx_valid, tx_ready, tx_last; flit_t tx_data; coord_t tx_dst; logic [7:0] tx_len;
  logic rx_valid, rx_ready, rx_last; flit_t rx_data;
  int checks = 0, failures = 0;

  rma_send dut (.*);
  always #5 clk = ~clk;

  task automatic check(bit c, string what);
    checks++;
    if (!c) begin failures++; $display("FAIL %s at %0t", what, $time); end
  endtask

  function automatic pkt_cmd_t as_cmd(flit_t f);
    return pkt_cmd_t'(f);
  endfunction

  initial begin
    #5000000; failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(negedge clk) tx_ready = ($urandom % 3 != 0);

  initial begin
    req_valid = 0; req_we = 0; req_dst = '0; req_addr = 0; req_wdata = '0;
    rx_valid = 0; rx_data = 0; rx_last = 0;
    repeat (3) @(posedge clk); rst_n = 1;
    for (int it = 0; it < 300; it++) begin
      flit_t pk[$]; line_t ans; int n_done;
      pk = {};
      @(negedge clk);
      req_valid = 1; req_we = $urandom % 2;
      req_dst = '{x: 4'($urandom % 3), y: 4'($urandom % 3)};
      req_addr = ($urandom % 4096) * 32;
      for (int w = 0; w < 8; w++) begin req_wdata[32*w +: 32] = $urandom; ans[32*w +: 32] = $urandom; end
      // capture the request packet
      forever begin
        @(posedge clk);
        if (tx_valid && tx_ready) begin
          check(tx_dst == req_dst && tx_len == (req_we ? 10 : 2), "tx_dst / tx_len");
          pk.push_back(tx_data);
          if (tx_last) break;
        end
      end
      check(pk.size() == (req_we ? 10 : 2), "request length");
      check(as_cmd(pk[0]).kind == (req_we ? PK_WR_REQ : PK_RD_REQ) && as_cmd(pk[0]).src == my_xy &&
            as_cmd(pk[0]).len == 8, "command word");
      check(pk[1] == req_addr, "address flit");
      if (req_we) for (int w = 0; w < 8; w++) check(pk[2 + w] == req_wdata[32*w +: 32], "write data");
      // answer
      n_done = 0;
      fork
        begin
          flit_t a[$]; pkt_cmd_t c;
          c = '0; c.kind = req_we ? PK_WR_ACK : PK_RD_RESP; c.src = req_dst; c.len = req_we ? 0 : 8;
          a = {flit_t'(c)};
          if (!req_we) for (int w = 0; w < 8; w++) a.push_back(ans[32*w +: 32]);
          repeat ($urandom % 20) @(negedge clk);
          foreach (a[i]) begin
            @(negedge clk);
            rx_valid = 1; rx_data = a[i]; rx_last = (i == a.size() - 1);
            do @(posedge clk); while (!rx_ready);
            @(negedge clk); rx_valid = 0;
            if (i != a.size() - 1) check(n_done == 0, "no done before the answer is complete");
            if ($urandom % 2) @(negedge clk);
          end
        end
        begin
          do begin @(posedge clk); if (done) n_done++; end while (!done);
          if (!req_we) check(rdata == ans, "read line returned");
          @(negedge clk); req_valid = 0;
        end
      join
      check(n_done == 1, "single done pulse");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
