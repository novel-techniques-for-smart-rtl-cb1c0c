// tb_rma_reply: sends random read and write requests (from random requester
// nodes, with random gaps) into the answering RMA unit, which works on a RAM
// model, with random back-pressure on its answers. A read must answer
// RD_RESP to the requester with the addressed words; a write must update
// the RAM and answer WR_ACK. Also checks that an 8-word read is answered
// (first answer flit offered) 11 cycles after its address flit.
//
// Timing: 10-unit clock; watchdog after 500,000 cycles. The request/answer
// packet formats and the answer timing are this design's; the document gives
// the unit's function.
module tb_rma_reply;
  import openscale_pkg::*;
  localparam int RAM_BYTES = 8192, RAW = $clog2(RAM_BYTES / 4);
  logic clk = 0, rst_n = 0;
  coord_t my_xy = '{x: 1, y: 2};
  logic rx_valid, rx_ready, rx_last; flit_t rx_data;
  logic tx_valid, tx_ready, tx_last; flit_t tx_data; coord_t tx_dst; logic [7:0] tx_len;
  logic ram_en; logic [3:0] ram_we; logic [RAW-1:0] ram_addr; logic [31:0] ram_wdata, ram_rdata;
  logic evt_served;
  int checks = 0, failures = 0;
  bit rand_ready = 0;

  rma_reply #(.RAM_BYTES(RAM_BYTES)) dut (.*);
  always #5 clk = ~clk;

  task automatic check(bit c, string what);
    checks++;
    if (!c) begin failures++; $display("FAIL %s at %0t", what, $time); end
  endtask

  initial begin
    #5000000; failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  logic [31:0] ram [RAM_BYTES / 4];
  always @(posedge clk) if (ram_en) begin
    ram_rdata <= ram[ram_addr];
    if (ram_we == 4'hF) ram[ram_addr] <= ram_wdata;
  end

  always @(negedge clk) tx_ready = rand_ready ? ($urandom % 3 != 0) : 1'b1;

  function automatic pkt_cmd_t as_cmd(flit_t f);
    return pkt_cmd_t'(f);
  endfunction

  // collect one answer
  task automatic get_answer(output flit_t f[$], output coord_t dst, output int t_first);
    f = {};
    forever begin
      @(posedge clk);
      if (tx_valid && tx_ready) begin
        if (f.size() == 0) begin t_first = $time; dst = tx_dst; end
        f.push_back(tx_data);
        check(tx_len == 8'(1 + int'(as_cmd(f[0]).len)), "tx_len");
        if (tx_last) break;
      end
    end
  endtask

  task automatic put(flit_t f[$]);
    foreach (f[i]) begin
      @(negedge clk);
      if (rand_ready) repeat ($urandom % 2) @(negedge clk);
      rx_valid = 1; rx_data = f[i]; rx_last = (i == f.size() - 1);
      do @(posedge clk); while (!rx_ready);
      @(negedge clk); rx_valid = 0;
    end
  endtask

  initial begin
    rx_valid = 0; rx_data = 0; rx_last = 0;
    for (int i = 0; i < RAM_BYTES / 4; i++) ram[i] = $urandom;
    repeat (3) @(posedge clk); rst_n = 1;
    for (int it = 0; it < 300; it++) begin
      flit_t req[$], ans[$]; pkt_cmd_t c; coord_t src, dst; logic [31:0] a; int t_addr, t_first;
      bit wr; logic [31:0] words [8];
      if (it == 5) rand_ready = 1;
      wr = $urandom % 2;
      src = '{x: 4'($urandom % 3), y: 4'($urandom % 3)};
      a = ($urandom % (RAM_BYTES / 32)) * 32;
      c = '0; c.kind = wr ? PK_WR_REQ : PK_RD_REQ; c.src = src; c.len = 8;
      req = {flit_t'(c), a};
      if (wr) for (int w = 0; w < 8; w++) begin words[w] = $urandom; req.push_back(words[w]); end
      fork
        put(req);
        begin
          wait (rx_valid && rx_ready && rx_data == a);
          @(posedge clk); t_addr = $time;
        end
        get_answer(ans, dst, t_first);
      join
      check(dst == src, "answer goes to requester");
      if (wr) begin
        check(ans.size() == 1 && as_cmd(ans[0]).kind == PK_WR_ACK, "write acknowledged");
        for (int w = 0; w < 8; w++) check(ram[a / 4 + w] == words[w], "RAM written");
      end else begin
        check(ans.size() == 9 && as_cmd(ans[0]).kind == PK_RD_RESP, "read answered");
        check(as_cmd(ans[0]).src == my_xy, "answer names this node");
        for (int w = 0; w < 8; w++) check(ans[1 + w] == ram[a / 4 + w], "read data");
        if (!rand_ready) check((t_first - t_addr) / 10 == 10, $sformatf("read turnaround %0d", (t_first - t_addr) / 10));
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
