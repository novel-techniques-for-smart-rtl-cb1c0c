// tb_dsm_mapper: the mapper between two caches, a RAM model and an RMA
// model. Checks: local line reads and writes move the right 8 words, in 9
// and 8 RAM cycles (done sampled 11 and 10 cycles after the request);
// the window registers read back; with window 0 (shared data at the host)
// and window 1 (remote code) enabled, lines inside a window go to the RMA
// with that window's node and address, lines outside stay local; both
// caches waiting at once are both served.
//
// Timing: 10-unit clock; watchdog after 500,000 cycles. The window registers
// and the local timing are this design's; the shared-area default
// 0x0000-0x1FFF follows the document's memory map.
module tb_dsm_mapper;
  import openscale_pkg::*;
  localparam int RAM_BYTES = 8192, RAW = $clog2(RAM_BYTES / 4);
  logic clk = 0, rst_n = 0;
  line_req_t creq [2]; line_rsp_t crsp [2];
  logic ram_en; logic [3:0] ram_we; logic [RAW-1:0] ram_addr; logic [31:0] ram_wdata, ram_rdata;
  logic rma_valid, rma_we, rma_done; coord_t rma_dst; logic [31:0] rma_addr; line_t rma_wdata, rma_rdata;
  wb_req_t wb_req; wb_rsp_t wb_rsp; logic evt_remote, evt_local;
  int checks = 0, failures = 0;
  int ram_cycles = 0, n_remote = 0;

  dsm_mapper #(.RAM_BYTES(RAM_BYTES)) dut (.*);
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

  // RAM model, one-cycle read
  logic [31:0] ram [RAM_BYTES / 4];
  always @(posedge clk) if (ram_en) begin
    ram_cycles++;
    ram_rdata <= ram[ram_addr];
    if (ram_we == 4'hF) ram[ram_addr] <= ram_wdata;
  end

  // RMA model: answers a read with a pattern made of node and address
  function automatic line_t remote_line(coord_t n, logic [31:0] a);
    line_t l;
    for (int w = 0; w < 8; w++) l[32*w +: 32] = {n, 8'hEE, a[15:0] + 16'(4 * w)};
    return l;
  endfunction
  coord_t last_dst; logic [31:0] last_addr; bit last_we; line_t last_wdata;
  always @(posedge clk) begin
    rma_done <= 1'b0;
    if (rma_valid && !rma_done) begin
      last_dst = rma_dst; last_addr = rma_addr; last_we = rma_we; last_wdata = rma_wdata;
      n_remote++;
      rma_rdata <= remote_line(rma_dst, rma_addr);
      rma_done  <= 1'b1;
    end
  end

  task automatic wb(input logic we, input logic [7:0] adr, input logic [31:0] dat, output logic [31:0] rd);
    @(negedge clk);
    wb_req = '{cyc: 1'b1, stb: 1'b1, we: we, adr: adr, dat: dat};
    do @(posedge clk); while (!wb_rsp.ack);
    #1 rd = wb_rsp.dat;
    @(negedge clk); wb_req = '0;
  endtask

  // one line request from cache c; returns the data and the cycle count
  task automatic line(int c, bit we, logic [31:0] a, line_t wd, output line_t rd, output int cyc);
    @(negedge clk);
    creq[c] = '{valid: 1'b1, we: we, addr: a, wdata: wd};
    cyc = 0;
    do begin @(posedge clk); cyc++; end while (!crsp[c].done);
    rd = crsp[c].rdata;
    @(negedge clk); creq[c] = '0;
  endtask

  function automatic line_t ram_line(logic [31:0] a);
    line_t l;
    for (int w = 0; w < 8; w++) l[32*w +: 32] = ram[a[RAW+1:2] + w];
    return l;
  endfunction

  initial begin
    logic [31:0] rd; line_t l, wl; int cyc;
    creq[0] = '0; creq[1] = '0; wb_req = '0; rma_rdata = '0;
    for (int i = 0; i < RAM_BYTES / 4; i++) ram[i] = $urandom;
    repeat (3) @(posedge clk); rst_n = 1;
    // reset window values
    wb(0, 8'h08, 0, rd); check(rd == 32'h1FFF, "window 0 default limit (shared area)");
    wb(0, 8'h00, 0, rd); check(rd[0] == 0, "window 0 disabled at reset");
    // local traffic
    for (int i = 0; i < 20; i++) begin
      logic [31:0] a; a = ($urandom % (RAM_BYTES / 32)) * 32;
      line(i % 2, 0, a, '0, l, cyc);
      check(l == ram_line(a), "local line read");
      check(cyc == 11, $sformatf("local read takes 11 cycles (%0d)", cyc));
      for (int w = 0; w < 8; w++) wl[32*w +: 32] = $urandom;
      line(1, 1, a, wl, l, cyc);
      check(ram_line(a) == wl, "local line write");
      check(cyc == 10, $sformatf("local write takes 10 cycles (%0d)", cyc));
    end
    check(n_remote == 0, "nothing remote while windows are off");
    // bonding: window 0 -> host (0,0) for 0x0000-0x1FFF; window 1 -> node (2,1) for 0x10000-0x10FFF
    wb(1, 8'h00, 32'h0001, rd);
    wb(1, 8'h0C, 32'h2101, rd);
    wb(1, 8'h10, 32'h0001_0000, rd);
    wb(1, 8'h14, 32'h0001_0FFF, rd);
    wb(0, 8'h0C, 0, rd); check(rd == 32'h2101, "window 1 control readback");
    wb(0, 8'h10, 0, rd); check(rd == 32'h0001_0000, "window 1 base readback");
    line(1, 0, 32'h0000_0100, '0, l, cyc);
    check(n_remote == 1 && last_dst == '{x: 0, y: 0} && last_addr == 32'h100 && !last_we, "shared read goes to host");
    check(l == remote_line('{x: 0, y: 0}, 32'h100), "remote line returned to cache");
    for (int w = 0; w < 8; w++) wl[32*w +: 32] = $urandom;
    line(1, 1, 32'h0000_1FE0, wl, l, cyc);
    check(n_remote == 2 && last_we && last_wdata == wl && last_addr == 32'h1FE0, "shared write-back goes to host");
    line(0, 0, 32'h0001_0040, '0, l, cyc);
    check(n_remote == 3 && last_dst == '{x: 2, y: 1} && l == remote_line('{x: 2, y: 1}, 32'h0001_0040), "code fetch goes to code node");
    line(0, 0, 32'h0000_2000, '0, l, cyc);
    check(n_remote == 3 && l == ram_line(32'h2000), "outside windows stays local");
    // both caches at once
    @(negedge clk);
    creq[0] = '{valid: 1'b1, we: 1'b0, addr: 32'h0000_0400, wdata: '0};
    creq[1] = '{valid: 1'b1, we: 1'b0, addr: 32'h0000_3000, wdata: '0};
    fork
      begin do @(posedge clk); while (!crsp[0].done); check(crsp[0].rdata == remote_line('{x: 0, y: 0}, 32'h400), "I side served"); @(negedge clk); creq[0] = '0; end
      begin do @(posedge clk); while (!crsp[1].done); check(crsp[1].rdata == ram_line(32'h3000), "D side served"); @(negedge clk); creq[1] = '0; end
    join
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
