// tb_pe_node: one node at (0,0) whose router Local port is looped back to
// itself, so its remote memory path can be exercised alone. A CPU model
// drives the instruction and data ports. Checks: cached reads and writes to
// local RAM; flush and invalidate; a shared-memory window pointed at this
// node sends line fills and write-backs through RMA-Send, the NI, the loop
// and RMA-Reply to RAM (results checked after turning the window off);
// instruction fetch through the code window; a message sent to itself with
// its interrupt; the timer interrupt through the interrupt controller; and
// the DFS unit halving the node clock.
//
// Timing: 10-unit reference clock; watchdog after 2,000,000 cycles. The node
// runs with 1 kB caches to keep the run short.
//
// The node components follow the document's node figure; the address map,
// register layouts and the loop-back set-up are this design's and this
// test's own.
module tb_pe_node;
  import openscale_pkg::*;
  logic clk = 0, rst_n = 0, clk_cpu;
  logic i_req, i_ack; logic [31:0] i_addr, i_rdata;
  logic d_req, d_ack; cache_op_e d_op; logic [31:0] d_addr, d_wdata, d_rdata; logic [3:0] d_wstrb;
  logic cpu_irq;
  logic inj_valid, inj_ready, ej_valid, ej_ready; flit_t inj_data, ej_data;
  node_evt_t evt; logic [4:0] dfs_k;
  int checks = 0, failures = 0;
  int n_remote = 0, n_served = 0, n_imiss = 0;

  pe_node #(.MY_X(0), .MY_Y(0), .ICACHE_BYTES(1024), .DCACHE_BYTES(1024), .RAM_BYTES(131072)) dut (.clk_ref(clk), .*);
  always #5 clk = ~clk;

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

  // loopback of the Local port through a 4-flit buffer, as a router would
  flit_fifo #(.WIDTH(32), .DEPTH(4)) u_loop (
    .clk, .rst_n, .in_valid(inj_valid), .in_ready(inj_ready), .in_data(inj_data),
    .out_valid(ej_valid), .out_ready(ej_ready), .out_data(ej_data), .count());

  always @(posedge clk_cpu) begin
    if (evt.remote_line) n_remote++;
    if (evt.rma_served)  n_served++;
    if (evt.imiss)       n_imiss++;
  end

  task automatic dacc(cache_op_e op, logic [31:0] a, logic [31:0] wd, output logic [31:0] rd, output int cyc);
    @(negedge clk_cpu);
    d_req = 1; d_op = op; d_addr = a; d_wdata = wd; d_wstrb = 4'hF;
    cyc = 0; #1;
    while (!d_ack) begin @(negedge clk_cpu); cyc++; end
    rd = d_rdata;
    @(posedge clk_cpu); @(negedge clk_cpu); d_req = 0;
  endtask

  task automatic fetch(logic [31:0] a, output logic [31:0] rd, output int cyc);
    @(negedge clk_cpu);
    i_req = 1; i_addr = a; cyc = 0; #1;
    while (!i_ack) begin @(negedge clk_cpu); cyc++; end
    rd = i_rdata;
    @(posedge clk_cpu); @(negedge clk_cpu); i_req = 0;
  endtask

  localparam logic [31:0] TMR = 32'h8000_0000, IRQ = 32'h8000_0100, DFS = 32'h8000_0200,
                          MSG = 32'h8000_0300, MAP = 32'h8000_0400;

  initial begin
    logic [31:0] rd; int cyc, p0;
    i_req = 0; i_addr = 0; d_req = 0; d_op = OP_READ; d_addr = 0; d_wdata = 0; d_wstrb = 0;
    repeat (3) @(posedge clk); rst_n = 1;
    repeat (3) @(posedge clk);
    // ---- local cached memory ----
    for (int i = 0; i < 64; i++) dacc(OP_WRITE, 32'h2000 + 4 * i, 32'hD000_0000 + i, rd, cyc);
    for (int i = 0; i < 64; i++) begin
      dacc(OP_READ, 32'h2000 + 4 * i, 0, rd, cyc);
      check(rd == 32'hD000_0000 + i, "local read after write");
    end
    dacc(OP_READ, 32'h2000, 0, rd, cyc);
    check(cyc == 0, $sformatf("hit without wait (%0d)", cyc));
    for (int i = 0; i < 8; i++) dacc(OP_FLUSH, 32'h2000 + 32 * i, 0, rd, cyc);
    for (int i = 0; i < 8; i++) dacc(OP_INVAL, 32'h2000 + 32 * i, 0, rd, cyc);
    dacc(OP_READ, 32'h2004, 0, rd, cyc);
    check(rd == 32'hD000_0001 && cyc > 5, "refetched from RAM after flush and invalidate");
    // ---- shared window pointing at this node: goes round through the RMA ----
    dacc(OP_WRITE, MAP + 32'h00, 32'h0000_0001, rd, cyc);      // window 0 on, node (0,0)
    for (int i = 0; i < 16; i++) dacc(OP_WRITE, 32'h0100 + 4 * i, 32'h5A00_0000 + i, rd, cyc);
    check(n_remote >= 2, "shared lines fetched remotely");
    dacc(OP_FLUSH, 32'h0100, 0, rd, cyc);
    dacc(OP_FLUSH, 32'h0120, 0, rd, cyc);
    check(n_served >= 4, "RMA-Reply served fills and write-backs");
    dacc(OP_INVAL, 32'h0100, 0, rd, cyc);
    p0 = n_remote;
    dacc(OP_READ, 32'h0108, 0, rd, cyc);
    check(rd == 32'h5A00_0002 && n_remote == p0 + 1, "remote refill returns flushed data");
    $display("remote line fill: %0d node cycles", cyc);
    dacc(OP_WRITE, MAP + 32'h00, 32'h0000_0000, rd, cyc);      // window off
    dacc(OP_INVAL, 32'h0120, 0, rd, cyc);
    dacc(OP_READ, 32'h0124, 0, rd, cyc);
    check(rd == 32'h5A00_0009, "write-back landed in RAM");
    // ---- instruction fetch, local then through the code window ----
    for (int i = 0; i < 8; i++) dacc(OP_WRITE, 32'h1_0000 + 4 * i, 32'h1234_0000 + i, rd, cyc);
    dacc(OP_FLUSH, 32'h1_0000, 0, rd, cyc);
    fetch(32'h1_0004, rd, cyc);
    check(rd == 32'h1234_0001, "instruction fetched");
    dacc(OP_WRITE, MAP + 32'h10, 32'h0001_0000, rd, cyc);
    dacc(OP_WRITE, MAP + 32'h14, 32'h0001_FFFF, rd, cyc);
    dacc(OP_WRITE, MAP + 32'h0C, 32'h0000_0001, rd, cyc);
    p0 = n_remote;
    fetch(32'h1_0104, rd, cyc);
    check(n_remote == p0 + 1 && n_imiss > 0, "code window fetch is remote");
    fetch(32'h1_0000, rd, cyc);
    check(rd == 32'h1234_0000, "cached instruction kept");
    // ---- message to itself ----
    dacc(OP_WRITE, IRQ + 32'h04, 32'h3, rd, cyc);              // enable both sources
    dacc(OP_WRITE, MSG + 32'h00, 32'hCAFE_0001, rd, cyc);
    dacc(OP_WRITE, MSG + 32'h00, 32'hCAFE_0002, rd, cyc);
    dacc(OP_WRITE, MSG + 32'h04, 32'h0000_0000, rd, cyc);      // to (0,0)
    repeat (60) @(posedge clk_cpu);
    check(cpu_irq, "message interrupt");
    dacc(OP_READ, IRQ + 32'h08, 0, rd, cyc); check(rd[1], "message source active");
    dacc(OP_READ, MSG + 32'h08, 0, rd, cyc);
    check(rd[31:28] == 4'(PK_MSG) && rd[7:0] == 8'd2, "message command word");
    dacc(OP_READ, MSG + 32'h08, 0, rd, cyc); check(rd == 32'hCAFE_0001, "message word 1");
    dacc(OP_READ, MSG + 32'h08, 0, rd, cyc); check(rd == 32'hCAFE_0002, "message word 2");
    dacc(OP_WRITE, IRQ + 32'h00, 32'h3, rd, cyc);
    check(!cpu_irq, "interrupt cleared");
    // ---- timer ----
    dacc(OP_WRITE, TMR + 32'h04, 32'd50, rd, cyc);
    dacc(OP_WRITE, TMR + 32'h00, 32'h3, rd, cyc);
    repeat (60) @(posedge clk_cpu);
    check(cpu_irq, "timer interrupt");
    dacc(OP_READ, IRQ + 32'h00, 0, rd, cyc); check(rd[0], "timer source pending");
    // ---- DFS: half frequency ----
    dacc(OP_WRITE, DFS + 32'h00, 32'd8, rd, cyc);
    repeat (20) @(posedge clk);
    check(dfs_k == 8, "DFS setting taken");
    begin
      int n0; n0 = 0;
      fork
        repeat (160) @(posedge clk);
        forever begin @(posedge clk_cpu); n0++; end
      join_any
      disable fork;
      check(n0 == 80, $sformatf("node clock at half rate: %0d pulses in 160", n0));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
