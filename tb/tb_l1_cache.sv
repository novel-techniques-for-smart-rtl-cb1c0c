// tb_l1_cache: a 256-byte cache (8 lines of 8 words) over a 4 kB backing
// memory model that answers line requests after a random delay. Random
// reads, byte-masked writes, flushes and invalidates are checked against a
// reference model of a direct-mapped write-back cache kept here: read data,
// which line requests go to memory (fills and write-backs, with their
// addresses and data), that hits are acknowledged in the request cycle,
// and that flush/invalidate leave lines alone when the tag differs.
//
// Timing: 10-unit clock; watchdog after 2,000,000 cycles. Eight words per
// line and the tag-matched flush/invalidate rule follow the document; the
// organisation (direct-mapped, write-back) is this design's.
module tb_l1_cache;
  import openscale_pkg::*;
  localparam int SIZE = 256, LINES = SIZE / 32, MEMW = 1024;
  logic clk = 0, rst_n = 0;
  logic cpu_req; cache_op_e cpu_op; logic [31:0] cpu_addr, cpu_wdata, cpu_rdata; logic [3:0] cpu_wstrb;
  logic cpu_ack; line_req_t mreq; line_rsp_t mrsp; logic evt_miss, evt_writeback;
  int checks = 0, failures = 0;
  int n_fill = 0, n_wb = 0, n_hit = 0, n_flush_wb = 0, n_inval = 0;

  l1_cache #(.SIZE_BYTES(SIZE)) dut (.*);
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

  // backing memory and the expected next memory request
  logic [31:0] mem [MEMW];
  bit exp_valid; bit exp_we; logic [31:0] exp_addr; line_t exp_data;
  bit mem_seen;

  always @(posedge clk) begin
    mrsp.done <= 1'b0;
    if (rst_n && mreq.valid && !mrsp.done && !mem_seen) begin
      mem_seen = 1;
      check(exp_valid && mreq.we == exp_we && mreq.addr == exp_addr, $sformatf("memory request kind/address ev=%0d we=%0d/%0d a=%h/%h", exp_valid, mreq.we, exp_we, mreq.addr, exp_addr));
      if (mreq.we) check(mreq.wdata == exp_data, "write-back data");
      fork begin
        repeat ($urandom % 5) @(posedge clk);
        if (mreq.we) for (int w = 0; w < 8; w++) mem[mreq.addr[11:2] + w] = mreq.wdata[32*w +: 32];
        for (int w = 0; w < 8; w++) mrsp.rdata[32*w +: 32] <= mem[mreq.addr[11:2] + w];
        mrsp.done <= 1'b1;
        @(posedge clk); mem_seen = 0;
      end join_none
    end
  end

  // reference cache
  bit          rv [LINES]; bit rd [LINES]; int rtag [LINES];
  logic [31:0] rdat [LINES][8];

  function automatic logic [31:0] merge(logic [31:0] o, logic [31:0] d, logic [3:0] s);
    for (int b = 0; b < 4; b++) if (s[b]) o[8*b +: 8] = d[8*b +: 8];
    return o;
  endfunction

  task automatic expect_mem(bit we, logic [31:0] a, int idx);
    exp_valid = 1; exp_we = we; exp_addr = a;
    for (int w = 0; w < 8; w++) exp_data[32*w +: 32] = rdat[idx][w];
  endtask

  task automatic access(cache_op_e op, logic [31:0] a, logic [31:0] d, logic [3:0] s);
    int idx, tag, w; bit hit; int cycles;
    idx = (a >> 5) % LINES; tag = a >> 8; w = (a >> 2) % 8;
    hit = rv[idx] && rtag[idx] == tag;
    @(negedge clk);
    cpu_req = 1; cpu_op = op; cpu_addr = a; cpu_wdata = d; cpu_wstrb = s;
    // what the cache must do to memory first
    if ((op == OP_READ || op == OP_WRITE) && !hit) begin
      if (rv[idx] && rd[idx]) begin
        expect_mem(1, (rtag[idx] << 8) | (idx << 5), idx);
        do @(posedge clk); while (!mrsp.done); @(negedge clk); n_wb++;
      end
      expect_mem(0, a & ~32'h1F, idx);
      do @(posedge clk); while (!mrsp.done); @(negedge clk); n_fill++;
      rv[idx] = 1; rd[idx] = 0; rtag[idx] = tag;
      for (int k = 0; k < 8; k++) rdat[idx][k] = mem[(a & ~32'h1F) / 4 + k];
    end else if (op == OP_FLUSH && hit && rd[idx]) begin
      expect_mem(1, (rtag[idx] << 8) | (idx << 5), idx);
      do @(posedge clk); while (!mrsp.done); @(negedge clk); n_flush_wb++;
      rd[idx] = 0;
    end else begin
      n_hit++;
      #1 check(cpu_ack, "zero-wait acknowledge");
    end
    exp_valid = 0;
    cycles = 0;
    while (!cpu_ack) begin @(negedge clk); cycles++; check(cycles < 4, "ack after memory"); end
    if (op == OP_READ)  check(cpu_rdata == rdat[idx][w], $sformatf("read %h got %h exp %h", a, cpu_rdata, rdat[idx][w]));
    if (op == OP_WRITE) begin rdat[idx][w] = merge(rdat[idx][w], d, s); rd[idx] = 1; end
    if (op == OP_INVAL && hit) begin rv[idx] = 0; n_inval++; end
    @(posedge clk); @(negedge clk); cpu_req = 0;
  endtask

  initial begin
    cpu_req = 0; cpu_op = OP_READ; cpu_addr = 0; cpu_wdata = 0; cpu_wstrb = 0;
    mrsp = '0; exp_valid = 0; mem_seen = 0;
    for (int i = 0; i < MEMW; i++) mem[i] = 32'hC000_0000 | i;
    for (int i = 0; i < LINES; i++) begin rv[i] = 0; rd[i] = 0; end
    repeat (3) @(posedge clk); rst_n = 1;
    // directed: write, flush of a different tag does nothing, flush writes back
    access(OP_WRITE, 32'h040, 32'h1111_2222, 4'hF);
    access(OP_FLUSH, 32'h140, 0, 0);               // same index, other tag
    check(mem[32'h040 / 4] == 32'hC000_0010, "no write-back on tag mismatch");
    access(OP_FLUSH, 32'h040, 0, 0);
    check(mem[32'h040 / 4] == 32'h1111_2222, "flush wrote back");
    access(OP_INVAL, 32'h040, 0, 0);
    access(OP_READ, 32'h040, 0, 0);                // refetched from memory
    // random mix
    for (int i = 0; i < 4000; i++) begin
      int r; logic [31:0] a;
      r = $urandom % 10;
      a = (($urandom % 2) ? ($urandom % 128) : ($urandom % MEMW)) * 4;
      if (r < 4)      access(OP_READ, a, 0, 0);
      else if (r < 8) access(OP_WRITE, a, $urandom, 4'($urandom));
      else if (r < 9) access(OP_FLUSH, a, 0, 0);
      else            access(OP_INVAL, a, 0, 0);
    end
    check(n_fill > 100 && n_wb > 50 && n_flush_wb > 20 && n_inval > 20 && n_hit > 500,
          $sformatf("coverage fill %0d wb %0d flush %0d inval %0d hit %0d", n_fill, n_wb, n_flush_wb, n_inval, n_hit));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
