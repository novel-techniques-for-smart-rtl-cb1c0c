// tb_workload_threads: the instruction traffic of the four benchmark
// threads, run on the full 3x3 core at its default sizes. The thread code
// sizes are those of the benchmark table: MJPEG 52 kB, SmithWaterman
// 3.8 kB, LU 2.4 kB and FFT 5 kB. The host node (0,0) holds each thread's
// code in its RAM (loaded through a backdoor before the run). For each
// benchmark in turn, the eight other nodes point their code window at the
// host and run two passes over the thread's code, fetching one word of every
// line, as a loop body that walks its whole code would. The CPUs are
// bus-functional models; what runs is the memory traffic of the threads, not
// their computation.
//
// Checks, per benchmark and worker: every fetched word is the host's code
// word; the first pass misses on every line; the second pass hits on every
// line when the code fits the 16 kB instruction cache and misses on every
// line when it does not (MJPEG, 52 kB, in a direct-mapped 16 kB cache).
// Reported: the cycles each benchmark's fetch phase took and the resulting
// bandwidth out of the host's memory, in MB/s at a 500 MHz NoC clock, to
// compare with the host's line-serving capacity.
//
// Timing: 2-unit NoC clock; watchdog after 10,000,000 NoC cycles. Code
// sizes and the cache size are the document's; the placement of code in the
// host memory and the one-word-per-line fetch pattern are this test's.
module tb_workload_threads;
  import openscale_pkg::*;
  localparam int N = 9;
  localparam int NAPP = 4;
  localparam string NAME [NAPP] = '{"MJPEG", "SmithWaterman", "LU", "FFT"};
  localparam int BYTES [NAPP] = '{53248, 3891, 2458, 5120};
  localparam logic [31:0] BASE [NAPP] = '{32'h0000_2000, 32'h0001_0000, 32'h0001_1000, 32'h0001_2000};
  localparam int ICACHE = 16384;
  localparam logic [31:0] MAP = 32'h8000_0400;

  logic clk = 0, rst_n = 0;
  logic clk_cpu [N];
  logic i_req [N]; logic [31:0] i_addr [N]; logic i_ack [N]; logic [31:0] i_rdata [N];
  logic d_req [N]; cache_op_e d_op [N]; logic [31:0] d_addr [N]; logic [31:0] d_wdata [N];
  logic [3:0] d_wstrb [N]; logic d_ack [N]; logic [31:0] d_rdata [N];
  logic cpu_irq [N]; node_evt_t evt [N]; logic [4:0] dfs_k [N];

  openscale_top dut (.*);
  always #1 clk = ~clk;

  int checks = 0, failures = 0;
  int phase = -1;
  int done_cnt = 0;
  int served = 0;

  function automatic logic [31:0] code_word(logic [31:0] a);
    return {a[15:0], ~a[15:0]} ^ 32'h5A5A_0000;
  endfunction

  task automatic check(bit c, string what);
    checks++;
    if (!c) begin failures++; $display("FAIL %s at %0t", what, $time); end
  endtask

  always @(posedge clk_cpu[0]) if (rst_n && evt[0].rma_served) served++;

  // the host's CPU stays idle: its memory is served by its RMA-Reply unit
  initial begin
    i_req[0] = 0; i_addr[0] = 0; d_req[0] = 0; d_op[0] = OP_READ; d_addr[0] = 0;
    d_wdata[0] = 0; d_wstrb[0] = 0;
  end

  for (genvar n = 1; n < N; n++) begin : g_w
    task automatic dwrite(logic [31:0] a, logic [31:0] wd);
      @(negedge clk_cpu[n]);
      d_req[n] = 1; d_op[n] = OP_WRITE; d_addr[n] = a; d_wdata[n] = wd; d_wstrb[n] = 4'hF;
      #1;
      while (!d_ack[n]) @(negedge clk_cpu[n]);
      @(posedge clk_cpu[n]); @(negedge clk_cpu[n]); d_req[n] = 0;
    endtask

    task automatic fetch(logic [31:0] a, output logic [31:0] rd, output bit miss);
      @(negedge clk_cpu[n]);
      i_req[n] = 1; i_addr[n] = a; miss = 0;
      #1;
      while (!i_ack[n]) begin @(negedge clk_cpu[n]); miss = 1; end
      rd = i_rdata[n];
      @(posedge clk_cpu[n]); @(negedge clk_cpu[n]); i_req[n] = 0;
    endtask

    initial begin
      logic [31:0] rd; bit miss;
      int lines, m1, m2;
      i_req[n] = 0; i_addr[n] = 0; d_req[n] = 0; d_op[n] = OP_READ; d_addr[n] = 0;
      d_wdata[n] = 0; d_wstrb[n] = 0;
      for (int a = 0; a < NAPP; a++) begin
        wait (phase == a);
        lines = (BYTES[a] + 31) / 32;
        dwrite(MAP + 32'h10, BASE[a]);
        dwrite(MAP + 32'h14, BASE[a] + 32'(lines * 32 - 1));
        dwrite(MAP + 32'h0C, 32'h0000_0001);     // owner (0,0), enabled
        m1 = 0; m2 = 0;
        for (int pass = 0; pass < 2; pass++)
          for (int l = 0; l < lines; l++) begin
            logic [31:0] addr;
            addr = BASE[a] + 32'(32 * l + 4 * (l % 8));
            fetch(addr, rd, miss);
            if (rd != code_word(addr)) begin
              failures++;
              $display("FAIL node %0d %s: word at %h", n, NAME[a], addr);
            end
            if (pass == 0) m1 += int'(miss); else m2 += int'(miss);
          end
        check(m1 == lines, $sformatf("node %0d %s first pass misses %0d of %0d", n, NAME[a], m1, lines));
        if (BYTES[a] <= ICACHE)
          check(m2 == 0, $sformatf("node %0d %s second pass misses %0d (fits the cache)", n, NAME[a], m2));
        else
          check(m2 == lines, $sformatf("node %0d %s second pass misses %0d of %0d (exceeds the cache)",
                                       n, NAME[a], m2, lines));
        done_cnt++;
      end
    end
  end

  initial begin
    #20000000; failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    longint t0, cyc; int s0;
    repeat (5) @(posedge clk);
    // backdoor load of the code images into the host RAM
    for (int a = 0; a < NAPP; a++)
      for (int w = 0; w < (BYTES[a] + 31) / 32 * 8; w++) begin
        logic [31:0] addr;
        addr = BASE[a] + 32'(4 * w);
        dut.g_y[0].g_x[0].u_node.u_ram.mem[addr[16:2]] = code_word(addr);
      end
    rst_n = 1;
    repeat (10) @(posedge clk);
    for (int a = 0; a < NAPP; a++) begin
      t0 = $time; s0 = served;
      phase = a;
      wait (done_cnt == (N - 1) * (a + 1));
      cyc = ($time - t0) / 2;
      $display("%-14s %6d B, %0d lines served to 8 threads in %0d NoC cycles: %0d MB/s out of the host",
               NAME[a], BYTES[a], served - s0, cyc, (longint'(served - s0) * 32 * 500) / cyc);
      check(served - s0 > 0, "host served lines");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
