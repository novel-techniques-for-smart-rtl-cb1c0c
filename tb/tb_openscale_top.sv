// tb_openscale_top: the whole 3x3 core at its default sizes, running one
// shared-memory multithreaded job as a vSMP cluster of all nine nodes, with
// the host at the top-left node (0,0), as in the document's 8-thread
// mapping. Each node's CPU is a bus-functional model (cpu_bfm). The host
// writes a shared array and sends "go" messages; eight workers bond to the
// host, read the array through remote cache-line fills, write and flush a
// result line in the host's memory and report with a message; the host
// checks every result both ways. Node 4 also executes code fetched from the
// host (remote execution); nodes 2 and 5 run at lowered DFS settings; node 3
// takes timer interrupts. The test counts how often each mechanism
// happened (remote fills, remote write-backs, RMA requests served by the
// host, remote instruction fetches, messages, NoC back-pressure at the
// host, DFS settings in use, timer interrupts) and fails if one never did.
// It also reports the zero-load cycle count of one remote instruction-line
// fetch.
//
// Timing: 2-unit NoC clock (500 MHz); the node clocks come from the
// frequency scalers; watchdog after 2,000,000 NoC cycles. All parameters are
// at their defaults. The 182-cycle figure checked against is the document's
// zero-load remote miss latency.
module tb_openscale_top;
  import openscale_pkg::*;
  localparam int N = 9;
  logic clk = 0, rst_n = 0;
  logic clk_cpu [N];
  logic i_req [N]; logic [31:0] i_addr [N]; logic i_ack [N]; logic [31:0] i_rdata [N];
  logic d_req [N]; cache_op_e d_op [N]; logic [31:0] d_addr [N]; logic [31:0] d_wdata [N];
  logic [3:0] d_wstrb [N]; logic d_ack [N]; logic [31:0] d_rdata [N];
  logic cpu_irq [N]; node_evt_t evt [N]; logic [4:0] dfs_k [N];
  int b_checks [N]; int b_fail [N]; int b_irqs [N]; int b_fetch [N]; int b_zl [N]; bit b_done [N];
  logic start = 0;
  int checks = 0, failures = 0;

  openscale_top dut (.*);
  always #1 clk = ~clk;       // 500 MHz NoC clock

  // mechanism counters
  int n_remote_fill = 0, n_remote_wb = 0, n_served = 0, n_imiss = 0, n_msgs = 0;
  int n_backpressure = 0, n_slow_clk = 0, n_local = 0;

  for (genvar n = 0; n < N; n++) begin : g_cpu
    cpu_bfm #(.NODE(n), .NW(8)) u_cpu (
      .clk(clk_cpu[n]),
      .i_req(i_req[n]), .i_addr(i_addr[n]), .i_ack(i_ack[n]), .i_rdata(i_rdata[n]),
      .d_req(d_req[n]), .d_op(d_op[n]), .d_addr(d_addr[n]), .d_wdata(d_wdata[n]),
      .d_wstrb(d_wstrb[n]), .d_ack(d_ack[n]), .d_rdata(d_rdata[n]),
      .cpu_irq(cpu_irq[n]), .start(start),
      .checks(b_checks[n]), .failures(b_fail[n]), .irqs(b_irqs[n]),
      .fetch_cycles(b_fetch[n]), .zl_cycles(b_zl[n]), .done(b_done[n]));

    // the mapper's cur says which cache it serves: 0 instruction, 1 data
    always @(posedge clk_cpu[n]) if (rst_n) begin
      if (evt[n].remote_line) begin
        if (!dut.g_y[n / 3].g_x[n % 3].u_node.u_mapper.cur)   n_imiss++;
        else if (dut.g_y[n / 3].g_x[n % 3].u_node.u_mapper.r.we) n_remote_wb++;
        else                                                   n_remote_fill++;
      end
      if (evt[n].rma_served) n_served++;
      if (evt[n].local_line) n_local++;
    end
    always @(posedge clk) if (rst_n && dfs_k[n] != 5'd16) n_slow_clk++;
  end

  // messages reaching the message modules, NoC back-pressure at the host
  always @(posedge clk) begin
    if (rst_n && dut.ej_valid[0] && !dut.ej_ready[0]) n_backpressure++;
  end
  for (genvar n = 0; n < N; n++) begin : g_msg
    always @(posedge clk_cpu[n])
      if (rst_n && dut.g_y[n / 3].g_x[n % 3].u_node.u_ni.u_rx_valid[2] &&
          dut.g_y[n / 3].g_x[n % 3].u_node.u_ni.u_rx_ready[2] &&
          dut.g_y[n / 3].g_x[n % 3].u_node.u_ni.rstate == 2'd2) n_msgs++;
  end

  task automatic check(bit c, string what);
    checks++;
    if (!c) begin failures++; $display("FAIL %s", what); end
  endtask

  initial begin
    #4000000; failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    bit all_done;
    repeat (5) @(posedge clk); rst_n = 1;
    repeat (5) @(posedge clk); start = 1;
    do begin
      repeat (100) @(posedge clk);
      all_done = 1;
      for (int n = 0; n < N; n++) if (!b_done[n]) all_done = 0;
    end while (!all_done);
    for (int n = 0; n < N; n++) begin checks += b_checks[n]; failures += b_fail[n]; end
    $display("remote data line fills %0d, remote write-backs %0d, RMA requests served %0d",
             n_remote_fill, n_remote_wb, n_served);
    $display("remote instruction fills %0d, local line moves %0d", n_imiss, n_local);
    $display("instruction-line fetch from the host, node (1,1): %0d cycles under load, %0d idle",
             b_fetch[4], b_zl[4]);
    $display("messages %0d, host ejection back-pressure cycles %0d, cycles at lowered clock %0d, timer irqs %0d",
             n_msgs, n_backpressure, n_slow_clk, b_irqs[3]);
    $display("finished at NoC cycle %0d", $time / 2);
    // 8 lines of the array and one result line per worker
    check(n_remote_fill == 8 * 9, "every worker filled the shared array remotely");
    check(n_remote_wb == 8, "every worker wrote its result back remotely");
    check(n_served == n_remote_fill + n_remote_wb + n_imiss, "host answered every RMA request");
    check(n_imiss == 3, "remote execution fetched code");
    check(b_zl[4] > 0 && b_zl[4] < 182, "idle remote fetch within the document's 182 cycles");
    check(n_msgs == 17, "go and done messages delivered");
    check(n_backpressure > 0, "NoC back-pressure at the host happened");
    check(n_slow_clk > 0, "nodes ran at a lowered frequency");
    check(b_irqs[3] > 0, "timer interrupts taken");
    check(n_local > 0, "local line transfers");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
