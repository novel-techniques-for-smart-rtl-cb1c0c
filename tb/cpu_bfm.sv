// cpu_bfm: bus-functional stand-in for a node's CPU in the system test. It
// drives the node's instruction and data ports in the node's own clock
// domain and runs a fixed program chosen by NODE:
//   node 0 (cluster host): fills the shared array A[0..63] and a block of
//     "code" words in its memory, flushes them, sends a "go" message to every
//     worker, then collects one "done" message per worker and checks the
//     result each worker wrote into the host's shared area.
//   nodes 1..NW (workers): wait for "go", bond to the host (shared window),
//     read A through their data cache (remote line fills), add their node
//     number to the sum, write the result to their own shared line, flush it,
//     and report it in a "done" message. Node 4 also runs code from the host
//     (remote execution window) and checks the instructions it fetches;
//     when the host has collected every result it sends node 4 a "finish"
//     message and node 4 times one more instruction-line fetch on the now
//     idle network.
//     Node 2 lowers its clock to 8/16 and node 5 to 11/16 before starting;
//     node 3 runs its timer and counts interrupts.
//
// Interface and timing: the ports are those of one node's CPU side. A
// request is set up on a falling edge of the node clock and held until it is
// acknowledged; a second thread (the interrupt handler) shares the data port
// through a lock. checks/failures count this node's own checks, done rises
// when the program ends. The real CPU, a MicroBlaze-ISA core in the
// document, is not modelled; only its port behaviour is, and the programs
// are this test's own.
module cpu_bfm
  import openscale_pkg::*;
#(
  parameter int NODE = 0,
  parameter int NW   = 8
) (
  input  logic        clk,
  output logic        i_req,
  output logic [31:0] i_addr,
  input  logic        i_ack,
  input  logic [31:0] i_rdata,
  output logic        d_req,
  output cache_op_e   d_op,
  output logic [31:0] d_addr,
  output logic [31:0] d_wdata,
  output logic [3:0]  d_wstrb,
  input  logic        d_ack,
  input  logic [31:0] d_rdata,
  input  logic        cpu_irq,
  input  logic        start,
  output int          checks,
  output int          failures,
  output int          irqs,
  output int          fetch_cycles,
  output int          zl_cycles,
  output bit          done
);
  localparam logic [31:0] TMR = 32'h8000_0000, IRQ = 32'h8000_0100, DFS = 32'h8000_0200,
                          MSG = 32'h8000_0300, MAP = 32'h8000_0400;
  localparam logic [31:0] A_BASE = 32'h0000_0400, R_BASE = 32'h0000_1000, CODE = 32'h0001_0000;

  function automatic logic [31:0] a_val(int i);
    return 32'h0101_0000 + 32'(i * i);
  endfunction
  function automatic logic [31:0] a_sum();
    logic [31:0] s;
    s = 0;
    for (int i = 0; i < 64; i++) s += a_val(i);
    return s;
  endfunction

  task automatic check(bit c, string what);
    checks++;
    if (!c) begin failures++; $display("FAIL node %0d: %s at %0t", NODE, what, $time); end
  endtask

  // one data access at a time: the interrupt handler thread and the main
  // program share the data port
  bit busy = 0;

  task automatic dacc(cache_op_e op, logic [31:0] a, logic [31:0] wd, output logic [31:0] rd);
    @(negedge clk);
    while (busy) @(negedge clk);
    busy = 1;
    d_req = 1; d_op = op; d_addr = a; d_wdata = wd; d_wstrb = 4'hF;
    #1;
    while (!d_ack) @(negedge clk);
    rd = d_rdata;
    @(posedge clk); @(negedge clk); d_req = 0;
    busy = 0;
  endtask

  task automatic fetch(logic [31:0] a, output logic [31:0] rd, output int cyc);
    @(negedge clk);
    i_req = 1; i_addr = a; cyc = 0;
    #1;
    while (!i_ack) begin @(negedge clk); cyc++; end
    rd = i_rdata;
    @(posedge clk); @(negedge clk); i_req = 0;
  endtask

  // wait until the message FIFO holds at least n words
  task automatic wait_rx(int n);
    logic [31:0] st;
    do dacc(OP_READ, MSG + 32'h0C, 0, st); while (int'(st[7:0]) < n);
  endtask

  task automatic send_msg(coord_t dst, logic [31:0] w);
    logic [31:0] rd;
    dacc(OP_WRITE, MSG + 32'h00, w, rd);
    dacc(OP_WRITE, MSG + 32'h04, 32'(dst), rd);
  endtask

  initial begin
    logic [31:0] rd;
    checks = 0; failures = 0; irqs = 0; fetch_cycles = 0; zl_cycles = 0; done = 0;
    i_req = 0; i_addr = 0; d_req = 0; d_op = OP_READ; d_addr = 0; d_wdata = 0; d_wstrb = 0;
    wait (start);
    repeat (4) @(posedge clk);
    if (NODE == 0) begin
      // ---------------- host ----------------
      for (int i = 0; i < 64; i++) dacc(OP_WRITE, A_BASE + 32'(4 * i), a_val(i), rd);
      for (int i = 0; i < 24; i++) dacc(OP_WRITE, CODE + 32'(4 * i), 32'hC0DE_0000 + 32'(i), rd);
      for (int l = 0; l < 8; l++) dacc(OP_FLUSH, A_BASE + 32'(32 * l), 0, rd);
      for (int l = 0; l < 3; l++) dacc(OP_FLUSH, CODE + 32'(32 * l), 0, rd);
      for (int n = 1; n <= NW; n++) send_msg('{x: 4'(n % 3), y: 4'(n / 3)}, 32'h60 + 32'(n));
      for (int k = 0; k < NW; k++) begin
        pkt_cmd_t c; int n; logic [31:0] res;
        wait_rx(2);
        dacc(OP_READ, MSG + 32'h08, 0, rd); c = pkt_cmd_t'(rd);
        dacc(OP_READ, MSG + 32'h08, 0, res);
        n = int'(c.src.y) * 3 + int'(c.src.x);
        check(c.kind == PK_MSG && c.len == 1 && n >= 1 && n <= NW, "done message");
        check(res == a_sum() + 32'(n), $sformatf("result in message from node %0d", n));
        // the worker's flushed result must be in the host memory
        dacc(OP_INVAL, R_BASE + 32'(32 * n), 0, rd);
        dacc(OP_READ, R_BASE + 32'(32 * n), 0, rd);
        check(rd == a_sum() + 32'(n), $sformatf("result of node %0d in shared memory", n));
      end
      // everyone is done: let node 4 time a fetch on the idle network
      send_msg('{x: 1, y: 1}, 32'h0000_00FF);
    end else if (NODE <= NW) begin
      // ---------------- worker ----------------
      logic [31:0] s;
      if (NODE == 2) dacc(OP_WRITE, DFS, 32'd8, rd);
      if (NODE == 5) dacc(OP_WRITE, DFS, 32'd11, rd);
      if (NODE == 3) begin
        dacc(OP_WRITE, IRQ + 32'h04, 32'h1, rd);
        dacc(OP_WRITE, TMR + 32'h04, 32'd200, rd);
        dacc(OP_WRITE, TMR + 32'h00, 32'h3, rd);
        fork
          forever begin
            @(posedge clk);
            if (cpu_irq) begin
              irqs++;
              dacc(OP_WRITE, TMR + 32'h0C, 32'h1, rd);
              dacc(OP_WRITE, IRQ + 32'h00, 32'h1, rd);
            end
          end
        join_none
      end
      wait_rx(2);
      dacc(OP_READ, MSG + 32'h08, 0, rd);
      check(rd[31:28] == 4'(PK_MSG) && rd[23:16] == 8'h00, "go message from host");
      dacc(OP_READ, MSG + 32'h08, 0, rd);
      check(rd == 32'h60 + 32'(NODE), "go payload");
      // bond to the cluster host (0,0): window 0 over the shared area
      dacc(OP_WRITE, MAP + 32'h00, 32'h0000_0001, rd);
      s = 0;
      for (int i = 0; i < 64; i++) begin
        dacc(OP_READ, A_BASE + 32'(4 * i), 0, rd);
        check(rd == a_val(i), "shared array element");
        s += rd;
      end
      if (NODE == 4) begin
        // remote execution: code window over the host's code block
        int cyc;
        dacc(OP_WRITE, MAP + 32'h10, CODE, rd);
        dacc(OP_WRITE, MAP + 32'h14, CODE + 32'hFFFF, rd);
        dacc(OP_WRITE, MAP + 32'h0C, 32'h0000_0001, rd);
        for (int i = 0; i < 16; i++) begin
          fetch(CODE + 32'(4 * i), rd, cyc);
          if (i == 0) fetch_cycles = cyc;
          check(rd == 32'hC0DE_0000 + 32'(i), "remotely fetched instruction");
        end
      end
      dacc(OP_WRITE, R_BASE + 32'(32 * NODE), s + 32'(NODE), rd);
      dacc(OP_FLUSH, R_BASE + 32'(32 * NODE), 0, rd);
      send_msg('{x: 0, y: 0}, s + 32'(NODE));
      if (NODE == 4) begin
        int cyc;
        wait_rx(2);
        dacc(OP_READ, MSG + 32'h08, 0, rd);
        dacc(OP_READ, MSG + 32'h08, 0, rd);
        check(rd == 32'h0000_00FF, "finish message");
        fetch(CODE + 32'h40, rd, cyc);
        zl_cycles = cyc;
        check(rd == 32'hC0DE_0010, "instruction fetched on the idle network");
      end
    end
    done = 1;
  end
endmodule
