// tb_dfs: for every setting K the node clock must give exactly K pulses in
// each window of STEPS reference cycles (f_node = f_ref*K/STEPS), each pulse
// a full reference high phase. Also checks the limits 0 -> 1 and
// >STEPS -> STEPS, the FREQ readback and the change counter.
//
// Timing: 10-unit reference clock; watchdog after 1,000,000 reference
// cycles. The K/STEPS scheme and its limits are this design's choice: the
// document says only that a per-task PID loop sets the node frequency.
module tb_dfs;
  import openscale_pkg::*;
  localparam int STEPS = 16;
  logic clk_ref = 0, rst_n = 0, clk_node;
  wb_req_t wb_req; wb_rsp_t wb_rsp;
  logic [$clog2(STEPS+1)-1:0] k_active;
  int checks = 0, failures = 0;
  int pulses = 0;

  dfs #(.STEPS(STEPS)) dut (.*);
  always #5 clk_ref = ~clk_ref;
  always @(posedge clk_node) pulses++;

  task automatic check(bit c, string what);
    checks++;
    if (!c) begin failures++; $display("FAIL %s at %0t", what, $time); end
  endtask

  task automatic wb(input logic we, input logic [7:0] adr, input logic [31:0] dat, output logic [31:0] rd);
    @(negedge clk_node);
    wb_req = '{cyc: 1'b1, stb: 1'b1, we: we, adr: adr, dat: dat};
    do @(posedge clk_node); while (!wb_rsp.ack);
    #1 rd = wb_rsp.dat;
    @(negedge clk_node); wb_req = '0;
  endtask

  // every node clock high phase lasts one full reference high phase
  realtime t_rise;
  always @(posedge clk_node) t_rise = $realtime;
  always @(negedge clk_node) if (rst_n) begin
    checks++;
    if ($realtime - t_rise != 5.0) begin failures++; $display("FAIL short pulse at %0t", $realtime); end
  end

  initial begin
    #10000000; failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [31:0] rd;
    int p0, ch0;
    wb_req = '0;
    repeat (3) @(posedge clk_ref); rst_n = 1;
    // full speed after reset
    repeat (4) @(posedge clk_ref);
    p0 = pulses; repeat (STEPS * 4) @(posedge clk_ref);
    check(pulses - p0 == STEPS * 4, "reset frequency is f_ref");
    wb(0, 8'h04, 0, rd); ch0 = rd;
    for (int k = STEPS; k >= 0; k--) begin
      int kk;
      kk = (k == 0) ? 1 : k;
      wb(1, 8'h00, k, rd);
      wb(0, 8'h00, 0, rd);
      check(rd == kk, "FREQ readback / clamp");
      repeat (6) @(posedge clk_ref);
      check(k_active == kk, "setting taken");
      for (int w = 0; w < 3; w++) begin
        p0 = pulses; repeat (STEPS) @(posedge clk_ref);
        check(pulses - p0 == kk, $sformatf("K=%0d pulses %0d", kk, pulses - p0));
      end
    end
    wb(1, 8'h00, 40, rd);
    wb(0, 8'h00, 0, rd);
    check(rd == STEPS, "clamp above STEPS");
    repeat (6) @(posedge clk_ref);
    wb(0, 8'h04, 0, rd);
    check(rd - ch0 == STEPS, $sformatf("change counter %0d", rd - ch0));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
