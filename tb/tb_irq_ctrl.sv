// tb_irq_ctrl: raises source edges, checks pending capture on rising edges
// only, masking, ACTIVE readback, write-1-to-clear, and that an edge in the
// same cycle as a clear is not lost.
//
// Timing: 10-unit clock; watchdog after 100,000 cycles. The document names
// the interrupt controller only; its registers are this design's.
module tb_irq_ctrl;
  import openscale_pkg::*;
  logic clk = 0, rst_n = 0;
  logic [3:0] src;
  wb_req_t wb_req; wb_rsp_t wb_rsp; logic cpu_irq;
  int checks = 0, failures = 0;

  irq_ctrl #(.NSRC(4)) dut (.*);
  always #5 clk = ~clk;

  task automatic check(bit c, string what);
    checks++;
    if (!c) begin failures++; $display("FAIL %s at %0t", what, $time); end
  endtask

  task automatic wb(input logic we, input logic [7:0] adr, input logic [31:0] dat, output logic [31:0] rd);
    @(negedge clk);
    wb_req = '{cyc: 1'b1, stb: 1'b1, we: we, adr: adr, dat: dat};
    do @(posedge clk); while (!wb_rsp.ack);
    #1 rd = wb_rsp.dat;
    @(negedge clk); wb_req = '0;
  endtask

  initial begin
    #1000000; failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [31:0] rd;
    logic [3:0] exp_p, m;
    wb_req = '0; src = 0;
    repeat (3) @(posedge clk); rst_n = 1;
    exp_p = 0;
    for (int it = 0; it < 200; it++) begin
      logic [3:0] s;
      m = 4'($urandom);
      wb(1, 8'h04, 32'(m), rd);
      s = 4'($urandom);
      @(negedge clk); src = s;                  // rising edges on s
      exp_p |= s;
      repeat (2) @(posedge clk);
      @(negedge clk); src = 0;                  // falling edges: no effect
      repeat (2) @(posedge clk); #1;
      check(cpu_irq == |(exp_p & m), "irq = |(pending & mask)");
      wb(0, 8'h00, 0, rd); check(rd[3:0] == exp_p, "PENDING");
      wb(0, 8'h08, 0, rd); check(rd[3:0] == (exp_p & m), "ACTIVE");
      wb(0, 8'h04, 0, rd); check(rd[3:0] == m, "MASK");
      begin
        logic [3:0] c;
        c = 4'($urandom);
        wb(1, 8'h00, 32'(c), rd);
        exp_p &= ~c;
      end
      wb(0, 8'h00, 0, rd); check(rd[3:0] == exp_p, "PENDING after clear");
    end
    // edge coinciding with a clear of the same bit
    wb(1, 8'h00, 32'hF, rd);
    @(negedge clk);
    wb_req = '{cyc: 1'b1, stb: 1'b1, we: 1'b1, adr: 8'h00, dat: 32'h1};
    src = 4'h1;
    @(posedge clk); @(negedge clk); wb_req = '0; src = 0;
    wb(0, 8'h00, 0, rd); check(rd[0] == 1'b1, "edge kept during clear");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
