// tb_timer: programs periods through the register bus and checks that the
// expiry flag (and the interrupt, when enabled) comes exactly every PERIOD
// cycles, that COUNT reads back, and that writing STATUS clears the flag.
//
// Timing: 10-unit clock; watchdog after 100,000 cycles. The register layout
// is this design's; the document names the timer and its periodic interrupt.
module tb_timer;
  import openscale_pkg::*;
  logic clk = 0, rst_n = 0;
  wb_req_t wb_req; wb_rsp_t wb_rsp; logic irq;
  int checks = 0, failures = 0;

  timer dut (.*);
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
    int t0, t1;
    wb_req = '0;
    repeat (3) @(posedge clk); rst_n = 1;
    for (int k = 0; k < 3; k++) begin
      int per;
      per = (k == 0) ? 10 : (k == 1) ? 37 : 5;
      wb(1, 8'h00, 32'h0, rd);             // stop
      wb(1, 8'h0C, 32'h1, rd);             // clear
      wb(1, 8'h04, per, rd);
      wb(1, 8'h00, 32'h3, rd);             // run, irq enable
      wait (irq); @(posedge clk); t0 = $time;
      check(dut.count == 0, "wrapped at expiry");
      wb(1, 8'h0C, 32'h1, rd);
      check(!irq, "cleared");
      wait (irq); @(posedge clk); t1 = $time;
      check((t1 - t0) == per * 10, $sformatf("period %0d measured %0d", per, (t1 - t0) / 10));
      wb(0, 8'h04, 0, rd);
      check(rd == per, "PERIOD readback");
      wb(0, 8'h0C, 0, rd);
      check(rd == 1, "STATUS expired");
    end
    // interrupt disabled: flag sets, irq stays low
    wb(1, 8'h00, 32'h1, rd);
    wb(1, 8'h0C, 32'h1, rd);
    repeat (12) @(posedge clk);
    check(!irq, "irq masked");
    wb(0, 8'h0C, 0, rd);
    check(rd == 1, "flag set while masked");
    wb(0, 8'h08, 0, rd);
    check(rd < 5, "COUNT in range");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
