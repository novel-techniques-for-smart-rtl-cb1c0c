// tb_async_fifo: two unrelated clocks (10 ns and 7 ns, then 4 ns and 13 ns)
// with random write and read enables. Every word read must be the next word
// written, nothing may be lost or duplicated, and the FIFO must refuse
// writes once DEPTH words are in flight.
//
// Timing: the two clocks are free-running and unrelated; the watchdog ends
// the run after 2,000,000 time units. The FIFO depth (8) and the Gray-code
// crossing are this design's choices; the document only asks for
// asynchronous FIFOs between the node and the NoC.
module tb_async_fifo;
  localparam int DEPTH = 8;
  logic wclk = 0, rclk = 0, rst_n = 0;
  logic wr_valid, wr_ready, rd_valid, rd_ready;
  logic [31:0] wr_data, rd_data;
  int checks = 0, failures = 0;
  logic [31:0] q[$];
  int wper = 5, rper = 3;
  int nread = 0;

  async_fifo #(.WIDTH(32), .DEPTH(DEPTH)) dut (
    .wr_clk(wclk), .wr_rst_n(rst_n), .wr_valid, .wr_ready, .wr_data,
    .rd_clk(rclk), .rd_rst_n(rst_n), .rd_valid, .rd_ready, .rd_data);

  always #(wper) wclk = ~wclk;
  always #(rper) rclk = ~rclk;

  task automatic check(bit c, string what);
    checks++;
    if (!c) begin failures++; $display("FAIL %s at %0t", what, $time); end
  endtask

  initial begin
    #2000000; failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // writer
  initial begin
    wr_valid = 0; wr_data = 0;
    #50 rst_n = 1;
    // no reads yet: exactly DEPTH writes accepted
    for (int i = 0; i < DEPTH + 4; i++) begin
      @(negedge wclk); wr_valid = 1; wr_data = 32'h1000 + i;
      @(posedge wclk); if (wr_ready) q.push_back(wr_data);
    end
    @(negedge wclk); wr_valid = 0;
    check(q.size() == DEPTH, "accepts exactly DEPTH words");
    for (int i = 0; i < 3000; i++) begin
      @(negedge wclk); wr_valid = ($urandom % 2) != 0; wr_data = $urandom;
      if (i == 1500) begin wper = 2; end
      @(posedge wclk); if (wr_valid && wr_ready) q.push_back(wr_data);
    end
    @(negedge wclk); wr_valid = 0;
  end

  // reader
  initial begin
    rd_ready = 0;
    #1000;
    forever begin
      @(negedge rclk); rd_ready = ($urandom % 3) != 0;
      if ($time > 12000 && rper == 3) rper = 6;
      @(posedge rclk);
      if (rd_valid && rd_ready) begin
        check(q.size() > 0 && rd_data == q[0], "order and content");
        if (q.size() > 0) void'(q.pop_front());
        nread++;
      end
    end
  end

  initial begin
    wait (rst_n);
    #150000;
    check(q.size() == 0, "all words delivered");
    check(nread > 1000, "enough traffic");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
