// tb_flit_fifo: checks the router input FIFO against a queue model under
// random push/pop traffic: data order, the occupancy count, in_ready going
// low at exactly DEPTH words, and first-word fall-through (a word written on
// one edge is visible on out_data right after it).
//
// Timing: 10-unit clock; watchdog after 20,000 cycles. The depth of 4 is the
// document's input-buffer size.
module tb_flit_fifo;
  localparam int DEPTH = 4;
  logic clk = 0, rst_n = 0;
  logic in_valid, in_ready, out_valid, out_ready;
  logic [31:0] in_data, out_data;
  logic [$clog2(DEPTH+1)-1:0] count;
  int checks = 0, failures = 0;
  logic [31:0] q[$];

  flit_fifo #(.WIDTH(32), .DEPTH(DEPTH)) dut (.*);

  always #5 clk = ~clk;

  task automatic check(bit c, string what);
    checks++;
    if (!c) begin failures++; $display("FAIL %s at %0t", what, $time); end
  endtask

  initial begin
    #200000; failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    in_valid = 0; out_ready = 0; in_data = 0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    // fill to full
    for (int i = 0; i < DEPTH + 2; i++) begin
      @(negedge clk);
      in_valid = 1; in_data = 32'hA000 + i;
      check(in_ready == (i < DEPTH), "in_ready while filling");
      @(posedge clk);
      if (in_ready) q.push_back(in_data);
    end
    @(negedge clk); in_valid = 0;
    check(count == DEPTH, "count at full");
    check(out_valid && out_data == q[0], "fall-through head");
    // random traffic
    for (int i = 0; i < 2000; i++) begin
      @(negedge clk);
      in_valid  = ($urandom % 3) != 0;
      in_data   = $urandom;
      out_ready = ($urandom % 2) != 0;
      check(count == q.size(), "count");
      check(in_ready == (q.size() < DEPTH), "in_ready");
      if (q.size() > 0) check(out_valid && out_data == q[0], "data order");
      else              check(!out_valid, "empty");
      @(posedge clk);
      if (out_valid && out_ready) void'(q.pop_front());
      if (in_valid && in_ready) q.push_back(in_data);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
