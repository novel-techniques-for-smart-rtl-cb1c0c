// tb_local_ram: random reads and byte-masked writes on both ports against an
// array model; read data must appear one cycle after the address.
//
// Timing: 10-unit clock; watchdog after 100,000 cycles. The dual-port
// organisation is this design's choice.
module tb_local_ram;
  localparam int BYTES = 4096;
  localparam int AW = $clog2(BYTES/4);
  logic clk = 0;
  logic a_en, b_en;
  logic [3:0] a_we, b_we;
  logic [AW-1:0] a_addr, b_addr;
  logic [31:0] a_wdata, b_wdata, a_rdata, b_rdata;
  logic [31:0] model [BYTES/4];
  int checks = 0, failures = 0;

  local_ram #(.BYTES(BYTES)) dut (.*);
  always #5 clk = ~clk;

  initial begin
    #1000000; failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic logic [31:0] merge(logic [31:0] old, logic [31:0] d, logic [3:0] we);
    for (int b = 0; b < 4; b++) if (we[b]) old[8*b +: 8] = d[8*b +: 8];
    return old;
  endfunction

  initial begin
    a_en = 0; b_en = 0; a_we = 0; b_we = 0; a_addr = 0; b_addr = 0; a_wdata = 0; b_wdata = 0;
    // initialise through both ports
    for (int i = 0; i < BYTES/4; i++) begin
      @(negedge clk); a_en = 1; a_we = 4'hF; a_addr = AW'(i); a_wdata = i * 7 + 3;
      model[i] = i * 7 + 3;
    end
    @(negedge clk); a_en = 0; a_we = 0;
    for (int i = 0; i < 3000; i++) begin
      logic [31:0] ea, eb;
      @(negedge clk);
      a_en = 1; b_en = 1;
      a_addr = AW'($urandom); b_addr = AW'($urandom);
      if (b_addr == a_addr) b_addr = b_addr + 1'b1;
      a_we = ($urandom % 2) ? 4'($urandom) : 4'h0;
      b_we = ($urandom % 2) ? 4'($urandom) : 4'h0;
      a_wdata = $urandom; b_wdata = $urandom;
      ea = model[a_addr]; eb = model[b_addr];
      model[a_addr] = merge(model[a_addr], a_wdata, a_we);
      model[b_addr] = merge(model[b_addr], b_wdata, b_we);
      @(posedge clk); #1;
      checks++; if (a_rdata !== ea) begin failures++; $display("FAIL port A %h %h", a_rdata, ea); end
      checks++; if (b_rdata !== eb) begin failures++; $display("FAIL port B %h %h", b_rdata, eb); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
