// timer: node timer. It raises a periodic interrupt, which the microkernel
// uses for preemptive scheduling and to run the frequency-control service at
// its chosen period.
//
// A counter runs on the node clock while enabled; when it reaches PERIOD-1
// it wraps to zero and sets the EXPIRED flag. irq is EXPIRED and IRQ_EN.
// Software clears EXPIRED by writing 1 to bit 0 of STATUS.
// Registers (byte offsets, one-cycle ack):
//   0x00 CTRL    [0] run, [1] interrupt enable
//   0x04 PERIOD  cycles per period (values below 2 behave as 2)
//   0x08 COUNT   current count (read only)
//   0x0C STATUS  [0] expired, write 1 to clear
// The document only names the timer and says the control service is
// triggered by interrupts at a chosen period; this register set is this
// design's own.
module timer
  import openscale_pkg::*;
(
  input  logic    clk,
  input  logic    rst_n,
  input  wb_req_t wb_req,
  output wb_rsp_t wb_rsp,
  output logic    irq
);
  logic        run, ie, expired;
  logic [31:0] period, count;
  logic        access;

  assign access = wb_req.cyc && wb_req.stb && !wb_rsp.ack;
  assign irq    = expired && ie;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      run     <= 1'b0;
      ie      <= 1'b0;
      expired <= 1'b0;
      period  <= 32'd1000;
      count   <= '0;
      wb_rsp  <= '0;
    end else begin
      if (run) begin
        if (count >= period - 1 && period > 1 || period <= 1 && count >= 1) begin
          count   <= '0;
          expired <= 1'b1;
        end else begin
          count <= count + 1'b1;
        end
      end
      wb_rsp.ack <= access;
      if (access) begin
        unique case (wb_req.adr)
          8'h00:   wb_rsp.dat <= {30'd0, ie, run};
          8'h04:   wb_rsp.dat <= period;
          8'h08:   wb_rsp.dat <= count;
          8'h0C:   wb_rsp.dat <= {31'd0, expired};
          default: wb_rsp.dat <= '0;
        endcase
        if (wb_req.we) begin
          unique case (wb_req.adr)
            8'h00: begin run <= wb_req.dat[0]; ie <= wb_req.dat[1]; end
            8'h04: begin period <= wb_req.dat; count <= '0; end
            8'h0C: if (wb_req.dat[0]) expired <= 1'b0;
            default: ;
          endcase
        end
      end
    end
  end
endmodule
