// irq_ctrl: node interrupt controller. It gathers the node's interrupt
// sources into the single interrupt line of the CPU.
//
// A rising edge on source i sets PENDING[i]; software clears it by writing
// 1 to that bit. cpu_irq is high while any pending source is also enabled in
// MASK. Registers (byte offsets, one-cycle ack):
//   0x00 PENDING  read; write 1s to clear
//   0x04 MASK     read/write, 1 enables the source
//   0x08 ACTIVE   PENDING and MASK, read only
// The document only names the interrupt controller; edge capture and this
// register set are this design's own.
module irq_ctrl
  import openscale_pkg::*;
#(
  parameter int unsigned NSRC = 4
) (
  input  logic            clk,
  input  logic            rst_n,
  input  logic [NSRC-1:0] src,
  input  wb_req_t         wb_req,
  output wb_rsp_t         wb_rsp,
  output logic            cpu_irq
);
  logic [NSRC-1:0] src_q, pending, mask;
  logic            access;

  assign access  = wb_req.cyc && wb_req.stb && !wb_rsp.ack;
  assign cpu_irq = |(pending & mask);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      src_q   <= '0;
      pending <= '0;
      mask    <= '0;
      wb_rsp  <= '0;
    end else begin
      src_q <= src;
      // new edges win over a clear in the same cycle
      if (access && wb_req.we && wb_req.adr == 8'h00)
        pending <= (pending & ~wb_req.dat[NSRC-1:0]) | (src & ~src_q);
      else
        pending <= pending | (src & ~src_q);
      if (access && wb_req.we && wb_req.adr == 8'h04) mask <= wb_req.dat[NSRC-1:0];
      wb_rsp.ack <= access;
      if (access) begin
        unique case (wb_req.adr)
          8'h00:   wb_rsp.dat <= 32'(pending);
          8'h04:   wb_rsp.dat <= 32'(mask);
          8'h08:   wb_rsp.dat <= 32'(pending & mask);
          default: wb_rsp.dat <= '0;
        endcase
      end
    end
  end
endmodule
