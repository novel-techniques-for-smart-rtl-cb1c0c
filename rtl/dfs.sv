// dfs: dynamic frequency scaling unit of a node. It derives the node clock
// from the reference clock (the NoC clock) and lets software running on the
// node change the node frequency at run time; the microkernel's feedback
// control service (a PI or PID loop on the measured task throughput) writes
// the new setting through the register bus.
//
// Frequency is set in STEPS equal steps: with setting K (1..STEPS) the node
// clock has K pulses in every STEPS reference cycles, that is
// f_node = f_ref * K / STEPS. A phase accumulator adds K each reference
// cycle and lets a pulse through when it wraps, so the pulses are spread as
// evenly as possible. The clock is gated by an enable sampled on the falling
// edge of the reference clock and ANDed with it, so no pulse is ever cut
// short. The setting is written in the node clock domain and carried to the
// reference domain through a two-stage synchroniser; a new value is taken
// only when both stages agree.
// Registers (byte offsets, one-cycle ack): 0x00 FREQ [4:0] K (0 is read as
// 1, values above STEPS as STEPS); 0x04 CHANGES, count of frequency changes
// taken. The reset value is the full reference frequency.
// That each node scales its own frequency under software control follows
// the document; the pulse-spreading divider and the register set are this
// design's own.
module dfs
  import openscale_pkg::*;
#(
  parameter int unsigned STEPS = 16
) (
  input  logic    clk_ref,
  input  logic    rst_n,
  output logic    clk_node,
  input  wb_req_t wb_req,     // clk_node domain
  output wb_rsp_t wb_rsp,
  output logic [$clog2(STEPS+1)-1:0] k_active  // setting in use (reference domain)
);
  localparam int unsigned KW = $clog2(STEPS + 1);

  logic [KW-1:0] k_reg;                 // node domain
  logic [KW-1:0] k_s1, k_s2;            // synchroniser
  logic [KW-1:0] acc;
  logic          en, en_neg;
  logic [31:0]   changes;
  logic          access;

  assign access = wb_req.cyc && wb_req.stb && !wb_rsp.ack;

  // register side, in the node clock domain
  always_ff @(posedge clk_node or negedge rst_n) begin
    if (!rst_n) begin
      k_reg  <= KW'(STEPS);
      wb_rsp <= '0;
    end else begin
      wb_rsp.ack <= access;
      if (access) begin
        unique case (wb_req.adr)
          8'h00:   wb_rsp.dat <= 32'(k_reg);
          8'h04:   wb_rsp.dat <= changes;
          default: wb_rsp.dat <= '0;
        endcase
        if (wb_req.we && wb_req.adr == 8'h00) begin
          if (wb_req.dat == 0)          k_reg <= KW'(1);
          else if (wb_req.dat > STEPS)  k_reg <= KW'(STEPS);
          else                          k_reg <= KW'(wb_req.dat);
        end
      end
    end
  end

  // pulse spreading, in the reference clock domain
  always_ff @(posedge clk_ref or negedge rst_n) begin
    if (!rst_n) begin
      k_s1     <= KW'(STEPS);
      k_s2     <= KW'(STEPS);
      k_active <= KW'(STEPS);
      acc      <= '0;
      en       <= 1'b1;
      changes  <= '0;
    end else begin
      k_s1 <= k_reg;
      k_s2 <= k_s1;
      if (k_s1 == k_s2 && k_s2 != k_active) begin
        k_active <= k_s2;
        changes  <= changes + 1'b1;
      end
      if (32'(acc) + 32'(k_active) >= STEPS) begin
        acc <= KW'(32'(acc) + 32'(k_active) - STEPS);
        en  <= 1'b1;
      end else begin
        acc <= acc + k_active;
        en  <= 1'b0;
      end
    end
  end

  always_ff @(negedge clk_ref or negedge rst_n) begin
    if (!rst_n) en_neg <= 1'b1;
    else        en_neg <= en;
  end

  assign clk_node = clk_ref & en_neg;
endmodule
