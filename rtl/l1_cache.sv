// l1_cache: level-one cache placed between the CPU and the node memory
// system; a node has one for instructions and one for data. Lines are 8
// words of 32 bits, as in the evaluated platform; capacity is a parameter
// (the document evaluates 4, 8 and 16 kB; 16 kB is the default here).
//
// Direct-mapped, write-back, write-allocate. The CPU port takes one request
// at a time (cpu_req held until cpu_ack):
//   OP_READ / OP_WRITE  word access with byte strobes. A hit is acknowledged
//                       in the same cycle (combinational cpu_ack, data in
//                       cpu_rdata). A miss first writes back the victim line
//                       if it is dirty, then fills the line through the
//                       line-level memory port, then completes as a hit.
//   OP_FLUSH            if the line holding the address is valid, dirty and
//                       its tag matches the address, write it back and mark
//                       it clean; otherwise just acknowledge.
//   OP_INVAL            if the line is valid and its tag matches the
//                       address, mark it invalid (contents dropped).
// Flush and invalidate act only when the tag matches, so unrelated lines
// that share the index are left alone; this is the rule the document gives
// for its relaxed consistency model (flush on unlock / thread creation,
// invalidate on lock). The memory port issues one line_req_t, held until a
// line_rsp_t.done pulse. Direct mapping, write-back policy and the request
// protocol are this design's choices.
module l1_cache
  import openscale_pkg::*;
#(
  parameter int unsigned SIZE_BYTES = 16384
) (
  input  logic              clk,
  input  logic              rst_n,
  // CPU side
  input  logic              cpu_req,
  input  cache_op_e         cpu_op,
  input  logic [ADDR_W-1:0] cpu_addr,
  input  logic [31:0]       cpu_wdata,
  input  logic [3:0]        cpu_wstrb,
  output logic              cpu_ack,
  output logic [31:0]       cpu_rdata,
  // memory side
  output line_req_t         mreq,
  input  line_rsp_t         mrsp,
  // events, one-cycle pulses
  output logic              evt_miss,
  output logic              evt_writeback
);
  localparam int unsigned LINES = SIZE_BYTES / (LINE_WORDS * 4);
  localparam int unsigned OFF_W = $clog2(LINE_WORDS * 4);
  localparam int unsigned IDX_W = $clog2(LINES);
  localparam int unsigned TAG_W = ADDR_W - OFF_W - IDX_W;
  localparam int unsigned WSEL  = $clog2(LINE_WORDS);

  typedef enum logic [1:0] {S_IDLE, S_WB, S_FILL} state_e;

  line_t            data  [LINES];
  logic [TAG_W-1:0] tags  [LINES];
  logic [LINES-1:0] valid;
  logic [LINES-1:0] dirty;

  state_e state;

  logic [IDX_W-1:0] idx;
  logic [TAG_W-1:0] tag;
  logic [WSEL-1:0]  wsel;
  logic             tag_eq, hit;
  cache_op_e        op;

  assign op     = cpu_op;
  assign idx    = cpu_addr[OFF_W +: IDX_W];
  assign tag    = cpu_addr[ADDR_W-1 -: TAG_W];
  assign wsel   = cpu_addr[2 +: WSEL];
  assign tag_eq = (tags[idx] == tag);
  assign hit    = valid[idx] && tag_eq;

  assign cpu_rdata = data[idx][32*wsel +: 32];

  always_comb begin
    cpu_ack = 1'b0;
    if (cpu_req && state == S_IDLE) begin
      unique case (op)
        OP_READ, OP_WRITE: cpu_ack = hit;
        OP_FLUSH:          cpu_ack = !(hit && dirty[idx]);
        default:           cpu_ack = 1'b1;     // OP_INVAL
      endcase
    end
  end

  always_comb begin
    mreq       = '0;
    mreq.wdata = data[idx];
    if (state == S_WB) begin
      mreq.valid = 1'b1;
      mreq.we    = 1'b1;
      mreq.addr  = {tags[idx], idx, {OFF_W{1'b0}}};
    end else if (state == S_FILL) begin
      mreq.valid = 1'b1;
      mreq.we    = 1'b0;
      mreq.addr  = {tag, idx, {OFF_W{1'b0}}};
    end
  end

  assign evt_miss      = cpu_req && state == S_IDLE && (op == OP_READ || op == OP_WRITE) && !hit;
  assign evt_writeback = (state == S_WB) && mrsp.done;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state <= S_IDLE;
      valid <= '0;
      dirty <= '0;
    end else begin
      unique case (state)
        S_IDLE: if (cpu_req) begin
          unique case (op)
            OP_READ, OP_WRITE: begin
              if (hit) begin
                if (op == OP_WRITE) dirty[idx] <= 1'b1;
              end else if (valid[idx] && dirty[idx]) begin
                state <= S_WB;
              end else begin
                state <= S_FILL;
              end
            end
            OP_FLUSH: if (hit && dirty[idx]) state <= S_WB;
            default:  if (hit) valid[idx] <= 1'b0;
          endcase
        end
        S_WB: if (mrsp.done) begin
          dirty[idx] <= 1'b0;
          // a flush is complete after the write-back; a miss goes on to fill
          state <= (op == OP_FLUSH) ? S_IDLE : S_FILL;
        end
        S_FILL: if (mrsp.done) begin
          valid[idx] <= 1'b1;
          dirty[idx] <= 1'b0;
          state      <= S_IDLE;
        end
        default: state <= S_IDLE;
      endcase
    end
  end

  // Data and tag arrays (no reset needed: guarded by valid).
  always_ff @(posedge clk) begin
    if (state == S_FILL && mrsp.done) begin
      data[idx] <= mrsp.rdata;
      tags[idx] <= tag;
    end else if (state == S_IDLE && cpu_req && op == OP_WRITE && hit) begin
      for (int b = 0; b < 4; b++)
        if (cpu_wstrb[b]) data[idx][32*wsel + 8*b +: 8] <= cpu_wdata[8*b +: 8];
    end
  end

`ifndef SYNTHESIS
  // The CPU must hold its request stable until it is acknowledged.
  a_req_held: assert property (@(posedge clk) disable iff (!rst_n)
    cpu_req && !cpu_ack |=> cpu_req && $stable(cpu_addr) && $stable(cpu_op));
`endif
endmodule
