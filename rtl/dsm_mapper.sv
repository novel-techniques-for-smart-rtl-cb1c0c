// dsm_mapper: the node's memory-side switch behind the two L1 caches. It
// decides, per cache line, whether the line lives in this node's RAM or in
// another node's RAM reached through the remote memory access (RMA) unit.
//
// Two address windows are programmable at run time through a small register
// bus. A line whose address falls inside an enabled window [base, limit] is
// sent to the RMA-Send unit with the window's target node; any other line is
// moved to or from local RAM port A, one word per cycle (8 cycles to write a
// line, 9 to read one because of the RAM read latency).
//   window 0: distributed shared memory. When a node joins a cluster
//             ("bonding mode") window 0 points at the cluster's host node,
//             and by default covers 0x00000-0x01FFF, the shared-data area of
//             the host's memory map.
//   window 1: remote execution. Covers the code of a task left in its
//             original node, so the task runs here while its instructions
//             are fetched from there and cached.
// The instruction and data caches share the mapper; when both wait, they are
// served alternately. One line transfer is in progress at a time.
//
// Registers (byte offsets): 0x00 W0_CTRL, 0x04 W0_BASE, 0x08 W0_LIMIT, 0x0C W1_CTRL, 0x10 W1_BASE, 0x14 W1_LIMIT.
// W*_CTRL: bit 0 enable, bits [15:8] target node {x[15:12], y[11:8]}.
// The shared region and the bonding idea follow the document; that it is
// done with two base/limit windows, and the register layout, are this
// design's own.
module dsm_mapper
  import openscale_pkg::*;
#(
  parameter int unsigned RAM_BYTES = 131072
) (
  input  logic        clk,
  input  logic        rst_n,
  // cache ports: 0 instruction, 1 data
  input  line_req_t   creq [2],
  output line_rsp_t   crsp [2],
  // local RAM port A
  output logic        ram_en,
  output logic [3:0]  ram_we,
  output logic [$clog2(RAM_BYTES/4)-1:0] ram_addr,
  output logic [31:0] ram_wdata,
  input  logic [31:0] ram_rdata,
  // RMA-Send
  output logic        rma_valid,
  output logic        rma_we,
  output coord_t      rma_dst,
  output logic [ADDR_W-1:0] rma_addr,
  output line_t       rma_wdata,
  input  logic        rma_done,
  input  line_t       rma_rdata,
  // register bus
  input  wb_req_t     wb_req,
  output wb_rsp_t     wb_rsp,
  // events
  output logic        evt_remote,
  output logic        evt_local
);
  localparam int unsigned RAW = $clog2(RAM_BYTES / 4);
  localparam int unsigned WSEL = $clog2(LINE_WORDS);

  typedef enum logic [2:0] {S_IDLE, S_LRD, S_LRD_LAST, S_LWR, S_REMOTE, S_DONE} state_e;

  typedef struct packed {
    logic              en;
    coord_t            node;
    logic [ADDR_W-1:0] base;
    logic [ADDR_W-1:0] limit;
  } window_t;

  window_t win [2];
  state_e  state;
  logic    cur;            // cache being served
  logic    last_served;
  line_req_t r;            // request being served
  line_t   buf_line;
  logic [WSEL-1:0] cnt;
  logic    hit0, pick;

  // ---------------- register bus ----------------
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      win[0] <= '{en: 1'b0, node: '0, base: 32'h0000_0000, limit: 32'h0000_1FFF};
      win[1] <= '{en: 1'b0, node: '0, base: 32'h0000_0000, limit: 32'h0000_0000};
      wb_rsp <= '0;
    end else begin
      wb_rsp.ack <= wb_req.cyc && wb_req.stb && !wb_rsp.ack;
      if (wb_req.cyc && wb_req.stb && !wb_rsp.ack) begin
        unique case (wb_req.adr)
          8'h00: wb_rsp.dat <= {16'd0, win[0].node, 7'd0, win[0].en};
          8'h04: wb_rsp.dat <= win[0].base;
          8'h08: wb_rsp.dat <= win[0].limit;
          8'h0C: wb_rsp.dat <= {16'd0, win[1].node, 7'd0, win[1].en};
          8'h10: wb_rsp.dat <= win[1].base;
          8'h14: wb_rsp.dat <= win[1].limit;
          default: wb_rsp.dat <= '0;
        endcase
        if (wb_req.we) begin
          unique case (wb_req.adr)
            8'h00: begin win[0].en <= wb_req.dat[0]; win[0].node <= wb_req.dat[15:8]; end
            8'h04: win[0].base  <= wb_req.dat;
            8'h08: win[0].limit <= wb_req.dat;
            8'h0C: begin win[1].en <= wb_req.dat[0]; win[1].node <= wb_req.dat[15:8]; end
            8'h10: win[1].base  <= wb_req.dat;
            8'h14: win[1].limit <= wb_req.dat;
            default: ;
          endcase
        end
      end
    end
  end

  // ---------------- line transfers ----------------
  function automatic logic in_win(window_t w, logic [ADDR_W-1:0] a);
    return w.en && a >= w.base && a <= w.limit;
  endfunction

  // target of the line being served (window 0 has priority)
  assign hit0 = in_win(win[0], r.addr);

  // arbitration: alternate when both caches wait
  always_comb begin
    if (creq[0].valid && creq[1].valid) pick = !last_served;
    else                                pick = creq[1].valid;
  end

  always_comb begin
    for (int c = 0; c < 2; c++) begin
      crsp[c].done  = (state == S_DONE) && (cur == c[0]);
      crsp[c].rdata = buf_line;
    end
  end

  assign ram_en    = (state == S_LRD) || (state == S_LWR);
  assign ram_we    = (state == S_LWR) ? 4'hF : 4'h0;
  assign ram_addr  = RAW'({r.addr[ADDR_W-1:2 + WSEL], cnt});
  assign ram_wdata = r.wdata[32*cnt +: 32];

  assign rma_valid = (state == S_REMOTE);
  assign rma_we    = r.we;
  assign rma_dst   = hit0 ? win[0].node : win[1].node;
  assign rma_addr  = r.addr;
  assign rma_wdata = r.wdata;

  assign evt_remote = (state == S_REMOTE) && rma_done;
  assign evt_local  = (state == S_LRD_LAST) || (state == S_LWR && cnt == WSEL'(LINE_WORDS - 1));

  logic [WSEL-1:0] cnt_q;   // word whose read data arrives this cycle

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state       <= S_IDLE;
      cur         <= 1'b0;
      last_served <= 1'b1;
      r           <= '0;
      cnt         <= '0;
      cnt_q       <= '0;
    end else begin
      cnt_q <= cnt;
      unique case (state)
        S_IDLE: if (creq[0].valid || creq[1].valid) begin
          cur         <= pick;
          last_served <= pick;
          r           <= creq[pick];
          cnt         <= '0;
          if (in_win(win[0], creq[pick].addr) || in_win(win[1], creq[pick].addr))
            state <= S_REMOTE;
          else if (creq[pick].we)
            state <= S_LWR;
          else
            state <= S_LRD;
        end
        S_LRD: begin
          cnt <= cnt + 1'b1;
          if (cnt == WSEL'(LINE_WORDS - 1)) state <= S_LRD_LAST;
        end
        S_LRD_LAST: state <= S_DONE;
        S_LWR: begin
          cnt <= cnt + 1'b1;
          if (cnt == WSEL'(LINE_WORDS - 1)) state <= S_DONE;
        end
        S_REMOTE: if (rma_done) state <= S_DONE;
        S_DONE:   state <= S_IDLE;
        default:  state <= S_IDLE;
      endcase
    end
  end

  // read data capture (one cycle after the address)
  always_ff @(posedge clk) begin
    if (state == S_LRD_LAST || (state == S_LRD && cnt != '0))
      buf_line[32*cnt_q +: 32] <= ram_rdata;
    if (state == S_REMOTE && rma_done)
      buf_line <= rma_rdata;
  end
endmodule
