// rma_reply: answering half of the remote memory access unit. It serves
// read and write requests that other nodes send to this node's RAM, through
// RAM port B, without involving this node's CPU.
//
// Request payloads arrive on the rx stream: command word, address, then for
// a write the data words. A write stores each word as it arrives (one per
// cycle) and then sends a one-flit WR_ACK packet to the requester. A read
// fetches the requested words (len, at most LINE_WORDS) into a line buffer,
// one RAM read per cycle, then sends {RD_RESP} followed by the words. With
// an idle NoC a line read keeps the unit busy for about 2 + 9 + 9 = 20
// node cycles. The unit handles one request at a time; further requests wait
// in the NoC. Serving requests without the local CPU and answering the
// requester follow the document; the buffering scheme is this design's.
module rma_reply
  import openscale_pkg::*;
#(
  parameter int unsigned RAM_BYTES = 131072
) (
  input  logic        clk,
  input  logic        rst_n,
  input  coord_t      my_xy,
  // incoming requests
  input  logic        rx_valid,
  output logic        rx_ready,
  input  flit_t       rx_data,
  input  logic        rx_last,
  // outgoing answers
  output logic        tx_valid,
  input  logic        tx_ready,
  output flit_t       tx_data,
  output logic        tx_last,
  output coord_t      tx_dst,
  output logic [7:0]  tx_len,
  // RAM port B
  output logic        ram_en,
  output logic [3:0]  ram_we,
  output logic [$clog2(RAM_BYTES/4)-1:0] ram_addr,
  output logic [31:0] ram_wdata,
  input  logic [31:0] ram_rdata,
  // one pulse per request served
  output logic        evt_served
);
  localparam int unsigned RAW  = $clog2(RAM_BYTES / 4);
  localparam int unsigned WSEL = $clog2(LINE_WORDS);

  typedef enum logic [2:0] {S_CMD, S_ADDR, S_WDATA, S_READ, S_READ_LAST, S_SEND} state_e;

  state_e     state;
  pkt_cmd_t   req;
  logic [RAW-1:0] waddr;     // current word address
  logic [7:0] cnt;
  logic [WSEL-1:0] cnt_q;
  line_t      lbuf;
  logic [3:0] sidx;          // answer flit being sent
  pkt_cmd_t   ans;

  assign rx_ready = (state == S_CMD) || (state == S_ADDR) || (state == S_WDATA);

  assign ram_en    = (state == S_READ) || (state == S_WDATA && rx_valid);
  assign ram_we    = (state == S_WDATA) ? 4'hF : 4'h0;
  assign ram_addr  = waddr;
  assign ram_wdata = rx_data;

  always_comb begin
    ans      = '0;
    ans.kind = (req.kind == PK_WR_REQ) ? PK_WR_ACK : PK_RD_RESP;
    ans.src  = my_xy;
    ans.len  = (req.kind == PK_WR_REQ) ? 8'd0 : req.len;
  end

  assign tx_valid = (state == S_SEND);
  assign tx_dst   = req.src;
  assign tx_len   = 8'd1 + ans.len;
  assign tx_last  = (8'(sidx) == tx_len - 8'd1);
  assign tx_data  = (sidx == 0) ? flit_t'(ans) : lbuf[32*(32'(sidx)-1) +: 32];

  assign evt_served = (state == S_SEND) && tx_ready && tx_last;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state <= S_CMD;
      req   <= '0;
      waddr <= '0;
      cnt   <= '0;
      cnt_q <= '0;
      sidx  <= '0;
    end else begin
      cnt_q <= WSEL'(cnt);
      unique case (state)
        S_CMD: if (rx_valid) begin
          req   <= pkt_cmd_t'(rx_data);
          state <= S_ADDR;
        end
        S_ADDR: if (rx_valid) begin
          waddr <= RAW'(rx_data[ADDR_W-1:2]);
          cnt   <= '0;
          sidx  <= '0;
          if (req.kind == PK_WR_REQ) state <= rx_last ? S_SEND : S_WDATA;
          else                       state <= S_READ;
        end
        S_WDATA: if (rx_valid) begin
          waddr <= waddr + 1'b1;
          if (rx_last) state <= S_SEND;
        end
        S_READ: begin
          waddr <= waddr + 1'b1;
          cnt   <= cnt + 1'b1;
          if (cnt == req.len - 8'd1) state <= S_READ_LAST;
        end
        S_READ_LAST: state <= S_SEND;
        S_SEND: if (tx_ready) begin
          sidx <= sidx + 1'b1;
          if (tx_last) state <= S_CMD;
        end
        default: state <= S_CMD;
      endcase
    end
  end

  always_ff @(posedge clk) begin
    if (state == S_READ_LAST || (state == S_READ && cnt != 0))
      lbuf[32*cnt_q +: 32] <= ram_rdata;
  end

`ifndef SYNTHESIS
  a_len_ok: assert property (@(posedge clk) disable iff (!rst_n)
    state == S_ADDR |-> req.len <= 8'(LINE_WORDS) && req.len != 0 || req.kind == PK_WR_REQ);
`endif
endmodule
