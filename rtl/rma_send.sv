// rma_send: requesting half of the remote memory access (RMA) unit. It
// turns a cache line request for memory that lives in another node into a
// NoC packet and waits for the answer.
//
// A request (req_valid held high until done) carries the target node, a
// line-aligned address and, for a write, the 8-word line. The unit streams
// the payload of one packet to the network interface:
//   read:  {cmd RD_REQ, len 8}, address
//   write: {cmd WR_REQ, len 8}, address, 8 data words
// tx_dst and tx_len (payload flits) are stable for the whole packet; tx_last
// marks its final flit. Then it waits for the answer packet payload on the
// rx stream (RD_RESP with 8 words, or WR_ACK alone), and pulses done, with
// rdata holding the line for a read. One request is outstanding at a time.
// The split into RMA-Send and RMA-Reply and their roles follow the
// document; the packet contents and the write acknowledgement (which lets a
// flush complete only when the data is in the remote memory) are this
// design's choices.
module rma_send
  import openscale_pkg::*;
(
  input  logic              clk,
  input  logic              rst_n,
  input  coord_t            my_xy,
  // request from the memory mapper
  input  logic              req_valid,
  input  logic              req_we,
  input  coord_t            req_dst,
  input  logic [ADDR_W-1:0] req_addr,
  input  line_t             req_wdata,
  output logic              done,
  output line_t             rdata,
  // outgoing payload stream
  output logic              tx_valid,
  input  logic              tx_ready,
  output flit_t             tx_data,
  output logic              tx_last,
  output coord_t            tx_dst,
  output logic [7:0]        tx_len,
  // incoming payload stream (answers)
  input  logic              rx_valid,
  output logic              rx_ready,
  input  flit_t             rx_data,
  input  logic              rx_last
);
  typedef enum logic [2:0] {S_IDLE, S_SEND, S_WAIT_CMD, S_WAIT_DATA, S_DONE} state_e;
  localparam int unsigned WSEL = $clog2(LINE_WORDS);

  state_e          state;
  logic [3:0]      idx;       // payload flit being sent
  logic [WSEL-1:0] widx;      // data word being received
  pkt_cmd_t        cmd;

  always_comb begin
    cmd      = '0;
    cmd.kind = req_we ? PK_WR_REQ : PK_RD_REQ;
    cmd.src  = my_xy;
    cmd.len  = 8'(LINE_WORDS);
  end

  assign tx_valid = (state == S_SEND);
  assign tx_dst   = req_dst;
  assign tx_len   = req_we ? 8'(2 + LINE_WORDS) : 8'd2;
  assign tx_last  = (32'(idx) == 32'(tx_len) - 1);
  always_comb begin
    if (idx == 0)      tx_data = flit_t'(cmd);
    else if (idx == 1) tx_data = req_addr;
    else               tx_data = req_wdata[32*(32'(idx)-2) +: 32];
  end

  assign rx_ready = (state == S_WAIT_CMD) || (state == S_WAIT_DATA);
  assign done     = (state == S_DONE);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state <= S_IDLE;
      idx   <= '0;
      widx  <= '0;
    end else begin
      unique case (state)
        S_IDLE: if (req_valid) begin
          idx   <= '0;
          state <= S_SEND;
        end
        S_SEND: if (tx_ready) begin
          idx <= idx + 1'b1;
          if (tx_last) state <= S_WAIT_CMD;
        end
        S_WAIT_CMD: if (rx_valid) begin
          widx  <= '0;
          state <= rx_last ? S_DONE : S_WAIT_DATA;
        end
        S_WAIT_DATA: if (rx_valid) begin
          widx <= widx + 1'b1;
          if (rx_last) state <= S_DONE;
        end
        S_DONE:  state <= S_IDLE;
        default: state <= S_IDLE;
      endcase
    end
  end

  always_ff @(posedge clk) begin
    if (state == S_WAIT_DATA && rx_valid) rdata[32*widx +: 32] <= rx_data;
  end

`ifndef SYNTHESIS
  a_req_held: assert property (@(posedge clk) disable iff (!rst_n)
    req_valid && !done |=> req_valid);
`endif
endmodule
