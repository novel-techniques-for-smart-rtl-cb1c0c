// network_interface: joins a node to its router's Local port. It packetizes
// what the node's three NoC users send and depacketizes what arrives for
// them, and it carries the flits across the clock boundary between the node
// (whose clock the DFS unit scales) and the NoC.
//
// Users, by index: 0 RMA-Reply, 1 RMA-Send, 2 message module. Each offers a
// payload stream (valid/ready/data/last) with a destination node and a
// payload length that stay stable for the packet. The packetizer picks one
// waiting user in round-robin order, writes a header flit (destination) and
// a size flit (payload length) and then the user's payload flits into the
// outgoing asynchronous FIFO. On the way in, the depacketizer drops the
// header, notes the size, reads the packet kind from the first payload flit
// (the command word) and steers the whole payload to the RMA-Reply unit
// (requests), the RMA-Send unit (answers) or the message module (messages),
// with last marking the final flit. Two asynchronous FIFOs, one per
// direction, sit between this logic (node clock) and the router (NoC clock).
// The NI's packetization role and the asynchronous FIFOs follow the
// document; sharing one FIFO pair between all three users, the arbitration
// and the steering by command word are this design's own. The reset is
// asynchronous and must be released when both clocks run.
module network_interface
  import openscale_pkg::*;
#(
  parameter int unsigned AFIFO_DEPTH = 8
) (
  input  logic       clk_node,
  input  logic       clk_noc,
  input  logic       rst_n,
  // users' outgoing payload streams
  input  logic       u_tx_valid [3],
  output logic       u_tx_ready [3],
  input  flit_t      u_tx_data  [3],
  input  logic       u_tx_last  [3],
  input  coord_t     u_tx_dst   [3],
  input  logic [7:0] u_tx_len   [3],
  // users' incoming payload streams
  output logic       u_rx_valid [3],
  input  logic       u_rx_ready [3],
  output flit_t      u_rx_data,
  output logic       u_rx_last,
  // router Local port (NoC clock)
  output logic       inj_valid,
  input  logic       inj_ready,
  output flit_t      inj_data,
  input  logic       ej_valid,
  output logic       ej_ready,
  input  flit_t      ej_data
);
  // ---------------- outgoing ----------------
  typedef enum logic [1:0] {T_IDLE, T_HDR, T_SIZE, T_PAY} tstate_e;
  tstate_e    tstate;
  logic [1:0] tsel, rr;
  logic       tw_valid, tw_ready;
  flit_t      tw_data;
  logic [1:0] pick;
  logic       any;

  always_comb begin
    any  = 1'b0;
    pick = rr;
    for (int k = 2; k >= 0; k--) begin
      if (u_tx_valid[(32'(rr) + k) % 3]) begin
        any  = 1'b1;
        pick = 2'((32'(rr) + k) % 3);
      end
    end
  end

  always_comb begin
    tw_valid = 1'b0;
    tw_data  = '0;
    unique case (tstate)
      T_HDR:  begin tw_valid = 1'b1; tw_data = make_header(u_tx_dst[tsel]); end
      T_SIZE: begin tw_valid = 1'b1; tw_data = flit_t'(u_tx_len[tsel]); end
      T_PAY:  begin tw_valid = u_tx_valid[tsel]; tw_data = u_tx_data[tsel]; end
      default: ;
    endcase
    for (int u = 0; u < 3; u++)
      u_tx_ready[u] = (tstate == T_PAY) && (tsel == 2'(u)) && tw_ready;
  end

  always_ff @(posedge clk_node or negedge rst_n) begin
    if (!rst_n) begin
      tstate <= T_IDLE;
      tsel   <= '0;
      rr     <= '0;
    end else begin
      unique case (tstate)
        T_IDLE: if (any) begin
          tsel   <= pick;
          rr     <= (pick == 2'd2) ? 2'd0 : pick + 2'd1;
          tstate <= T_HDR;
        end
        T_HDR:  if (tw_ready) tstate <= T_SIZE;
        T_SIZE: if (tw_ready) tstate <= T_PAY;
        T_PAY:  if (tw_valid && tw_ready && u_tx_last[tsel]) tstate <= T_IDLE;
        default: tstate <= T_IDLE;
      endcase
    end
  end

  async_fifo #(.WIDTH(FLIT_W), .DEPTH(AFIFO_DEPTH)) u_tx_afifo (
    .wr_clk(clk_node), .wr_rst_n(rst_n), .wr_valid(tw_valid), .wr_ready(tw_ready), .wr_data(tw_data),
    .rd_clk(clk_noc),  .rd_rst_n(rst_n), .rd_valid(inj_valid), .rd_ready(inj_ready), .rd_data(inj_data)
  );

  // ---------------- incoming ----------------
  typedef enum logic [1:0] {R_HDR, R_SIZE, R_CMD, R_PAY} rstate_e;
  rstate_e    rstate;
  logic       rr_valid, rr_ready;
  flit_t      rr_data;
  logic [1:0] rdst, rdst_cmd;
  logic [FLIT_W-1:0] remain;
  pkt_cmd_t   head_cmd;

  async_fifo #(.WIDTH(FLIT_W), .DEPTH(AFIFO_DEPTH)) u_rx_afifo (
    .wr_clk(clk_noc),  .wr_rst_n(rst_n), .wr_valid(ej_valid), .wr_ready(ej_ready), .wr_data(ej_data),
    .rd_clk(clk_node), .rd_rst_n(rst_n), .rd_valid(rr_valid), .rd_ready(rr_ready), .rd_data(rr_data)
  );

  assign head_cmd = pkt_cmd_t'(rr_data);
  always_comb begin
    unique case (head_cmd.kind)
      PK_RD_REQ, PK_WR_REQ:   rdst_cmd = 2'd0;
      PK_RD_RESP, PK_WR_ACK:  rdst_cmd = 2'd1;
      default:                rdst_cmd = 2'd2;
    endcase
  end

  logic [1:0] cur_dst;
  assign cur_dst   = (rstate == R_CMD) ? rdst_cmd : rdst;
  assign u_rx_data = rr_data;
  assign u_rx_last = (remain == 1);

  always_comb begin
    for (int u = 0; u < 3; u++)
      u_rx_valid[u] = rr_valid && (rstate == R_CMD || rstate == R_PAY) && cur_dst == 2'(u);
    unique case (rstate)
      R_HDR, R_SIZE: rr_ready = 1'b1;
      default:       rr_ready = u_rx_ready[cur_dst];
    endcase
  end

  always_ff @(posedge clk_node or negedge rst_n) begin
    if (!rst_n) begin
      rstate <= R_HDR;
      rdst   <= '0;
      remain <= '0;
    end else if (rr_valid && rr_ready) begin
      unique case (rstate)
        R_HDR:  rstate <= R_SIZE;
        R_SIZE: begin
          remain <= rr_data;
          rstate <= (rr_data == 0) ? R_HDR : R_CMD;
        end
        R_CMD, R_PAY: begin
          rdst   <= cur_dst;
          remain <= remain - 1'b1;
          rstate <= (remain == 1) ? R_HDR : R_PAY;
        end
        default: rstate <= R_HDR;
      endcase
    end
  end
endmodule
