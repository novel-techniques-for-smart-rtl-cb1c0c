// msg_module: message module of the network interface, the hardware under
// the message-passing primitives (MPI_Send / MPI_Receive style) of the
// microkernel.
//
// Sending: the CPU writes up to TX_DEPTH payload words into TXDATA, then
// writes the destination node into TXSEND. The module sends one packet
// whose payload is a command word {MSG, source node, word count} followed by
// the words. Receiving: every incoming message payload (command word first,
// then the words) is queued in the RX FIFO; the CPU reads RXDATA to pop one
// word. irq is high while the RX FIFO holds anything. When the RX FIFO is
// full the module stops accepting flits, which holds the packet back in the
// NoC (flow control).
//
// Registers (byte offsets on the node register bus, one-cycle ack):
//   0x00 TXDATA  W  push a payload word
//   0x04 TXSEND  W  [7:0] destination {x[7:4], y[3:0]}; starts the send
//   0x08 RXDATA  R  pop the oldest received word
//   0x0C STATUS  R  [7:0] RX count, [15:8] TX count, [16] sending
// The document names the message module and its FIFO; its registers, the
// FIFO depths and the interrupt are this design's own.
module msg_module
  import openscale_pkg::*;
#(
  parameter int unsigned TX_DEPTH = 16,
  parameter int unsigned RX_DEPTH = 16
) (
  input  logic        clk,
  input  logic        rst_n,
  input  coord_t      my_xy,
  input  wb_req_t     wb_req,
  output wb_rsp_t     wb_rsp,
  output logic        irq,
  // outgoing payload stream
  output logic        tx_valid,
  input  logic        tx_ready,
  output flit_t       tx_data,
  output logic        tx_last,
  output coord_t      tx_dst,
  output logic [7:0]  tx_len,
  // incoming payload stream
  input  logic        rx_valid,
  output logic        rx_ready,
  input  flit_t       rx_data,
  input  logic        rx_last
);
  logic        access;
  logic        sending, hdr_sent;
  logic [7:0]  words_left;
  logic [7:0]  len_q;       // words in the packet being sent
  coord_t      dst_q;
  logic [$clog2(TX_DEPTH+1)-1:0] tx_cnt;
  logic [$clog2(RX_DEPTH+1)-1:0] rx_cnt;
  logic        txf_valid, txf_pop;
  flit_t       txf_data;
  logic        rxf_valid, rxf_pop;
  flit_t       rxf_data;
  logic        txf_push;
  pkt_cmd_t    cmd;

  assign access   = wb_req.cyc && wb_req.stb && !wb_rsp.ack;
  assign txf_push = access && wb_req.we && wb_req.adr == 8'h00;
  assign rxf_pop  = access && !wb_req.we && wb_req.adr == 8'h08 && rxf_valid;

  flit_fifo #(.WIDTH(FLIT_W), .DEPTH(TX_DEPTH)) u_txf (
    .clk, .rst_n,
    .in_valid(txf_push), .in_ready(/* a full TX FIFO drops the word */), .in_data(wb_req.dat),
    .out_valid(txf_valid), .out_ready(txf_pop), .out_data(txf_data), .count(tx_cnt)
  );

  flit_fifo #(.WIDTH(FLIT_W), .DEPTH(RX_DEPTH)) u_rxf (
    .clk, .rst_n,
    .in_valid(rx_valid), .in_ready(rx_ready), .in_data(rx_data),
    .out_valid(rxf_valid), .out_ready(rxf_pop), .out_data(rxf_data), .count(rx_cnt)
  );

  assign irq = rxf_valid;

  always_comb begin
    cmd      = '0;
    cmd.kind = PK_MSG;
    cmd.src  = my_xy;
    cmd.len  = len_q;
  end

  assign tx_valid = sending && (!hdr_sent || txf_valid);
  assign tx_data  = hdr_sent ? txf_data : flit_t'(cmd);
  assign tx_dst   = dst_q;
  assign tx_len   = 8'd1 + len_q;
  assign tx_last  = hdr_sent ? (words_left == 8'd1) : (words_left == 8'd0);
  assign txf_pop  = sending && hdr_sent && tx_ready;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      sending    <= 1'b0;
      hdr_sent   <= 1'b0;
      words_left <= '0;
      len_q      <= '0;
      dst_q      <= '0;
      wb_rsp     <= '0;
    end else begin
      wb_rsp.ack <= access;
      if (access) begin
        unique case (wb_req.adr)
          8'h08:   wb_rsp.dat <= rxf_data;
          8'h0C:   wb_rsp.dat <= {15'd0, sending, 8'(tx_cnt), 8'(rx_cnt)};
          default: wb_rsp.dat <= '0;
        endcase
      end
      if (!sending && access && wb_req.we && wb_req.adr == 8'h04) begin
        sending    <= 1'b1;
        hdr_sent   <= 1'b0;
        words_left <= 8'(tx_cnt);
        len_q      <= 8'(tx_cnt);
        dst_q      <= coord_t'(wb_req.dat[7:0]);
      end else if (sending && tx_valid && tx_ready) begin
        if (tx_last) sending <= 1'b0;
        if (!hdr_sent) hdr_sent <= 1'b1;
        else           words_left <= words_left - 1'b1;
      end
    end
  end

  // rx_last is implied by the command word length; the FIFO keeps packets whole.
  logic unused_ok;
  assign unused_ok = rx_last;
endmodule
