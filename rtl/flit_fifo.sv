// flit_fifo: synchronous first-in first-out buffer, used as the input buffer
// of each router port (one per port, 4 positions in the evaluated platform)
// and as a small queue inside the node.
//
// A circular array with read and write pointers and an occupancy counter.
// Write side: in_valid/in_ready, a word is taken on a clock edge where both
// are high. Read side: out_valid/out_data show the oldest word with no
// latency (first-word fall-through); it is removed on an edge where out_ready
// is high. in_ready depends only on the occupancy, never on out_ready, so
// ready signals do not chain combinationally from router to router.
// The depth default of 4 follows the document; the ready/valid handshake
// and the fall-through behaviour are this design's choice.
module flit_fifo #(
  parameter int unsigned WIDTH = 32,
  parameter int unsigned DEPTH = 4
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             in_valid,
  output logic             in_ready,
  input  logic [WIDTH-1:0] in_data,
  output logic             out_valid,
  input  logic             out_ready,
  output logic [WIDTH-1:0] out_data,
  output logic [$clog2(DEPTH+1)-1:0] count
);
  localparam int unsigned PW = (DEPTH > 1) ? $clog2(DEPTH) : 1;

  logic [WIDTH-1:0] mem [DEPTH];
  logic [PW-1:0]    rd_ptr, wr_ptr;
  logic             do_wr, do_rd;

  assign out_valid = (count != 0);
  assign in_ready  = (32'(count) < DEPTH);
  assign out_data  = mem[rd_ptr];
  assign do_wr     = in_valid && in_ready;
  assign do_rd     = out_valid && out_ready;

  function automatic logic [PW-1:0] next_ptr(logic [PW-1:0] p);
    return (p == PW'(DEPTH-1)) ? '0 : p + 1'b1;
  endfunction

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      rd_ptr <= '0;
      wr_ptr <= '0;
      count  <= '0;
    end else begin
      if (do_wr) wr_ptr <= next_ptr(wr_ptr);
      if (do_rd) rd_ptr <= next_ptr(rd_ptr);
      case ({do_wr, do_rd})
        2'b10:   count <= count + 1'b1;
        2'b01:   count <= count - 1'b1;
        default: ;
      endcase
    end
  end

  always_ff @(posedge clk) begin
    if (do_wr) mem[wr_ptr] <= in_data;
  end

`ifndef SYNTHESIS
  a_no_overflow: assert property (@(posedge clk) disable iff (!rst_n) 32'(count) <= DEPTH);
`endif
endmodule
