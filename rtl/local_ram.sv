// local_ram: the node's local memory, holding the microkernel, task code and
// data (and, on a cluster's host node, the shared data of the cluster).
//
// True dual-port word memory with byte write strobes and one-cycle read
// latency: rdata shows the word addressed on the previous edge where en was
// high. Port A serves the node's own cache line transfers, port B serves the
// RMA-Reply unit answering other nodes, so remote accesses never stall on
// the local CPU's. Writes to the same word from both ports in one cycle are
// not arbitrated (port B wins). The 128 kB default matches the 0x00000 to
// 0x1FFFF address map of a node; the two-port organisation is this design's.
module local_ram #(
  parameter int unsigned BYTES = 131072
) (
  input  logic        clk,
  input  logic        a_en,
  input  logic [3:0]  a_we,
  input  logic [$clog2(BYTES/4)-1:0] a_addr,   // word address
  input  logic [31:0] a_wdata,
  output logic [31:0] a_rdata,
  input  logic        b_en,
  input  logic [3:0]  b_we,
  input  logic [$clog2(BYTES/4)-1:0] b_addr,
  input  logic [31:0] b_wdata,
  output logic [31:0] b_rdata
);
  localparam int unsigned WORDS = BYTES / 4;

  logic [31:0] mem [WORDS];

  always_ff @(posedge clk) begin
    if (a_en) begin
      for (int b = 0; b < 4; b++)
        if (a_we[b]) mem[a_addr][8*b +: 8] <= a_wdata[8*b +: 8];
      a_rdata <= mem[a_addr];
    end
    if (b_en) begin
      for (int b = 0; b < 4; b++)
        if (b_we[b]) mem[b_addr][8*b +: 8] <= b_wdata[8*b +: 8];
      b_rdata <= mem[b_addr];
    end
  end
endmodule
