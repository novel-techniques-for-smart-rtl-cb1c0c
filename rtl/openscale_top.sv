// openscale_top: the homogeneous mesh multiprocessor core. NX x NY
// processing-element nodes, each with its own local memory, caches, network
// interface with remote memory access, timer, interrupt controller and
// frequency scaling, joined by a 2D-mesh wormhole NoC with XY routing.
//
// Nodes normally exchange messages (message passing). For multithreading a
// group of nodes can be bonded into a virtual shared-memory cluster at run
// time: each member points its shared-memory window at the cluster's host
// node, and its data cache then fetches and writes back shared lines in the
// host's RAM through the NoC. For remote execution a node points its code
// window at the node that holds a task's code and runs the task from there,
// caching the instructions. Coherence is kept by software with tag-matched
// flush and invalidate operations at synchronisation points.
//
// The CPU cores are not part of this RTL: each node's instruction port, data
// port, interrupt line and derived clock are brought out as arrays indexed
// by node, index y*NX+x, with (0,0) the top-left node. clk is the NoC clock,
// from which every node derives its own clock (clk_cpu[n]); a CPU must be
// clocked by its node's clk_cpu and drive its ports in that domain.
// Defaults are the document's evaluated platform: a 3x3 array, 4-flit
// router input buffers, 32-bit links, 16 kB caches with 8-word lines; the
// 128 kB local memory follows the node memory map.
module openscale_top
  import openscale_pkg::*;
#(
  parameter int unsigned NX           = 3,
  parameter int unsigned NY           = 3,
  parameter int unsigned BUF_DEPTH    = 4,
  parameter int unsigned ICACHE_BYTES = 16384,
  parameter int unsigned DCACHE_BYTES = 16384,
  parameter int unsigned RAM_BYTES    = 131072,
  parameter int unsigned DFS_STEPS    = 16
) (
  input  logic              clk,
  input  logic              rst_n,
  output logic              clk_cpu [NX*NY],
  input  logic              i_req   [NX*NY],
  input  logic [ADDR_W-1:0] i_addr  [NX*NY],
  output logic              i_ack   [NX*NY],
  output logic [31:0]       i_rdata [NX*NY],
  input  logic              d_req   [NX*NY],
  input  cache_op_e         d_op    [NX*NY],
  input  logic [ADDR_W-1:0] d_addr  [NX*NY],
  input  logic [31:0]       d_wdata [NX*NY],
  input  logic [3:0]        d_wstrb [NX*NY],
  output logic              d_ack   [NX*NY],
  output logic [31:0]       d_rdata [NX*NY],
  output logic              cpu_irq [NX*NY],
  output node_evt_t         evt     [NX*NY],
  output logic [$clog2(DFS_STEPS+1)-1:0] dfs_k [NX*NY]
);
  localparam int unsigned N = NX * NY;

  logic  inj_valid [N];
  logic  inj_ready [N];
  flit_t inj_data  [N];
  logic  ej_valid  [N];
  logic  ej_ready  [N];
  flit_t ej_data   [N];

  noc_mesh #(.NX(NX), .NY(NY), .BUF_DEPTH(BUF_DEPTH)) u_noc (
    .clk, .rst_n,
    .inj_valid, .inj_ready, .inj_data,
    .ej_valid, .ej_ready, .ej_data
  );

  for (genvar y = 0; y < NY; y++) begin : g_y
    for (genvar x = 0; x < NX; x++) begin : g_x
      localparam int unsigned n = y * NX + x;
      pe_node #(
        .MY_X(x), .MY_Y(y),
        .ICACHE_BYTES(ICACHE_BYTES), .DCACHE_BYTES(DCACHE_BYTES),
        .RAM_BYTES(RAM_BYTES), .DFS_STEPS(DFS_STEPS)
      ) u_node (
        .clk_ref(clk), .rst_n, .clk_cpu(clk_cpu[n]),
        .i_req(i_req[n]), .i_addr(i_addr[n]), .i_ack(i_ack[n]), .i_rdata(i_rdata[n]),
        .d_req(d_req[n]), .d_op(d_op[n]), .d_addr(d_addr[n]), .d_wdata(d_wdata[n]),
        .d_wstrb(d_wstrb[n]), .d_ack(d_ack[n]), .d_rdata(d_rdata[n]),
        .cpu_irq(cpu_irq[n]),
        .inj_valid(inj_valid[n]), .inj_ready(inj_ready[n]), .inj_data(inj_data[n]),
        .ej_valid(ej_valid[n]), .ej_ready(ej_ready[n]), .ej_data(ej_data[n]),
        .evt(evt[n]), .dfs_k(dfs_k[n])
      );
    end
  end
endmodule
