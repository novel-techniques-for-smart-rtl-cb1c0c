// noc_mesh: NX x NY two-dimensional mesh of hermes_router instances.
//
// Router (x,y) sits at index y*NX+x; x grows towards East and y towards
// South, so (0,0) is the top-left corner. Neighbouring routers are joined by
// a pair of opposite unidirectional 32-bit links with valid/ready handshake.
// Ports on the mesh border have nothing attached: their inputs are held
// idle and their outputs always ready (XY routing never sends a packet
// there when the target lies inside the mesh). The Local port of each router
// is brought out for the node's network interface. A packet crossing h
// routers takes about 2 cycles per hop before its header reaches the target
// Local port (one FIFO write, one arbitration), then streams one flit per
// cycle. The 3x3 default is the document's evaluated array.
module noc_mesh
  import openscale_pkg::*;
#(
  parameter int unsigned NX        = 3,
  parameter int unsigned NY        = 3,
  parameter int unsigned BUF_DEPTH = 4
) (
  input  logic  clk,
  input  logic  rst_n,
  // Local ports, index y*NX+x. "inj" goes into the NoC, "ej" comes out.
  input  logic  inj_valid [NX*NY],
  output logic  inj_ready [NX*NY],
  input  flit_t inj_data  [NX*NY],
  output logic  ej_valid  [NX*NY],
  input  logic  ej_ready  [NX*NY],
  output flit_t ej_data   [NX*NY]
);
  localparam int unsigned N = NX * NY;

  logic  iv [N][NPORTS];
  logic  ir [N][NPORTS];
  flit_t id [N][NPORTS];
  logic  ov [N][NPORTS];
  logic  orr[N][NPORTS];
  flit_t od [N][NPORTS];

  for (genvar y = 0; y < NY; y++) begin : g_y
    for (genvar x = 0; x < NX; x++) begin : g_x
      localparam int unsigned n = y * NX + x;

      hermes_router #(.MY_X(x), .MY_Y(y), .BUF_DEPTH(BUF_DEPTH)) u_router (
        .clk, .rst_n,
        .in_valid (iv[n]), .in_ready (ir[n]), .in_data (id[n]),
        .out_valid(ov[n]), .out_ready(orr[n]), .out_data(od[n])
      );

      // Local port
      assign iv[n][PORT_LOCAL]  = inj_valid[n];
      assign id[n][PORT_LOCAL]  = inj_data[n];
      assign inj_ready[n]       = ir[n][PORT_LOCAL];
      assign ej_valid[n]        = ov[n][PORT_LOCAL];
      assign ej_data[n]         = od[n][PORT_LOCAL];
      assign orr[n][PORT_LOCAL] = ej_ready[n];

      // East side: link to (x+1,y) West port
      if (x < NX - 1) begin : g_e
        assign iv[n][PORT_EAST]  = ov[n+1][PORT_WEST];
        assign id[n][PORT_EAST]  = od[n+1][PORT_WEST];
        assign orr[n][PORT_EAST] = ir[n+1][PORT_WEST];
      end else begin : g_e_edge
        assign iv[n][PORT_EAST]  = 1'b0;
        assign id[n][PORT_EAST]  = '0;
        assign orr[n][PORT_EAST] = 1'b1;
      end
      // West side
      if (x > 0) begin : g_w
        assign iv[n][PORT_WEST]  = ov[n-1][PORT_EAST];
        assign id[n][PORT_WEST]  = od[n-1][PORT_EAST];
        assign orr[n][PORT_WEST] = ir[n-1][PORT_EAST];
      end else begin : g_w_edge
        assign iv[n][PORT_WEST]  = 1'b0;
        assign id[n][PORT_WEST]  = '0;
        assign orr[n][PORT_WEST] = 1'b1;
      end
      // North side: (x,y-1)
      if (y > 0) begin : g_n
        assign iv[n][PORT_NORTH]  = ov[n-NX][PORT_SOUTH];
        assign id[n][PORT_NORTH]  = od[n-NX][PORT_SOUTH];
        assign orr[n][PORT_NORTH] = ir[n-NX][PORT_SOUTH];
      end else begin : g_n_edge
        assign iv[n][PORT_NORTH]  = 1'b0;
        assign id[n][PORT_NORTH]  = '0;
        assign orr[n][PORT_NORTH] = 1'b1;
      end
      // South side: (x,y+1)
      if (y < NY - 1) begin : g_s
        assign iv[n][PORT_SOUTH]  = ov[n+NX][PORT_NORTH];
        assign id[n][PORT_SOUTH]  = od[n+NX][PORT_NORTH];
        assign orr[n][PORT_SOUTH] = ir[n+NX][PORT_NORTH];
      end else begin : g_s_edge
        assign iv[n][PORT_SOUTH]  = 1'b0;
        assign id[n][PORT_SOUTH]  = '0;
        assign orr[n][PORT_SOUTH] = 1'b1;
      end
    end
  end
endmodule
