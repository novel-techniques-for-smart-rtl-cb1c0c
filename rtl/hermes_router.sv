// hermes_router: five-port wormhole router of the mesh NoC (East, West,
// North, South, Local), in the style of the HERMES infrastructure.
//
// Each input port has its own FIFO (flit_fifo, BUF_DEPTH positions). When a
// header flit reaches the head of an input FIFO, the XY rule picks the output
// port: first along x until the column matches, then along y, then Local.
// A free output is granted to one requesting input by a per-output
// round-robin arbiter. From then on the input and output are locked to each
// other (wormhole switching) and every flit of the packet goes through: the
// header, the size flit, then as many payload flits as the size flit says.
// After the last flit both ports are released. A flit moves on a clock edge
// where the FIFO head is valid and the downstream ready is high, so a
// packet streams at one flit per cycle once routed; routing a header costs
// one cycle for arbitration.
//
// Link handshake is valid/ready per port (the original HERMES uses a
// credit signal; ready plays that role here). Wormhole locking, XY routing
// and one input FIFO per port follow the document; the round-robin
// arbiter, the handshake and the one-cycle routing delay are this design's.
module hermes_router
  import openscale_pkg::*;
#(
  parameter int unsigned MY_X      = 0,
  parameter int unsigned MY_Y      = 0,
  parameter int unsigned BUF_DEPTH = 4
) (
  input  logic  clk,
  input  logic  rst_n,
  input  logic  in_valid  [NPORTS],
  output logic  in_ready  [NPORTS],
  input  flit_t in_data   [NPORTS],
  output logic  out_valid [NPORTS],
  input  logic  out_ready [NPORTS],
  output flit_t out_data  [NPORTS]
);
  typedef enum logic [1:0] {PH_HDR, PH_SIZE, PH_PAY} phase_e;

  logic   fv   [NPORTS];
  flit_t  fd   [NPORTS];
  logic   pop  [NPORTS];

  logic   active [NPORTS];          // input locked to an output
  port_e  sel    [NPORTS];          // output used by the input
  phase_e phase  [NPORTS];
  logic [FLIT_W-1:0] remain [NPORTS];

  logic   busy  [NPORTS];           // output locked to an input
  logic [2:0] owner [NPORTS];
  logic [2:0] rr    [NPORTS];       // round-robin pointer per output

  logic   grant_v [NPORTS];         // per output: a grant this cycle
  logic [2:0] grant_i [NPORTS];     // per output: granted input

  for (genvar p = 0; p < NPORTS; p++) begin : g_buf
    flit_fifo #(.WIDTH(FLIT_W), .DEPTH(BUF_DEPTH)) u_buf (
      .clk, .rst_n,
      .in_valid (in_valid[p]), .in_ready(in_ready[p]), .in_data(in_data[p]),
      .out_valid(fv[p]), .out_ready(pop[p]), .out_data(fd[p]),
      .count    (/* occupancy not needed here */)
    );
  end

  function automatic port_e xy_route(flit_t hdr);
    coord_t d;
    d = header_dst(hdr);
    if (32'(d.x) > MY_X)      return PORT_EAST;
    else if (32'(d.x) < MY_X) return PORT_WEST;
    else if (32'(d.y) < MY_Y) return PORT_NORTH;
    else if (32'(d.y) > MY_Y) return PORT_SOUTH;
    else                      return PORT_LOCAL;
  endfunction

  function automatic logic [2:0] rr_idx(logic [2:0] base, int k);
    return 3'((32'(base) + k) % NPORTS);
  endfunction

  // Arbitration for free outputs.
  always_comb begin
    for (int o = 0; o < NPORTS; o++) begin
      grant_v[o] = 1'b0;
      grant_i[o] = '0;
      if (!busy[o]) begin
        // scan from the lowest priority up so the last hit wins
        for (int k = NPORTS - 1; k >= 0; k--) begin
          if (!active[rr_idx(rr[o], k)] && fv[rr_idx(rr[o], k)] &&
              (xy_route(fd[rr_idx(rr[o], k)]) == port_e'(o))) begin
            grant_v[o] = 1'b1;
            grant_i[o] = rr_idx(rr[o], k);
          end
        end
      end
    end
  end

  // Crossbar.
  always_comb begin
    for (int o = 0; o < NPORTS; o++) begin
      out_valid[o] = busy[o] && fv[owner[o]];
      out_data[o]  = fd[owner[o]];
    end
    for (int i = 0; i < NPORTS; i++) begin
      pop[i] = active[i] && fv[i] && out_ready[sel[i]];
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int p = 0; p < NPORTS; p++) begin
        active[p] <= 1'b0;
        sel[p]    <= PORT_LOCAL;
        phase[p]  <= PH_HDR;
        remain[p] <= '0;
        busy[p]   <= 1'b0;
        owner[p]  <= '0;
        rr[p]     <= '0;
      end
    end else begin
      for (int o = 0; o < NPORTS; o++) begin
        if (grant_v[o]) begin
          busy[o]            <= 1'b1;
          owner[o]           <= grant_i[o];
          rr[o]              <= (grant_i[o] == 3'(NPORTS - 1)) ? 3'd0 : grant_i[o] + 3'd1;
          active[grant_i[o]] <= 1'b1;
          sel[grant_i[o]]    <= port_e'(o);
          phase[grant_i[o]]  <= PH_HDR;
        end
      end
      for (int i = 0; i < NPORTS; i++) begin
        if (pop[i]) begin
          unique case (phase[i])
            PH_HDR:  phase[i] <= PH_SIZE;
            PH_SIZE: begin
              phase[i]  <= PH_PAY;
              remain[i] <= fd[i];
              if (fd[i] == '0) begin
                active[i]    <= 1'b0;
                busy[sel[i]] <= 1'b0;
              end
            end
            default: begin
              remain[i] <= remain[i] - 1'b1;
              if (remain[i] == 1) begin
                active[i]    <= 1'b0;
                busy[sel[i]] <= 1'b0;
              end
            end
          endcase
        end
      end
    end
  end
endmodule
