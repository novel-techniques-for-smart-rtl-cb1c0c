// pe_node: one processing element of the mesh, everything of a node except
// the CPU core and the router. The CPU (a 32-bit pipelined core of the
// MicroBlaze instruction set) attaches to the instruction and data ports.
//
// Inside: instruction and data L1 caches; the memory mapper that sends each
// missing line either to the local RAM or, through the RMA-Send unit, to
// another node (shared-memory bonding or remote execution); the local RAM,
// whose second port is served by the RMA-Reply unit on behalf of other
// nodes; the message module; the timer, interrupt controller and DFS unit;
// and the network interface towards the router.
//
// Clocks: clk_ref is the NoC clock. The DFS unit derives the node clock
// clk_cpu from it, and all node logic runs on clk_cpu; the CPU must use it
// too. The router side of the network interface runs on clk_ref.
//
// Data port address map (byte addresses):
//   0x0000_0000 - 0x7FFF_FFFF  memory, through the data cache; only the low
//                              17 bits select a word of the 128 kB RAM
//   0x8000_0000 + 0x000        timer registers
//   0x8000_0000 + 0x100        interrupt controller registers
//   0x8000_0000 + 0x200        DFS registers
//   0x8000_0000 + 0x300        message module registers
//   0x8000_0000 + 0x400        memory mapper (window) registers
// Register accesses are uncached and take two cycles (d_ack in the second).
// Cache hits are acknowledged in the cycle of the request. d_op selects
// read, write, flush-line or invalidate-line (cache_op_e); flush and
// invalidate act on the data cache only.
// Interrupt sources: 0 timer, 1 message received.
// The set of node components follows the document's node figure; the
// address map, the register bus (a single-master subset of Wishbone) and
// the sizes of what the document does not give are this design's own.
module pe_node
  import openscale_pkg::*;
#(
  parameter int unsigned MY_X        = 0,
  parameter int unsigned MY_Y        = 0,
  parameter int unsigned ICACHE_BYTES = 16384,
  parameter int unsigned DCACHE_BYTES = 16384,
  parameter int unsigned RAM_BYTES    = 131072,
  parameter int unsigned DFS_STEPS    = 16
) (
  input  logic              clk_ref,
  input  logic              rst_n,
  output logic              clk_cpu,
  // CPU instruction port
  input  logic              i_req,
  input  logic [ADDR_W-1:0] i_addr,
  output logic              i_ack,
  output logic [31:0]       i_rdata,
  // CPU data port
  input  logic              d_req,
  input  cache_op_e         d_op,
  input  logic [ADDR_W-1:0] d_addr,
  input  logic [31:0]       d_wdata,
  input  logic [3:0]        d_wstrb,
  output logic              d_ack,
  output logic [31:0]       d_rdata,
  output logic              cpu_irq,
  // router Local port (clk_ref domain)
  output logic              inj_valid,
  input  logic              inj_ready,
  output flit_t             inj_data,
  input  logic              ej_valid,
  output logic              ej_ready,
  input  flit_t             ej_data,
  // statistics
  output node_evt_t         evt,
  output logic [$clog2(DFS_STEPS+1)-1:0] dfs_k
);
  localparam int unsigned RAW = $clog2(RAM_BYTES / 4);
  localparam coord_t MY_XY = '{x: COORD_W'(MY_X), y: COORD_W'(MY_Y)};

  logic clk;
  assign clk_cpu = clk;

  // ---------------- data port split ----------------
  logic    is_reg, dc_req, reg_ack;
  logic [31:0] dc_rdata, reg_rdata;
  logic    dc_ack;
  wb_req_t wb;
  wb_rsp_t wb_rsp [5];
  wb_req_t wb_s   [5];
  logic [2:0] slave;

  assign is_reg = d_addr[31];
  assign dc_req = d_req && !is_reg;
  assign slave  = d_addr[10:8];

  always_comb begin
    wb     = '0;
    wb.cyc = d_req && is_reg;
    wb.stb = d_req && is_reg;
    wb.we  = (d_op == OP_WRITE);
    wb.adr = d_addr[7:0];
    wb.dat = d_wdata;
    for (int s = 0; s < 5; s++) begin
      wb_s[s] = wb;
      if (slave != 3'(s)) begin
        wb_s[s].cyc = 1'b0;
        wb_s[s].stb = 1'b0;
      end
    end
    reg_ack   = 1'b0;
    reg_rdata = '0;
    for (int s = 0; s < 5; s++) begin
      if (slave == 3'(s)) begin
        reg_ack   = wb_rsp[s].ack;
        reg_rdata = wb_rsp[s].dat;
      end
    end
    // unmapped register slots answer at once with zero
    if (slave > 3'd4) reg_ack = 1'b1;
  end

  assign d_ack   = is_reg ? (d_req && reg_ack) : dc_ack;
  assign d_rdata = is_reg ? reg_rdata : dc_rdata;

  // ---------------- caches and mapper ----------------
  line_req_t creq [2];
  line_rsp_t crsp [2];

  l1_cache #(.SIZE_BYTES(ICACHE_BYTES)) u_icache (
    .clk, .rst_n,
    .cpu_req(i_req), .cpu_op(OP_READ), .cpu_addr(i_addr), .cpu_wdata('0), .cpu_wstrb('0),
    .cpu_ack(i_ack), .cpu_rdata(i_rdata),
    .mreq(creq[0]), .mrsp(crsp[0]),
    .evt_miss(evt.imiss), .evt_writeback(/* never: instructions are not written */)
  );

  l1_cache #(.SIZE_BYTES(DCACHE_BYTES)) u_dcache (
    .clk, .rst_n,
    .cpu_req(dc_req), .cpu_op(d_op), .cpu_addr(d_addr), .cpu_wdata(d_wdata), .cpu_wstrb(d_wstrb),
    .cpu_ack(dc_ack), .cpu_rdata(dc_rdata),
    .mreq(creq[1]), .mrsp(crsp[1]),
    .evt_miss(evt.dmiss), .evt_writeback(evt.writeback)
  );

  logic        ra_en,  rb_en;
  logic [3:0]  ra_we,  rb_we;
  logic [RAW-1:0] ra_addr, rb_addr;
  logic [31:0] ra_wdata, ra_rdata, rb_wdata, rb_rdata;

  logic        rs_valid, rs_we, rs_done;
  coord_t      rs_dst;
  logic [ADDR_W-1:0] rs_addr;
  line_t       rs_wdata, rs_rdata;

  dsm_mapper #(.RAM_BYTES(RAM_BYTES)) u_mapper (
    .clk, .rst_n,
    .creq, .crsp,
    .ram_en(ra_en), .ram_we(ra_we), .ram_addr(ra_addr), .ram_wdata(ra_wdata), .ram_rdata(ra_rdata),
    .rma_valid(rs_valid), .rma_we(rs_we), .rma_dst(rs_dst), .rma_addr(rs_addr),
    .rma_wdata(rs_wdata), .rma_done(rs_done), .rma_rdata(rs_rdata),
    .wb_req(wb_s[4]), .wb_rsp(wb_rsp[4]),
    .evt_remote(evt.remote_line), .evt_local(evt.local_line)
  );

  local_ram #(.BYTES(RAM_BYTES)) u_ram (
    .clk,
    .a_en(ra_en), .a_we(ra_we), .a_addr(ra_addr), .a_wdata(ra_wdata), .a_rdata(ra_rdata),
    .b_en(rb_en), .b_we(rb_we), .b_addr(rb_addr), .b_wdata(rb_wdata), .b_rdata(rb_rdata)
  );

  // ---------------- NoC users ----------------
  logic       u_tx_valid [3];
  logic       u_tx_ready [3];
  flit_t      u_tx_data  [3];
  logic       u_tx_last  [3];
  coord_t     u_tx_dst   [3];
  logic [7:0] u_tx_len   [3];
  logic       u_rx_valid [3];
  logic       u_rx_ready [3];
  flit_t      u_rx_data;
  logic       u_rx_last;

  rma_reply #(.RAM_BYTES(RAM_BYTES)) u_rma_reply (
    .clk, .rst_n, .my_xy(MY_XY),
    .rx_valid(u_rx_valid[0]), .rx_ready(u_rx_ready[0]), .rx_data(u_rx_data), .rx_last(u_rx_last),
    .tx_valid(u_tx_valid[0]), .tx_ready(u_tx_ready[0]), .tx_data(u_tx_data[0]),
    .tx_last(u_tx_last[0]), .tx_dst(u_tx_dst[0]), .tx_len(u_tx_len[0]),
    .ram_en(rb_en), .ram_we(rb_we), .ram_addr(rb_addr), .ram_wdata(rb_wdata), .ram_rdata(rb_rdata),
    .evt_served(evt.rma_served)
  );

  rma_send u_rma_send (
    .clk, .rst_n, .my_xy(MY_XY),
    .req_valid(rs_valid), .req_we(rs_we), .req_dst(rs_dst), .req_addr(rs_addr),
    .req_wdata(rs_wdata), .done(rs_done), .rdata(rs_rdata),
    .tx_valid(u_tx_valid[1]), .tx_ready(u_tx_ready[1]), .tx_data(u_tx_data[1]),
    .tx_last(u_tx_last[1]), .tx_dst(u_tx_dst[1]), .tx_len(u_tx_len[1]),
    .rx_valid(u_rx_valid[1]), .rx_ready(u_rx_ready[1]), .rx_data(u_rx_data), .rx_last(u_rx_last)
  );

  logic msg_irq, tmr_irq;

  msg_module u_msg (
    .clk, .rst_n, .my_xy(MY_XY),
    .wb_req(wb_s[3]), .wb_rsp(wb_rsp[3]), .irq(msg_irq),
    .tx_valid(u_tx_valid[2]), .tx_ready(u_tx_ready[2]), .tx_data(u_tx_data[2]),
    .tx_last(u_tx_last[2]), .tx_dst(u_tx_dst[2]), .tx_len(u_tx_len[2]),
    .rx_valid(u_rx_valid[2]), .rx_ready(u_rx_ready[2]), .rx_data(u_rx_data), .rx_last(u_rx_last)
  );

  network_interface u_ni (
    .clk_node(clk), .clk_noc(clk_ref), .rst_n,
    .u_tx_valid, .u_tx_ready, .u_tx_data, .u_tx_last, .u_tx_dst, .u_tx_len,
    .u_rx_valid, .u_rx_ready, .u_rx_data, .u_rx_last,
    .inj_valid, .inj_ready, .inj_data, .ej_valid, .ej_ready, .ej_data
  );

  // ---------------- peripherals ----------------
  timer u_timer (.clk, .rst_n, .wb_req(wb_s[0]), .wb_rsp(wb_rsp[0]), .irq(tmr_irq));

  irq_ctrl #(.NSRC(2)) u_irq (
    .clk, .rst_n, .src({msg_irq, tmr_irq}),
    .wb_req(wb_s[1]), .wb_rsp(wb_rsp[1]), .cpu_irq
  );

  dfs #(.STEPS(DFS_STEPS)) u_dfs (
    .clk_ref, .rst_n, .clk_node(clk),
    .wb_req(wb_s[2]), .wb_rsp(wb_rsp[2]), .k_active(dfs_k)
  );
endmodule
