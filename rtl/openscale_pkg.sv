// openscale_pkg: types and constants shared by the mesh multiprocessor.
//
// The NoC carries 32-bit flits (the channel width of the evaluated platform).
// A packet is a header flit holding the target router address, a size flit
// holding the number of payload flits that follow, and the payload. The
// first payload flit of every packet is a command word (pkt_cmd_t) that
// says what the packet is for: a message for the message module, or one of
// the remote-memory-access (RMA) request/answer kinds. The header/size layout
// follows the HERMES convention the router family is based on; the command
// word layout, the field widths and the kind encoding are this design's own.
//
// Coordinates: x grows towards East, y grows towards South, node (0,0) is
// the top-left corner of the mesh.
package openscale_pkg;

  parameter int unsigned FLIT_W     = 32;  // channel width
  parameter int unsigned COORD_W    = 4;   // bits per mesh coordinate
  parameter int unsigned LINE_WORDS = 8;   // words per cache line
  parameter int unsigned ADDR_W     = 32;  // byte address width seen by the CPU

  typedef logic [FLIT_W-1:0] flit_t;

  typedef struct packed {
    logic [COORD_W-1:0] x;
    logic [COORD_W-1:0] y;
  } coord_t;

  // Router ports, HERMES order.
  typedef enum logic [2:0] {
    PORT_EAST  = 3'd0,
    PORT_WEST  = 3'd1,
    PORT_NORTH = 3'd2,
    PORT_SOUTH = 3'd3,
    PORT_LOCAL = 3'd4
  } port_e;

  parameter int unsigned NPORTS = 5;

  // Packet kinds carried in the command word.
  typedef enum logic [3:0] {
    PK_MSG     = 4'd1,  // message-passing payload for the message module
    PK_RD_REQ  = 4'd2,  // RMA read request:  cmd, address
    PK_WR_REQ  = 4'd3,  // RMA write request: cmd, address, data words
    PK_RD_RESP = 4'd4,  // RMA read answer:   cmd, data words
    PK_WR_ACK  = 4'd5   // RMA write answer:  cmd
  } pkt_kind_e;

  typedef struct packed {
    pkt_kind_e          kind;   // [31:28]
    logic [3:0]         rsvd;   // [27:24]
    coord_t             src;    // [23:16] sender node
    logic [7:0]         rsvd2;  // [15:8]
    logic [7:0]         len;    // [7:0] data words carried or requested
  } pkt_cmd_t;

  // Header flit: target address in the low byte, HERMES style.
  function automatic flit_t make_header(coord_t dst);
    return flit_t'({dst.x, dst.y});
  endfunction

  function automatic coord_t header_dst(flit_t h);
    coord_t c;
    c.x = h[2*COORD_W-1:COORD_W];
    c.y = h[COORD_W-1:0];
    return c;
  endfunction

  // One cache line moved as a unit between caches, RAM and the RMA.
  typedef logic [LINE_WORDS*32-1:0] line_t;

  // Line-level memory request used behind the L1 caches.
  typedef struct packed {
    logic                 valid;
    logic                 we;     // 1: write the line back, 0: fill the line
    logic [ADDR_W-1:0]    addr;   // line-aligned byte address
    line_t                wdata;
  } line_req_t;

  typedef struct packed {
    logic   done;                 // one-cycle pulse, rdata valid for reads
    line_t  rdata;
  } line_rsp_t;

  // Node register bus: a single-master subset of Wishbone classic.
  typedef struct packed {
    logic        cyc;
    logic        stb;
    logic        we;
    logic [7:0]  adr;     // byte offset inside the slave
    logic [31:0] dat;
  } wb_req_t;

  typedef struct packed {
    logic        ack;
    logic [31:0] dat;
  } wb_rsp_t;

  // Cache operations on the data port of a node.
  typedef enum logic [1:0] {
    OP_READ  = 2'd0,
    OP_WRITE = 2'd1,
    OP_FLUSH = 2'd2,   // write back the line if dirty and the tag matches
    OP_INVAL = 2'd3    // drop the line if the tag matches
  } cache_op_e;

  // One-cycle event pulses of a node, for statistics and tests.
  typedef struct packed {
    logic imiss;        // instruction cache miss
    logic dmiss;        // data cache miss
    logic writeback;    // dirty line written back (miss or flush)
    logic remote_line;  // line moved through the RMA
    logic local_line;   // line moved from/to local RAM
    logic rma_served;   // request from another node answered
  } node_evt_t;

endpackage
