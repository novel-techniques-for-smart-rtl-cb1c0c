// async_fifo: dual-clock FIFO joining a node's clock domain (whose frequency
// the DFS block changes at run time) and the NoC clock domain. The network
// interface uses one in each direction.
//
// Classic Gray-code design: binary read and write pointers with one extra
// wrap bit, converted to Gray code and passed to the other domain through two
// flip-flop synchronisers. "Full" is computed in the write domain against the
// synchronised read pointer, "empty" in the read domain against the
// synchronised write pointer, so both are conservative. The read side is
// first-word fall-through: rd_valid/rd_data show the oldest word, rd_ready
// pops it. The write side takes wr_data when wr_valid and wr_ready are high.
// Latency from write to visible on the read side is about three read-clock
// edges. The document states only that asynchronous FIFOs join the RMA to the
// NoC; depth and structure are this design's own. DEPTH must be a power of two.
module async_fifo #(
  parameter int unsigned WIDTH = 32,
  parameter int unsigned DEPTH = 8
) (
  input  logic             wr_clk,
  input  logic             wr_rst_n,
  input  logic             wr_valid,
  output logic             wr_ready,
  input  logic [WIDTH-1:0] wr_data,
  input  logic             rd_clk,
  input  logic             rd_rst_n,
  output logic             rd_valid,
  input  logic             rd_ready,
  output logic [WIDTH-1:0] rd_data
);
  localparam int unsigned AW = $clog2(DEPTH);

  logic [WIDTH-1:0] mem [DEPTH];
  logic [AW:0] wbin, rbin, wgray, rgray;
  logic [AW:0] rgray_w1, rgray_w2;   // read pointer seen by the write side
  logic [AW:0] wgray_r1, wgray_r2;   // write pointer seen by the read side

  function automatic logic [AW:0] bin2gray(logic [AW:0] b);
    return b ^ (b >> 1);
  endfunction

  // write domain
  assign wr_ready = (wgray != {~rgray_w2[AW:AW-1], rgray_w2[AW-2:0]});

  always_ff @(posedge wr_clk or negedge wr_rst_n) begin
    if (!wr_rst_n) begin
      wbin     <= '0;
      wgray    <= '0;
      rgray_w1 <= '0;
      rgray_w2 <= '0;
    end else begin
      rgray_w1 <= rgray;
      rgray_w2 <= rgray_w1;
      if (wr_valid && wr_ready) begin
        wbin  <= wbin + 1'b1;
        wgray <= bin2gray(wbin + 1'b1);
      end
    end
  end

  always_ff @(posedge wr_clk) begin
    if (wr_valid && wr_ready) mem[wbin[AW-1:0]] <= wr_data;
  end

  // read domain
  assign rd_valid = (rgray != wgray_r2);
  assign rd_data  = mem[rbin[AW-1:0]];

  always_ff @(posedge rd_clk or negedge rd_rst_n) begin
    if (!rd_rst_n) begin
      rbin     <= '0;
      rgray    <= '0;
      wgray_r1 <= '0;
      wgray_r2 <= '0;
    end else begin
      wgray_r1 <= wgray;
      wgray_r2 <= wgray_r1;
      if (rd_valid && rd_ready) begin
        rbin  <= rbin + 1'b1;
        rgray <= bin2gray(rbin + 1'b1);
      end
    end
  end
endmodule
