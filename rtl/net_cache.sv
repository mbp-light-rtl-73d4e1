// net_cache: the Net Cache of the Ack Generator.
//
// A direct-mapped cache of 512 entries, indexed by the low bits of the DSM
// line address carried in a packet header. Each entry holds a valid bit, the
// remaining address bits as a tag, and one bit telling whether the line is
// cached in this cluster (in an L2 or the L3 part of cluster memory). The
// lookup is combinational: hit and cached follow lk_addr in the same cycle.
// Entries are written by the core through I/O registers; a write takes effect
// at the clock edge. The entry count and the stored information follow the
// design description; the tag layout, the write path and clearing all valid
// bits at reset are this implementation's choices.
module net_cache #(
  parameter int ENTRIES = 512,
  parameter int ADDR_W  = 32,
  localparam int IW     = $clog2(ENTRIES),
  localparam int TW     = ADDR_W - IW
) (
  input  logic              clk,
  input  logic              rst,
  input  logic [ADDR_W-1:0] lk_addr,
  output logic              lk_hit,
  output logic              lk_cached,
  input  logic              wr_en,
  input  logic [ADDR_W-1:0] wr_addr,
  input  logic              wr_valid,
  input  logic              wr_cached
);
  logic [TW-1:0]  tag    [ENTRIES];
  logic           cached [ENTRIES];
  logic [ENTRIES-1:0] valid;

  always_ff @(posedge clk) begin
    if (rst) begin
      valid <= '0;
    end else if (wr_en) begin
      valid[wr_addr[IW-1:0]] <= wr_valid;
    end
  end

  always_ff @(posedge clk) begin
    if (wr_en) begin
      tag[wr_addr[IW-1:0]]    <= wr_addr[ADDR_W-1:IW];
      cached[wr_addr[IW-1:0]] <= wr_cached;
    end
  end

  wire [IW-1:0] idx = lk_addr[IW-1:0];
  assign lk_hit    = valid[idx] && (tag[idx] == lk_addr[ADDR_W-1:IW]);
  assign lk_cached = cached[idx];
endmodule
