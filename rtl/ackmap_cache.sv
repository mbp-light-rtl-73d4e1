// ackmap_cache: the Ackmap Cache of the Ack Generator.
//
// Indexed by the number of the cluster that sent a packet, it returns the
// bitmap describing the path an acknowledgment takes back to that cluster.
// Direct mapped: the low bits of the cluster number select an entry, the
// high bits are kept as its tag. Lookup is combinational; writes from the
// core take effect at the clock edge. The design description gives the
// index (source cluster) and the content (a returning-path bitmap); the 64
// entries, the 16-bit bitmap and the write path are this implementation's
// choices. Valid bits are cleared at reset.
module ackmap_cache #(
  parameter int ENTRIES   = 64,
  parameter int CLUSTER_W = 8,
  parameter int BITMAP_W  = 16,
  localparam int IW       = $clog2(ENTRIES),
  localparam int TW       = (CLUSTER_W > IW) ? CLUSTER_W - IW : 1
) (
  input  logic                 clk,
  input  logic                 rst,
  input  logic [CLUSTER_W-1:0] lk_src,
  output logic                 lk_hit,
  output logic [BITMAP_W-1:0]  lk_bitmap,
  input  logic                 wr_en,
  input  logic [CLUSTER_W-1:0] wr_src,
  input  logic                 wr_valid,
  input  logic [BITMAP_W-1:0]  wr_bitmap
);
  logic [TW-1:0]       tag    [ENTRIES];
  logic [BITMAP_W-1:0] bitmap [ENTRIES];
  logic [ENTRIES-1:0]  valid;

  function automatic logic [TW-1:0] tag_of(logic [CLUSTER_W-1:0] c);
    return TW'(c >> IW);
  endfunction

  always_ff @(posedge clk) begin
    if (rst) valid <= '0;
    else if (wr_en) valid[wr_src[IW-1:0]] <= wr_valid;
  end

  always_ff @(posedge clk) begin
    if (wr_en) begin
      tag[wr_src[IW-1:0]]    <= tag_of(wr_src);
      bitmap[wr_src[IW-1:0]] <= wr_bitmap;
    end
  end

  wire [IW-1:0] idx = lk_src[IW-1:0];
  assign lk_hit    = valid[idx] && (tag[idx] == tag_of(lk_src));
  assign lk_bitmap = bitmap[idx];
endmodule
