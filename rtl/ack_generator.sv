// ack_generator: the Ack Generator of the RDT Interface.
//
// When the header of a packet carrying a coherent message arrives, the Net
// Cache (by the DSM line address) and the Ackmap Cache (by the source
// cluster) are looked up together in the same cycle. If both hit, a reply
// packet is built in hardware: an ack when the Net Cache says the line is
// cached in this cluster, a nack when it says it is not. The reply has two
// flits: a header (type ACK/NACK, source = this cluster, destination = the
// sender, the sender's ack slot and the address) and a flit whose low bits
// carry the returning-path bitmap. If either cache misses, no reply is made
// and the core's software answers the message (it receives every coherent
// packet anyway). The reply waits in a one-packet buffer until the packet
// handler takes it (out_valid/out_ready, one flit per cycle, out_last on the
// second); lk_ready is low while the buffer is occupied. Lookup happens in
// the cycle of lk_valid; out_valid rises the cycle after.
// The caches, their indexing and the ack/nack decision follow the design
// description; the reply format and the behaviour on a miss are this
// implementation's own.
module ack_generator
  import mbp_pkg::*;
#(
  parameter int NC_N = NC_ENTRIES,
  parameter int AM_N = AM_ENTRIES
) (
  input  logic                 clk,
  input  logic                 rst,
  input  logic [CLUSTER_W-1:0] my_cluster,
  // lookup request from the packet handler
  input  logic                 lk_valid,
  output logic                 lk_ready,
  input  hdr_t                 lk_hdr,
  // reply packet to the packet handler
  output logic                 out_valid,
  input  logic                 out_ready,
  output flit_t                out_flit,
  output logic                 out_last,
  // cache fills from the core
  input  logic                 nc_wr_en,
  input  logic [DSM_AW-1:0]    nc_wr_addr,
  input  logic                 nc_wr_valid,
  input  logic                 nc_wr_cached,
  input  logic                 am_wr_en,
  input  logic [CLUSTER_W-1:0] am_wr_src,
  input  logic                 am_wr_valid,
  input  logic [BITMAP_W-1:0]  am_wr_bitmap,
  // statistics
  output logic [7:0]           n_ack,
  output logic [7:0]           n_nack,
  output logic [7:0]           n_miss
);
  logic nc_hit, nc_cached, am_hit;
  logic [BITMAP_W-1:0] am_bitmap;

  net_cache #(.ENTRIES(NC_N), .ADDR_W(DSM_AW)) u_nc (
    .clk, .rst,
    .lk_addr(lk_hdr.addr), .lk_hit(nc_hit), .lk_cached(nc_cached),
    .wr_en(nc_wr_en), .wr_addr(nc_wr_addr), .wr_valid(nc_wr_valid), .wr_cached(nc_wr_cached));

  ackmap_cache #(.ENTRIES(AM_N), .CLUSTER_W(CLUSTER_W), .BITMAP_W(BITMAP_W)) u_am (
    .clk, .rst,
    .lk_src(lk_hdr.src), .lk_hit(am_hit), .lk_bitmap(am_bitmap),
    .wr_en(am_wr_en), .wr_src(am_wr_src), .wr_valid(am_wr_valid), .wr_bitmap(am_wr_bitmap));

  logic  full, second;
  hdr_t  rep_hdr;
  logic [BITMAP_W-1:0] rep_bitmap;

  assign lk_ready = !full;
  wire take = lk_valid && lk_ready;

  always_ff @(posedge clk) begin
    if (rst) begin
      full   <= 1'b0;
      second <= 1'b0;
      n_ack  <= '0;
      n_nack <= '0;
      n_miss <= '0;
      rep_hdr    <= '0;
      rep_bitmap <= '0;
    end else begin
      if (take) begin
        if (nc_hit && am_hit) begin
          full           <= 1'b1;
          second         <= 1'b0;
          rep_hdr.ptype  <= nc_cached ? PT_ACK : PT_NACK;
          rep_hdr.src    <= my_cluster;
          rep_hdr.dst    <= lk_hdr.src;
          rep_hdr.slot   <= lk_hdr.slot;
          rep_hdr.rsvd   <= '0;
          rep_hdr.addr   <= lk_hdr.addr;
          rep_bitmap     <= am_bitmap;
          if (nc_cached) n_ack <= n_ack + 1'b1;
          else           n_nack <= n_nack + 1'b1;
        end else begin
          n_miss <= n_miss + 1'b1;
        end
      end
      if (out_valid && out_ready) begin
        if (second) begin
          full   <= 1'b0;
          second <= 1'b0;
        end else begin
          second <= 1'b1;
        end
      end
    end
  end

  assign out_valid = full;
  assign out_last  = second;
  assign out_flit  = second ? {4'b0, 48'b0, rep_bitmap} : {4'b0, rep_hdr};
endmodule
