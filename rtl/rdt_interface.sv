// rdt_interface: the RDT Interface, MBP-light's hardwired link to the RDT
// router chip of the interconnection network.
//
// It joins the Packet Handler (packets in and out of the PBR sets), the Ack
// Generator (ack/nack replies to coherent messages, with its Net Cache and
// Ackmap Cache) and the Ack Collector (counts returning replies). The core
// controls all three through I/O registers (mbp_pkg R_* addresses, low byte
// of the I/O address); register reads are combinational and writes act at
// the clock edge:
//   RX_STATUS  rd  [15] a received packet waits, [9:8] its set, [4:0] length
//   RX_RELEASE wr  [1:0] set handed back to the receiver
//   TX_SEND    wr  [1:0] set to send, [12:8] its length in flits
//   SET_STATE  rd  two bits per set (FREE, FULL, SEND)
//   NC_ADDR_LO/HI, NC_WRITE  wr  fill a Net Cache entry ([1] valid [0] cached)
//   AM_BITMAP, AM_WRITE      wr  fill an Ackmap Cache entry ([8] valid [7:0] cluster)
//   AG_COUNT   rd  acks and nacks generated in hardware
//   AC_ARM     wr  [15:12] slot, [7:0] number of replies expected
//   AC_DONE, AC_NACK  rd  one bit per slot
// The three parts follow the design description; the register map is this
// implementation's own.
module rdt_interface
  import mbp_pkg::*;
(
  input  logic                 clk,
  input  logic                 rst,
  input  logic [CLUSTER_W-1:0] my_cluster,
  // router link
  input  logic                 in_valid,
  output logic                 in_ready,
  input  flit_t                in_flit,
  input  logic                 in_last,
  output logic                 out_valid,
  input  logic                 out_ready,
  output flit_t                out_flit,
  output logic                 out_last,
  // PBR port
  output pbr_idx_t             p_raddr,
  input  flit_t                p_rdata,
  output logic                 p_we,
  output pbr_idx_t             p_waddr,
  output flit_t                p_wdata,
  // I/O registers
  input  logic                 io_we,
  input  logic [7:0]           io_addr,
  input  logic [15:0]          io_wdata,
  output logic [15:0]          io_rdata,
  // statistics
  output logic [7:0]           n_rx_pkts,
  output logic [7:0]           n_tx_pkts,
  output logic [7:0]           n_rx_stalls,
  output logic [7:0]           n_ack_gen,
  output logic [7:0]           n_nack_gen,
  output logic [7:0]           n_ag_miss
);
  logic lk_valid, lk_ready;
  hdr_t lk_hdr;
  logic ag_valid, ag_ready, ag_last;
  flit_t ag_flit;
  logic ac_valid, ac_nack;
  logic [3:0] ac_slot;
  logic rx_head_valid;
  logic [1:0] rx_head_set;
  logic [4:0] rx_head_len;
  set_state_e set_state [PBR_SETS];
  logic [AC_SLOTS-1:0] ac_done, ac_nack_seen;

  logic [DSM_AW-1:0]   nc_addr;
  logic [BITMAP_W-1:0] am_bitmap;

  wire wr_rel  = io_we && io_addr == R_RX_RELEASE;
  wire wr_send = io_we && io_addr == R_TX_SEND;
  wire wr_nc   = io_we && io_addr == R_NC_WRITE;
  wire wr_am   = io_we && io_addr == R_AM_WRITE;
  wire wr_arm  = io_we && io_addr == R_AC_ARM;

  packet_handler u_ph (
    .clk, .rst,
    .in_valid, .in_ready, .in_flit, .in_last,
    .out_valid, .out_ready, .out_flit, .out_last,
    .p_raddr, .p_rdata, .p_we, .p_waddr, .p_wdata,
    .lk_valid, .lk_ready, .lk_hdr,
    .ag_valid, .ag_ready, .ag_flit, .ag_last,
    .ac_valid, .ac_slot, .ac_nack,
    .rel_en(wr_rel), .rel_set(io_wdata[1:0]),
    .send_en(wr_send), .send_set(io_wdata[1:0]), .send_len(io_wdata[12:8]),
    .rx_head_valid, .rx_head_set, .rx_head_len, .set_state,
    .n_rx_pkts, .n_tx_pkts, .n_rx_stalls);

  ack_generator u_ag (
    .clk, .rst, .my_cluster,
    .lk_valid, .lk_ready, .lk_hdr,
    .out_valid(ag_valid), .out_ready(ag_ready), .out_flit(ag_flit), .out_last(ag_last),
    .nc_wr_en(wr_nc), .nc_wr_addr(nc_addr), .nc_wr_valid(io_wdata[1]), .nc_wr_cached(io_wdata[0]),
    .am_wr_en(wr_am), .am_wr_src(io_wdata[7:0]), .am_wr_valid(io_wdata[8]), .am_wr_bitmap(am_bitmap),
    .n_ack(n_ack_gen), .n_nack(n_nack_gen), .n_miss(n_ag_miss));

  ack_collector #(.SLOTS(AC_SLOTS), .CNT_W(8)) u_ac (
    .clk, .rst,
    .arm_en(wr_arm), .arm_slot(io_wdata[15:12]), .arm_expected(io_wdata[7:0]),
    .in_valid(ac_valid), .in_slot(ac_slot), .in_nack(ac_nack),
    .done(ac_done), .nack_seen(ac_nack_seen));

  always_ff @(posedge clk) begin
    if (rst) begin
      nc_addr   <= '0;
      am_bitmap <= '0;
    end else if (io_we) begin
      case (io_addr)
        R_NC_ADDR_LO: nc_addr[15:0]  <= io_wdata;
        R_NC_ADDR_HI: nc_addr[31:16] <= io_wdata;
        R_AM_BITMAP:  am_bitmap      <= io_wdata;
        default: ;
      endcase
    end
  end

  always_comb begin
    io_rdata = '0;
    case (io_addr)
      R_RX_STATUS: io_rdata = {rx_head_valid, 5'b0, rx_head_set, 3'b0, rx_head_len};
      R_SET_STATE: io_rdata = {8'b0, set_state[3], set_state[2], set_state[1], set_state[0]};
      R_AG_COUNT:  io_rdata = {n_ack_gen, n_nack_gen};
      R_AC_DONE:   io_rdata = ac_done;
      R_AC_NACK:   io_rdata = ac_nack_seen;
      default: ;
    endcase
  end
endmodule
