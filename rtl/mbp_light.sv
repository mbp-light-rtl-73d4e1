// mbp_light: the MBP-light chip, a processor that manages the distributed
// shared memory (DSM) of one cluster.
//
// The MBP Core (a 16-bit RISC whose operands may be packet buffer registers)
// runs the coherence protocol software from its local memory. Two hardwired
// blocks do the time-critical work around it: the RDT Interface moves
// packets between the RDT router and the packet buffer registers and answers
// coherent messages with ack/nack packets on its own; the Main Memory
// Controller (MMC) serves the cluster bus, whose four L2-cache masters take
// turns through a round-robin arbiter, from cluster memory when the line's
// tag allows it, hands the request to the core by interrupt when it does not,
// and moves PBR contents to and from cluster memory and the cluster bus.
//
// The core reaches everything through its I/O space: addresses 0xFF00-0xFF1F
// are the RDT Interface registers, 0xFF20-0xFF2F the MMC registers, all
// others go out of the chip on the io_* pins (where, for example, the barrier
// hardware sits). I/O read data, internal or external, is registered here and
// reaches the core one cycle after io_re; an external device drives io_rdata
// combinationally in the io_re cycle. The local memory is loaded through the
// lm_boot_* port while rst is high.
//
// The partitioning into MBP Core, RDT Interface and MMC, the PBRs shared by
// all three, and the local memory follow the design description; the pins,
// the I/O decoding and the boot port are this implementation's own.
module mbp_light
  import mbp_pkg::*;
(
  input  logic                 clk,
  input  logic                 rst,
  input  logic [CLUSTER_W-1:0] my_cluster,
  // local memory loader (used while rst is high)
  input  logic                 lm_boot_we,
  input  logic [LM_AW-1:0]     lm_boot_addr,
  input  logic [INSTR_W-1:0]   lm_boot_wdata,
  // RDT router link
  input  logic                 rdt_in_valid,
  output logic                 rdt_in_ready,
  input  flit_t                rdt_in_flit,
  input  logic                 rdt_in_last,
  output logic                 rdt_out_valid,
  input  logic                 rdt_out_ready,
  output flit_t                rdt_out_flit,
  output logic                 rdt_out_last,
  // cluster bus
  input  logic [BUS_MASTERS-1:0] bus_req,
  input  logic [BUS_MASTERS-1:0] bus_we,
  input  logic [LINE_AW-1:0]   bus_addr  [BUS_MASTERS],
  input  logic [63:0]          bus_wdata [BUS_MASTERS],
  output logic [BUS_MASTERS-1:0] bus_gnt,     // owner of the shared response lines
  output logic [4:0]           bus_beat,
  output logic                 bus_wready,
  output logic                 bus_rvalid,
  output logic [63:0]          bus_rdata,
  output logic                 bus_done,
  output logic                 bus_held,
  // cluster memory
  output logic                 cm_req,
  output logic                 cm_we,
  output logic [CM_AW-1:0]     cm_addr,
  output logic [63:0]          cm_wdata,
  input  logic                 cm_ack,
  input  logic [63:0]          cm_rdata,
  output logic                 tag_en,
  output logic                 tag_we,
  output logic [LINE_AW-1:0]   tag_addr,
  output tag_state_e           tag_wdata,
  input  tag_state_e           tag_rdata,
  // external I/O space
  output logic                 io_re,
  output logic                 io_we,
  output logic [15:0]          io_addr,
  output logic [15:0]          io_wdata,
  input  logic [15:0]          io_rdata,
  // status
  output logic                 halted,
  output logic                 irq,
  output logic                 xfer_busy,     // some PBR still has a block transfer pending
  output mbp_stats_t           stats
);
  // ---------------- local memory ----------------
  logic                if_en;
  logic [LM_AW-1:0]    if_addr;
  logic [INSTR_W-1:0]  if_rdata;
  logic                c_lm_en, c_lm_we;
  logic [LM_AW-1:0]    c_lm_addr;
  logic [INSTR_W-1:0]  c_lm_wdata, lm_rdata;

  local_mem #(.DEPTH(LM_DEPTH), .WIDTH(INSTR_W)) u_lm (
    .clk,
    .a_en(if_en), .a_addr(if_addr), .a_rdata(if_rdata),
    .b_en(rst ? lm_boot_we : c_lm_en),
    .b_we(rst ? lm_boot_we : c_lm_we),
    .b_addr(rst ? lm_boot_addr : c_lm_addr),
    .b_wdata(rst ? lm_boot_wdata : c_lm_wdata),
    .b_rdata(lm_rdata));

  // ---------------- PBRs ----------------
  pbr_idx_t c_raddr, c_waddr, r_raddr, r_waddr, m_raddr, m_waddr;
  flit_t    c_rdata, c_wdata, r_rdata, r_wdata, m_rdata, m_wdata;
  logic     c_we, r_we, m_we;
  logic [4:0] c_wmask;

  pbr_file u_pbr (
    .clk, .rst,
    .c_raddr, .c_rdata, .c_we, .c_waddr, .c_wmask, .c_wdata,
    .r_raddr, .r_rdata, .r_we, .r_waddr, .r_wdata,
    .m_raddr, .m_rdata, .m_we, .m_waddr, .m_wdata);

  // ---------------- core ----------------
  logic        c_io_re, c_io_we;
  logic [15:0] c_io_addr, c_io_wdata, c_io_rdata;
  logic        xf_valid, xf_ready, xf_done;
  xfer_req_t   xf_req;
  pbr_idx_t    xf_done_start;
  logic [4:0]  xf_done_len;
  logic [NUM_PBR-1:0] pbr_busy;
  assign xfer_busy = |pbr_busy;

  mbp_core u_core (
    .clk, .rst,
    .if_en, .if_addr, .if_rdata,
    .lm_en(c_lm_en), .lm_we(c_lm_we), .lm_addr(c_lm_addr), .lm_wdata(c_lm_wdata), .lm_rdata,
    .io_re(c_io_re), .io_we(c_io_we), .io_addr(c_io_addr), .io_wdata(c_io_wdata), .io_rdata(c_io_rdata),
    .p_raddr(c_raddr), .p_rdata(c_rdata), .p_we(c_we), .p_waddr(c_waddr), .p_wmask(c_wmask), .p_wdata(c_wdata),
    .xf_valid, .xf_ready, .xf_req, .xf_done, .xf_done_start, .xf_done_len,
    .irq, .halted, .pbr_busy,
    .n_retired(stats.retired), .n_sb_stalls(stats.sb_stalls), .n_load_stalls(stats.load_stalls),
    .n_irqs(stats.irqs), .n_overtakes(stats.overtakes));

  // ---------------- I/O decode ----------------
  wire        io_int  = (c_io_addr[15:8] == IO_INT_BASE[15:8]);
  wire        io_rdt  = io_int && (c_io_addr[7:5] == 3'b000);
  wire        io_mmc  = io_int && (c_io_addr[7:4] == 4'b0010);
  logic [15:0] rdt_io_rdata, mmc_io_rdata;

  assign io_re    = c_io_re && !io_int;
  assign io_we    = c_io_we && !io_int;
  assign io_addr  = c_io_addr;
  assign io_wdata = c_io_wdata;

  always_ff @(posedge clk) begin
    if (rst) c_io_rdata <= '0;
    else if (c_io_re)
      c_io_rdata <= io_rdt ? rdt_io_rdata : io_mmc ? mmc_io_rdata : io_int ? 16'h0 : io_rdata;
  end

  // ---------------- RDT Interface ----------------
  rdt_interface u_rdt (
    .clk, .rst, .my_cluster,
    .in_valid(rdt_in_valid), .in_ready(rdt_in_ready), .in_flit(rdt_in_flit), .in_last(rdt_in_last),
    .out_valid(rdt_out_valid), .out_ready(rdt_out_ready), .out_flit(rdt_out_flit), .out_last(rdt_out_last),
    .p_raddr(r_raddr), .p_rdata(r_rdata), .p_we(r_we), .p_waddr(r_waddr), .p_wdata(r_wdata),
    .io_we(c_io_we && io_rdt), .io_addr(c_io_addr[7:0]), .io_wdata(c_io_wdata), .io_rdata(rdt_io_rdata),
    .n_rx_pkts(stats.rx_pkts), .n_tx_pkts(stats.tx_pkts), .n_rx_stalls(stats.rx_stalls),
    .n_ack_gen(stats.ack_gen), .n_nack_gen(stats.nack_gen), .n_ag_miss(stats.ag_miss));

  // ---------------- cluster bus arbitration ----------------
  logic               s_req, s_we;
  logic [LINE_AW-1:0] s_addr;
  logic [63:0]        s_wdata;

  bus_arbiter #(.N(BUS_MASTERS)) u_arb (
    .clk, .rst,
    .m_req(bus_req), .m_we(bus_we), .m_addr(bus_addr), .m_wdata(bus_wdata), .gnt(bus_gnt),
    .s_req, .s_we, .s_addr, .s_wdata, .s_done(bus_done),
    .n_conflicts(stats.bus_conflicts));

  // ---------------- MMC ----------------
  mmc u_mmc (
    .clk, .rst,
    .cmd_valid(xf_valid), .cmd_ready(xf_ready), .cmd(xf_req),
    .done_valid(xf_done), .done_start(xf_done_start), .done_len(xf_done_len),
    .p_raddr(m_raddr), .p_rdata(m_rdata), .p_we(m_we), .p_waddr(m_waddr), .p_wdata(m_wdata),
    .io_we(c_io_we && io_mmc), .io_addr(c_io_addr[7:0]), .io_wdata(c_io_wdata), .io_rdata(mmc_io_rdata),
    .irq,
    .bus_req(s_req), .bus_we(s_we), .bus_addr(s_addr), .bus_wdata(s_wdata), .bus_beat, .bus_wready, .bus_rvalid, .bus_rdata,
    .bus_done, .bus_held,
    .cm_req, .cm_we, .cm_addr, .cm_wdata, .cm_ack, .cm_rdata,
    .tag_en, .tag_we, .tag_addr, .tag_wdata, .tag_rdata,
    .n_hw_served(stats.hw_served), .n_held(stats.held));
endmodule
