// mmc: the Main Memory Controller (MMC) of MBP-light.
//
// The MMC owns the cluster memory (SDRAM for data, SRAM for one tag per
// line) and is the slave on the cluster bus that joins the four processors'
// L2 caches. It does three kinds of work, one at a time:
//
//  * Cluster bus requests. When an L2 miss reaches the bus, the MMC reads the
//    line's tag. If the state allows it (a read needs SHARED or EXCLUSIVE, a
//    write needs EXCLUSIVE) it serves the line from cluster memory in hardware
//    (the L3 hit case), LINE_BEATS 64-bit beats. Otherwise it holds the
//    request (bus_held), records its address and kind in I/O registers and
//    interrupts the MBP Core, whose software then runs the coherence protocol.
//  * Block transfers for the core (the XFER instruction): a run of PBRs is
//    moved, one flit per beat, between the PBRs and cluster memory, or between
//    the PBRs and the held bus request (the data of a read reply, or the data
//    of a write), or between the PBRs and the tag SRAM (one line's tag in
//    bits [1:0] of each PBR; a tag read takes two cycles, a write one).
//    Completion is reported with done_valid and the PBR range, so the core
//    can clear its scoreboard (out-of-order completion).
//  * Register accesses from the core: tag writes, resuming a held request
//    (the tag is checked again) and acknowledging the interrupt.
//
// Commands are accepted into a one-entry queue (cmd_ready is high while it is
// empty) and started when the MMC is idle; commands go before new bus
// requests. Cluster memory is a per-beat request/acknowledge port
// (cm_req held until cm_ack; read data valid with cm_ack). The tag SRAM is
// synchronous with one cycle read latency. The bus beat counter is bus_beat;
// write data must be presented for it while bus_wready can rise, read data is
// valid with bus_rvalid, and bus_done marks the last beat of a transaction.
//
// The roles of the MMC, the tag check with an interrupt to the core and the
// block transfers of data and tags through the PBRs follow the design
// description. The tag registers are an extra, quicker path for one tag. SDRAM
// timing, the bus protocol, the tag states, line size and register map are
// this implementation's own choices.
module mmc
  import mbp_pkg::*;
(
  input  logic                 clk,
  input  logic                 rst,
  // block transfer commands from the core
  input  logic                 cmd_valid,
  output logic                 cmd_ready,
  input  xfer_req_t            cmd,
  output logic                 done_valid,
  output pbr_idx_t             done_start,
  output logic [4:0]           done_len,
  // PBR port
  output pbr_idx_t             p_raddr,
  input  flit_t                p_rdata,
  output logic                 p_we,
  output pbr_idx_t             p_waddr,
  output flit_t                p_wdata,
  // internal I/O registers (low address byte)
  input  logic                 io_we,
  input  logic [7:0]           io_addr,
  input  logic [15:0]          io_wdata,
  output logic [15:0]          io_rdata,
  output logic                 irq,
  // cluster bus (slave side)
  input  logic                 bus_req,
  input  logic                 bus_we,
  input  logic [LINE_AW-1:0]   bus_addr,
  input  logic [63:0]          bus_wdata,
  output logic [4:0]           bus_beat,
  output logic                 bus_wready,
  output logic                 bus_rvalid,
  output logic [63:0]          bus_rdata,
  output logic                 bus_done,
  output logic                 bus_held,
  // cluster memory (SDRAM) data port
  output logic                 cm_req,
  output logic                 cm_we,
  output logic [CM_AW-1:0]     cm_addr,
  output logic [63:0]          cm_wdata,
  input  logic                 cm_ack,
  input  logic [63:0]          cm_rdata,
  // tag SRAM
  output logic                 tag_en,
  output logic                 tag_we,
  output logic [LINE_AW-1:0]   tag_addr,
  output tag_state_e           tag_wdata,
  input  tag_state_e           tag_rdata,
  // statistics
  output logic [15:0]          n_hw_served,
  output logic [15:0]          n_held
);
  typedef enum logic [3:0] {
    S_IDLE, S_TAG, S_SRV_RD, S_SRV_WR, S_CM_RD, S_CM_WR, S_BUS_RD, S_BUS_WR,
    S_TG_RD, S_TG_WR, S_DONE
  } st_e;
  st_e st;

  // command queue
  logic      q_valid;
  xfer_req_t q;
  assign cmd_ready = !q_valid;

  // current job
  xfer_req_t            cur;
  logic [4:0]           beat;
  logic [LINE_AW-1:0]   cur_line;
  logic                 cur_we;
  logic                 tph;       // tag read: 0 = address out, 1 = data back

  // held request and registers
  logic                 held, held_we, irq_acked;
  logic [LINE_AW-1:0]   held_line;
  logic [LINE_AW-1:0]   tagreg_line;
  logic                 tag_wr_pend, resume_pend;
  tag_state_e           tag_wr_state;

  wire [4:0] cur_len  = (cur.len == 0) ? 5'd1 : cur.len;
  wire       cur_last = (beat == cur_len - 5'd1);
  wire       srv_last = (beat == 5'(LINE_BEATS - 1));
  wire [CM_AW-1:0] xfer_cm_addr = (CM_AW'(cur.line) << $clog2(LINE_BEATS)) + CM_AW'(beat);
  wire [LINE_AW-1:0] xfer_tag_line = LINE_AW'(cur.line) + LINE_AW'(beat);

  wire tag_ok = cur_we ? (tag_rdata == TAG_EXCLUSIVE)
                       : (tag_rdata == TAG_SHARED || tag_rdata == TAG_EXCLUSIVE);

  // ---------------- outputs ----------------
  always_comb begin
    cm_req = 1'b0; cm_we = 1'b0; cm_addr = '0; cm_wdata = '0;
    bus_wready = 1'b0; bus_rvalid = 1'b0; bus_rdata = '0; bus_done = 1'b0;
    p_raddr = '0; p_we = 1'b0; p_waddr = '0; p_wdata = '0;
    tag_en = 1'b0; tag_we = 1'b0; tag_addr = '0; tag_wdata = TAG_INVALID;
    bus_beat = beat;
    case (st)
      S_IDLE: begin
        if (tag_wr_pend) begin
          tag_en = 1'b1; tag_we = 1'b1; tag_addr = tagreg_line; tag_wdata = tag_wr_state;
        end else if (!q_valid && resume_pend && held) begin
          tag_en = 1'b1; tag_addr = held_line;
        end else if (!q_valid && !resume_pend && bus_req && !held) begin
          tag_en = 1'b1; tag_addr = bus_addr;
        end
      end
      S_SRV_RD: begin
        cm_req = 1'b1; cm_addr = {cur_line, 2'(beat)};
        bus_rvalid = cm_ack; bus_rdata = cm_rdata;
        bus_done = cm_ack && srv_last;
      end
      S_SRV_WR: begin
        cm_req = 1'b1; cm_we = 1'b1; cm_addr = {cur_line, 2'(beat)}; cm_wdata = bus_wdata;
        bus_wready = cm_ack;
        bus_done = cm_ack && srv_last;
      end
      S_CM_RD: begin
        cm_req = 1'b1; cm_addr = xfer_cm_addr;
        p_we = cm_ack; p_waddr = cur.start + pbr_idx_t'(beat); p_wdata = {4'b0, cm_rdata};
      end
      S_CM_WR: begin
        cm_req = 1'b1; cm_we = 1'b1; cm_addr = xfer_cm_addr;
        p_raddr = cur.start + pbr_idx_t'(beat); cm_wdata = p_rdata[63:0];
      end
      S_BUS_RD: begin
        p_raddr = cur.start + pbr_idx_t'(beat);
        bus_rvalid = 1'b1; bus_rdata = p_rdata[63:0];
        bus_done = cur_last;
      end
      S_BUS_WR: begin
        bus_wready = 1'b1;
        p_we = 1'b1; p_waddr = cur.start + pbr_idx_t'(beat); p_wdata = {4'b0, bus_wdata};
        bus_done = cur_last;
      end
      S_TG_RD: begin
        tag_en = !tph; tag_addr = xfer_tag_line;
        p_we = tph; p_waddr = cur.start + pbr_idx_t'(beat); p_wdata = {66'b0, tag_rdata};
      end
      S_TG_WR: begin
        p_raddr = cur.start + pbr_idx_t'(beat);
        tag_en = 1'b1; tag_we = 1'b1; tag_addr = xfer_tag_line; tag_wdata = tag_state_e'(p_rdata[1:0]);
      end
      default: ;
    endcase
  end

  assign done_valid = (st == S_DONE);
  assign done_start = cur.start;
  assign done_len   = cur_len;
  assign bus_held   = held;
  assign irq        = held && !irq_acked;

  always_comb begin
    io_rdata = '0;
    case (io_addr)
      R_MMC_REQ_LO: io_rdata = held_line[15:0];
      R_MMC_REQ_HI: io_rdata = {held, held_we, 8'b0, 6'(held_line >> 16)};
      default: ;
    endcase
  end

  // ---------------- state ----------------
  always_ff @(posedge clk) begin
    if (rst) begin
      st <= S_IDLE;
      q_valid <= 1'b0; q <= '0; cur <= '0; beat <= '0;
      cur_line <= '0; cur_we <= 1'b0; tph <= 1'b0;
      held <= 1'b0; held_we <= 1'b0; irq_acked <= 1'b0; held_line <= '0;
      tagreg_line <= '0; tag_wr_pend <= 1'b0; resume_pend <= 1'b0; tag_wr_state <= TAG_INVALID;
      n_hw_served <= '0; n_held <= '0;
    end else begin
      if (cmd_valid && cmd_ready) begin
        q_valid <= 1'b1;
        q       <= cmd;
      end
      // registers written by the core
      if (io_we) begin
        case (io_addr)
          R_MMC_TAG_LO: tagreg_line[15:0] <= io_wdata;
          R_MMC_TAG_HI: tagreg_line <= {6'(io_wdata), tagreg_line[15:0]};
          R_MMC_TAG_WR: begin tag_wr_pend <= 1'b1; tag_wr_state <= tag_state_e'(io_wdata[1:0]); end
          R_MMC_RESUME: resume_pend <= 1'b1;
          R_MMC_IRQACK: irq_acked <= 1'b1;
          default: ;
        endcase
      end

      case (st)
        S_IDLE: begin
          beat <= '0;
          tph  <= 1'b0;
          if (tag_wr_pend) begin
            tag_wr_pend <= 1'b0;
          end else if (q_valid) begin
            q_valid <= 1'b0;
            cur     <= q;
            case (q.cmd)
              XF_CM_TO_PBR:  st <= S_CM_RD;
              XF_PBR_TO_CM:  st <= S_CM_WR;
              XF_PBR_TO_BUS: st <= (held && !held_we) ? S_BUS_RD : S_DONE;
              XF_BUS_TO_PBR: st <= (held &&  held_we) ? S_BUS_WR : S_DONE;
              XF_TAG_TO_PBR: st <= S_TG_RD;
              XF_PBR_TO_TAG: st <= S_TG_WR;
              default:       st <= S_DONE;
            endcase
          end else if (resume_pend) begin
            resume_pend <= 1'b0;
            if (held) begin
              cur_line <= held_line;
              cur_we   <= held_we;
              st       <= S_TAG;
            end
          end else if (bus_req && !held) begin
            cur_line <= bus_addr;
            cur_we   <= bus_we;
            st       <= S_TAG;
          end
        end
        S_TAG: begin
          if (tag_ok) begin
            held        <= 1'b0;
            n_hw_served <= n_hw_served + 1'b1;
            st          <= cur_we ? S_SRV_WR : S_SRV_RD;
          end else begin
            held      <= 1'b1;
            held_we   <= cur_we;
            held_line <= cur_line;
            irq_acked <= 1'b0;
            n_held    <= n_held + 1'b1;
            st        <= S_IDLE;
          end
        end
        S_SRV_RD, S_SRV_WR: if (cm_ack) begin
          beat <= beat + 5'd1;
          if (srv_last) st <= S_IDLE;
        end
        S_CM_RD, S_CM_WR: if (cm_ack) begin
          beat <= beat + 5'd1;
          if (cur_last) st <= S_DONE;
        end
        S_BUS_RD, S_BUS_WR: begin
          beat <= beat + 5'd1;
          if (cur_last) begin
            held <= 1'b0;
            st   <= S_DONE;
          end
        end
        S_TG_RD: begin
          tph <= !tph;
          if (tph) begin
            beat <= beat + 5'd1;
            if (cur_last) st <= S_DONE;
          end
        end
        S_TG_WR: begin
          beat <= beat + 5'd1;
          if (cur_last) st <= S_DONE;
        end
        default: st <= S_IDLE;   // S_DONE
      endcase
    end
  end

  // the core never queues a command over one that is waiting
  property p_no_cmd_overrun;
    @(posedge clk) disable iff (rst) cmd_valid |-> cmd_ready;
  endproperty
  assert property (p_no_cmd_overrun);
endmodule
