// mbp_core: the MBP Core, a 16-bit RISC with a buffer-register architecture.
//
// Four pipeline stages: IF fetches a 21-bit instruction from local memory;
// RF decodes it, reads the 16 GPRs (with forwarding from the two later
// stages), resolves branches and checks hazards; the third stage is one of
// LM (local memory and I/O access), EX (ALU) or GM (packet buffer register
// access), chosen by the instruction; WB writes the GPR.
//
// Packet buffer registers (PBRs, 68 bits) are addressed by the contents of a
// GPR: PLD copies a 16-bit field (or the 4 tag bits) of PBR[GPR[ra]] into a
// GPR, PST writes a GPR into one field, PEQ compares a field with a GPR, PMOV
// copies a whole PBR to another. XFER hands a run of PBRs to the MMC for a
// block transfer with cluster memory or the cluster bus; it does not wait.
// A scoreboard marks the PBRs of each transfer busy until the MMC reports
// completion, and only instructions that touch a busy PBR stall, so later
// independent instructions complete first (out-of-order completion).
//
// Encoding: [20:16] opcode (mbp_pkg::opcode_e), [15:12] rd, [11:8] ra,
// [7:4] rb, [7:0] imm8 (signed for ADDI, LD/ST/IN/OUT offsets and branches),
// [11:0] imm12 for LDI, [15:0] imm16 for JMP, [2:0] PBR field for
// PLD/PST/PEQ, [7:5] command and [4:0] length for XFER (rd holds the cluster
// memory line, ra the first PBR). Branches are resolved in RF: a taken branch
// costs one bubble, a load followed by a use of its result one stall cycle.
// Memory and I/O reads return their data in the cycle after the request.
// An interrupt (irq, when enabled) replaces the instruction in RF: its
// address is saved and fetch goes to mbp_pkg::IRQ_VECTOR with interrupts off;
// RETI returns and turns them on again. HALT stops fetching.
//
// The 16-bit data, 21-bit instructions, 16 GPRs, 112 PBRs addressed through
// GPRs, the four stages with LM/EX/GM in parallel, I/O-mapped devices and
// out-of-order completion of block transfers follow the design description.
// The instruction set and its encoding, forwarding, branch timing and the
// interrupt scheme are this implementation's own.
module mbp_core
  import mbp_pkg::*;
(
  input  logic                clk,
  input  logic                rst,
  // instruction fetch port of local memory
  output logic                if_en,
  output logic [LM_AW-1:0]    if_addr,
  input  logic [INSTR_W-1:0]  if_rdata,
  // data port of local memory
  output logic                lm_en,
  output logic                lm_we,
  output logic [LM_AW-1:0]    lm_addr,
  output logic [INSTR_W-1:0]  lm_wdata,
  input  logic [INSTR_W-1:0]  lm_rdata,
  // I/O space
  output logic                io_re,
  output logic                io_we,
  output logic [15:0]         io_addr,
  output logic [15:0]         io_wdata,
  input  logic [15:0]         io_rdata,
  // PBR port
  output pbr_idx_t            p_raddr,
  input  flit_t               p_rdata,
  output logic                p_we,
  output pbr_idx_t            p_waddr,
  output logic [4:0]          p_wmask,
  output flit_t               p_wdata,
  // block transfers through the MMC
  output logic                xf_valid,
  input  logic                xf_ready,
  output xfer_req_t           xf_req,
  input  logic                xf_done,
  input  pbr_idx_t            xf_done_start,
  input  logic [4:0]          xf_done_len,
  // interrupt
  input  logic                irq,
  // status
  output logic                halted,
  output logic [NUM_PBR-1:0]  pbr_busy,
  output logic [15:0]         n_retired,
  output logic [15:0]         n_sb_stalls,
  output logic [15:0]         n_load_stalls,
  output logic [15:0]         n_irqs,
  output logic [15:0]         n_overtakes
);
  // ---------------- decode ----------------
  typedef struct packed {
    opcode_e    op;
    logic [3:0] rd, ra, rb;
    logic [7:0] imm8;
    logic       use_ra, use_rb, use_rd, wr_rd, is_load, pbr_a, pbr_d;
  } dec_t;

  function automatic dec_t decode(logic [INSTR_W-1:0] ins);
    dec_t d;
    d = '0;
    d.op   = opcode_e'(ins[20:16]);
    d.rd   = ins[15:12];
    d.ra   = ins[11:8];
    d.rb   = ins[7:4];
    d.imm8 = ins[7:0];
    case (d.op)
      OP_ADD, OP_SUB, OP_AND, OP_OR, OP_XOR, OP_SHL, OP_SHR:
                          begin d.use_ra = 1; d.use_rb = 1; d.wr_rd = 1; end
      OP_ADDI, OP_LDIH:   begin d.use_ra = 1; d.wr_rd = 1; end
      OP_LDI:             d.wr_rd = 1;
      OP_LD, OP_IN:       begin d.use_ra = 1; d.wr_rd = 1; d.is_load = 1; end
      OP_ST, OP_OUT:      begin d.use_ra = 1; d.use_rd = 1; end
      OP_BEQZ, OP_BNEZ, OP_JR: d.use_ra = 1;
      OP_PLD:             begin d.use_ra = 1; d.wr_rd = 1; d.pbr_a = 1; end
      OP_PEQ:             begin d.use_ra = 1; d.use_rb = 1; d.wr_rd = 1; d.pbr_a = 1; end
      OP_PST:             begin d.use_ra = 1; d.use_rd = 1; d.pbr_a = 1; end
      OP_PMOV:            begin d.use_ra = 1; d.use_rd = 1; d.pbr_a = 1; d.pbr_d = 1; end
      OP_XFER:            begin d.use_ra = 1; d.use_rd = 1; end
      default: ;
    endcase
    return d;
  endfunction

  function automatic logic [NUM_PBR-1:0] range_mask(pbr_idx_t start, logic [4:0] len);
    logic [NUM_PBR-1:0] m;
    int unsigned l = (len == 0) ? 1 : 32'(len);
    for (int i = 0; i < NUM_PBR; i++)
      m[i] = (i >= 32'(start)) && (i < 32'(start) + l);
    return m;
  endfunction

  function automatic logic [15:0] pbr_field(flit_t f, logic [2:0] sel);
    case (sel)
      3'd0: return f[15:0];
      3'd1: return f[31:16];
      3'd2: return f[47:32];
      3'd3: return f[63:48];
      default: return {12'b0, f[67:64]};
    endcase
  endfunction

  // ---------------- state ----------------
  logic [15:0]        pc_f;
  logic               rf_valid, rf_hold;
  logic [15:0]        rf_pc;
  logic [INSTR_W-1:0] ir_hold;
  logic               ie;
  logic [15:0]        epc;

  logic               x_valid;
  dec_t               x_d;
  logic [INSTR_W-1:0] x_ins;
  logic [15:0]        x_va, x_vb, x_vd;

  typedef enum logic [1:0] {W_ALU, W_LM, W_IO} wsrc_e;
  logic               w_valid, w_we;
  logic [3:0]         w_rd;
  logic [15:0]        w_result;
  wsrc_e              w_src;

  // ---------------- RF stage ----------------
  wire [INSTR_W-1:0] rf_ins = rf_hold ? ir_hold : if_rdata;
  dec_t rf_d;
  assign rf_d = decode(rf_ins);

  logic [15:0] g_a, g_b, g_d;
  logic [15:0] w_value, x_result;
  logic        gpr_we;

  gpr_file #(.NUM_GPR(NUM_GPR), .GPR_W(GPR_W)) u_gpr (
    .clk, .rst,
    .ra_addr(rf_d.ra), .ra_data(g_a),
    .rb_addr(rf_d.rb), .rb_data(g_b),
    .rc_addr(rf_d.rd), .rc_data(g_d),
    .we(gpr_we), .w_addr(w_rd), .w_data(w_value));

  assign gpr_we  = w_valid && w_we;
  assign w_value = (w_src == W_LM) ? lm_rdata[15:0] : (w_src == W_IO) ? io_rdata : w_result;

  wire x_fwd = x_valid && x_d.wr_rd && !x_d.is_load;

  function automatic logic [15:0] fwd(logic [3:0] r, logic [15:0] g, logic xf,
                                      logic [3:0] xr, logic [15:0] xv,
                                      logic wf, logic [3:0] wr, logic [15:0] wv);
    if (xf && xr == r) return xv;
    if (wf && wr == r) return wv;
    return g;
  endfunction

  wire [15:0] va = fwd(rf_d.ra, g_a, x_fwd, x_d.rd, x_result, gpr_we, w_rd, w_value);
  wire [15:0] vb = fwd(rf_d.rb, g_b, x_fwd, x_d.rd, x_result, gpr_we, w_rd, w_value);
  wire [15:0] vd = fwd(rf_d.rd, g_d, x_fwd, x_d.rd, x_result, gpr_we, w_rd, w_value);

  // hazards
  wire load_use = x_valid && x_d.is_load && x_d.wr_rd &&
                  ((rf_d.use_ra && rf_d.ra == x_d.rd) ||
                   (rf_d.use_rb && rf_d.rb == x_d.rd) ||
                   (rf_d.use_rd && rf_d.rd == x_d.rd));

  wire                x_is_xfer = x_valid && x_d.op == OP_XFER;
  wire [NUM_PBR-1:0]  x_mask    = x_is_xfer ? range_mask(pbr_idx_t'(x_va), x_ins[4:0]) : '0;
  wire [NUM_PBR-1:0]  busy_now  = pbr_busy | x_mask;
  wire [NUM_PBR-1:0]  rf_mask   = range_mask(pbr_idx_t'(va), rf_ins[4:0]);

  wire sb_hit = (rf_d.pbr_a && 32'(va) < NUM_PBR && busy_now[pbr_idx_t'(va)]) ||
                (rf_d.pbr_d && 32'(vd) < NUM_PBR && busy_now[pbr_idx_t'(vd)]) ||
                (rf_d.op == OP_XFER && |(rf_mask & busy_now));
  wire xf_block = (rf_d.op == OP_XFER) && (!xf_ready || x_is_xfer);

  wire stall   = rf_valid && !halted && (load_use || sb_hit || xf_block);
  wire take_irq = rf_valid && !halted && !stall && irq && ie;
  wire issue    = rf_valid && !halted && !stall && !take_irq;

  // branches resolve here
  logic        redirect;
  logic [15:0] target;
  always_comb begin
    redirect = 1'b0;
    target   = '0;
    if (take_irq) begin
      redirect = 1'b1; target = IRQ_VECTOR;
    end else if (issue) begin
      case (rf_d.op)
        OP_BEQZ: begin redirect = (va == 0); target = rf_pc + {{8{rf_d.imm8[7]}}, rf_d.imm8}; end
        OP_BNEZ: begin redirect = (va != 0); target = rf_pc + {{8{rf_d.imm8[7]}}, rf_d.imm8}; end
        OP_JMP:  begin redirect = 1'b1; target = rf_ins[15:0]; end
        OP_JR:   begin redirect = 1'b1; target = va; end
        OP_RETI: begin redirect = 1'b1; target = epc; end
        default: ;
      endcase
    end
  end
  wire halt_now = issue && rf_d.op == OP_HALT;

  assign if_en   = !halted && !stall;
  assign if_addr = pc_f;

  // ---------------- LM / EX / GM stage ----------------
  wire [15:0] x_off = x_va + {{8{x_d.imm8[7]}}, x_d.imm8};
  wire [2:0]  x_fld = x_ins[2:0];
  wire [15:0] x_pfield = pbr_field(p_rdata, x_fld);

  always_comb begin
    case (x_d.op)
      OP_ADD:  x_result = x_va + x_vb;
      OP_SUB:  x_result = x_va - x_vb;
      OP_AND:  x_result = x_va & x_vb;
      OP_OR:   x_result = x_va | x_vb;
      OP_XOR:  x_result = x_va ^ x_vb;
      OP_SHL:  x_result = x_va << x_vb[3:0];
      OP_SHR:  x_result = x_va >> x_vb[3:0];
      OP_ADDI: x_result = x_off;
      OP_LDI:  x_result = {4'b0, x_ins[11:0]};
      OP_LDIH: x_result = {x_d.imm8, x_va[7:0]};
      OP_PLD:  x_result = x_pfield;
      OP_PEQ:  x_result = {15'b0, x_pfield == x_vb};
      default: x_result = '0;
    endcase
  end

  // LM: local memory and I/O
  assign lm_en    = x_valid && (x_d.op == OP_LD || x_d.op == OP_ST);
  assign lm_we    = x_valid && x_d.op == OP_ST;
  assign lm_addr  = x_off;
  assign lm_wdata = {5'b0, x_vd};
  assign io_re    = x_valid && x_d.op == OP_IN;
  assign io_we    = x_valid && x_d.op == OP_OUT;
  assign io_addr  = x_off;
  assign io_wdata = x_vd;

  // GM: packet buffer registers
  assign p_raddr = pbr_idx_t'(x_va);
  always_comb begin
    p_we    = 1'b0;
    p_waddr = pbr_idx_t'(x_va);
    p_wmask = '0;
    p_wdata = '0;
    if (x_valid && x_d.op == OP_PST) begin
      p_we    = 32'(x_va) < NUM_PBR;
      p_wmask = (x_fld > 3'd3) ? 5'b10000 : 5'(1 << x_fld);
      p_wdata = {x_vd[3:0], x_vd, x_vd, x_vd, x_vd};
    end else if (x_valid && x_d.op == OP_PMOV) begin
      p_we    = 32'(x_vd) < NUM_PBR && 32'(x_va) < NUM_PBR;
      p_waddr = pbr_idx_t'(x_vd);
      p_wmask = 5'b11111;
      p_wdata = p_rdata;
    end
  end

  assign xf_valid     = x_is_xfer;
  assign xf_req.cmd   = xfer_cmd_e'(x_ins[7:5]);
  assign xf_req.start = pbr_idx_t'(x_va);
  assign xf_req.len   = x_ins[4:0];
  assign xf_req.line  = x_vd;

  // ---------------- sequential ----------------
  always_ff @(posedge clk) begin
    if (rst) begin
      pc_f <= '0; rf_valid <= 1'b0; rf_hold <= 1'b0; rf_pc <= '0; ir_hold <= '0;
      ie <= 1'b1; epc <= '0; halted <= 1'b0;
      x_valid <= 1'b0; x_d <= '0; x_ins <= '0; x_va <= '0; x_vb <= '0; x_vd <= '0;
      w_valid <= 1'b0; w_we <= 1'b0; w_rd <= '0; w_result <= '0; w_src <= W_ALU;
      pbr_busy <= '0;
      n_retired <= '0; n_sb_stalls <= '0; n_load_stalls <= '0; n_irqs <= '0; n_overtakes <= '0;
    end else begin
      // IF / RF
      if (stall) begin
        rf_hold <= 1'b1;
        ir_hold <= rf_ins;
      end else begin
        rf_hold  <= 1'b0;
        rf_valid <= !halted && !halt_now && !redirect;
        rf_pc    <= pc_f;
        if (!halted && !halt_now) pc_f <= redirect ? target : pc_f + 16'd1;
      end
      if (halt_now) halted <= 1'b1;
      if (take_irq) begin
        epc    <= rf_pc;
        ie     <= 1'b0;
        n_irqs <= n_irqs + 1'b1;
      end
      if (issue && rf_d.op == OP_RETI) ie <= 1'b1;
      if (stall && sb_hit)   n_sb_stalls   <= n_sb_stalls + 1'b1;
      if (stall && load_use) n_load_stalls <= n_load_stalls + 1'b1;

      // RF -> X
      x_valid <= issue;
      x_d     <= rf_d;
      x_ins   <= rf_ins;
      x_va    <= va;
      x_vb    <= vb;
      x_vd    <= vd;

      // X -> WB
      w_valid  <= x_valid;
      w_we     <= x_valid && x_d.wr_rd;
      w_rd     <= x_d.rd;
      w_result <= x_result;
      w_src    <= (x_d.op == OP_LD) ? W_LM : (x_d.op == OP_IN) ? W_IO : W_ALU;
      if (w_valid) begin
        n_retired <= n_retired + 1'b1;
        if (|pbr_busy) n_overtakes <= n_overtakes + 1'b1;
      end

      // scoreboard
      pbr_busy <= (pbr_busy & ~(xf_done ? range_mask(xf_done_start, xf_done_len) : '0)) | x_mask;
    end
  end

  // a block transfer is only issued when the MMC can take it
  property p_xfer_accepted;
    @(posedge clk) disable iff (rst) xf_valid |-> xf_ready;
  endproperty
  assert property (p_xfer_accepted);
endmodule
