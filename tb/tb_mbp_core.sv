// tb_mbp_core: runs a test program on the MBP Core with its local memory,
// the PBR file, an I/O register model and a block-transfer model standing in
// for the MMC (it takes 12 cycles, then writes a known pattern into the
// PBRs one per cycle and reports completion). The program covers the ALU,
// forwarding, a load-use stall, store/load, I/O out/in, PBR field
// store/load/compare and whole-PBR move, a counted loop, a jump over dead
// code, and an XFER followed by independent instructions (which must finish
// while the transfer is busy) and a dependent PLD (which must wait for it).
// An interrupt is raised in the middle of the program; the handler clears it
// and returns, and the results must be unchanged. Register values are
// checked at HALT against values worked out by hand. A second part runs a
// random program of ALU operations, loads and stores from reset and compares
// every register and the data it wrote with a reference model.
module tb_mbp_core;
  import mbp_pkg::*;
  import tb_asm_pkg::*;
  logic clk = 0, rst = 1;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic if_en, lm_en, lm_we, io_re, io_we, p_we, xf_valid, xf_ready, xf_done, irq, halted;
  logic [15:0] if_addr, lm_addr, io_addr, io_wdata, io_rdata;
  logic [20:0] if_rdata, lm_wdata, lm_rdata;
  pbr_idx_t p_raddr, p_waddr, xf_done_start;
  flit_t p_rdata, p_wdata;
  logic [4:0] p_wmask, xf_done_len;
  xfer_req_t xf_req;
  logic [NUM_PBR-1:0] pbr_busy;
  logic [15:0] n_retired, n_sb_stalls, n_load_stalls, n_irqs, n_overtakes;

  mbp_core dut (.*);

  local_mem u_lm (.clk, .a_en(if_en), .a_addr(if_addr), .a_rdata(if_rdata),
    .b_en(lm_en), .b_we(lm_we), .b_addr(lm_addr), .b_wdata(lm_wdata), .b_rdata(lm_rdata));

  // PBRs; the MMC model writes through the m port
  logic m_we;
  pbr_idx_t m_waddr, t_raddr;
  flit_t m_wdata, t_rdata, m_rd;
  pbr_idx_t z_idx = '0;
  pbr_file u_pbr (.clk, .rst,
    .c_raddr(p_raddr), .c_rdata(p_rdata), .c_we(p_we), .c_waddr(p_waddr), .c_wmask(p_wmask), .c_wdata(p_wdata),
    .r_raddr(t_raddr), .r_rdata(t_rdata), .r_we(1'b0), .r_waddr(z_idx), .r_wdata(68'b0),
    .m_raddr(z_idx), .m_rdata(m_rd), .m_we, .m_waddr, .m_wdata);

  // I/O model: 256 registers; writing 0x20 clears the interrupt
  logic [15:0] io_regs [256];
  logic irq_clear;
  always_ff @(posedge clk) begin
    irq_clear <= 1'b0;
    if (io_we) begin
      io_regs[io_addr[7:0]] <= io_wdata;
      if (io_addr[7:0] == 8'h20) irq_clear <= 1'b1;
    end
    if (io_re) io_rdata <= io_regs[io_addr[7:0]];
  end

  // block transfer model
  int xf_timer = 0, xf_beat = 0, xf_count = 0;
  xfer_req_t xq;
  always_ff @(posedge clk) begin
    if (rst) begin xf_timer <= 0; xf_beat <= 0; xf_ready <= 1; end
    else if (xf_valid && xf_ready) begin xq <= xf_req; xf_ready <= 0; xf_timer <= 12; xf_beat <= 0; end
    else if (!xf_ready) begin
      if (xf_timer > 0) xf_timer <= xf_timer - 1;
      else if (xf_beat < int'(xq.len)) xf_beat <= xf_beat + 1;
      else begin xf_ready <= 1; xf_count <= xf_count + 1; end
    end
  end
  assign m_we    = !xf_ready && xf_timer == 0 && xf_beat < int'(xq.len);
  assign m_waddr = xq.start + pbr_idx_t'(xf_beat);
  assign m_wdata = {4'h0, 48'hC0DE_0000_0000, 16'(xq.line + 16'(xf_beat))};
  assign xf_done = !xf_ready && xf_timer == 0 && xf_beat == int'(xq.len);
  assign xf_done_start = xq.start;
  assign xf_done_len   = xq.len;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(logic [67:0] got, logic [67:0] exp, string what);
    checks++;
    if (got !== exp) begin failures++; $display("FAIL %s got %h exp %h", what, got, exp); end
  endtask

  logic [20:0] prog [64];
  int n;
  task automatic put(logic [20:0] w); prog[n] = w; n++; endtask

  int cycles;
  localparam int RAND_N = 600;
  logic [15:0] mr [16];
  logic [15:0] mm [64];
  int last_rd, op_i, rd_i, ra_i, rb_i, k_i;
  logic [7:0] imm_i;
  initial begin
    irq = 0;
    for (int i = 0; i < 256; i++) io_regs[i] = 0;
    for (int i = 0; i < 64; i++) prog[i] = op0(OP_NOP);
    n = 0;
    put(jmp(8));                               // 0
    n = 4;
    put(rri(OP_OUT, 0, 0, 8'h20));             // 4: handler: clear the request
    put(op0(OP_RETI));                         // 5
    n = 8;
    put(ldi(1, 5));                            // 8
    put(ldi(2, 7));                            // 9
    put(rrr(OP_ADD, 3, 1, 2));                 // 10  r3 = 12
    put(rrr(OP_SUB, 4, 3, 1));                 // 11  r4 = 7
    put(rri(OP_ST, 3, 0, 8'h40));              // 12  mem[0x40] = 12
    put(rri(OP_LD, 5, 0, 8'h40));              // 13  r5 = 12
    put(rri(OP_ADDI, 6, 5, 1));                // 14  r6 = 13 (load-use)
    put(rri(OP_OUT, 6, 0, 8'h10));             // 15  io[0x10] = 13
    put(rri(OP_IN, 7, 0, 8'h10));              // 16  r7 = 13
    put(rrr(OP_ADD, 7, 7, 7));                 // 17  r7 = 26
    put(ldi(8, 84));                           // 18
    put(ldi(9, 12'h123));                      // 19
    put(pfield(OP_PST, 9, 8, 0, 1));           // 20  PBR84.f1 = 0x123
    put(pfield(OP_PLD, 10, 8, 0, 1));          // 21  r10 = 0x123
    put(pfield(OP_PEQ, 11, 8, 9, 1));          // 22  r11 = 1
    put(ldi(12, 85));                          // 23
    put(rrr(OP_PMOV, 12, 8, 0));               // 24  PBR85 = PBR84
    put(pfield(OP_PLD, 13, 12, 0, 1));         // 25  r13 = 0x123
    put(ldi(14, 3));                           // 26
    put(rri(OP_ADDI, 14, 14, -1));             // 27  loop
    put(br(OP_BNEZ, 14, -1));                  // 28
    put(ldih(1, 1, 8'hAB));                    // 29  r1 = 0xAB05
    put(xfer(XF_CM_TO_PBR, 1, 12, 4));         // 30  PBR85..88 <- line r1
    put(rri(OP_ADDI, 2, 2, 1));                // 31  independent, r2 = 8
    put(rri(OP_ADDI, 2, 2, 1));                // 32  r2 = 9
    put(pfield(OP_PLD, 15, 12, 0, 0));         // 33  waits: r15 = 0xAB05
    put(rri(OP_OUT, 15, 0, 8'h11));            // 34
    put(jmp(38));                              // 35
    put(ldi(2, 12'hFFF));                      // 36  skipped
    put(ldi(2, 12'hEEE));                      // 37  skipped
    put(ldih(4, 4, 8'h01));                    // 38  r4 = 0x0107
    put(op0(OP_HALT));                         // 39
    for (int i = 0; i < 64; i++) u_lm.mem[i] = prog[i];
    repeat (3) @(posedge clk);
    rst <= 0;
    cycles = 0;
    fork
      begin
        repeat (14) @(posedge clk);
        irq <= 1;
        @(posedge clk); while (!irq_clear) @(posedge clk);
        irq <= 0;
      end
      begin
        while (!halted) begin @(posedge clk); cycles++; end
      end
    join
    repeat (4) @(posedge clk);
    chk(dut.u_gpr.regs[1], 16'hAB05, "r1");
    chk(dut.u_gpr.regs[2], 16'd9, "r2 (dead code skipped)");
    chk(dut.u_gpr.regs[3], 16'd12, "r3");
    chk(dut.u_gpr.regs[4], 16'h0107, "r4");
    chk(dut.u_gpr.regs[5], 16'd12, "r5");
    chk(dut.u_gpr.regs[6], 16'd13, "r6");
    chk(dut.u_gpr.regs[7], 16'd26, "r7");
    chk(dut.u_gpr.regs[10], 16'h123, "r10");
    chk(dut.u_gpr.regs[11], 16'd1, "r11");
    chk(dut.u_gpr.regs[13], 16'h123, "r13");
    chk(dut.u_gpr.regs[14], 16'd0, "r14");
    chk(dut.u_gpr.regs[15], 16'hAB05, "r15 after transfer");
    chk(io_regs[8'h10], 16'd13, "io 0x10");
    chk(io_regs[8'h11], 16'hAB05, "io 0x11");
    chk(u_lm.mem[16'h40], 21'd12, "local memory store");
    t_raddr = 86; #1 chk(t_rdata, {4'h0, 48'hC0DE_0000_0000, 16'hAB06}, "PBR86 from transfer");
    chk(68'(xf_count), 68'(1), "one transfer");
    chk(68'(n_irqs), 68'(1), "interrupt taken");
    chk(68'(n_load_stalls >= 1), 68'(1), "load-use stall");
    chk(68'(n_sb_stalls >= 5), 68'(1), "scoreboard stall");
    chk(68'(n_overtakes >= 2), 68'(1), "instructions completed during transfer");
    chk(68'(pbr_busy), 68'(0), "scoreboard clear");
    $display("core: %0d cycles, %0d retired, %0d scoreboard stalls, %0d overtakes",
             cycles, n_retired, n_sb_stalls, n_overtakes);

    // Part 2: a random program of ALU operations, loads and stores with
    // many back-to-back dependences, run from reset and checked against a
    // reference model of the instruction set. r15 holds the data base.
    rst <= 1;
    repeat (3) @(posedge clk);
    for (int i = 0; i < 16; i++) mr[i] = 0;
    for (int i = 0; i < 64; i++) begin mm[i] = 16'($urandom); u_lm.mem[16'h800 + i] = {5'($urandom), mm[i]}; end
    u_lm.mem[0] = ldi(15, 12'h800); mr[15] = 16'h800;
    last_rd = 15;
    for (int a = 1; a <= RAND_N; a++) begin
      op_i = $urandom % 13;
      rd_i = 1 + $urandom % 14;
      ra_i = ($urandom % 2) ? last_rd : $urandom % 16;
      rb_i = ($urandom % 2) ? last_rd : $urandom % 16;
      k_i  = $urandom % 64;
      imm_i = $urandom % 256;
      case (op_i)
        0:  begin u_lm.mem[a] = rrr(OP_ADD, rd_i, ra_i, rb_i); mr[rd_i] = mr[ra_i] + mr[rb_i]; end
        1:  begin u_lm.mem[a] = rrr(OP_SUB, rd_i, ra_i, rb_i); mr[rd_i] = mr[ra_i] - mr[rb_i]; end
        2:  begin u_lm.mem[a] = rrr(OP_AND, rd_i, ra_i, rb_i); mr[rd_i] = mr[ra_i] & mr[rb_i]; end
        3:  begin u_lm.mem[a] = rrr(OP_OR,  rd_i, ra_i, rb_i); mr[rd_i] = mr[ra_i] | mr[rb_i]; end
        4:  begin u_lm.mem[a] = rrr(OP_XOR, rd_i, ra_i, rb_i); mr[rd_i] = mr[ra_i] ^ mr[rb_i]; end
        5:  begin u_lm.mem[a] = rrr(OP_SHL, rd_i, ra_i, rb_i); mr[rd_i] = mr[ra_i] << mr[rb_i][3:0]; end
        6:  begin u_lm.mem[a] = rrr(OP_SHR, rd_i, ra_i, rb_i); mr[rd_i] = mr[ra_i] >> mr[rb_i][3:0]; end
        7:  begin u_lm.mem[a] = rri(OP_ADDI, rd_i, ra_i, imm_i); mr[rd_i] = mr[ra_i] + {{8{imm_i[7]}}, 8'(imm_i)}; end
        8:  begin u_lm.mem[a] = ldi(rd_i, imm_i * 16 + k_i); mr[rd_i] = 16'(12'(imm_i * 16 + k_i)); end
        9:  begin u_lm.mem[a] = ldih(rd_i, ra_i, imm_i); mr[rd_i] = {8'(imm_i), mr[ra_i][7:0]}; end
        10, 11: begin u_lm.mem[a] = rri(OP_LD, rd_i, 15, k_i); mr[rd_i] = mm[k_i]; end
        default: begin u_lm.mem[a] = rri(OP_ST, ra_i, 15, k_i); mm[k_i] = mr[ra_i]; rd_i = last_rd; end
      endcase
      last_rd = rd_i;
    end
    u_lm.mem[RAND_N + 1] = op0(OP_HALT);
    rst <= 0;
    @(posedge clk);
    while (!halted) @(posedge clk);
    repeat (4) @(posedge clk);
    for (int i = 0; i < 16; i++) chk(68'(dut.u_gpr.regs[i]), 68'(mr[i]), "random program register");
    for (int i = 0; i < 64; i++) chk(68'(u_lm.mem[16'h800 + i][15:0]), 68'(mm[i]), "random program memory");
    chk(68'(n_retired), 68'(RAND_N + 2), "random program retired count (with LDI and HALT)");
    chk(68'(n_load_stalls > 0), 68'(1), "random program had load-use stalls");
    $display("random program: %0d instructions, %0d load-use stalls", RAND_N, n_load_stalls);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
