// tb_mbp_light: end-to-end test of the MBP-light chip at its full size.
//
// A protocol program is loaded into local memory through the boot port. It
// fills the Net Cache and Ackmap Cache, arms an Ack Collector slot, then
// loops: every packet received is turned into a plain data packet (its
// type field cleared with PLD/AND/PST) and sent back out of the same PBR
// set. Its interrupt handler serves cluster bus requests the MMC could not
// serve: a read is answered by moving the line cluster memory -> PBRs ->
// bus, a write by bus -> PBRs -> cluster memory. The line's tag is then
// set so the next access is served by the MMC alone: after a read through
// the MMC tag registers, after a write by a PBR -> tag block transfer.
//
// Around the chip sit a router model (sends packets, collects what comes
// out, and stops taking packets for a while so that the three receive sets
// fill up), a cluster memory with random latency, a tag SRAM, an external
// I/O register file and four cluster bus masters, which at the end all
// request the bus at once. The test checks every packet
// that comes out (hardware ack, hardware nack, echoed packets), the data of
// every bus transaction against a memory model, the Ack Collector result,
// and that each mechanism of the design happened at least once.
module tb_mbp_light;
  import mbp_pkg::*;
  import tb_asm_pkg::*;
  logic clk = 0, rst = 1;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic [7:0] my_cluster = 8'd17;
  logic lm_boot_we; logic [15:0] lm_boot_addr; logic [20:0] lm_boot_wdata;
  logic rdt_in_valid, rdt_in_ready, rdt_in_last, rdt_out_valid, rdt_out_ready, rdt_out_last;
  flit_t rdt_in_flit, rdt_out_flit;
  logic [BUS_MASTERS-1:0] bus_req, bus_we, bus_gnt;
  logic bus_wready, bus_rvalid, bus_done, bus_held;
  logic [LINE_AW-1:0] bus_addr [BUS_MASTERS]; logic [63:0] bus_wdata [BUS_MASTERS];
  logic [63:0] bus_rdata; logic [4:0] bus_beat;
  logic cm_req, cm_we, cm_ack; logic [CM_AW-1:0] cm_addr; logic [63:0] cm_wdata, cm_rdata;
  logic tag_en, tag_we; logic [LINE_AW-1:0] tag_addr; tag_state_e tag_wdata, tag_rdata;
  logic io_re, io_we; logic [15:0] io_addr, io_wdata, io_rdata;
  logic halted, irq, xfer_busy;
  mbp_stats_t stats;

  mbp_light dut (.*);

  // ---------------- models ----------------
  logic [63:0] cm [4096];
  int cm_wait = 0;
  always_ff @(posedge clk) begin
    if (cm_req && !cm_ack) begin
      if (cm_wait == 0) cm_wait <= 1 + $urandom % 4;
      else cm_wait <= cm_wait - 1;
    end
  end
  assign cm_ack   = cm_req && cm_wait == 1;
  assign cm_rdata = cm[cm_addr[11:0]];
  always_ff @(posedge clk) if (cm_ack && cm_we) cm[cm_addr[11:0]] <= cm_wdata;

  tag_state_e tags [1024];
  always_ff @(posedge clk) if (tag_en) begin
    tag_rdata <= tags[tag_addr[9:0]];
    if (tag_we) tags[tag_addr[9:0]] <= tag_wdata;
  end

  logic [15:0] ext_io [256];
  assign io_rdata = ext_io[io_addr[7:0]];
  always_ff @(posedge clk) if (io_we) ext_io[io_addr[7:0]] <= io_wdata;

  initial begin
    repeat (40000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(logic [67:0] got, logic [67:0] exp, string what);
    checks++;
    if (got !== exp) begin failures++; $display("FAIL %s got %h exp %h", what, got, exp); end
  endtask

  // ---------------- program ----------------
  logic [20:0] prog [256];
  int pc;
  int L_loop, L_idle, L_hwrite, L_settag, L_handler;
  task automatic e(logic [20:0] w); prog[pc] = w; pc++; endtask
  function automatic int off(int target); return target - pc; endfunction

  task automatic gen();
    pc = 0;
    e(jmp(16));
    pc = 4;
    e(jmp(L_handler));
    pc = 16;
    // r1 = 0xFF00, internal register base
    e(ldi(1, 0)); e(ldih(1, 1, 8'hFF));
    // Net Cache: 0x100 cached, 0x200 not cached; Ackmap: cluster 5 -> 0x00F0
    e(ldi(2, 12'h100)); e(rri(OP_OUT, 2, 1, R_NC_ADDR_LO)); e(rri(OP_OUT, 0, 1, R_NC_ADDR_HI));
    e(ldi(2, 3)); e(rri(OP_OUT, 2, 1, R_NC_WRITE));
    e(ldi(2, 12'h200)); e(rri(OP_OUT, 2, 1, R_NC_ADDR_LO));
    e(ldi(2, 2)); e(rri(OP_OUT, 2, 1, R_NC_WRITE));
    e(ldi(2, 12'h0F0)); e(rri(OP_OUT, 2, 1, R_AM_BITMAP));
    e(ldi(2, 12'h105)); e(rri(OP_OUT, 2, 1, R_AM_WRITE));
    // Ack Collector slot 1 expects 2 replies
    e(ldi(2, 2)); e(ldih(2, 2, 8'h10)); e(rri(OP_OUT, 2, 1, R_AC_ARM));
    // tell the environment we are ready: ext 0x00
    e(ldi(2, 1)); e(rri(OP_OUT, 2, 0, 0));
    L_loop = pc;
    e(rri(OP_IN, 2, 1, R_RX_STATUS));
    e(ldi(4, 15)); e(rrr(OP_SHR, 3, 2, 4));
    e(br(OP_BEQZ, 3, off(L_idle)));
    e(ldi(4, 8)); e(rrr(OP_SHR, 5, 2, 4)); e(ldi(4, 3)); e(rrr(OP_AND, 5, 5, 4));   // r5 = set
    e(ldi(4, 12'h1F)); e(rrr(OP_AND, 6, 2, 4));                                       // r6 = length
    e(ldi(4, 4)); e(rrr(OP_SHL, 7, 5, 4));                                            // r7 = set*28
    e(ldi(4, 3)); e(rrr(OP_SHL, 4, 5, 4)); e(rrr(OP_ADD, 7, 7, 4));
    e(ldi(4, 2)); e(rrr(OP_SHL, 4, 5, 4)); e(rrr(OP_ADD, 7, 7, 4));
    e(pfield(OP_PLD, 3, 7, 0, 3)); e(ldi(4, 12'hFFF)); e(rrr(OP_AND, 3, 3, 4));      // type := DATA
    e(pfield(OP_PST, 3, 7, 0, 3));
    e(ldi(4, 8)); e(rrr(OP_SHL, 6, 6, 4)); e(rrr(OP_OR, 6, 6, 5));
    e(rri(OP_OUT, 6, 1, R_TX_SEND));
    e(rri(OP_LD, 3, 0, 8'h7F)); e(rri(OP_ADDI, 3, 3, 1)); e(rri(OP_ST, 3, 0, 8'h7F)); // count
    e(jmp(L_loop));
    L_idle = pc;
    e(rri(OP_IN, 2, 0, 1));                     // ext 0x01: stop request
    e(br(OP_BEQZ, 2, off(L_loop)));
    e(rri(OP_IN, 2, 1, R_AC_DONE)); e(rri(OP_OUT, 2, 0, 2));
    e(rri(OP_IN, 2, 1, R_AC_NACK)); e(rri(OP_OUT, 2, 0, 3));
    e(rri(OP_LD, 3, 0, 8'h7F)); e(rri(OP_OUT, 3, 0, 4));
    e(rri(OP_OUT, 13, 0, 5));
    e(op0(OP_HALT));
    // interrupt handler: r8..r12 scratch, r13 counts handled requests
    L_handler = pc;
    e(rri(OP_IN, 8, 1, R_MMC_REQ_LO));
    e(rri(OP_IN, 9, 1, R_MMC_REQ_HI));
    e(rri(OP_OUT, 0, 1, R_MMC_IRQACK));
    e(ldi(10, 84));
    e(ldi(11, 14)); e(rrr(OP_SHR, 12, 9, 11)); e(ldi(11, 1)); e(rrr(OP_AND, 12, 12, 11));
    e(br(OP_BNEZ, 12, off(L_hwrite)));
    e(xfer(XF_CM_TO_PBR, 8, 10, LINE_BEATS));
    e(rri(OP_ADDI, 13, 13, 1));
    e(xfer(XF_PBR_TO_BUS, 8, 10, LINE_BEATS));
    e(ldi(11, 1));
    e(jmp(L_settag));
    L_hwrite = pc;
    e(xfer(XF_BUS_TO_PBR, 8, 10, LINE_BEATS));
    e(rri(OP_ADDI, 13, 13, 1));
    e(xfer(XF_PBR_TO_CM, 8, 10, LINE_BEATS));
    // the written line becomes EXCLUSIVE, its tag written through PBR 100
    e(ldi(11, 2)); e(ldi(12, 100));
    e(pfield(OP_PST, 11, 12, 0, 0));
    e(xfer(XF_PBR_TO_TAG, 8, 12, 1));
    e(op0(OP_RETI));
    L_settag = pc;
    e(rri(OP_OUT, 8, 1, R_MMC_TAG_LO)); e(rri(OP_OUT, 0, 1, R_MMC_TAG_HI)); e(rri(OP_OUT, 11, 1, R_MMC_TAG_WR));
    e(op0(OP_RETI));
  endtask

  // ---------------- router model ----------------
  flit_t out_pkt [$];
  flit_t echoes_exp [$][$];
  int n_ack_out = 0, n_nack_out = 0, n_echo_ok = 0;
  int ack_slot_seen = -1;
  logic [15:0] ack_bitmap_seen;

  always @(posedge clk) if (rdt_out_valid && rdt_out_ready) begin
    out_pkt.push_back(rdt_out_flit);
    if (rdt_out_last) begin
      hdr_t h;
      int found;
      h = hdr_t'(out_pkt[0][63:0]);
      if (h.ptype == PT_ACK || h.ptype == PT_NACK) begin
        checks++;
        if (out_pkt.size() != 2 || h.src != my_cluster || h.dst != 8'd5 || out_pkt[1][15:0] != 16'h00F0) begin
          failures++; $display("FAIL bad reply packet %h %h", out_pkt[0], out_pkt[1]);
        end
        if (h.ptype == PT_ACK) begin n_ack_out++; chk(68'(h.addr), 68'h100, "ack address"); end
        else begin n_nack_out++; chk(68'(h.addr), 68'h200, "nack address"); end
      end else begin
        found = -1;
        foreach (echoes_exp[k]) if (found < 0 && echoes_exp[k].size() == out_pkt.size()) begin
          logic same;
          same = 1;
          foreach (out_pkt[i]) if (out_pkt[i] !== echoes_exp[k][i]) same = 0;
          if (same) found = k;
        end
        checks++;
        if (found < 0) begin failures++; $display("FAIL unexpected packet, header %h", out_pkt[0]); end
        else begin echoes_exp.delete(found); n_echo_ok++; end
      end
      out_pkt.delete();
    end
  end

  task automatic send_pkt(pkt_type_e t, int src, int slot, logic [31:0] a, int len, logic expect_echo);
    flit_t f [$];
    flit_t ex [$];
    hdr_t h;
    h = '0; h.ptype = t; h.src = 8'(src); h.dst = my_cluster; h.slot = 4'(slot); h.addr = a;
    f.push_back({4'(len), h});
    for (int i = 1; i < len; i++) f.push_back({4'($urandom), $urandom, $urandom});
    if (expect_echo) begin
      ex = f;
      ex[0][63:60] = 4'(PT_DATA);
      echoes_exp.push_back(ex);
    end
    foreach (f[i]) begin
      @(negedge clk);
      rdt_in_valid = 1; rdt_in_flit = f[i]; rdt_in_last = (i == len - 1);
      @(posedge clk); while (!rdt_in_ready) @(posedge clk);
    end
    @(negedge clk); rdt_in_valid = 0; rdt_in_last = 0;
  endtask

  // ---------------- bus masters (the L2 caches) ----------------
  // Master m owns the shared response lines while bus_gnt[m] is set.
  logic [63:0] beats  [BUS_MASTERS][LINE_BEATS];
  logic [63:0] wbeats [BUS_MASTERS][LINE_BEATS];
  int bus_cycles [BUS_MASTERS];
  task automatic bus_xact(int m, logic we, int line);
    int b;
    b = 0;
    bus_cycles[m] = 0;
    @(negedge clk);
    bus_req[m] = 1; bus_we[m] = we; bus_addr[m] = LINE_AW'(line);
    while (1) begin
      #1 bus_wdata[m] = wbeats[m][bus_beat[1:0]];
      @(posedge clk);
      bus_cycles[m]++;
      if (bus_gnt[m] && bus_rvalid) begin beats[m][b] = bus_rdata; b++; end
      if (bus_gnt[m] && bus_done) break;
      @(negedge clk);
    end
    @(negedge clk); bus_req[m] = 0;
  endtask

  // after a request the core handled, let its handler finish
  task automatic settle();
    repeat (4) @(negedge clk);
    while (xfer_busy || dut.u_mmc.tag_wr_pend || dut.u_core.ie == 0) @(negedge clk);
    repeat (4) @(negedge clk);
  endtask

  task automatic bus_read_check(int m, int line, string what);
    bus_xact(m, 0, line);
    for (int i = 0; i < LINE_BEATS; i++) chk(beats[m][i], cm[line * LINE_BEATS + i], what);
  endtask
  task automatic bus_write(int m, int line);
    for (int i = 0; i < LINE_BEATS; i++) wbeats[m][i] = {$urandom, $urandom};
    bus_xact(m, 1, line);
  endtask

  int hit_cycles, miss_cycles;
  initial begin
    lm_boot_we = 0; lm_boot_addr = 0; lm_boot_wdata = 0;
    rdt_in_valid = 0; rdt_in_flit = 0; rdt_in_last = 0; rdt_out_ready = 1;
    bus_req = 0; bus_we = 0;
    for (int m = 0; m < BUS_MASTERS; m++) begin bus_addr[m] = 0; bus_wdata[m] = 0; end
    for (int i = 0; i < 4096; i++) cm[i] = {$urandom, $urandom};
    for (int i = 0; i < 1024; i++) tags[i] = TAG_INVALID;
    tags[3] = TAG_SHARED;
    for (int i = 0; i < 256; i++) ext_io[i] = 0;
    for (int i = 0; i < 256; i++) prog[i] = op0(OP_NOP);
    gen(); gen();                       // second pass resolves forward labels
    repeat (2) @(posedge clk);
    for (int i = 0; i < 256; i++) begin
      @(negedge clk); lm_boot_we = 1; lm_boot_addr = 16'(i); lm_boot_wdata = prog[i];
    end
    @(negedge clk); lm_boot_we = 0;
    rst = 0;
    while (ext_io[0] == 0) @(negedge clk);

    fork
      begin : packets
        send_pkt(PT_COHERENT, 5, 3, 32'h100, 2, 1);   // hardware ack
        send_pkt(PT_COHERENT, 5, 4, 32'h200, 3, 1);   // hardware nack
        send_pkt(PT_COHERENT, 6, 4, 32'h100, 1, 1);   // Ackmap miss: software only
        send_pkt(PT_ACK, 9, 1, 0, 2, 0);
        send_pkt(PT_NACK, 10, 1, 0, 2, 0);
        // router stops taking packets: sets fill and the receiver must wait
        rdt_out_ready = 0;
        for (int k = 0; k < 5; k++) send_pkt(PT_DATA, 20 + k, 0, 32'(k), 4 + 5 * k, 1);
      end
      begin : unblock
        repeat (400) @(negedge clk);
        rdt_out_ready = 1;
      end
      begin : bus
        repeat (30) @(negedge clk);
        bus_read_check(0, 3, "read hit");               // SHARED: MMC alone
        hit_cycles = bus_cycles[0];
        bus_read_check(0, 10, "read miss via core");    // INVALID: interrupt
        miss_cycles = bus_cycles[0];
        settle();
        bus_read_check(2, 10, "read after tag set");    // now SHARED
        bus_write(1, 11);                               // INVALID: interrupt
        settle();
        for (int i = 0; i < LINE_BEATS; i++) chk(cm[44 + i], wbeats[1][i], "write miss data in memory");
        bus_write(3, 11);                               // now EXCLUSIVE: MMC alone
        for (int i = 0; i < LINE_BEATS; i++) chk(cm[44 + i], wbeats[3][i], "write hit data in memory");
        bus_read_check(0, 11, "read back");
        // all four caches at once: the arbiter serialises them
        fork
          bus_read_check(0, 3, "contended read, cache 0");
          bus_read_check(1, 10, "contended read, cache 1");
          bus_read_check(2, 11, "contended read, cache 2");
          bus_read_check(3, 3, "contended read, cache 3");
        join
      end
    join
    while (echoes_exp.size() != 0 || rdt_out_valid) @(negedge clk);
    repeat (20) @(negedge clk);
    ext_io[1] = 1;
    while (!halted) @(negedge clk);
    repeat (5) @(negedge clk);

    chk(68'(ext_io[2][1]), 68'(1), "ack collector slot 1 done");
    chk(68'(ext_io[3][1]), 68'(1), "ack collector saw a nack");
    chk(68'(ext_io[4]), 68'(8), "packets echoed by software");
    chk(68'(ext_io[5]), 68'(2), "requests handled by software");
    chk(68'(n_echo_ok), 68'(8), "echoes received");
    chk(68'(tags[10]), 68'(TAG_SHARED), "tag set by software (read)");
    chk(68'(tags[11]), 68'(TAG_EXCLUSIVE), "tag set by software (write)");
    chk(68'(xfer_busy), 68'(0), "no transfer left");
    chk(68'(bus_held), 68'(0), "no request left");

    $display("mechanisms: hw_ack=%0d hw_nack=%0d ag_miss=%0d rx_stalls=%0d rx=%0d tx=%0d",
             n_ack_out, n_nack_out, stats.ag_miss, stats.rx_stalls, stats.rx_pkts, stats.tx_pkts);
    $display("            irqs=%0d held=%0d hw_served=%0d sb_stalls=%0d load_stalls=%0d overtakes=%0d retired=%0d",
             stats.irqs, stats.held, stats.hw_served, stats.sb_stalls, stats.load_stalls, stats.overtakes, stats.retired);
    $display("            bus read: %0d cycles served by the MMC, %0d cycles through the core; bus conflicts=%0d",
             hit_cycles, miss_cycles, stats.bus_conflicts);
    chk(68'(n_ack_out), 68'(1), "hardware ack sent");
    chk(68'(n_nack_out), 68'(1), "hardware nack sent");
    chk(68'(stats.ag_miss), 68'(1), "coherent message left to software");
    chk(68'(stats.rx_stalls > 0), 68'(1), "receiver waited for a free set");
    chk(68'(stats.irqs), 68'(2), "interrupts");
    chk(68'(stats.held), 68'(2), "requests held by the MMC");
    chk(68'(stats.hw_served), 68'(8), "requests served by the MMC");
    chk(68'(stats.bus_conflicts > 0), 68'(1), "bus arbitration between caches");
    chk(68'(stats.sb_stalls > 0), 68'(1), "scoreboard stall");
    chk(68'(stats.load_stalls > 0), 68'(1), "load-use stall");
    chk(68'(stats.overtakes > 0), 68'(1), "out-of-order completion");
    chk(68'(miss_cycles > hit_cycles), 68'(1), "software path slower than hardware");
    // an L3 hit takes 760 ns in the original chip: 38 clocks at 50 MHz
    chk(68'(hit_cycles <= 38), 68'(1), "L3 hit within 38 clocks");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
