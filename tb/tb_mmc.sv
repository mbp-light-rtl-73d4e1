// tb_mmc: exercises the Main Memory Controller with a cluster memory model
// (random 1-3 cycle acknowledge latency), a tag SRAM model, a cluster bus
// master and the PBR file. Checked: reads and writes served from cluster
// memory when the tag allows it; a request the tag does not allow is held,
// raises the interrupt and shows its address in the registers; the held
// request is completed by PBR-to-bus and bus-to-PBR block transfers or by
// a tag change and resume; PBR <-> cluster memory and PBR <-> tag block
// transfers; the
// completion report (start and length) of every transfer.
module tb_mmc;
  import mbp_pkg::*;
  logic clk = 0, rst = 1;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic cmd_valid, cmd_ready, done_valid;
  xfer_req_t cmd;
  pbr_idx_t done_start;
  logic [4:0] done_len;
  pbr_idx_t m_raddr, m_waddr, c_raddr;
  flit_t m_rdata, m_wdata, c_rdata, c_wdata, r_rdata;
  logic m_we, c_we;
  logic io_we;
  logic [7:0] io_addr;
  logic [15:0] io_wdata, io_rdata;
  logic irq;
  logic bus_req, bus_we, bus_wready, bus_rvalid, bus_done, bus_held;
  logic [LINE_AW-1:0] bus_addr;
  logic [63:0] bus_wdata, bus_rdata;
  logic [4:0] bus_beat;
  logic cm_req, cm_we, cm_ack;
  logic [CM_AW-1:0] cm_addr;
  logic [63:0] cm_wdata, cm_rdata;
  logic tag_en, tag_we;
  logic [LINE_AW-1:0] tag_addr;
  tag_state_e tag_wdata, tag_rdata;
  logic [15:0] n_hw_served, n_held;

  mmc dut (.clk, .rst, .cmd_valid, .cmd_ready, .cmd, .done_valid, .done_start, .done_len,
    .p_raddr(m_raddr), .p_rdata(m_rdata), .p_we(m_we), .p_waddr(m_waddr), .p_wdata(m_wdata),
    .io_we, .io_addr, .io_wdata, .io_rdata, .irq,
    .bus_req, .bus_we, .bus_addr, .bus_wdata, .bus_beat, .bus_wready, .bus_rvalid, .bus_rdata,
    .bus_done, .bus_held,
    .cm_req, .cm_we, .cm_addr, .cm_wdata, .cm_ack, .cm_rdata,
    .tag_en, .tag_we, .tag_addr, .tag_wdata, .tag_rdata, .n_hw_served, .n_held);

  pbr_idx_t z_idx = '0;
  pbr_file u_pbr (.clk, .rst,
    .c_raddr, .c_rdata, .c_we, .c_waddr(c_raddr), .c_wmask(5'b11111), .c_wdata,
    .r_raddr(z_idx), .r_rdata, .r_we(1'b0), .r_waddr(z_idx), .r_wdata(68'b0),
    .m_raddr, .m_rdata, .m_we, .m_waddr, .m_wdata);

  // cluster memory model: 4096 beats, acknowledge after 1..3 cycles
  logic [63:0] cm [4096];
  int cm_wait = 0;
  always_ff @(posedge clk) begin
    if (cm_req && !cm_ack) begin
      if (cm_wait == 0) cm_wait <= 1 + $urandom % 3;
      else cm_wait <= cm_wait - 1;
    end
  end
  assign cm_ack   = cm_req && cm_wait == 1;
  assign cm_rdata = cm[cm_addr[11:0]];
  always_ff @(posedge clk) if (cm_ack && cm_we) cm[cm_addr[11:0]] <= cm_wdata;

  // tag SRAM model
  tag_state_e tags [1024];
  always_ff @(posedge clk) begin
    if (tag_en) begin
      tag_rdata <= tags[tag_addr[9:0]];
      if (tag_we) tags[tag_addr[9:0]] <= tag_wdata;
    end
  end

  // done reports
  int n_done = 0;
  pbr_idx_t last_start;
  logic [4:0] last_len;
  always @(posedge clk) if (done_valid) begin n_done++; last_start = done_start; last_len = done_len; end

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

  task automatic wr_reg(logic [7:0] a, logic [15:0] d);
    @(negedge clk); io_we = 1; io_addr = a; io_wdata = d;
    @(negedge clk); io_we = 0;
  endtask
  task automatic set_tag(int line, tag_state_e s);
    wr_reg(R_MMC_TAG_LO, 16'(line));
    wr_reg(R_MMC_TAG_HI, 16'(line >> 16));
    wr_reg(R_MMC_TAG_WR, 16'(s));
    repeat (2) @(negedge clk);
  endtask
  task automatic do_xfer(xfer_cmd_e c, int start, int len, int line);
    int n0 = n_done;
    @(negedge clk);
    while (!cmd_ready) @(negedge clk);
    cmd_valid = 1; cmd.cmd = c; cmd.start = pbr_idx_t'(start); cmd.len = 5'(len); cmd.line = 16'(line);
    @(negedge clk); cmd_valid = 0;
    while (n_done == n0) @(negedge clk);
    chk(68'(last_start), 68'(start), "done start");
    chk(68'(last_len), 68'(len), "done len");
  endtask

  logic [63:0] beats [LINE_BEATS];
  logic [63:0] wbeats [LINE_BEATS];
  // bus master: one transaction; returns after bus_done
  task automatic bus_xact(logic we, int line);
    int b = 0;
    @(negedge clk);
    bus_req = 1; bus_we = we; bus_addr = LINE_AW'(line);
    while (1) begin
      bus_wdata = wbeats[bus_beat[1:0]];
      #1;
      bus_wdata = wbeats[bus_beat[1:0]];
      @(posedge clk);
      if (bus_rvalid) begin beats[b] = bus_rdata; b++; end
      if (bus_done) break;
      @(negedge clk);
    end
    @(negedge clk); bus_req = 0;
  endtask

  initial begin
    cmd_valid = 0; cmd = '0; c_raddr = 0; c_we = 0; c_wdata = 0;
    io_we = 0; io_addr = 0; io_wdata = 0;
    bus_req = 0; bus_we = 0; bus_addr = 0; bus_wdata = 0;
    for (int i = 0; i < 4096; i++) cm[i] = {$urandom, $urandom};
    for (int i = 0; i < 1024; i++) tags[i] = TAG_INVALID;
    for (int i = 0; i < LINE_BEATS; i++) wbeats[i] = {$urandom, $urandom};
    repeat (2) @(posedge clk);
    rst <= 0;
    set_tag(5, TAG_SHARED);
    set_tag(6, TAG_EXCLUSIVE);
    chk(68'(tags[5]), 68'(TAG_SHARED), "tag write");

    // 1. read hit, served by hardware
    bus_xact(0, 5);
    for (int i = 0; i < LINE_BEATS; i++) chk(beats[i], cm[20 + i], "L3 read data");
    chk(68'(n_hw_served), 68'(1), "served count");

    // 2. write to a SHARED line: held, interrupt, completed by bus->PBR transfer
    fork
      bus_xact(1, 5);
      begin
        while (!irq) @(negedge clk);
        chk(68'(bus_held), 68'(1), "held");
        io_addr = R_MMC_REQ_LO; #1 chk(68'(io_rdata), 68'(5), "req line");
        io_addr = R_MMC_REQ_HI; #1 chk(68'(io_rdata), 68'(16'hC000), "req held+write");
        wr_reg(R_MMC_IRQACK, 0);
        chk(68'(irq), 68'(0), "irq acknowledged");
        do_xfer(XF_BUS_TO_PBR, 84, 4, 0);
      end
    join
    for (int i = 0; i < 4; i++) begin c_raddr = pbr_idx_t'(84 + i); #1 chk(c_rdata, {4'b0, wbeats[i]}, "bus->PBR"); end
    chk(68'(bus_held), 68'(0), "released");

    // 3. write to an EXCLUSIVE line: served into cluster memory
    for (int i = 0; i < LINE_BEATS; i++) wbeats[i] = {$urandom, $urandom};
    bus_xact(1, 6);
    for (int i = 0; i < LINE_BEATS; i++) chk(cm[24 + i], wbeats[i], "L3 write data");

    // 4. read of an INVALID line: held; core fetches line 6 into PBRs and replies
    fork
      bus_xact(0, 7);
      begin
        while (!irq) @(negedge clk);
        do_xfer(XF_CM_TO_PBR, 90, 4, 6);
        for (int i = 0; i < 4; i++) begin c_raddr = pbr_idx_t'(90 + i); #1 chk(c_rdata, {4'b0, cm[24 + i]}, "CM->PBR"); end
        do_xfer(XF_PBR_TO_BUS, 90, 4, 0);
      end
    join
    for (int i = 0; i < LINE_BEATS; i++) chk(beats[i], cm[24 + i], "PBR->bus data");

    // 5. held read resolved by a tag change and resume
    fork
      bus_xact(0, 7);
      begin
        while (!irq) @(negedge clk);
        set_tag(7, TAG_SHARED);
        wr_reg(R_MMC_RESUME, 0);
      end
    join
    for (int i = 0; i < LINE_BEATS; i++) chk(beats[i], cm[28 + i], "resumed read");
    chk(68'(n_held), 68'(3), "held count");

    // 6. PBR -> cluster memory, 6 flits
    for (int i = 0; i < 6; i++) begin
      @(negedge clk); c_we = 1; c_raddr = pbr_idx_t'(100 + i); c_wdata = {4'hF, $urandom, $urandom};
    end
    @(negedge clk); c_we = 0;
    do_xfer(XF_PBR_TO_CM, 100, 6, 20);
    for (int i = 0; i < 6; i++) begin c_raddr = pbr_idx_t'(100 + i); #1 chk(cm[80 + i], c_rdata[63:0], "PBR->CM"); end
    chk(68'(n_done), 68'(4), "transfer count");

    // 7. tags -> PBRs and PBRs -> tags, through the block transfer path
    for (int i = 0; i < 6; i++) tags[200 + i] = tag_state_e'(i % 4);
    do_xfer(XF_TAG_TO_PBR, 40, 6, 200);
    for (int i = 0; i < 6; i++) begin c_raddr = pbr_idx_t'(40 + i); #1 chk(c_rdata, 68'(i % 4), "tag->PBR"); end
    for (int i = 0; i < 5; i++) begin
      @(negedge clk); c_we = 1; c_raddr = pbr_idx_t'(50 + i); c_wdata = {4'h0, 62'($urandom), 2'(3 - i % 4)};
    end
    @(negedge clk); c_we = 0;
    do_xfer(XF_PBR_TO_TAG, 50, 5, 300);
    for (int i = 0; i < 5; i++) chk(68'(tags[300 + i]), 68'(3 - i % 4), "PBR->tag");
    chk(68'(tags[305]), 68'(TAG_INVALID), "tag after the run untouched");
    chk(68'(n_done), 68'(6), "transfer count with tag transfers");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
