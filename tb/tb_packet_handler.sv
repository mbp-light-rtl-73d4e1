// tb_packet_handler: sends packets of random length into the Packet
// Handler and checks that they land in PBR sets 0, 1, 2, 0, ... in turn,
// that a fourth packet waits while all three sets are full, that ack/nack
// packets go to the Ack Collector without using a set, that coherent
// headers are offered to the Ack Generator, that SEND transmits a set's
// flits in order and frees it, and that a waiting Ack Generator reply is
// sent before a PBR packet.
module tb_packet_handler;
  import mbp_pkg::*;
  logic clk = 0, rst = 1;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic in_valid, in_ready, in_last, out_valid, out_ready, out_last;
  flit_t in_flit, out_flit;
  pbr_idx_t p_raddr, p_waddr;
  flit_t p_rdata, p_wdata;
  logic p_we;
  logic lk_valid, lk_ready;
  hdr_t lk_hdr;
  logic ag_valid, ag_ready, ag_last;
  flit_t ag_flit;
  logic ac_valid, ac_nack;
  logic [3:0] ac_slot;
  logic rel_en, send_en;
  logic [1:0] rel_set, send_set;
  logic [4:0] send_len;
  logic rx_head_valid;
  logic [1:0] rx_head_set;
  logic [4:0] rx_head_len;
  set_state_e set_state [PBR_SETS];
  logic [7:0] n_rx_pkts, n_tx_pkts, n_rx_stalls;

  packet_handler dut (.*);

  // PBR storage for the handler's port
  pbr_idx_t z_idx = '0;
  flit_t    z_flit = '0;
  flit_t    core_rd, mmc_rd;
  pbr_idx_t core_ra;
  pbr_file u_pbr (.clk, .rst,
    .c_raddr(core_ra), .c_rdata(core_rd), .c_we(1'b0), .c_waddr(z_idx), .c_wmask(5'b0), .c_wdata(z_flit),
    .r_raddr(p_raddr), .r_rdata(p_rdata), .r_we(p_we), .r_waddr(p_waddr), .r_wdata(p_wdata),
    .m_raddr(z_idx), .m_rdata(mmc_rd), .m_we(1'b0), .m_waddr(z_idx), .m_wdata(z_flit));

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(logic [67:0] got, logic [67:0] exp, string what);
    checks++;
    if (got !== exp) begin failures++; $display("FAIL %s got %h exp %h", what, got, exp); end
  endtask

  // count ack collector pulses and lookups
  int n_ac = 0, n_lk = 0;
  always @(posedge clk) begin
    if (ac_valid) n_ac++;
    if (lk_valid && lk_ready) n_lk++;
  end

  flit_t pkt [4][32];
  int    plen[4];

  task automatic make_pkt(int k, pkt_type_e t, int len);
    hdr_t h;
    h = '0; h.ptype = t; h.src = 8'(k); h.slot = 4'(k); h.addr = $urandom;
    plen[k] = len;
    pkt[k][0] = {4'(k), h};
    for (int i = 1; i < len; i++) pkt[k][i] = {4'($urandom), 32'($urandom), 32'($urandom)};
  endtask

  task automatic send_in(int k);
    for (int i = 0; i < plen[k]; i++) begin
      @(negedge clk);
      in_valid = 1; in_flit = pkt[k][i]; in_last = (i == plen[k] - 1);
      @(posedge clk);
      while (!in_ready) @(posedge clk);
    end
    @(negedge clk); in_valid = 0; in_last = 0;
  endtask

  task automatic check_set(int k, int set);
    int n = plen[k] > SET_FLITS ? SET_FLITS : plen[k];
    for (int i = 0; i < n; i++) begin
      core_ra = pbr_idx_t'(set * SET_FLITS + i); #1;
      chk(core_rd, pkt[k][i], $sformatf("set %0d flit %0d", set, i));
    end
  endtask

  initial begin
    in_valid = 0; in_flit = '0; in_last = 0; out_ready = 0;
    lk_ready = 1; ag_valid = 0; ag_flit = '0; ag_last = 0;
    rel_en = 0; send_en = 0; rel_set = 0; send_set = 0; send_len = 0; core_ra = 0;
    repeat (2) @(posedge clk);
    rst <= 0;

    // three packets fill sets 0,1,2; the fourth (longer than a set) waits
    make_pkt(0, PT_DATA, 5);
    make_pkt(1, PT_COHERENT, 1);
    make_pkt(2, PT_DATA, 28);
    make_pkt(3, PT_DATA, 30);
    send_in(0); send_in(1); send_in(2);
    @(negedge clk);
    chk(68'(set_state[0]), 68'(SET_FULL), "set0 full");
    chk(68'(set_state[1]), 68'(SET_FULL), "set1 full");
    chk(68'(set_state[2]), 68'(SET_FULL), "set2 full");
    chk(68'(set_state[3]), 68'(SET_FREE), "set3 untouched");
    chk(68'(rx_head_valid), 68'(1), "head valid");
    chk(68'(rx_head_set), 68'(0), "head set 0");
    chk(68'(rx_head_len), 68'(5), "head len");
    chk(68'(n_lk), 68'(1), "one coherent lookup");
    check_set(0, 0); check_set(1, 1); check_set(2, 2);
    fork
      send_in(3);
      begin
        repeat (6) @(negedge clk);
        chk(68'(n_rx_stalls >= 5), 68'(1), "fourth packet stalled");
        chk(68'(set_state[0]), 68'(SET_FULL), "still full");
        rel_en = 1; rel_set = 0;
        @(negedge clk); rel_en = 0;
      end
    join
    @(negedge clk);
    chk(68'(set_state[0]), 68'(SET_FULL), "set0 reused");
    chk(68'(dut.set_len[0]), 68'(SET_FLITS), "truncated length");
    check_set(3, 0);
    chk(68'(rx_head_set), 68'(1), "head moved to set 1");

    // ack packets do not use a set
    make_pkt(0, PT_ACK, 2);
    make_pkt(1, PT_NACK, 1);
    send_in(0); send_in(1);
    @(negedge clk);
    chk(68'(n_ac), 68'(2), "two replies collected");
    chk(68'(n_rx_pkts), 68'(4), "stored packet count");

    // send set 1 (the coherent packet, 1 flit) with 3 flits, while a reply waits
    ag_valid = 1; ag_flit = 68'hA_0000_0000_0000_0001; ag_last = 0;
    send_en = 1; send_set = 1; send_len = 3;
    @(negedge clk); send_en = 0;
    out_ready = 1;
    begin
      flit_t exp_out [5];
      exp_out[0] = 68'hA_0000_0000_0000_0001;
      exp_out[1] = 68'hB_0000_0000_0000_0002;
      for (int i = 0; i < 3; i++) begin core_ra = pbr_idx_t'(SET_FLITS + i); #1; exp_out[2+i] = core_rd; end
      chk(exp_out[2][63:60], 68'(PT_COHERENT), "set 1 holds the coherent packet");
      for (int i = 0; i < 5; i++) begin
        while (!out_valid) @(negedge clk);
        chk(out_flit, exp_out[i], $sformatf("out flit %0d", i));
        chk(68'(out_last), 68'(i == 1 || i == 4), "out last");
        @(posedge clk);
        if (i == 0) begin #1 ag_flit = 68'hB_0000_0000_0000_0002; ag_last = 1; end
        if (i == 1) begin #1 ag_valid = 0; end
        @(negedge clk);
      end
    end
    out_ready = 0;
    @(negedge clk);
    chk(68'(set_state[1]), 68'(SET_FREE), "sent set freed");
    chk(68'(n_tx_pkts), 68'(2), "two packets sent");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
