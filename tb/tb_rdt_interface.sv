// tb_rdt_interface: drives the RDT Interface through its I/O registers and
// router link. It fills the Net Cache and Ackmap Cache, sends coherent
// messages whose lines are cached and not cached and checks the ack and
// nack packets that come out (header fields and bitmap), checks that the
// messages were also stored for the core (RX_STATUS), arms an Ack Collector
// slot and feeds it replies, and sends a stored packet back out with
// TX_SEND.
module tb_rdt_interface;
  import mbp_pkg::*;
  logic clk = 0, rst = 1;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic [7:0] my_cluster = 8'd9;
  logic in_valid, in_ready, in_last, out_valid, out_ready, out_last;
  flit_t in_flit, out_flit;
  pbr_idx_t p_raddr, p_waddr;
  flit_t p_rdata, p_wdata;
  logic p_we;
  logic io_we;
  logic [7:0] io_addr;
  logic [15:0] io_wdata, io_rdata;
  logic [7:0] n_rx_pkts, n_tx_pkts, n_rx_stalls, n_ack_gen, n_nack_gen, n_ag_miss;

  rdt_interface dut (.*);

  pbr_idx_t z_idx = '0;
  flit_t c_rd, m_rd;
  pbr_file u_pbr (.clk, .rst,
    .c_raddr(z_idx), .c_rdata(c_rd), .c_we(1'b0), .c_waddr(z_idx), .c_wmask(5'b0), .c_wdata(68'b0),
    .r_raddr(p_raddr), .r_rdata(p_rdata), .r_we(p_we), .r_waddr(p_waddr), .r_wdata(p_wdata),
    .m_raddr(z_idx), .m_rdata(m_rd), .m_we(1'b0), .m_waddr(z_idx), .m_wdata(68'b0));

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
  task automatic wr(logic [7:0] a, logic [15:0] d);
    @(negedge clk); io_we = 1; io_addr = a; io_wdata = d;
    @(negedge clk); io_we = 0;
  endtask
  task automatic rd(logic [7:0] a, output logic [15:0] d);
    @(negedge clk); io_addr = a; #1 d = io_rdata;
  endtask

  // collect outgoing flits
  flit_t outq [$];
  logic  lastq [$];
  always @(posedge clk) if (out_valid && out_ready) begin outq.push_back(out_flit); lastq.push_back(out_last); end

  task automatic send_pkt(flit_t f [], int n);
    for (int i = 0; i < n; i++) begin
      @(negedge clk); in_valid = 1; in_flit = f[i]; in_last = (i == n - 1);
      @(posedge clk); while (!in_ready) @(posedge clk);
    end
    @(negedge clk); in_valid = 0; in_last = 0;
  endtask

  function automatic flit_t hdr(pkt_type_e t, int src, int slot, logic [31:0] a);
    hdr_t h;
    h = '0; h.ptype = t; h.src = 8'(src); h.dst = my_cluster; h.slot = 4'(slot); h.addr = a;
    return {4'b0, h};
  endfunction

  logic [15:0] v;
  flit_t p [];
  hdr_t  h;
  initial begin
    in_valid = 0; in_flit = 0; in_last = 0; out_ready = 1; io_we = 0; io_addr = 0; io_wdata = 0;
    repeat (2) @(posedge clk);
    rst <= 0;
    // Net Cache: 0x1234_5678 cached, 0x0000_0A00 not cached; Ackmap: cluster 3
    wr(R_NC_ADDR_LO, 16'h5678); wr(R_NC_ADDR_HI, 16'h1234); wr(R_NC_WRITE, 16'b11);
    wr(R_NC_ADDR_LO, 16'h0A00); wr(R_NC_ADDR_HI, 16'h0000); wr(R_NC_WRITE, 16'b10);
    wr(R_AM_BITMAP, 16'hBEEF); wr(R_AM_WRITE, 16'h0103);

    p = new[2]; p[0] = hdr(PT_COHERENT, 3, 5, 32'h1234_5678); p[1] = 68'h1_2222_3333_4444_5555;
    send_pkt(p, 2);
    p[0] = hdr(PT_COHERENT, 3, 6, 32'h0000_0A00);
    send_pkt(p, 2);
    p[0] = hdr(PT_COHERENT, 4, 7, 32'h0000_0A00);     // Ackmap miss: left to software
    send_pkt(p, 2);
    repeat (6) @(negedge clk);
    chk(68'(outq.size()), 68'(4), "two replies of two flits");
    if (outq.size() == 4) begin
      h = hdr_t'(outq[0][63:0]);
      chk(68'(h.ptype), 68'(PT_ACK), "ack type");
      chk(68'(h.dst), 68'(3), "ack dst");
      chk(68'(h.src), 68'(9), "ack src");
      chk(68'(h.slot), 68'(5), "ack slot");
      chk(outq[1], 68'hBEEF, "ack bitmap");
      chk(68'(lastq[1]), 68'(1), "ack last");
      h = hdr_t'(outq[2][63:0]);
      chk(68'(h.ptype), 68'(PT_NACK), "nack type");
      chk(68'(h.slot), 68'(6), "nack slot");
    end
    rd(R_AG_COUNT, v); chk(68'(v), 68'(16'h0101), "generated counts");
    chk(68'(n_ag_miss), 68'(1), "miss count");
    rd(R_RX_STATUS, v); chk(68'(v), 68'(16'h8002), "rx status set0 len2");
    rd(R_SET_STATE, v); chk(68'(v), 68'(16'h0015), "sets 0-2 full");

    // Ack Collector slot 2 expects two replies
    wr(R_AC_ARM, 16'h2002);
    rd(R_AC_DONE, v); chk(68'(v[2]), 68'(0), "not done");
    p = new[1]; p[0] = hdr(PT_ACK, 7, 2, 0); send_pkt(p, 1);
    p = new[2]; p[0] = hdr(PT_NACK, 8, 2, 0); p[1] = 68'h0; send_pkt(p, 2);
    rd(R_AC_DONE, v); chk(68'(v[2]), 68'(1), "done");
    rd(R_AC_NACK, v); chk(68'(v[2]), 68'(1), "nack seen");
    chk(68'(n_rx_pkts), 68'(3), "replies not stored");

    // release set 0, send set 1 back out
    outq.delete(); lastq.delete();
    wr(R_RX_RELEASE, 16'h0000);
    rd(R_RX_STATUS, v); chk(68'(v), 68'(16'h8102), "head at set1");
    wr(R_TX_SEND, 16'h0201);
    repeat (5) @(negedge clk);
    chk(68'(outq.size()), 68'(2), "sent two flits");
    if (outq.size() == 2) begin
      chk(outq[0], hdr(PT_COHERENT, 3, 6, 32'h0000_0A00), "sent header");
      chk(outq[1], 68'h1_2222_3333_4444_5555, "sent body");
    end
    rd(R_SET_STATE, v); chk(68'(v), 68'(16'h0010), "only set 2 full");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
