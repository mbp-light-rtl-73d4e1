// tb_ack_generator: fills the Net Cache and Ackmap Cache, presents coherent
// message headers and checks that an ack (line cached) or nack (line not
// cached) packet with the right header and returning-path bitmap comes out,
// that a miss in either cache produces no packet, that lk_ready holds off a
// second header while a reply waits, and the reply's timing.
module tb_ack_generator;
  import mbp_pkg::*;
  logic clk = 0, rst = 1;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic [7:0] my_cluster = 8'd42;
  logic lk_valid, lk_ready, out_valid, out_ready, out_last;
  hdr_t lk_hdr;
  flit_t out_flit;
  logic nc_wr_en, nc_wr_valid, nc_wr_cached, am_wr_en, am_wr_valid;
  logic [31:0] nc_wr_addr;
  logic [7:0]  am_wr_src;
  logic [15:0] am_wr_bitmap;
  logic [7:0]  n_ack, n_nack, n_miss;

  ack_generator dut (.*);

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

  task automatic nc_fill(logic [31:0] a, logic cached);
    @(negedge clk); nc_wr_en = 1; nc_wr_addr = a; nc_wr_valid = 1; nc_wr_cached = cached;
    @(negedge clk); nc_wr_en = 0;
  endtask
  task automatic am_fill(logic [7:0] s, logic [15:0] bm);
    @(negedge clk); am_wr_en = 1; am_wr_src = s; am_wr_valid = 1; am_wr_bitmap = bm;
    @(negedge clk); am_wr_en = 0;
  endtask

  // present one header; expect a reply (kind) or none
  task automatic one(logic [31:0] a, logic [7:0] s, logic [3:0] slot, int expect_kind, logic [15:0] bm,
                     int ready_delay);
    hdr_t h;
    @(negedge clk);
    h = '0; h.ptype = PT_COHERENT; h.src = s; h.dst = my_cluster; h.slot = slot; h.addr = a;
    checks++; if (!lk_ready) begin failures++; $display("FAIL not ready"); end
    lk_valid = 1; lk_hdr = h;
    @(negedge clk);
    lk_valid = 0;
    if (expect_kind < 0) begin
      chk(68'(out_valid), 68'(0), "no reply on miss");
      return;
    end
    chk(68'(out_valid), 68'(1), "reply one cycle after lookup");
    chk(68'(lk_ready), 68'(0), "busy while reply waits");
    repeat (ready_delay) begin
      @(negedge clk);
      chk(68'(out_valid), 68'(1), "reply held");
    end
    begin
      hdr_t r;
      r = '0; r.ptype = pkt_type_e'(expect_kind); r.src = my_cluster; r.dst = s; r.slot = slot; r.addr = a;
      chk(out_flit, {4'b0, r}, "reply header");
      chk(68'(out_last), 68'(0), "header not last");
      out_ready = 1;
      @(negedge clk);
      chk(out_flit, {52'b0, bm}, "bitmap flit");
      chk(68'(out_last), 68'(1), "bitmap last");
      @(negedge clk);
      out_ready = 0;
      chk(68'(out_valid), 68'(0), "reply gone");
    end
  endtask

  logic [31:0] addrs [16];
  logic        cach  [16];
  logic [15:0] bms   [256];
  int na, nn, nm;
  initial begin
    lk_valid = 0; lk_hdr = '0; out_ready = 0;
    nc_wr_en = 0; nc_wr_addr = 0; nc_wr_valid = 0; nc_wr_cached = 0;
    am_wr_en = 0; am_wr_src = 0; am_wr_valid = 0; am_wr_bitmap = 0;
    na = 0; nn = 0; nm = 0;
    repeat (2) @(posedge clk);
    rst <= 0;
    for (int i = 0; i < 16; i++) begin
      addrs[i] = {$urandom} & 32'hFFFF_FFF0 | 32'(i);
      cach[i] = 1'(i % 2);
      nc_fill(addrs[i], cach[i]);
    end
    for (int s = 0; s < 32; s++) begin bms[s] = 16'($urandom); am_fill(8'(s), bms[s]); end
    for (int n = 0; n < 100; n++) begin
      int i, s;
      logic nc_miss;
      logic [31:0] a;
      i = $urandom % 16;
      s = $urandom % 40;                        // 32..39 miss in the Ackmap Cache
      nc_miss = ($urandom % 5) == 0;            // tag mismatch in the Net Cache
      a = nc_miss ? addrs[i] ^ 32'h8000_0000 : addrs[i];
      if (nc_miss || s >= 32) begin one(a, 8'(s), 4'(n), -1, 0, 0); nm++; end
      else begin
        one(a, 8'(s), 4'(n), cach[i] ? int'(PT_ACK) : int'(PT_NACK), bms[s], $urandom % 3);
        if (cach[i]) na++; else nn++;
      end
    end
    chk(68'(n_ack), 68'(na), "ack count");
    chk(68'(n_nack), 68'(nn), "nack count");
    chk(68'(n_miss), 68'(nm), "miss count");
    checks++; if (na == 0 || nn == 0 || nm == 0) begin failures++; $display("FAIL not every case ran"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
