// tb_ackmap_cache: fills Ackmap Cache entries for source clusters and checks
// hit, miss on a different cluster mapping to the same entry, the returned
// bitmap and invalidation against a reference model.
module tb_ackmap_cache;
  logic clk = 0, rst = 1;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic [7:0]  lk_src, wr_src;
  logic        lk_hit, wr_en, wr_valid;
  logic [15:0] lk_bitmap, wr_bitmap;

  ackmap_cache dut (.*);

  logic        m_valid [64];
  logic [7:0]  m_src   [64];
  logic [15:0] m_bm    [64];

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(logic [15:0] got, logic [15:0] exp, string what);
    checks++;
    if (got !== exp) begin failures++; $display("FAIL %s src %0d got %h exp %h", what, lk_src, got, exp); end
  endtask

  task automatic lookup(logic [7:0] s);
    logic [5:0] i = s[5:0];
    lk_src = s; #1;
    chk(16'(lk_hit), 16'(m_valid[i] && m_src[i] == s), "hit");
    if (m_valid[i] && m_src[i] == s) chk(lk_bitmap, m_bm[i], "bitmap");
  endtask

  initial begin
    wr_en = 0; wr_src = 0; wr_valid = 0; wr_bitmap = 0; lk_src = 0;
    for (int i = 0; i < 64; i++) begin m_valid[i] = 0; m_src[i] = 0; m_bm[i] = 0; end
    repeat (2) @(posedge clk);
    rst <= 0;
    @(negedge clk);
    for (int s = 0; s < 256; s++) lookup(8'(s));
    for (int n = 0; n < 300; n++) begin
      @(negedge clk);
      wr_en = 1; wr_src = 8'($urandom); wr_valid = ($urandom % 6) != 0; wr_bitmap = 16'($urandom);
      @(posedge clk);
      m_valid[wr_src[5:0]] = wr_valid; m_src[wr_src[5:0]] = wr_src; m_bm[wr_src[5:0]] = wr_bitmap;
      @(negedge clk); wr_en = 0;
      if (n % 10 == 0) for (int s = 0; s < 256; s++) lookup(8'(s));
    end
    for (int s = 0; s < 256; s++) lookup(8'(s));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
