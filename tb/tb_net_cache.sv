// tb_net_cache: fills Net Cache entries, then checks hits, misses on a tag
// mismatch, the cached bit, invalidation and replacement in a direct-mapped
// set against a reference model, and that reset clears every entry.
module tb_net_cache;
  logic clk = 0, rst = 1;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic [31:0] lk_addr, wr_addr;
  logic lk_hit, lk_cached, wr_en, wr_valid, wr_cached;

  net_cache dut (.*);

  // reference: one entry per index
  logic        m_valid [512];
  logic [31:0] m_addr  [512];
  logic        m_cached[512];

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(logic got, logic exp, string what);
    checks++;
    if (got !== exp) begin failures++; $display("FAIL %s addr %h got %b exp %b", what, lk_addr, got, exp); end
  endtask

  task automatic lookup(logic [31:0] a);
    logic [8:0] i = a[8:0];
    lk_addr = a; #1;
    chk(lk_hit, m_valid[i] && m_addr[i] == a, "hit");
    if (m_valid[i] && m_addr[i] == a) chk(lk_cached, m_cached[i], "cached");
  endtask

  logic [31:0] used [256];
  initial begin
    wr_en = 0; wr_addr = 0; wr_valid = 0; wr_cached = 0; lk_addr = 0;
    for (int i = 0; i < 512; i++) begin m_valid[i] = 0; m_addr[i] = 0; m_cached[i] = 0; end
    repeat (2) @(posedge clk);
    rst <= 0;
    @(negedge clk);
    for (int n = 0; n < 64; n++) lookup(32'($urandom));
    for (int n = 0; n < 256; n++) begin
      @(negedge clk);
      wr_en = 1; wr_addr = 32'($urandom); wr_valid = ($urandom % 8) != 0; wr_cached = 1'($urandom);
      if (n < 8) wr_addr[8:0] = 9'h1F;   // several writes to one set: replacement
      used[n] = wr_addr;
      @(posedge clk);
      m_valid[wr_addr[8:0]] = wr_valid; m_addr[wr_addr[8:0]] = wr_addr; m_cached[wr_addr[8:0]] = wr_cached;
    end
    @(negedge clk); wr_en = 0;
    for (int n = 0; n < 256; n++) begin
      lookup(used[n]);
      lookup(used[n] ^ 32'h0001_0000);   // same index, other tag
      lookup(used[n] ^ (32'h1 << (9 + n % 23)));   // each tag bit in turn
    end
    rst = 1; @(posedge clk); @(negedge clk); rst = 0;
    for (int i = 0; i < 512; i++) m_valid[i] = 0;
    for (int n = 0; n < 32; n++) lookup(used[n]);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
