// tb_local_mem: writes random words through the data port, then reads them
// back through both ports and checks the one-cycle read latency and the
// read-before-write behaviour of the data port.
module tb_local_mem;
  logic clk = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic        a_en, b_en, b_we;
  logic [15:0] a_addr, b_addr;
  logic [20:0] a_rdata, b_wdata, b_rdata;
  logic [20:0] model [logic [15:0]];
  logic [15:0] addrs [64];

  local_mem dut (.*);

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(logic [20:0] got, logic [20:0] exp, string what);
    checks++;
    if (got !== exp) begin failures++; $display("FAIL %s got %h exp %h", what, got, exp); end
  endtask

  initial begin
    a_en = 0; b_en = 0; b_we = 0; a_addr = 0; b_addr = 0; b_wdata = 0;
    for (int i = 0; i < 64; i++) begin
      addrs[i] = (i == 0) ? 16'h0000 : (i == 1) ? 16'hFFFF : 16'($urandom);
      @(negedge clk);
      b_en = 1; b_we = 1; b_addr = addrs[i]; b_wdata = 21'($urandom);
      model[addrs[i]] = b_wdata;
    end
    @(negedge clk); b_en = 0; b_we = 0;
    for (int i = 0; i < 64; i++) begin
      @(negedge clk);
      a_en = 1; a_addr = addrs[i];
      b_en = 1; b_we = 0; b_addr = addrs[63 - i];
      @(negedge clk);
      a_en = 0; b_en = 0;
      chk(a_rdata, model[addrs[i]], "fetch port");
      chk(b_rdata, model[addrs[63 - i]], "data port");
    end
    // read-before-write and output hold while disabled
    @(negedge clk);
    b_en = 1; b_we = 1; b_addr = addrs[5]; b_wdata = 21'h15A5A5;
    @(negedge clk);
    b_en = 0; b_we = 0;
    chk(b_rdata, model[addrs[5]], "old data on write");
    @(negedge clk);
    chk(b_rdata, model[addrs[5]], "output held while disabled");
    model[addrs[5]] = 21'h15A5A5;
    a_en = 1; a_addr = addrs[5];
    @(negedge clk);
    chk(a_rdata, 21'h15A5A5, "new data");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
