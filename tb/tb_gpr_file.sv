// tb_gpr_file: random writes and three-port reads of the GPR file, checked
// against a reference array; also checks reset to zero.
module tb_gpr_file;
  logic clk = 0, rst = 1;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic [3:0]  ra, rb, rc, wa;
  logic [15:0] da, db, dc, wd;
  logic        we;
  logic [15:0] model [16];

  gpr_file dut (.clk, .rst, .ra_addr(ra), .ra_data(da), .rb_addr(rb), .rb_data(db),
                .rc_addr(rc), .rc_data(dc), .we, .w_addr(wa), .w_data(wd));

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(logic [15:0] got, logic [15:0] exp, string what);
    checks++;
    if (got !== exp) begin failures++; $display("FAIL %s got %h exp %h", what, got, exp); end
  endtask

  initial begin
    we = 0; wa = 0; wd = 0; ra = 0; rb = 0; rc = 0;
    repeat (2) @(posedge clk);
    rst <= 0;
    for (int i = 0; i < 16; i++) model[i] = 0;
    @(posedge clk);
    for (int i = 0; i < 16; i++) begin ra = 4'(i); #1 chk(da, 16'h0, "reset"); end
    for (int n = 0; n < 400; n++) begin
      @(negedge clk);
      we = ($urandom % 2) == 1; wa = 4'($urandom); wd = 16'($urandom);
      ra = 4'($urandom); rb = 4'($urandom); rc = 4'($urandom);
      #1;
      chk(da, model[ra], "port a");
      chk(db, model[rb], "port b");
      chk(dc, model[rc], "port c");
      @(posedge clk);
      if (we) model[wa] = wd;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
