// tb_pbr_file: drives the core, RDT and MMC ports of the PBR file with
// random writes (including masked field writes from the core) and random
// reads, and checks every read against a reference model.
module tb_pbr_file;
  import mbp_pkg::*;
  logic clk = 0, rst = 1;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  pbr_idx_t c_raddr, c_waddr, r_raddr, r_waddr, m_raddr, m_waddr;
  flit_t    c_rdata, c_wdata, r_rdata, r_wdata, m_rdata, m_wdata;
  logic     c_we, r_we, m_we;
  logic [4:0] c_wmask;
  flit_t model [NUM_PBR];

  pbr_file dut (.*);

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(flit_t got, flit_t exp, string what);
    checks++;
    if (got !== exp) begin failures++; $display("FAIL %s got %h exp %h", what, got, exp); end
  endtask

  function automatic flit_t rflit();
    return {4'($urandom), 32'($urandom), 32'($urandom)};
  endfunction
  function automatic pbr_idx_t ridx();
    return pbr_idx_t'($urandom % NUM_PBR);
  endfunction

  initial begin
    c_we = 0; r_we = 0; m_we = 0; c_wmask = 0;
    c_raddr = 0; c_waddr = 0; r_raddr = 0; r_waddr = 0; m_raddr = 0; m_waddr = 0;
    c_wdata = 0; r_wdata = 0; m_wdata = 0;
    repeat (2) @(posedge clk);
    rst <= 0;
    for (int i = 0; i < NUM_PBR; i++) model[i] = '0;
    for (int n = 0; n < 2000; n++) begin
      @(negedge clk);
      c_raddr = ridx(); r_raddr = ridx(); m_raddr = ridx();
      #1;
      chk(c_rdata, model[c_raddr], "core read");
      chk(r_rdata, model[r_raddr], "rdt read");
      chk(m_rdata, model[m_raddr], "mmc read");
      // three writes to three different PBRs
      c_waddr = ridx();
      do r_waddr = ridx(); while (r_waddr == c_waddr);
      do m_waddr = ridx(); while (m_waddr == c_waddr || m_waddr == r_waddr);
      c_we = ($urandom % 2) == 1; r_we = ($urandom % 2) == 1; m_we = ($urandom % 2) == 1;
      c_wmask = 5'($urandom); c_wdata = rflit(); r_wdata = rflit(); m_wdata = rflit();
      @(posedge clk);
      if (c_we) begin
        for (int f = 0; f < 4; f++) if (c_wmask[f]) model[c_waddr][16*f +: 16] = c_wdata[16*f +: 16];
        if (c_wmask[4]) model[c_waddr][67:64] = c_wdata[67:64];
      end
      if (r_we) model[r_waddr] = r_wdata;
      if (m_we) model[m_waddr] = m_wdata;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
