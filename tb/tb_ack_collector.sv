// tb_ack_collector: arms slots with expected reply counts, delivers acks
// and nacks in random order and checks the done and nack-seen bits after
// every reply against a reference model.
module tb_ack_collector;
  logic clk = 0, rst = 1;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic arm_en, in_valid, in_nack;
  logic [3:0] arm_slot, in_slot;
  logic [7:0] arm_expected;
  logic [15:0] done, nack_seen;

  ack_collector dut (.*);

  int   m_cnt [16], m_exp [16];
  logic m_armed [16], m_nack [16];

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check_all();
    for (int s = 0; s < 16; s++) begin
      checks += 2;
      if (done[s] !== (m_armed[s] && m_cnt[s] == m_exp[s])) begin
        failures++; $display("FAIL done[%0d]=%b cnt %0d exp %0d", s, done[s], m_cnt[s], m_exp[s]);
      end
      if (nack_seen[s] !== m_nack[s]) begin failures++; $display("FAIL nack[%0d]", s); end
    end
  endtask

  initial begin
    arm_en = 0; in_valid = 0; in_nack = 0; arm_slot = 0; in_slot = 0; arm_expected = 0;
    for (int s = 0; s < 16; s++) begin m_cnt[s] = 0; m_exp[s] = 0; m_armed[s] = 0; m_nack[s] = 0; end
    repeat (2) @(posedge clk);
    rst <= 0;
    @(negedge clk); check_all();
    for (int round = 0; round < 20; round++) begin
      for (int s = 0; s < 16; s++) begin
        @(negedge clk);
        arm_en = 1; arm_slot = 4'(s); arm_expected = 8'(1 + $urandom % 6);
        @(posedge clk);
        m_armed[s] = 1; m_exp[s] = arm_expected; m_cnt[s] = 0; m_nack[s] = 0;
        @(negedge clk); arm_en = 0;
      end
      for (int n = 0; n < 60; n++) begin
        @(negedge clk);
        in_valid = 1; in_slot = 4'($urandom); in_nack = ($urandom % 5) == 0;
        @(posedge clk);
        m_cnt[in_slot]++; if (in_nack) m_nack[in_slot] = 1;
        @(negedge clk); in_valid = 0;
        check_all();
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
