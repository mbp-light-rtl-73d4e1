// tb_bus_arbiter: four masters request the cluster bus at random; a slave
// model finishes each transaction (s_done) one to five cycles after it sees
// the request. Checked every cycle: at most one grant; the slave sees the
// owner's command; each grant goes to the master a round-robin reference
// model picks from the requests of the cycle before; no master waits for
// more than three other grants; the bus is released the cycle after
// s_done; the conflict counter matches the model.
module tb_bus_arbiter;
  import mbp_pkg::*;
  localparam int N = 4;
  logic clk = 0, rst = 1;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic [N-1:0] m_req, m_we, gnt;
  logic [LINE_AW-1:0] m_addr [N];
  logic [63:0] m_wdata [N];
  logic s_req, s_we, s_done;
  logic [LINE_AW-1:0] s_addr;
  logic [63:0] s_wdata;
  logic [15:0] n_conflicts;

  bus_arbiter dut (.*);

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(logic [63:0] got, logic [63:0] exp, string what);
    checks++;
    if (got !== exp) begin failures++; $display("FAIL %s got %h exp %h at %0t", what, got, exp, $time); end
  endtask

  // slave model
  int s_wait;
  always_ff @(posedge clk) begin
    if (rst) begin s_done <= 0; s_wait <= 0; end
    else begin
      s_done <= 0;
      if (s_req && !s_done) begin
        if (s_wait == 0) s_wait <= 1 + $urandom % 5;
        else if (s_wait == 1) begin s_done <= 1; s_wait <= 0; end
        else s_wait <= s_wait - 1;
      end
    end
  end

  // masters: hold a request until their own transaction is done
  int served [N];
  always_ff @(posedge clk) begin
    if (rst) begin
      m_req <= '0; m_we <= '0;
      for (int i = 0; i < N; i++) begin m_addr[i] <= '0; m_wdata[i] <= '0; served[i] <= 0; end
    end else begin
      for (int i = 0; i < N; i++) begin
        if (m_req[i] && gnt[i] && s_done) begin
          m_req[i] <= 0;
          served[i] <= served[i] + 1;
        end else if (!m_req[i] && ($urandom % 4) == 0) begin
          m_req[i] <= 1; m_we[i] <= 1'($urandom);
          m_addr[i] <= LINE_AW'($urandom); m_wdata[i] <= {$urandom, $urandom};
        end
      end
    end
  end

  // reference model
  int last_m, waits [N], conflicts, grants;
  logic [N-1:0] prev_req, prev_gnt;
  logic prev_done;
  always @(negedge clk) if (!rst) begin
    int ones;
    ones = $countones(gnt);
    chk(64'(ones <= 1), 1, "one grant at most");
    if (ones == 1) begin
      int o;
      o = 0;
      for (int i = 0; i < N; i++) if (gnt[i]) o = i;
      chk(64'(s_req), 64'(m_req[o]), "request forwarded");
      chk(64'(s_addr), 64'(m_addr[o]), "address of owner");
      chk(64'(s_we), 64'(m_we[o]), "direction of owner");
      chk(s_wdata, m_wdata[o], "write data of owner");
      if (prev_gnt == 0) begin
        int e;
        e = -1;
        for (int k = 1; k <= N; k++) if (e < 0 && prev_req[(last_m + k) % N]) e = (last_m + k) % N;
        chk(64'(o), 64'(e), "round-robin choice");
        if ($countones(prev_req) > 1) conflicts++;
        grants++;
        for (int i = 0; i < N; i++) if (i != o && prev_req[i]) begin
          waits[i]++;
          chk(64'(waits[i] <= N - 1), 1, "bounded wait");
        end
        waits[o] = 0;
        last_m = o;
      end
    end
    if (prev_done) chk(64'(gnt), 0, "bus released after done");
    chk(64'(n_conflicts), 64'(conflicts), "conflict count");
    prev_req = m_req; prev_gnt = gnt; prev_done = s_done;
  end

  initial begin
    last_m = N - 1; conflicts = 0; grants = 0;
    prev_req = 0; prev_gnt = 0; prev_done = 0;
    for (int i = 0; i < N; i++) waits[i] = 0;
    repeat (3) @(posedge clk);
    rst <= 0;
    repeat (4000) @(posedge clk);
    @(negedge clk);
    for (int i = 0; i < N; i++) chk(64'(served[i] > 50), 1, "every master served");
    chk(64'(conflicts > 50), 1, "contention happened");
    $display("grants %0d conflicts %0d", grants, conflicts);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
