// bus_arbiter: cluster bus arbitration among the L2 caches of a cluster.
//
// A cluster bus joins the L2 caches of several processors (four by default)
// to the Main Memory Controller, which is the only slave. Each master
// raises m_req with its command (m_we, m_addr, and m_wdata for the beat that
// the bus asks for). The arbiter grants the bus to one master at a time,
// round robin starting after the last owner, and forwards that master's
// command to the MMC. The owner keeps the bus for its whole transaction,
// including the time a request is held for the MBP Core's software, and
// releases it in the cycle the MMC signals s_done. Response lines from the
// MMC (beat number, read data, done, held) are shared by all masters; a
// master takes them as its own while its bit of gnt is set.
//
// Timing: a grant is registered, so a request reaches the MMC one cycle
// after it is raised on an idle bus; the next grant can be made in the
// cycle after s_done. n_conflicts counts grants made while another master
// was also requesting.
//
// That the MMC controls a bus with four processors follows the design
// description; the round-robin policy, the registered grant and holding the
// bus through a held request are this design's own choices.
module bus_arbiter
  import mbp_pkg::*;
#(
  parameter int N  = 4,
  parameter int AW = LINE_AW
)(
  input  logic              clk,
  input  logic              rst,
  // masters
  input  logic [N-1:0]      m_req,
  input  logic [N-1:0]      m_we,
  input  logic [AW-1:0]     m_addr  [N],
  input  logic [63:0]       m_wdata [N],
  output logic [N-1:0]      gnt,
  // slave (MMC)
  output logic              s_req,
  output logic              s_we,
  output logic [AW-1:0]     s_addr,
  output logic [63:0]       s_wdata,
  input  logic              s_done,
  output logic [15:0]       n_conflicts
);
  localparam int IW = (N > 1) ? $clog2(N) : 1;

  logic          own_valid;
  logic [IW-1:0] owner, last;

  // next requester after the last owner, in circular order
  logic          pick_valid;
  logic [IW-1:0] pick;
  always_comb begin
    pick_valid = 1'b0;
    pick       = '0;
    for (int k = 1; k <= N; k++) begin
      if (!pick_valid && m_req[(int'(last) + k) % N]) begin
        pick_valid = 1'b1;
        pick       = IW'((int'(last) + k) % N);
      end
    end
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      own_valid   <= 1'b0;
      owner       <= '0;
      last        <= IW'(N - 1);
      n_conflicts <= '0;
    end else if (own_valid) begin
      if (s_done) begin
        own_valid <= 1'b0;
        last      <= owner;
      end
    end else if (pick_valid) begin
      own_valid <= 1'b1;
      owner     <= pick;
      if ($countones(m_req) > 1) n_conflicts <= n_conflicts + 1'b1;
    end
  end

  always_comb begin
    gnt = '0;
    if (own_valid) gnt[owner] = 1'b1;
  end
  assign s_req   = own_valid && m_req[owner];
  assign s_we    = m_we[owner];
  assign s_addr  = m_addr[owner];
  assign s_wdata = m_wdata[owner];

  // the slave only finishes a transaction that has an owner
  property p_done_owned;
    @(posedge clk) disable iff (rst) s_done |-> own_valid;
  endproperty
  assert property (p_done_owned);
endmodule
