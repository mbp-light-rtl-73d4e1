// pbr_file: the 112 packet buffer registers (PBRs) of 68 bits.
//
// The PBRs are read and written by three agents at once: the MBP Core
// (one read port, one write port with a per-field write mask so that a single
// 16-bit field of a flit can be replaced), the RDT Interface (one read port
// for sending, one write port for receiving) and the MMC (one read and one
// write port for block transfers). Reads are combinational; writes take
// effect at the clock edge. The agents work on disjoint PBRs by protocol
// (set ownership and the core's scoreboard); if two write ports ever hit the
// same PBR in one cycle the MMC wins over the RDT Interface, which wins over
// the core. Field mask bits 0..3 select data bits [16f+15:16f], bit 4 the
// tag bits [67:64]. The count and width follow the design description; the
// port structure is this implementation's choice. Contents are cleared at
// reset.
module pbr_file
  import mbp_pkg::*;
#(
  parameter int NUM = NUM_PBR
) (
  input  logic        clk,
  input  logic        rst,
  // core
  input  pbr_idx_t    c_raddr,
  output flit_t       c_rdata,
  input  logic        c_we,
  input  pbr_idx_t    c_waddr,
  input  logic [4:0]  c_wmask,
  input  flit_t       c_wdata,
  // RDT Interface
  input  pbr_idx_t    r_raddr,
  output flit_t       r_rdata,
  input  logic        r_we,
  input  pbr_idx_t    r_waddr,
  input  flit_t       r_wdata,
  // MMC
  input  pbr_idx_t    m_raddr,
  output flit_t       m_rdata,
  input  logic        m_we,
  input  pbr_idx_t    m_waddr,
  input  flit_t       m_wdata
);
  flit_t mem [NUM];

  function automatic flit_t merge(flit_t old, flit_t nw, logic [4:0] mask);
    flit_t r = old;
    for (int f = 0; f < 4; f++)
      if (mask[f]) r[16*f +: 16] = nw[16*f +: 16];
    if (mask[4]) r[67:64] = nw[67:64];
    return r;
  endfunction

  always_ff @(posedge clk) begin
    if (rst) begin
      for (int i = 0; i < NUM; i++) mem[i] <= '0;
    end else begin
      if (c_we && 32'(c_waddr) < NUM) mem[c_waddr] <= merge(mem[c_waddr], c_wdata, c_wmask);
      if (r_we && 32'(r_waddr) < NUM) mem[r_waddr] <= r_wdata;
      if (m_we && 32'(m_waddr) < NUM) mem[m_waddr] <= m_wdata;
    end
  end

  assign c_rdata = (32'(c_raddr) < NUM) ? mem[c_raddr] : '0;
  assign r_rdata = (32'(r_raddr) < NUM) ? mem[r_raddr] : '0;
  assign m_rdata = (32'(m_raddr) < NUM) ? mem[m_raddr] : '0;
endmodule
