// gpr_file: the MBP Core's 16 general purpose registers of 16 bits.
//
// Three combinational read ports (the two sources and the rd field, which
// stores, PBR stores and block transfers read as a source) and one write port
// written at the clock edge by the write-back stage. The register count and
// width follow the design description; the port count is this
// implementation's choice. All registers reset to zero.
module gpr_file #(
  parameter int NUM_GPR = 16,
  parameter int GPR_W   = 16,
  localparam int AW     = $clog2(NUM_GPR)
) (
  input  logic             clk,
  input  logic             rst,
  input  logic [AW-1:0]    ra_addr,
  output logic [GPR_W-1:0] ra_data,
  input  logic [AW-1:0]    rb_addr,
  output logic [GPR_W-1:0] rb_data,
  input  logic [AW-1:0]    rc_addr,
  output logic [GPR_W-1:0] rc_data,
  input  logic             we,
  input  logic [AW-1:0]    w_addr,
  input  logic [GPR_W-1:0] w_data
);
  logic [GPR_W-1:0] regs [NUM_GPR];

  always_ff @(posedge clk) begin
    if (rst) begin
      for (int i = 0; i < NUM_GPR; i++) regs[i] <= '0;
    end else if (we) begin
      regs[w_addr] <= w_data;
    end
  end

  assign ra_data = regs[ra_addr];
  assign rb_data = regs[rb_addr];
  assign rc_data = regs[rc_addr];
endmodule
