// local_mem: the MBP Core's 21-bit x 64K local memory, holding both the
// program and local data.
//
// Port A is the instruction fetch port (read only), port B the data port of
// the core's LM stage (read/write). Both are synchronous: the word addressed
// in one cycle appears on the read data output in the next. A write on port
// B shows the old word on b_rdata (read-before-write). Size and width follow
// the design description; making the memory dual-ported, so that fetch and
// data accesses never collide, is this implementation's choice. The memory is
// not reset; it is loaded through port B before the core runs.
module local_mem #(
  parameter int DEPTH = 65536,
  parameter int WIDTH = 21,
  localparam int AW   = $clog2(DEPTH)
) (
  input  logic             clk,
  input  logic             a_en,
  input  logic [AW-1:0]    a_addr,
  output logic [WIDTH-1:0] a_rdata,
  input  logic             b_en,
  input  logic             b_we,
  input  logic [AW-1:0]    b_addr,
  input  logic [WIDTH-1:0] b_wdata,
  output logic [WIDTH-1:0] b_rdata
);
  logic [WIDTH-1:0] mem [DEPTH];

  always_ff @(posedge clk) begin
    if (a_en) a_rdata <= mem[a_addr];
  end

  always_ff @(posedge clk) begin
    if (b_en) begin
      b_rdata <= mem[b_addr];
      if (b_we) mem[b_addr] <= b_wdata;
    end
  end
endmodule
