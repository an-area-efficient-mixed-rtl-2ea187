// operand_buffer: on-chip operand buffer (used as activation buffer and as
// weight buffer).
//
// A simple dual-port memory of DEPTH words of WIDTH bits: one write port,
// used by the host to load a tile, and one read port that feeds the edge of
// the PE array. A word holds one 8-bit operand per array column (activation
// buffer, WIDTH = 64 x 8) or per array row (weight buffer, WIDTH = 48 x 8).
// Timing: a write is performed at the clock edge where we is high; a read
// issued with re high in cycle t presents the word in rdata during cycle t+1
// (registered read); rdata holds its value while re is low. Reading and
// writing the same address in one cycle returns the old word.
// The two buffers and the 512 KB total on-chip capacity come from the design
// description; the port structure, the read latency and the split of the
// capacity between the two buffers are this design's choices.
module operand_buffer #(
  parameter int unsigned WIDTH = 512,
  parameter int unsigned DEPTH = 4096,
  parameter int unsigned AW    = (DEPTH > 1) ? $clog2(DEPTH) : 1
) (
  input  logic             clk,
  input  logic             we,
  input  logic [AW-1:0]    waddr,
  input  logic [WIDTH-1:0] wdata,
  input  logic             re,
  input  logic [AW-1:0]    raddr,
  output logic [WIDTH-1:0] rdata
);

  logic [WIDTH-1:0] mem [DEPTH];

  always_ff @(posedge clk) begin
    if (we) mem[waddr] <= wdata;
  end

  always_ff @(posedge clk) begin
    if (re) rdata <= mem[raddr];
  end

endmodule
