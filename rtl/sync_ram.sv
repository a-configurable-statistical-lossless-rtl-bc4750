// sync_ram -- synchronous SRAM with one read port and one write port.
//
// Stands for the on-chip SRAM blocks of the core: the context tree memory
// (1312 x 28 bits), the context total memory (1024 x 11) and the
// probability storage (262,144 x 14).  A read returns mem[raddr] on the
// clock edge after re is high and holds it while re is low, so a stalled
// pipeline keeps its data.  A write takes effect at the clock edge; a read
// of the address being written returns the old word.  The contents are not
// reset: every user of this memory keeps its own valid bits.
module sync_ram #(
  parameter int DEPTH = 1024,
  parameter int WIDTH = 8,
  localparam int AW   = $clog2(DEPTH)
) (
  input  logic             clk,
  input  logic             re,
  input  logic [AW-1:0]    raddr,
  output logic [WIDTH-1:0] rdata,
  input  logic             we,
  input  logic [AW-1:0]    waddr,
  input  logic [WIDTH-1:0] wdata
);

  logic [WIDTH-1:0] mem [DEPTH];

  always_ff @(posedge clk) begin
    if (we) mem[waddr] <= wdata;
    if (re) rdata <= mem[raddr];
  end

endmodule
