// area_free_map -- busy/free bit for every context tree node, with a
// single-cycle reset of the whole map.
//
// The map is an SRAM of LINES words of 32 bits (41 x 32 = 1312 bits, one
// per tree node) plus a LINES-bit "line free" valid register.  A node is
// busy only when its line's valid bit is set and its own bit in the SRAM
// word is set, so clearing the valid register (clear) frees every node at
// once, like the valid bits of a direct-mapped cache.  Reads are
// synchronous: busy is valid the cycle after re.  mark sets a node's bit
// with a read-modify-write of its word; the old word comes from the read
// the caller made of the same node the cycle before (the search always
// reads a node before it claims it).  When the line was invalid the other
// 31 bits are written as free.  The organisation follows the source
// design; the read-modify-write sequencing is this design's own.
module area_free_map #(
  parameter int LINES  = 41,
  localparam int NODES = LINES * 32,
  localparam int IW    = $clog2(NODES)
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          clear,     // free every node (new block)
  input  logic          re,
  input  logic [IW-1:0] raddr,
  output logic          busy,      // state of the node read last
  input  logic          mark,      // claim the node read last
  input  logic [IW-1:0] maddr
);

  localparam int LW = $clog2(LINES);

  logic [31:0]    word_q;
  logic [LINES-1:0] line_valid;
  logic [4:0]     bit_q;
  logic [LW-1:0]  line_q;
  logic [31:0]    old_word, new_word;
  logic [LW-1:0]  mline;

  assign mline = LW'(maddr >> 5);

  sync_ram #(.DEPTH(LINES), .WIDTH(32)) u_ram (
    .clk   (clk),
    .re    (re),
    .raddr (LW'(raddr >> 5)),
    .rdata (word_q),
    .we    (mark),
    .waddr (mline),
    .wdata (new_word)
  );

  always_ff @(posedge clk) begin
    if (re) begin
      bit_q  <= raddr[4:0];
      line_q <= LW'(raddr >> 5);
    end
  end

  assign busy     = line_valid[line_q] && word_q[bit_q];
  assign old_word = line_valid[mline] ? word_q : '0;
  assign new_word = old_word | (32'd1 << maddr[4:0]);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)       line_valid <= '0;
    else if (clear)   line_valid <= '0;
    else if (mark)    line_valid[mline] <= 1'b1;
  end

endmodule
