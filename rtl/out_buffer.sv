// out_buffer -- output byte FIFO that can take back the bytes written since
// the last commit.
//
// Three pointers: write, commit and read.  push writes a byte at the write
// pointer; commit moves the commit pointer to the write pointer (including
// a byte pushed in the same cycle); rollback moves the write pointer back
// to the commit pointer.  Only committed bytes are visible on the read
// side (out_valid/out_ready, out_data shown combinationally).  push_ready
// is low when the FIFO holds DEPTH bytes, committed or not.  This is the
// update/commit counting of the output buffer in the source design; the
// depth of 256 bytes matches its 2 Kbit output buffer.
module out_buffer #(
  parameter int DEPTH = 256,
  localparam int AW   = $clog2(DEPTH)
) (
  input  logic       clk,
  input  logic       rst_n,
  input  logic       push,
  input  logic [7:0] push_data,
  output logic       push_ready,
  input  logic       commit,
  input  logic       rollback,
  output logic       out_valid,
  output logic [7:0] out_data,
  input  logic       out_ready
);

  logic [7:0] mem [DEPTH];
  logic [AW:0] wptr, cptr, rptr;
  logic        do_push;

  assign push_ready = (wptr - rptr) != (AW+1)'(DEPTH);
  assign do_push    = push && push_ready && !rollback;
  assign out_valid  = cptr != rptr;
  assign out_data   = mem[rptr[AW-1:0]];

  always_ff @(posedge clk) begin
    if (do_push) mem[wptr[AW-1:0]] <= push_data;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      wptr <= '0;
      cptr <= '0;
      rptr <= '0;
    end else begin
      if (rollback)     wptr <= cptr;
      else if (do_push) wptr <= wptr + 1'b1;
      if (commit && !rollback) cptr <= wptr + (AW+1)'(do_push);
      if (out_valid && out_ready) rptr <= rptr + 1'b1;
    end
  end

endmodule
