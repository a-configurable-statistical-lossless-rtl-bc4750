// sync_fifo -- synchronous first-in first-out buffer with valid/ready ports.
//
// Used as the input byte buffer of the core (256 entries of 8 data bits
// plus an end-of-block flag, the 2 Kbit input buffer of the source design).
// A word is written when in_valid and in_ready are both high and read when
// out_valid and out_ready are both high; out_data shows the oldest word
// combinationally.  Both may happen in the same cycle.  Full and empty come
// from read and write pointers one bit wider than the address.
module sync_fifo #(
  parameter int DEPTH = 256,
  parameter int WIDTH = 9,
  localparam int AW   = $clog2(DEPTH)
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             in_valid,
  output logic             in_ready,
  input  logic [WIDTH-1:0] in_data,
  output logic             out_valid,
  input  logic             out_ready,
  output logic [WIDTH-1:0] out_data
);

  logic [WIDTH-1:0] mem [DEPTH];
  logic [AW:0]      wptr, rptr;

  assign in_ready  = (wptr - rptr) != (AW+1)'(DEPTH);
  assign out_valid = wptr != rptr;
  assign out_data  = mem[rptr[AW-1:0]];

  always_ff @(posedge clk) begin
    if (in_valid && in_ready) mem[wptr[AW-1:0]] <= in_data;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      wptr <= '0;
      rptr <= '0;
    end else begin
      if (in_valid && in_ready)   wptr <= wptr + 1'b1;
      if (out_valid && out_ready) rptr <= rptr + 1'b1;
    end
  end

endmodule
