// lps_table -- 512 x 7 ROM giving the probability of the less probable
// branch of a binary decision.
//
// The index is {4 bits of the normalised total below its leading one,
// 5 bits of the normalised smaller branch count} (see
// ppmh_pkg::lps_address).  Entry i holds round(128 * l / t) for the
// midpoints l and t of the two quantised counts, clamped to 1..63: the
// probability of the smaller branch in 1/128 units (ppmh_pkg::lps_entry).
// The table is computed at elaboration.  The output is registered when en
// is high, one pipeline stage.  The size 512 x 7 follows the source
// design; its contents are this design's own, as the source does not give
// them.
module lps_table (
  input  logic       clk,
  input  logic       en,
  input  logic [8:0] idx,
  output logic [6:0] q
);

  typedef logic [6:0] rom_t [512];

  function automatic rom_t build_rom();
    rom_t r;
    for (int i = 0; i < 512; i++) r[i] = ppmh_pkg::lps_entry(9'(i));
    return r;
  endfunction

  localparam rom_t ROM = build_rom();

  always_ff @(posedge clk) begin
    if (en) q <= ROM[idx];
  end

endmodule
