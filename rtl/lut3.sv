// lut3: scheduled 3-input lookup table of the 1-bit control path.
//
// Output = tbl[{in[2], in[1], in[0]}], where the 8-bit truth table tbl is the
// LUT's per-phase configuration word, so the LUT can compute a different
// Boolean function of its three control inputs in every phase. Purely
// combinational. Two such LUTs per cluster follow the architecture; the
// truth-table bit order is this design's choice.
module lut3 (
  input  logic [2:0] in,
  input  logic [7:0] tbl,
  output logic       out
);

  always_comb out = tbl[in];

endmodule
