// signed_mult: signed multiplier of a level by a carrier sample.
//
// result = dataa * datab, both two's complement, full-width product
// (8 x 8 -> 16 bits by default). Used twice: sin * Q and cos * I.
// Combinational, as in the published schematic (no pipeline stage).
module signed_mult #(
  parameter int unsigned AW = qam64_pkg::SAMPLE_W,
  parameter int unsigned BW = qam64_pkg::SAMPLE_W
) (
  input  logic signed [AW-1:0]    dataa,
  input  logic signed [BW-1:0]    datab,
  output logic signed [AW+BW-1:0] result
);

  always_comb result = (AW+BW)'(dataa) * (AW+BW)'(datab);

endmodule
