// qam64_sum: the summation block (SUMM).
//
// Forms I*cos + Q*sin from the two 16-bit products, then rescales it for
// an 8-bit unipolar DAC: the signed sum is divided by 8 (truncating toward
// zero, as a signed-by-unsigned divider does) and 128 is added. The result
// is kept 16 bits wide; its low byte is the DAC word. Combinational.
//
// Range note: with 127-amplitude carriers, |I*cos + Q*sin| reaches
// 127*sqrt(I^2+Q^2), so for the outer points (amplitude above about 8.05)
// the 16-bit add lies outside 0..255 at the waveform peaks and the low
// byte wraps. The divisor 8 and the offset 128 follow the published
// schematic; add keeps the full value so the wrap can be seen.
module qam64_sum #(
  parameter int unsigned W      = qam64_pkg::PROD_W,
  parameter int unsigned DIV    = qam64_pkg::SUM_DIV,
  parameter int unsigned OFFSET = qam64_pkg::DAC_OFFSET
) (
  input  logic signed [W-1:0] sinsig,   // Q * sin
  input  logic signed [W-1:0] cossig,   // I * cos
  output logic signed [W-1:0] add,      // (sinsig + cossig) / DIV + OFFSET
  output logic        [7:0]   dac       // add[7:0]
);

  logic signed [W-1:0] total, quotient;

  always_comb begin
    total    = sinsig + cossig;
    quotient = total / signed'(W'(DIV));
    add      = quotient + signed'(W'(OFFSET));
    dac      = add[7:0];
  end

endmodule
