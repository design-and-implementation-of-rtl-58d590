// dds_rom: ROM_SIN or ROM_COS of the quadrature DDS.
//
// A 2^b-word table of m-bit samples of one carrier period, with a
// registered (synchronous) read: q is the word at the address sampled on
// the previous clock edge. Word i holds
//   INT[(2^(m-1)-1) * sin(2*pi*i/2^b)] + 128      (COSINE = 0)
//   INT[(2^(m-1)-1) * cos(2*pi*i/2^b)] + 128      (COSINE = 1)
// so the values lie in 1..255 (offset binary). INT is taken as truncation
// toward zero; this design's choice, as the rounding rule is not stated.
// The table is computed at elaboration from the formula, one constant per
// word, so no data file is needed. Defaults b = 13, m = 8 are the
// published sizes (8192 x 8 bits per table).
module dds_rom #(
  parameter int unsigned AW     = qam64_pkg::ROM_AW,
  parameter int unsigned DW     = qam64_pkg::SAMPLE_W,
  parameter bit          COSINE = 1'b0
) (
  input  logic          clk,
  input  logic [AW-1:0] addr,
  output logic [DW-1:0] q
);

  localparam real TWO_PI = 6.283185307179586;
  localparam real AMP    = real'((2 ** (DW - 1)) - 1);
  localparam int  OFFSET = 2 ** (DW - 1);

  logic [DW-1:0] table_q [2**AW];

  for (genvar i = 0; i < 2**AW; i++) begin : g_word
    localparam real ANG = TWO_PI * real'(i) / real'(2 ** AW);
    localparam real V   = AMP * (COSINE ? $cos(ANG) : $sin(ANG));
    localparam int  T   = (V < 0.0) ? -int'($floor(-V)) : int'($floor(V));
    assign table_q[i] = DW'(T + OFFSET);
  end

  always_ff @(posedge clk) q <= table_q[addr];

endmodule
