// qddfs: quadrature direct digital frequency synthesiser.
//
// A 32-bit phase accumulator steps by the frequency code every clock; its
// top 13 bits (phase[31:19]) address a sine table and a cosine table, so
// the two outputs are 90 degrees apart at f = L * F_CLK / 2^32. The tables
// hold offset-binary words (value + 128); subtracting 128 gives the signed
// carrier samples sin_sig and cos_sig used by the multipliers. A third
// output r is the unsigned sine word divided by 2, an 8-bit word for an
// external DAC. This structure follows the published QDDFS schematic;
// the divisor 2 is read from that schematic's constant. Since the sine
// word is at most 255, r never exceeds 127 and r[7] is always 0.
//
// Timing: the accumulator and the table reads are registered, so a sample
// reflects the phase two edges earlier. rst_n (active low) clears the
// accumulator asynchronously; the table outputs have no reset.
module qddfs #(
  parameter int unsigned PHASE_W = qam64_pkg::PHASE_W,
  parameter int unsigned AW      = qam64_pkg::ROM_AW,
  parameter int unsigned DW      = qam64_pkg::SAMPLE_W
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic [PHASE_W-1:0]   code_f,
  output logic signed [DW-1:0] sin_sig,
  output logic signed [DW-1:0] cos_sig,
  output logic [DW-1:0]        r,
  output logic [PHASE_W-1:0]   phase
);

  localparam int unsigned OFFSET = 2 ** (DW - 1);

  logic [DW-1:0] sin_u, cos_u;

  phase_accumulator #(.PHASE_W(PHASE_W)) u_pa (
    .clk, .rst_n, .code_f, .phase
  );

  dds_rom #(.AW(AW), .DW(DW), .COSINE(1'b0)) u_rom_sin (
    .clk, .addr(phase[PHASE_W-1 -: AW]), .q(sin_u)
  );

  dds_rom #(.AW(AW), .DW(DW), .COSINE(1'b1)) u_rom_cos (
    .clk, .addr(phase[PHASE_W-1 -: AW]), .q(cos_u)
  );

  always_comb begin
    sin_sig = signed'(sin_u - DW'(OFFSET));
    cos_sig = signed'(cos_u - DW'(OFFSET));
    r       = sin_u / DW'(qam64_pkg::R_DIV);
  end

endmodule
