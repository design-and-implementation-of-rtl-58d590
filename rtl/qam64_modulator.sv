// qam64_modulator: digital QAM-64 modulator built on a quadrature DDS.
//
// Serial data enter a serial-to-parallel converter that groups them into
// 6-bit symbols. The constant block maps the three MSBs to the in-phase
// level I and the three LSBs to the quadrature level Q (each one of
// +-1, +-3, +-5, +-7). A quadrature DDS produces 8-bit sine and cosine
// carriers at f = CODE_F * 50 MHz / 2^32 (1 MHz by default). Two signed
// multipliers form Q*sin and I*cos, and the summation block adds them,
// divides by 8 and adds 128 to give a word for an 8-bit DAC; an analog
// low-pass filter after the DAC (off chip) smooths it into the QAM-64
// signal. The DDS sine word halved (r) is a second DAC output for a
// carrier reference.
//
// Data flow and the numbers (32-bit accumulator, 13-bit tables, 8-bit
// samples, 16-bit products, /8 and +128, CODE_F = 85899346) follow the
// published block and schematic diagrams; the symbol framing inside the
// serial-to-parallel converter is this design's choice (see qam64_s2p).
//
// Timing: the carrier path has two register stages (accumulator, table
// read); the multipliers and the summation are combinational, so dac is
// valid one clock after the table read. A new symbol takes effect in the
// cycle after sym_valid. rst_n is active low and asynchronous.
module qam64_modulator #(
  parameter logic [qam64_pkg::PHASE_W-1:0] CODE_F      = qam64_pkg::CODE_F_1MHZ,
  parameter int unsigned                  CLK_PER_BIT = qam64_pkg::F_CLK_HZ / qam64_pkg::DATA_HZ
) (
  input  logic                           clk,        // 50 MHz
  input  logic                           rst_n,
  input  logic                           serial_in,  // bit stream data
  output logic                           bit_tick,   // serial_in sampled
  output logic [5:0]                     symbol,     // current 6-bit symbol
  output logic                           sym_valid,  // symbol updated
  output qam64_pkg::level_t              i_level,
  output qam64_pkg::level_t              q_level,
  output qam64_pkg::sample_t             sin_sig,
  output qam64_pkg::sample_t             cos_sig,
  output qam64_pkg::ubyte_t              sin_dac,    // r: sine word / 2
  output qam64_pkg::product_t            qam_add,    // full sum stage value
  output qam64_pkg::ubyte_t              qam_dac,    // 8-bit DAC word
  output logic [qam64_pkg::PHASE_W-1:0]  phase       // carrier phase accumulator
);

  qam64_pkg::product_t sinsig, cossig;

  qam64_s2p #(.CLK_PER_BIT(CLK_PER_BIT)) u_s2p (
    .clk, .rst_n, .serial_in, .bit_tick, .symbol, .sym_valid
  );

  qam64_const u_const (
    .b02(symbol[2:0]), .b35(symbol[5:3]), .q(q_level), .i(i_level)
  );

  qddfs u_qddfs (
    .clk, .rst_n, .code_f(CODE_F),
    .sin_sig, .cos_sig, .r(sin_dac), .phase
  );

  signed_mult u_mult_q (.dataa(sin_sig), .datab(q_level), .result(sinsig));
  signed_mult u_mult_i (.dataa(cos_sig), .datab(i_level), .result(cossig));

  qam64_sum u_sum (.sinsig, .cossig, .add(qam_add), .dac(qam_dac));

endmodule
