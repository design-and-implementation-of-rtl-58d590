// phase_accumulator: the PA of the quadrature DDS.
//
// An n-bit register that adds the frequency code L to itself on every
// clock, so its value is the carrier phase as a fraction of a full turn.
// The output frequency is f = L * F_CLK / 2^n; with n = 32 and a 50 MHz
// clock the step is 0.0116 Hz, and L = 85899346 gives 1 MHz. The sum
// wraps modulo 2^n. Following the published schematic the register is
// cleared asynchronously by the inverted reset input, so rst_n is active
// low here. The register value is the output: phase(k+1) = phase(k) + L.
module phase_accumulator #(
  parameter int unsigned PHASE_W = qam64_pkg::PHASE_W
) (
  input  logic               clk,
  input  logic               rst_n,
  input  logic [PHASE_W-1:0] code_f,   // frequency code L
  output logic [PHASE_W-1:0] phase     // accumulated phase
);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) phase <= '0;
    else        phase <= phase + code_f;
  end

endmodule
