// tb_qam64_modulator: end-to-end test of the QAM-64 modulator.
//
// Shifts all 64 symbols (in order, then 16 random ones) into the serial
// input, MSB first, one bit per bit period, with a short bit period
// (CLK_PER_BIT = 20) so a symbol lasts 120 clocks, more than two carrier
// periods at 1 MHz. qam64_tb_monitor checks every output on every clock
// against a reference model, the symbol period, and each symbol's peak
// amplitude. Mechanisms that must occur: every symbol, accumulator wrap,
// and the DAC byte wrap of the outer constellation points.
module tb_qam64_modulator;
  localparam int CPB = 20;
  localparam logic [31:0] CODE = 32'd85899346;

  logic clk = 1'b0, rst_n = 1'b0, serial_in = 1'b0;
  logic bit_tick, sym_valid;
  logic [5:0] symbol, exp_sym = '0;
  logic exp_ok = 1'b0;
  logic signed [7:0] i_level, q_level, sin_sig, cos_sig;
  logic [7:0] sin_dac, qam_dac;
  logic signed [15:0] qam_add;
  logic [31:0] phase;

  qam64_modulator #(.CODE_F(CODE), .CLK_PER_BIT(CPB)) dut (
    .clk, .rst_n, .serial_in, .bit_tick, .symbol, .sym_valid,
    .i_level, .q_level, .sin_sig, .cos_sig, .sin_dac, .qam_add, .qam_dac, .phase
  );

  qam64_tb_monitor #(.CODE_F(CODE), .CPB(CPB)) mon (
    .clk, .rst_n, .expected_symbol(exp_sym), .expected_ok(exp_ok),
    .bit_tick, .symbol, .sym_valid, .i_level, .q_level, .sin_sig, .cos_sig,
    .sin_dac, .qam_add, .qam_dac, .phase
  );

  always #10 clk = ~clk;

  initial begin
    repeat (100 * 6 * CPB) @(posedge clk);
    mon.failures++;
    $display("TB_RESULT checks=%0d failures=%0d", mon.checks, mon.failures);
    $finish;
  end

  initial begin
    repeat (3) @(posedge clk);
    @(negedge clk) rst_n = 1'b1;
    for (int n = 0; n < 80; n++) begin
      logic [5:0] v;
      v = (n < 64) ? 6'(n) : 6'($urandom);
      for (int b = 5; b >= 0; b--) begin
        serial_in = v[b];
        do @(negedge clk); while (!bit_tick);
        if (b == 0) begin exp_sym = v; exp_ok = 1'b1; end
        @(posedge clk); #1;
      end
    end
    // stop before the bits held after the last symbol form another one
    repeat (6 * CPB - 10) @(posedge clk);
    #3;
    mon.report(80, 1'b1);
    mon.checks++;
    if (mon.distinct() != 64) begin mon.failures++; $display("FAIL %0d distinct symbols", mon.distinct()); end
    $display("TB_RESULT checks=%0d failures=%0d", mon.checks, mon.failures);
    $finish;
  end
endmodule
