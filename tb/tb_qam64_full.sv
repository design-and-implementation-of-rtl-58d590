// tb_qam64_full: the QAM-64 modulator at its default configuration
// (50 MHz clock, 1 MHz carrier code 85899346, 1 kHz bit rate, so 50000
// clocks per bit and 300000 per symbol). Sends each of the 64 symbols once through the
// serial input and checks every output on every clock with
// qam64_tb_monitor, the symbol period, each symbol's amplitude, and the
// carrier frequency (1000 carrier periods per bit period).
module tb_qam64_full;
  localparam int CPB  = 50000;
  localparam int NSYM = 64;

  // symbol n of the sequence: all 64 symbols once, in a scrambled order
  function automatic logic [5:0] sym_at(input int n);
    return 6'((n * 37 + 36) % 64);
  endfunction

  logic clk = 1'b0, rst_n = 1'b0, serial_in = 1'b0;
  logic bit_tick, sym_valid;
  logic [5:0] symbol, exp_sym = '0;
  logic exp_ok = 1'b0;
  logic signed [7:0] i_level, q_level, sin_sig, cos_sig;
  logic [7:0] sin_dac, qam_dac;
  logic signed [15:0] qam_add;
  logic [31:0] phase;
  int carrier_periods = 0;
  logic msb_d = 1'b0;

  qam64_modulator dut (
    .clk, .rst_n, .serial_in, .bit_tick, .symbol, .sym_valid,
    .i_level, .q_level, .sin_sig, .cos_sig, .sin_dac, .qam_add, .qam_dac, .phase
  );

  qam64_tb_monitor #(.CODE_F(32'd85899346), .CPB(CPB)) mon (
    .clk, .rst_n, .expected_symbol(exp_sym), .expected_ok(exp_ok),
    .bit_tick, .symbol, .sym_valid, .i_level, .q_level, .sin_sig, .cos_sig,
    .sin_dac, .qam_add, .qam_dac, .phase
  );

  always #10 clk = ~clk;

  // carrier periods: rising edges of the accumulator MSB
  always @(posedge clk) begin
    if (phase[31] && !msb_d) carrier_periods++;
    msb_d <= phase[31];
  end

  initial begin
    repeat ((NSYM + 2) * 6 * CPB) @(posedge clk);
    mon.failures++;
    $display("TB_RESULT checks=%0d failures=%0d", mon.checks, mon.failures);
    $finish;
  end

  initial begin
    int p0;
    repeat (3) @(posedge clk);
    @(negedge clk) rst_n = 1'b1;
    for (int n = 0; n < NSYM; n++) begin
      for (int b = 5; b >= 0; b--) begin
        serial_in = sym_at(n)[b];
        if (n == 0 && b == 5) p0 = carrier_periods;
        do @(negedge clk); while (!bit_tick);
        if (n == 0 && b == 5) begin
          mon.checks++;
          if (carrier_periods - p0 < 999 || carrier_periods - p0 > 1001) begin
            mon.failures++; $display("FAIL %0d carrier periods in a bit period", carrier_periods - p0);
          end
        end
        if (b == 0) begin exp_sym = sym_at(n); exp_ok = 1'b1; end
        @(posedge clk); #1;
      end
    end
    repeat (6 * CPB - 10) @(posedge clk);
    #3;
    mon.report(NSYM, 1'b1);
    mon.checks++;
    if (mon.distinct() != 64) begin mon.failures++; $display("FAIL %0d distinct symbols", mon.distinct()); end
    $display("TB_RESULT checks=%0d failures=%0d", mon.checks, mon.failures);
    $finish;
  end
endmodule
