// tb_qam64_constellation: measures amplitude and phase of the modulated
// 1 MHz carrier for every symbol. First the 16 diagonal points
// (I = +-Q, |I| = 1, 3, 5, 7) are compared with their published values:
// amplitude 1.41, 4.2, 7.1, 9.9 and phase 45, 135, 225, 315 degrees. Then
// all 64 symbols are compared with A = sqrt(I^2 + Q^2) and
// phase = atan2(Q, I), I and Q taken from the Gray-code rank formula.
//
// Method: after each new symbol, the full sum-stage output qam_add over one
// carrier period (50 clocks) is rescaled by 8/127 and correlated with the
// cosine and sine of the carrier phase that produced each sample (the table
// address one clock before the accumulator value seen on the port). This
// recovers I and Q; amplitude = |(I, Q)|, phase = atan2(Q, I). The symbol
// codes come from the Gray-coded constellation labels. The bit period is
// shortened to 20 clocks so that a symbol lasts 120 clocks.
module tb_qam64_constellation;
  import qam64_ref_pkg::*;
  localparam int CPB = 20;
  localparam logic [31:0] CODE = 32'd85899346;
  localparam real PI = 3.141592653589793;

  // I/Q codes: -7:000 -5:001 -3:011 -1:010 +1:110 +3:111 +5:101 +7:100
  localparam logic [5:0] SYM [16] = '{
    6'b100_100, 6'b000_100, 6'b000_000, 6'b100_000,
    6'b101_101, 6'b001_101, 6'b001_001, 6'b101_001,
    6'b111_111, 6'b011_111, 6'b011_011, 6'b111_011,
    6'b110_110, 6'b010_110, 6'b010_010, 6'b110_010};
  localparam real AMP [4] = '{9.9, 7.1, 4.2, 1.41};     // per row of four
  localparam real PH  [4] = '{45.0, 135.0, 225.0, 315.0}; // per column

  logic clk = 1'b0, rst_n = 1'b0, serial_in = 1'b0;
  logic bit_tick, sym_valid;
  logic [5:0] symbol;
  logic signed [7:0] i_level, q_level, sin_sig, cos_sig;
  logic [7:0] sin_dac, qam_dac;
  logic signed [15:0] qam_add;
  logic [31:0] phase;
  int checks = 0, failures = 0, measured = 0;

  qam64_modulator #(.CODE_F(CODE), .CLK_PER_BIT(CPB)) dut (
    .clk, .rst_n, .serial_in, .bit_tick, .symbol, .sym_valid,
    .i_level, .q_level, .sin_sig, .cos_sig, .sin_dac, .qam_add, .qam_dac, .phase
  );

  always #10 clk = ~clk;

  initial begin
    repeat (90 * 6 * CPB) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // measurement of one symbol, started by sym_valid
  always @(posedge clk) begin
    #1;
    if (rst_n && sym_valid) measure(symbol);
  end

  task automatic measure(input logic [5:0] sym);
    real ac = 0.0, as_ = 0.0, x, th, amp, ph, dph;
    int k;
    logic [31:0] p;
    k = -1;
    foreach (SYM[n]) if (SYM[n] == sym) k = n;
    for (int t = 0; t < 50; t++) begin
      @(posedge clk); #1;
      p  = phase - CODE;
      th = 2.0 * PI * real'(p[31:19]) / 8192.0;
      x  = real'(int'(qam_add) - 128) * 8.0 / 127.0;
      ac  += x * $cos(th);
      as_ += x * $sin(th);
    end
    ac  = ac * 2.0 / 50.0;
    as_ = as_ * 2.0 / 50.0;
    amp = $sqrt(ac * ac + as_ * as_);
    ph  = $atan2(as_, ac) * 180.0 / PI;
    if (ph < 0.0) ph += 360.0;
    begin
      real ea, ep, il, ql;
      il = real'(ref_level(sym[5:3]));
      ql = real'(ref_level(sym[2:0]));
      ea = $sqrt(il * il + ql * ql);
      ep = $atan2(ql, il) * 180.0 / PI;
      if (ep < 0.0) ep += 360.0;
      dph = ph - ep;
      if (dph > 180.0) dph -= 360.0;
      if (dph < -180.0) dph += 360.0;
      checks += 2;
      if (amp < ea - 0.15 || amp > ea + 0.15) begin failures++; $display("FAIL amplitude %b: %f vs %f", sym, amp, ea); end
      if (dph < -1.5 || dph > 1.5) begin failures++; $display("FAIL phase %b: %f vs %f", sym, ph, ep); end
    end
    measured++;
    if (k < 0 || measured > 16) return;   // printed values: first 16 symbols only
    dph = ph - PH[k % 4];
    if (dph > 180.0) dph -= 360.0;
    if (dph < -180.0) dph += 360.0;
    checks += 2;
    $display("symbol %b: amplitude %5.2f (table %4.2f), phase %6.1f (table %5.1f)",
             sym, amp, AMP[k / 4], ph, PH[k % 4]);
    if (amp < AMP[k / 4] - 0.2 || amp > AMP[k / 4] + 0.2) begin failures++; $display("FAIL amplitude"); end
    if (dph < -2.0 || dph > 2.0) begin failures++; $display("FAIL phase"); end
  endtask

  task automatic send(input logic [5:0] v);
    for (int b = 5; b >= 0; b--) begin
      serial_in = v[b];
      do @(negedge clk); while (!bit_tick);
      @(posedge clk); #1;
    end
  endtask

  initial begin
    repeat (3) @(posedge clk);
    @(negedge clk) rst_n = 1'b1;
    foreach (SYM[n]) send(SYM[n]);
    for (int n = 0; n < 64; n++) send(6'(n));
    repeat (6 * CPB - 10) @(posedge clk);
    checks++;
    if (measured != 80) begin failures++; $display("FAIL measured %0d symbols", measured); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
