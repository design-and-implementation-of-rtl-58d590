// qam64_tb_monitor: end-to-end checker for the QAM-64 modulator testbenches.
//
// Runs a reference model beside the design: its own 32-bit phase
// accumulator, carrier values from the sine/cosine formula, levels from the
// Gray-code rank formula and the /8 +128 sum. On every clock it checks the
// design's outputs against the model, and per symbol it checks the peak
// of |qam_add - 128| against 127*sqrt(I^2+Q^2)/8 (the symbol's amplitude).
// It counts the mechanisms seen: symbols, distinct symbols, accumulator
// wraps and DAC byte wraps (sum outside 0..255).
module qam64_tb_monitor #(
  parameter logic [31:0] CODE_F = 32'd85899346,
  parameter int          CPB    = 50000
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic [5:0]        expected_symbol,
  input  logic              expected_ok,       // expected_symbol is meaningful
  input  logic              bit_tick,
  input  logic [5:0]        symbol,
  input  logic              sym_valid,
  input  logic signed [7:0] i_level,
  input  logic signed [7:0] q_level,
  input  logic signed [7:0] sin_sig,
  input  logic signed [7:0] cos_sig,
  input  logic [7:0]        sin_dac,
  input  logic signed [15:0] qam_add,
  input  logic [7:0]        qam_dac,
  input  logic [31:0]       phase
);
  import qam64_ref_pkg::*;

  int checks = 0, failures = 0;
  int n_sym = 0, n_acc_wrap = 0, n_dac_wrap = 0, n_bits = 0;
  bit seen [64];
  logic [31:0] ph_model = '0, ph_prev = '0;
  int cyc = 0, last_sym = -1, peak = 0;
  bit have_sym = 1'b0;

  function automatic int distinct();
    int n = 0;
    foreach (seen[k]) if (seen[k]) n++;
    return n;
  endfunction

  always @(posedge clk) begin
    #1;
    if (!rst_n) begin
      ph_model = '0; ph_prev = '0;
    end else begin
      int il, ql, s, c, e, dev;
      cyc++;
      ph_prev  = ph_model;
      ph_model = ph_model + CODE_F;
      if (ph_model < ph_prev) n_acc_wrap++;
      checks++;
      if (phase !== ph_model) begin failures++; if (failures < 10) $display("FAIL phase %h vs %h", phase, ph_model); end

      s  = ref_carrier(int'(ph_prev[31:19]), 13, 1'b0);
      c  = ref_carrier(int'(ph_prev[31:19]), 13, 1'b1);
      il = ref_level(symbol[5:3]);
      ql = ref_level(symbol[2:0]);
      e  = ref_add(il, ql, s, c);
      checks += 5;
      if (int'(sin_sig) != s || int'(cos_sig) != c) begin failures++; if (failures < 10) $display("FAIL carrier"); end
      if (int'(sin_dac) != (s + 128) / 2) begin failures++; if (failures < 10) $display("FAIL sin_dac"); end
      if (int'(i_level) != il || int'(q_level) != ql) begin failures++; if (failures < 10) $display("FAIL levels for %b", symbol); end
      if (int'(qam_add) != e) begin failures++; if (failures < 10) $display("FAIL add %0d vs %0d (sym %b)", qam_add, e, symbol); end
      if (qam_dac !== 8'(e)) begin failures++; if (failures < 10) $display("FAIL dac"); end
      if (e < 0 || e > 255) n_dac_wrap++;
      if (bit_tick) n_bits++;

      if (sym_valid) begin
        // close the previous symbol's amplitude measurement
        if (have_sym && cyc - last_sym >= 50) check_amp(last_symbol_val, peak);
        checks++;
        if (!expected_ok || symbol !== expected_symbol) begin
          failures++; $display("FAIL symbol %b vs %b", symbol, expected_symbol);
        end
        if (last_sym >= 0) begin
          checks++;
          if (cyc - last_sym != 6 * CPB) begin failures++; $display("FAIL symbol period %0d", cyc - last_sym); end
        end
        last_sym = cyc;
        n_sym++;
        seen[symbol] = 1'b1;
        have_sym = 1'b1;
        peak = 0;
      end
      dev = (e >= 128) ? e - 128 : 128 - e;
      if (dev > peak) peak = dev;
    end
  end

  logic [5:0] last_symbol_val;
  always @(posedge clk) #2 if (sym_valid) last_symbol_val = symbol;

  task automatic check_amp(input logic [5:0] sym, input int pk);
    real a, expd;
    int il, ql;
    il = ref_level(sym[5:3]);
    ql = ref_level(sym[2:0]);
    a = $sqrt(real'(il * il + ql * ql));
    expd = 127.0 * a / 8.0;
    checks++;
    if (real'(pk) < expd - 2.5 || real'(pk) > expd + 0.5) begin
      failures++;
      $display("FAIL amplitude sym %b: peak %0d, expected %f", sym, pk, expd);
    end
  endtask

  task automatic report(input int min_syms, input bit need_dac_wrap);
    checks++;
    if (need_dac_wrap && n_dac_wrap == 0) begin failures++; $display("FAIL DAC byte never wrapped"); end
    checks++;
    if (n_sym < min_syms) begin failures++; $display("FAIL only %0d symbols", n_sym); end
    checks++;
    if (n_acc_wrap == 0) begin failures++; $display("FAIL accumulator never wrapped"); end
    checks++;
    if (n_bits == 0) begin failures++; $display("FAIL no bit sampled"); end
    $display("mechanisms: symbols=%0d distinct=%0d bits=%0d acc_wraps=%0d dac_wraps=%0d",
             n_sym, distinct(), n_bits, n_acc_wrap, n_dac_wrap);
  endtask
endmodule
