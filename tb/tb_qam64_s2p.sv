// tb_qam64_s2p: sends random symbols MSB first, one bit per bit period,
// and checks each parallel symbol, the one-cycle sym_valid pulse, and the
// rate: bit_tick every CLK_PER_BIT clocks, a symbol every 6 bit periods.
module tb_qam64_s2p;
  localparam int CPB = 5;
  logic clk = 1'b0, rst_n = 1'b0, serial_in = 1'b0;
  logic bit_tick, sym_valid;
  logic [5:0] symbol;
  int checks = 0, failures = 0;
  logic [5:0] sent [$];
  int last_tick = -1, last_sym = -1, cyc = 0, nsym = 0;

  qam64_s2p #(.CLK_PER_BIT(CPB)) dut (.clk, .rst_n, .serial_in, .bit_tick, .symbol, .sym_valid);

  always #10 clk = ~clk;

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // monitor: periods and symbol contents
  always @(posedge clk) if (rst_n) begin
    cyc++;
    if (bit_tick) begin
      if (last_tick >= 0) begin
        checks++;
        if (cyc - last_tick != CPB) begin failures++; $display("FAIL bit period %0d", cyc - last_tick); end
      end
      last_tick = cyc;
    end
    if (sym_valid) begin
      logic [5:0] exp_s;
      exp_s = sent.pop_front();
      checks++;
      if (symbol !== exp_s) begin failures++; $display("FAIL symbol %b vs %b", symbol, exp_s); end
      if (last_sym >= 0) begin
        checks++;
        if (cyc - last_sym != 6 * CPB) begin failures++; $display("FAIL symbol period %0d", cyc - last_sym); end
      end
      last_sym = cyc;
      nsym++;
    end
  end

  initial begin
    repeat (3) @(posedge clk);
    checks++; if (symbol !== 6'd0 || sym_valid !== 1'b0) failures++;
    @(negedge clk) rst_n = 1'b1;
    for (int s = 0; s < 80; s++) begin
      logic [5:0] v;
      v = (s < 64) ? 6'(s) : 6'($urandom);
      sent.push_back(v);
      for (int b = 5; b >= 0; b--) begin
        serial_in = v[b];
        // hold the bit until it has been sampled
        do @(posedge clk); while (!bit_tick);
        @(negedge clk);
      end
    end
    repeat (3) @(posedge clk);
    checks++;
    if (nsym != 80) begin failures++; $display("FAIL %0d symbols", nsym); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
