// tb_qddfs: runs the quadrature DDS at its default size with the 1 MHz code
// and with other codes. Each cycle it checks sin_sig, cos_sig and r
// against INT[127 sin/cos] of the table address the accumulator held one
// clock earlier. It also checks the carrier period: 50 clocks at 1 MHz.
module tb_qddfs;
  import qam64_ref_pkg::*;
  logic clk = 1'b0, rst_n = 1'b0;
  logic [31:0] code_f, phase, ph_model, ph_prev;
  logic signed [7:0] sin_sig, cos_sig;
  logic [7:0] r;
  int checks = 0, failures = 0;

  qddfs dut (.clk, .rst_n, .code_f, .sin_sig, .cos_sig, .r, .phase);

  always #10 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic run(input logic [31:0] l, input int cycles);
    int idx, es, ec;
    code_f = l;
    for (int k = 0; k < cycles; k++) begin
      @(posedge clk); #1;
      ph_prev  = ph_model;
      ph_model = ph_model + l;
      checks++;
      if (phase !== ph_model) failures++;
      idx = int'(ph_prev[31:19]);
      es = ref_carrier(idx, 13, 1'b0);
      ec = ref_carrier(idx, 13, 1'b1);
      checks += 3;
      if (int'(sin_sig) != es) begin failures++; if (failures < 10) $display("FAIL sin idx %0d: %0d vs %0d", idx, sin_sig, es); end
      if (int'(cos_sig) != ec) begin failures++; if (failures < 10) $display("FAIL cos idx %0d: %0d vs %0d", idx, cos_sig, ec); end
      if (int'(r) != (es + 128) / 2) begin failures++; if (failures < 10) $display("FAIL r idx %0d: %0d", idx, r); end
    end
  endtask

  initial begin
    int zc, first, last;
    logic signed [7:0] prev_s;
    code_f = 32'd85899346;
    repeat (3) @(posedge clk);
    checks++; if (phase !== 32'd0) failures++;
    @(negedge clk) rst_n = 1'b1;
    ph_model = 32'd0;
    // first edge after reset: the table still shows address 0
    run(32'd85899346, 2000);
    run(32'h0008_0000, 9000);         // one table word per clock: walks every address
    run(32'd42949673, 500);           // 500 kHz
    // period check at 1 MHz: rising zero crossings of sin_sig
    code_f = 32'd85899346;
    zc = 0; first = -1; last = -1; prev_s = sin_sig;
    for (int k = 0; k < 5000; k++) begin
      @(posedge clk); #1;
      if (prev_s < 0 && sin_sig >= 0) begin
        if (first < 0) first = k;
        last = k; zc++;
      end
      prev_s = sin_sig;
    end
    checks++;
    if (zc < 99 || zc > 101 || (last - first) / (zc - 1) != 50) begin
      failures++; $display("FAIL period: %0d crossings over %0d clocks", zc, last - first);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
