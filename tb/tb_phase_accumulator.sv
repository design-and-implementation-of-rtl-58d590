// tb_phase_accumulator: checks the phase accumulator against a software
// accumulator for several frequency codes, including the 1 MHz code, checks
// the asynchronous clear, and checks the rate: with L = 85899346 the MSB
// must rise 1000 times (1 MHz) in 50000 clocks (1 ms at 50 MHz), +-1.
module tb_phase_accumulator;
  logic clk = 1'b0, rst_n = 1'b0;
  logic [31:0] code_f, phase;
  logic [31:0] model;
  int checks = 0, failures = 0;

  phase_accumulator dut (.clk, .rst_n, .code_f, .phase);

  always #10 clk = ~clk;

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic run_code(input logic [31:0] l, input int cycles);
    code_f = l;
    for (int k = 0; k < cycles; k++) begin
      @(posedge clk); #1;
      model = model + l;
      checks++;
      if (phase !== model) begin
        failures++;
        if (failures < 10) $display("FAIL code %0d step %0d: %h vs %h", l, k, phase, model);
      end
    end
  endtask

  initial begin
    int rises;
    logic msb_d;
    code_f = 32'd0;
    repeat (3) @(posedge clk);
    #1; checks++; if (phase !== 32'd0) failures++;
    rst_n = 1'b1;
    model = 32'd0;
    run_code(32'd85899346, 200);
    run_code(32'hFFFF_FFFF, 50);
    run_code(32'h8000_0001, 50);
    run_code(32'd1, 20);
    // asynchronous clear between clock edges
    #3 rst_n = 1'b0; #1;
    checks++; if (phase !== 32'd0) begin failures++; $display("FAIL async clear"); end
    @(negedge clk) rst_n = 1'b1;
    model = 32'd0;
    // rate: 1 MHz out of 50 MHz
    code_f = 32'd85899346;
    rises = 0; msb_d = 1'b0;
    for (int k = 0; k < 50000; k++) begin
      @(posedge clk); #1;
      if (phase[31] && !msb_d) rises++;
      msb_d = phase[31];
    end
    checks++;
    if (rises < 999 || rises > 1001) begin failures++; $display("FAIL rate: %0d periods", rises); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
