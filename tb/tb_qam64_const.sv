// tb_qam64_const: applies all 64 symbols to the constant block and checks
// I (bits 5..3) and Q (bits 2..0) against the Gray-code rank formula.
module tb_qam64_const;
  import qam64_ref_pkg::*;
  logic [2:0] b02, b35;
  logic signed [7:0] q, i;
  int checks = 0, failures = 0;

  qam64_const dut (.b02, .b35, .q, .i);

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int s = 0; s < 64; s++) begin
      {b35, b02} = 6'(s);
      #1;
      checks += 2;
      if (int'(i) != ref_level(b35)) begin failures++; $display("FAIL I sym %0d: %0d", s, i); end
      if (int'(q) != ref_level(b02)) begin failures++; $display("FAIL Q sym %0d: %0d", s, q); end
    end
    // spot values printed in the constellation
    {b35, b02} = 6'b100_100; #1; checks++; if (i != 8'sd7 || q != 8'sd7) failures++;
    {b35, b02} = 6'b011_010; #1; checks++; if (i != -8'sd3 || q != -8'sd1) failures++;
    {b35, b02} = 6'b110_001; #1; checks++; if (i != 8'sd1 || q != -8'sd5) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
