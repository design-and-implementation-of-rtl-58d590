// tb_qam64_sum: checks ADD = (SINSIG + COSSIG)/8 + 128 and the DAC byte for
// every level pair and a sweep of carrier samples, plus random inputs.
module tb_qam64_sum;
  import qam64_ref_pkg::*;
  logic signed [15:0] sinsig, cossig, add;
  logic [7:0] dac;
  int checks = 0, failures = 0;

  qam64_sum dut (.sinsig, .cossig, .add, .dac);

  initial begin
    #10000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check_one(input int il, input int ql, input int s, input int c);
    int e;
    sinsig = 16'(ql * s); cossig = 16'(il * c); #1;
    e = ref_add(il, ql, s, c);
    checks++;
    if (int'(add) != e || dac != 8'(e)) begin
      failures++;
      if (failures < 10) $display("FAIL I=%0d Q=%0d s=%0d c=%0d: %0d vs %0d", il, ql, s, c, add, e);
    end
  endtask

  initial begin
    for (int il = -7; il <= 7; il += 2)
      for (int ql = -7; ql <= 7; ql += 2)
        for (int s = -127; s <= 127; s += 9)
          for (int c = -127; c <= 127; c += 11)
            check_one(il, ql, s, c);
    for (int k = 0; k < 2000; k++) begin
      int s1, s2, e;
      s1 = int'($urandom_range(0, 8000)) - 4000;
      s2 = int'($urandom_range(0, 8000)) - 4000;
      sinsig = 16'(s1); cossig = 16'(s2); #1;
      e = (s1 + s2) / 8 + 128;
      checks++;
      if (int'(add) != e) failures++;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
