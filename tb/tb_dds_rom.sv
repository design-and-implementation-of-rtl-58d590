// tb_dds_rom: reads every word of a sine and a cosine table at the default
// size (8192 x 8) and compares with INT[127 sin/cos] + 128 computed by the
// testbench. Also checks the one-clock registered read latency.
module tb_dds_rom;
  import qam64_ref_pkg::*;
  localparam int AW = 13;
  logic clk = 1'b0;
  logic [AW-1:0] addr;
  logic [7:0] qs, qc;
  int checks = 0, failures = 0;

  dds_rom #(.AW(AW), .DW(8), .COSINE(1'b0)) u_s (.clk, .addr, .q(qs));
  dds_rom #(.AW(AW), .DW(8), .COSINE(1'b1)) u_c (.clk, .addr, .q(qc));

  always #10 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int es, ec;
    for (int i = 0; i < 2**AW; i++) begin
      @(negedge clk) addr = AW'(i);
      // before the edge the output still shows the previous address
      if (i > 0) begin
        es = ref_carrier(i - 1, AW, 1'b0) + 128;
        checks++;
        if (int'(qs) != es) failures++;
      end
      @(posedge clk); #1;
      es = ref_carrier(i, AW, 1'b0) + 128;
      ec = ref_carrier(i, AW, 1'b1) + 128;
      checks += 2;
      if (int'(qs) != es) begin failures++; if (failures < 10) $display("FAIL sin[%0d] %0d vs %0d", i, qs, es); end
      if (int'(qc) != ec) begin failures++; if (failures < 10) $display("FAIL cos[%0d] %0d vs %0d", i, qc, ec); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
