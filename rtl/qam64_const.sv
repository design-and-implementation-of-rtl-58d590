// qam64_const: the constant block (CONST).
//
// Two 8-way multiplexers pick the constellation levels from the 6-bit
// symbol: b02 (the three LSBs) selects Q and b35 (the three MSBs) selects
// I. Both use the same Gray-coded table, as drawn for mux-1/mux-2 and in
// the constellation diagram:
//   code  0  1  2  3  4  5  6  7
//   level -7 -5 -1 -3 +7 +5 +1 +3
// Outputs are 8-bit two's complement. Purely combinational.
module qam64_const (
  input  logic [2:0]              b02,   // symbol bits 2..0 -> Q
  input  logic [2:0]              b35,   // symbol bits 5..3 -> I
  output qam64_pkg::level_t       q,
  output qam64_pkg::level_t       i
);

  function automatic qam64_pkg::level_t pick(input logic [2:0] sel);
    case (sel)
      3'd0:    return -8'sd7;
      3'd1:    return -8'sd5;
      3'd2:    return -8'sd1;
      3'd3:    return -8'sd3;
      3'd4:    return  8'sd7;
      3'd5:    return  8'sd5;
      3'd6:    return  8'sd1;
      default: return  8'sd3;
    endcase
  endfunction

  always_comb begin
    q = pick(b02);
    i = pick(b35);
  end

endmodule
