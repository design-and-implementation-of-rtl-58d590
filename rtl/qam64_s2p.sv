// qam64_s2p: serial-to-parallel converter for the modulator's data input.
//
// The serial bit stream is sampled once per bit period (CLK_PER_BIT clock
// cycles; 50 MHz / 1 kHz = 50000 by default) into a 6-bit shift register,
// first bit received ending up as the MSB. After every sixth bit the
// register is copied to the parallel output, which then holds one symbol
// for six bit periods: bits 5..3 select I and bits 2..0 select Q.
//
// The converter's role and the 6-bit grouping are as described for the
// modulator; the bit order (MSB first), the sampling instant (the last
// cycle of each bit period) and the strobes are this design's choices.
//
// Interface: bit_tick pulses for one cycle on the cycle in which serial_in
// is sampled; sym_valid pulses for one cycle when symbol is updated (the
// cycle after the sixth bit is sampled). rst_n clears all state.
module qam64_s2p #(
  parameter int unsigned CLK_PER_BIT = qam64_pkg::F_CLK_HZ / qam64_pkg::DATA_HZ,
  parameter int unsigned NBITS       = qam64_pkg::SYMBOL_BITS
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             serial_in,
  output logic             bit_tick,
  output logic [NBITS-1:0] symbol,
  output logic             sym_valid
);

  localparam int unsigned CW = (CLK_PER_BIT > 1) ? $clog2(CLK_PER_BIT) : 1;
  localparam int unsigned BW = $clog2(NBITS);

  logic [CW-1:0]    div_cnt;
  logic [BW-1:0]    bit_cnt;
  logic [NBITS-2:0] shreg;     // the first NBITS-1 bits of a symbol

  assign bit_tick = (div_cnt == CW'(CLK_PER_BIT - 1));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      div_cnt   <= '0;
      bit_cnt   <= '0;
      shreg     <= '0;
      symbol    <= '0;
      sym_valid <= 1'b0;
    end else begin
      sym_valid <= 1'b0;
      div_cnt   <= bit_tick ? '0 : div_cnt + 1'b1;
      if (bit_tick) begin
        shreg <= {shreg[NBITS-3:0], serial_in};
        if (bit_cnt == BW'(NBITS - 1)) begin
          bit_cnt   <= '0;
          symbol    <= {shreg[NBITS-2:0], serial_in};
          sym_valid <= 1'b1;
        end else begin
          bit_cnt <= bit_cnt + 1'b1;
        end
      end
    end
  end

endmodule
