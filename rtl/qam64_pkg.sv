// qam64_pkg: types and constants shared by the QAM-64 modulator.
//
// The modulator is built from 8-bit two's-complement carrier samples and
// 8-bit constellation levels whose products are 16-bit. The carrier tables
// are stored offset-binary (value + 128) as in an 8-bit unipolar DAC, and
// the sum stage rescales by 8 and re-adds the 128 offset. The numbers here
// (50 MHz clock, 32-bit phase accumulator, 13-bit table address, 8-bit
// samples, tuning word 85899346 for 1 MHz, 1 kHz data) are the design's
// published configuration.
package qam64_pkg;

  localparam int unsigned F_CLK_HZ    = 50_000_000;
  localparam int unsigned PHASE_W     = 32;          // n
  localparam int unsigned ROM_AW      = 13;          // b
  localparam int unsigned SAMPLE_W    = 8;           // m
  localparam int unsigned PROD_W      = 16;
  localparam int unsigned DAC_OFFSET  = 128;
  localparam int unsigned SUM_DIV     = 8;
  localparam int unsigned R_DIV       = 2;
  localparam int unsigned SYMBOL_BITS = 6;
  localparam int unsigned DATA_HZ     = 1_000;
  localparam logic [PHASE_W-1:0] CODE_F_1MHZ = 32'd85899346;

  typedef logic signed [SAMPLE_W-1:0] sample_t;   // signed carrier sample
  typedef logic        [SAMPLE_W-1:0] ubyte_t;    // offset-binary / DAC word
  typedef logic signed [SAMPLE_W-1:0] level_t;    // I or Q level, +-1..+-7
  typedef logic signed [PROD_W-1:0]   product_t;  // level * sample

endpackage
