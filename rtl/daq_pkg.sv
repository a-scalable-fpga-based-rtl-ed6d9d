// daq_pkg: system-wide constants and shared types of the ionization-chamber
// data acquisition pipeline.
//
// The whole FPGA design is sized from this package at build time: changing
// ADC_N (the number of 8-channel ADCs in the ADC array) adapts every block to
// a different number of detector readout channels. The defaults describe the
// 96-channel detector prototype (12 ADCs of 8 channels each), 18-bit channels,
// 256-bit memory entries, Sample Blocks of 64 Samples and a Sample Buffer of
// 64 Sample Blocks. SAMPLE_PERIOD is the number of 10 MHz SCLK cycles per
// Sample at 25 kSps. The value/length encodings of the Varint path, the
// metadata layout and the ADC word struct are this design's own choices where
// the document only names the content.
package daq_pkg;

  // ADC array geometry
  parameter int unsigned ADC_N       = 12;   // ADCs in the array (96 channels)
  parameter int unsigned CH_PER_ADC  = 8;    // channels per ADC chip
  parameter int unsigned CH_W        = 18;   // bits per channel value
  parameter int unsigned ADC_WORD_W  = CH_PER_ADC * CH_W;  // 144-bit SIPO word

  // Varint geometry: an 18-bit value needs at most ceil(18/7) = 3 bytes
  parameter int unsigned VARINT_MAX_BYTES = (CH_W + 6) / 7;
  parameter int unsigned VARINT_W         = 8 * VARINT_MAX_BYTES;

  // Memory geometry (BRAM entries and the Avalon-MM FPGA2SDRAM bus)
  parameter int unsigned MEM_W       = 256;
  parameter int unsigned MEM_BYTES   = MEM_W / 8;

  // Sample Buffer geometry
  parameter int unsigned SAMPLES_PER_BLOCK = 64;
  parameter int unsigned N_BLOCKS          = 64;

  // Timing: 10 MHz SCLK / 25 kSps
  parameter int unsigned SAMPLE_PERIOD = 400;

  // Metadata words of a Sample (four 32-bit words, lowest first)
  parameter int unsigned META_WORD_W = 32;

  // One ADC transfer: the 144-bit word of one ADC, channel 0 in the top bits
  // (first out of the ADC), plus a flag marking the last ADC of a Sample.
  typedef struct packed {
    logic                  last;
    logic [ADC_WORD_W-1:0] data;
  } adc_word_t;

  // Channel c of a 144-bit ADC word (channel 0 is shifted in first, so it
  // ends up in the most significant bits of the SIPO register).
  function automatic logic [CH_W-1:0] adc_channel(input logic [ADC_WORD_W-1:0] w,
                                                  input int unsigned c);
    return w[ADC_WORD_W-1-c*CH_W -: CH_W];
  endfunction

endpackage
