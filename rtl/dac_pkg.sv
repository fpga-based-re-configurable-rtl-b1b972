// dac_pkg: constants shared by the time-proportioning DAC.
//
// DAC_W is the width of the digital input word (8 bits, as on the board's
// switch bank). SEG7_W is the width of one seven-segment digit (segments
// g..a). seg7_t names that bundle so the decoder and the top agree on it.
package dac_pkg;
  parameter int unsigned DAC_W  = 8;
  parameter int unsigned SEG7_W = 7;
  typedef logic [SEG7_W-1:0] seg7_t;
endpackage
