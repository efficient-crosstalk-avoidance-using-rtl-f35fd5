// mrfc_pkg: constants and types shared by the Modified Redundant Fibonacci
// Code (MRFC) CODEC.
//
// A 3-bit data word is carried as a 4-bit MRFC code word whose digits weigh
// 3, 2, 1 and 1 (most significant digit first). The CODEC moves frames of
// eight code words, one for each data value 000..111, so a frame is 32 bits
// of code and 24 bits of decoded data. These sizes are the ones the CODEC is
// defined for; the encoder table only exists for 3-bit data.
package mrfc_pkg;

  localparam int unsigned DATA_W      = 3;
  localparam int unsigned CODE_W      = 4;
  localparam int unsigned FRAME_WORDS = 8;
  localparam int unsigned FRAME_CODE_W = CODE_W * FRAME_WORDS;  // 32
  localparam int unsigned FRAME_DATA_W = DATA_W * FRAME_WORDS;  // 24
  localparam int unsigned SLOT_W      = $clog2(FRAME_WORDS);

  typedef logic [DATA_W-1:0] data_t;
  typedef logic [CODE_W-1:0] code_t;
  typedef logic [CODE_W-2:0] pair_t;  // one flag per pair of adjacent wires
  typedef logic [SLOT_W-1:0] slot_t;

  // Digit weights of a code word, two bits per digit, digit k in
  // bits [2k+1:2k]: bit3=3, bit2=2, bit1=1, bit0=1.
  localparam logic [2*CODE_W-1:0] WEIGHTS = {2'd3, 2'd2, 2'd1, 2'd1};

  // The bits the encoder inverts when it finds crosstalk: the last two.
  localparam code_t FLIP_MASK = 4'b0011;

endpackage
