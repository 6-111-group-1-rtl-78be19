// Shared types and arithmetic for the audio codec path.
//
// The transmit side groups five signed 16-bit samples into a chunk and
// compresses it to a 40-bit word (N1 verbatim, a 4-bit shift value and four
// sign/magnitude difference codes). Two protection fields extend that to 50
// bits, and sixteen such words make one 800-bit packet. The functions here
// are the arithmetic that compressor and decompressor must agree on: the
// leading-one position and the scaling of a 4-bit difference code.
package codec_pkg;
  localparam int unsigned SAMPLE_W  = 16;  // bits per audio sample
  localparam int unsigned CHUNK_N   = 5;   // samples per chunk
  localparam int unsigned CODE_W    = 4;   // bits per difference code
  localparam int unsigned PKT_W     = 40;  // compressed chunk
  localparam int unsigned ECC_W     = 50;  // compressed chunk plus protection
  localparam int unsigned WORDS_PER_PACKET = 16;
  localparam int unsigned PACKET_W  = ECC_W * WORDS_PER_PACKET;  // 800

  typedef logic signed [SAMPLE_W-1:0] sample_t;
  typedef sample_t [CHUNK_N-1:0] chunk_t;  // [0] = N1, the oldest sample

  // One compressed difference: sign (1 = negative) and 4-bit magnitude code.
  typedef struct packed {
    logic [CODE_W-1:0] code;
    logic              sign;
  } diff_code_t;

  // 40-bit compressed word; field order matches bit 39 down to bit 0.
  typedef struct packed {
    diff_code_t [3:0] d;          // d[0] = diff1 at bits 24:20 ... d[3] at 39:35
    logic [3:0]       shift_val;  // bits 19:16
    sample_t          n1;         // bits 15:0
  } comp_word_t;

  // 50-bit protected word.
  typedef struct packed {
    logic [3:0] first1;    // 49:46 leading one of N1
    logic [3:0] second1;   // 45:42 next one of N1
    logic [1:0] shift1;    // 41:40 leading one of shift_val
    comp_word_t data;      // 39:0
  } ecc_word_t;

  // Position of the most significant one of a 16-bit value; 0 when v == 0.
  function automatic logic [3:0] lead_one16(input logic [15:0] v);
    logic [3:0] p;
    p = '0;
    for (int i = 0; i < 16; i++) if (v[i]) p = 4'(i);
    return p;
  endfunction

  // Value of a difference code: the code's MSB is placed at bit shift_val,
  // so the result is code * 2^(shift_val-3), fractions dropped.
  function automatic logic [15:0] scale_code(input logic [3:0] code,
                                             input logic [3:0] shift_val);
    logic [18:0] wide;
    wide = 19'(code) << shift_val;
    return wide[18:3];
  endfunction
endpackage
