// fft_pkg: word and digit formats, pipeline tags, latencies and twiddle factors
// shared by every block of the bit-slice 64-point FFT butterfly processing unit.
//
// Numbers follow the design: complex samples of W = 4 bits per real part, each
// word carried as NDIG = 2 bit slices ("digits") of D = 2 bits, least significant
// slice first; 64 points are handled as 8 slices of 8 points. Twiddle factors are
// 4-bit two's complement with TWF = 2 fraction bits, so that 1, -1, j and -j are
// exact; that format, the rounding and the tag fields are choices of this design.
package fft_pkg;

  localparam int W    = 4;          // data word length of one real part (bits)
  localparam int D    = 2;          // bit-slice width processed per clock (bits)
  localparam int NDIG = W / D;      // slices per word = clocks per word
  localparam int TWF  = W - 2;      // fraction bits of a twiddle factor
  localparam int R    = 8;          // points per slice = size of a butterfly block
  localparam int NPT  = R * R;      // FFT size (64)
  localparam int FRAME = R * NDIG;  // clocks per 64-point frame (16)

  typedef logic        [D-1:0] dig_t;   // one bit slice of a real part
  typedef logic signed [W-1:0] word_t;  // a whole real part / twiddle component

  typedef struct packed { dig_t  re; dig_t  im; } cdig_t;   // complex bit slice
  typedef struct packed { word_t re; word_t im; } cword_t;  // complex word

  // Travels with the data through every pipeline stage.
  typedef struct packed {
    logic valid;  // a real bit slice is present this clock
    logic sof;    // first slice of the first word of a 64-point frame
    logic lsd;    // least significant slice of a word
  } tag_t;

  // Latencies in clocks of the bit-slice units and the cells built from them.
  localparam int LAT_ADD  = 1;               // bit-slice adder / subtractor
  localparam int LAT_MUL  = NDIG;            // bit-slice multiplier
  localparam int LAT_CMUL = LAT_MUL + LAT_ADD;  // complex multiplier
  localparam int LAT_R2   = LAT_ADD + LAT_CMUL;     // radix-2 cell
  localparam int LAT_SR   = 2*LAT_ADD + LAT_CMUL;   // split-radix cell
  localparam int LAT_R4   = 2*LAT_ADD + LAT_CMUL;   // radix-4 cell
  localparam int LAT_TW   = LAT_CMUL;               // twiddle factor block
  localparam int LAT_SHUF = FRAME;                  // shuffling block

  // Algorithm of the eight-point butterfly calculating blocks. The split-radix
  // block is the default; radix-2 and mixed-radix blocks fit the same unit.
  typedef enum logic [1:0] {
    ALG_SPLIT  = 2'd0,  // two split-radix cells, then one radix-4 and two radix-2 cells
    ALG_MIXED  = 2'd1,  // four radix-2 cells, then two radix-4 cells
    ALG_RADIX2 = 2'd2   // three ranks of four radix-2 cells
  } algo_e;

  // Latency of an eight-point block and of the whole unit, per algorithm.
  function automatic int lat_blk(algo_e a);
    case (a)
      ALG_MIXED:  return LAT_R2 + LAT_R4;
      ALG_RADIX2: return 3 * LAT_R2;
      default:    return LAT_SR + LAT_R4;
    endcase
  endfunction

  function automatic int lat_bpu(algo_e a);
    return 1 + 2 * lat_blk(a) + LAT_TW + LAT_SHUF;
  endfunction

  localparam int LAT_BLK = lat_blk(ALG_SPLIT);   // default eight-point block
  localparam int LAT_BPU = lat_bpu(ALG_SPLIT);   // default unit

  // cos(2*pi*k/64) * 2^14 for k = 0..16 (rounded to the nearest integer).
  localparam int COS64_Q14 [0:16] = '{16384, 16305, 16069, 15679, 15137, 14449,
                                      13623, 12665, 11585, 10394,  9102,  7723,
                                       6270,  4756,  3196,  1606,     0};

  // cos(2*pi*k/64) * 2^14 for any integer k, by quarter-wave symmetry.
  function automatic int cos64_q14(int k);
    int m;
    m = k & 63;
    if (m <= 16)      return  COS64_Q14[m];
    else if (m <= 32) return -COS64_Q14[32 - m];
    else if (m <= 48) return -COS64_Q14[m - 32];
    else              return  COS64_Q14[64 - m];
  endfunction

  // Round a Q14 value to a TWF-fraction-bit word (round half up).
  function automatic word_t q14_to_word(int v);
    int r;
    r = (v + (1 <<< (13 - TWF))) >>> (14 - TWF);
    return word_t'(r);
  endfunction

  // W64^k = exp(-j*2*pi*k/64) in the twiddle format.
  function automatic cword_t tw64(int k);
    cword_t t;
    t.re = q14_to_word(cos64_q14(k));
    t.im = q14_to_word(-cos64_q14(k + 48));  // -sin(x) = -cos(x - pi/2)
    return t;
  endfunction

  // W_n^k for n dividing 64.
  function automatic cword_t twiddle(int k, int n);
    return tw64(k * (NPT / n));
  endfunction

endpackage
