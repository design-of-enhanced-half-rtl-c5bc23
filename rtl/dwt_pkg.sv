// dwt_pkg: word width and bundle types shared by the 2-D Haar DWT datapath.
//
// Every sample inside the transform (pixels once read, row results and
// subband coefficients) is carried as a 16-bit two's-complement word, the
// width of the 16-bit EHRCA adder used for every addition. 16 bits hold the
// three-level decomposition of an 8-bit image with room to spare: the level-3
// LL coefficient is at most 8 * 255 = 2040 and no intermediate sum exceeds
// twice that.
package dwt_pkg;

  localparam int COEF_W = 16;

  typedef logic signed [COEF_W-1:0] coef_t;

  // A 2x2 block of samples, named p<row><column>.
  typedef struct packed {
    coef_t p00;
    coef_t p01;
    coef_t p10;
    coef_t p11;
  } block_t;

  // Output of the row-wise stage: low-pass (sum) and high-pass (difference)
  // of the top row (index 0) and of the bottom row (index 1).
  typedef struct packed {
    coef_t lo0;
    coef_t lo1;
    coef_t hi0;
    coef_t hi1;
  } row_pair_t;

  // The four subband coefficients of one block. The first letter is the
  // filter applied along the rows, the second the one along the columns.
  typedef struct packed {
    coef_t ll;
    coef_t hl;
    coef_t lh;
    coef_t hh;
  } subbands_t;

endpackage
