// ldpc_pkg: constants and types shared by the layered (TDMP) LDPC decoder.
//
// Messages are 8-bit two's complement log-likelihood ratios (8-bit messages
// and at most 8 iterations are the sizing figures the design targets).  The
// base matrix is 24 block columns wide with up to 12 block rows; the largest
// expansion factor is 96 (802.16e), the smallest used is 24.  An H entry is a
// 12-bit word: a 7-bit shift value above a 5-bit block-column number.  The
// compressed extrinsic record of one row holds one sign per edge, the first
// and second minimum magnitude and the position of the first minimum.
//
// Own choices: the kernel is normalized Min-Sum with factor 3/4 (plain
// Min-Sum with 8-bit saturated posteriors was found to drift away from the
// codeword after a few iterations), and outgoing magnitudes are capped at
// LAM_MAX = 31.  The cap keeps the layered update stable: once a posterior
// has saturated at 127, gamma - lambda no longer returns the true prior, and
// with extrinsic messages as large as the posterior range the error could
// flip signs (a noise-free 1944-bit frame decoded with up to 1300 wrong bits
// after 8 iterations without the cap); magnitudes are 7 bits (messages saturate to +/-127), the
// record reserves CMAX = 22 sign bits (the largest row degree of the two
// standards), and block column 31 is used as an end-of-block-row marker.
package ldpc_pkg;

  localparam int W      = 8;    // message width in bits
  localparam int MAGW   = W-1;  // magnitude width
  localparam int NB     = 24;   // block columns of every base matrix
  localparam int MBMAX  = 12;   // most block rows
  localparam int ZMAX   = 96;   // largest expansion factor
  localparam int CMAX   = 22;   // largest row degree
  localparam int IDXW   = 5;    // bits of an edge index inside a row
  localparam int SHW    = 7;    // shift field width
  localparam int COLW   = 5;    // block-column field width
  localparam int HEW    = SHW + COLW;  // H entry width (12)
  localparam logic [COLW-1:0] COL_END = 5'd31;  // end-of-block-row marker

  typedef logic signed [W-1:0] msg_t;
  typedef logic [MAGW-1:0]     mag_t;

  typedef struct packed {
    logic [SHW-1:0]  shift;
    logic [COLW-1:0] col;
  } h_entry_t;

  // Compressed row of extrinsic messages (Min-Sum): signs, two minima, index.
  typedef struct packed {
    logic [CMAX-1:0] signs;
    mag_t            min1;
    mag_t            min2;
    logic [IDXW-1:0] idx;
  } lam_rec_t;

  localparam int RECW = $bits(lam_rec_t);

  // How the stored shift is turned into the shift for the current Z.
  typedef enum logic [1:0] {
    SHIFT_DIRECT = 2'd0,  // used as stored (802.11n)
    SHIFT_SCALE  = 2'd1,  // floor(s * Z / 96)  (802.16e, most rates)
    SHIFT_MOD    = 2'd2   // s mod Z            (802.16e, rate 2/3A)
  } shift_mode_e;

  // Normalized Min-Sum: outgoing magnitudes are scaled by NMS_NUM/2^NMS_SHIFT
  // (3/4), rounded down, then capped at LAM_MAX.
  localparam int NMS_NUM   = 3;
  localparam int NMS_SHIFT = 2;
  localparam int LAM_MAX   = 31;   // largest outgoing extrinsic magnitude

  function automatic mag_t nms_scale(input mag_t m);
    logic [MAGW+1:0] p;
    p = ((MAGW+2)'(m) * (MAGW+2)'(NMS_NUM)) >> NMS_SHIFT;
    return (p > (MAGW+2)'(LAM_MAX)) ? mag_t'(LAM_MAX) : mag_t'(p);
  endfunction

  // Saturate a wide signed value to the symmetric message range.
  function automatic msg_t sat_msg(input logic signed [W+1:0] v);
    if (v > 127)       return msg_t'(127);
    else if (v < -127) return msg_t'(-127);
    else               return msg_t'(v);
  endfunction

endpackage
