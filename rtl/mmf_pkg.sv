// mmf_pkg: types and constants shared by the MMF-LSD (modified metric-first
// list sphere detector) RTL.
//
// The detector works on the real-valued model y~ = R x + noise with
// MT = 2*N_T real layers. A tree node is a partial symbol vector whose
// symbols are stored as indices 0..Q-1 into the real PAM alphabet
// w(k) = 2k - (Q-1), Q = 2**qlog. The largest configuration (N_T = 4,
// 64-QAM, i.e. MT = 8 layers of 8 real levels and 15-bit words) fixes the
// storage widths; smaller antenna counts and 4/16-QAM run on the same
// hardware by runtime inputs (mt, qlog).
//
// Number formats (this design's choice where the source gives only the word
// length of 15 bits): y~ and R are signed W-bit with FRAC fractional bits;
// partial Euclidean distances (PED) are unsigned PED_W-bit with FRAC
// fractional bits and saturate at all ones.
package mmf_pkg;

  localparam int MT      = 8;   // real layers (2 * N_T, N_T = 4)
  localparam int QMAX    = 8;   // real levels per layer (64-QAM)
  localparam int SYM_W   = 3;   // symbol index width, log2(QMAX)
  localparam int LVL_W   = 4;   // level field 0..MT (MT marks the root)
  localparam int W       = 15;  // data word length (64-QAM figure)
  localparam int FRAC    = 8;   // fractional bits of y~ and R
  localparam int PED_W   = 24;  // PED width
  localparam int QLOG_W  = 2;   // qlog = 1 (4-QAM), 2 (16-QAM), 3 (64-QAM)
  localparam int MTC_W   = 4;   // active layer count 1..MT

  localparam logic [PED_W-1:0] PED_MAX = '1;

  typedef logic signed [W-1:0]                 word_t;
  typedef logic        [PED_W-1:0]             ped_t;
  typedef logic        [SYM_W-1:0]             sym_t;
  typedef logic        [MT-1:0][SYM_W-1:0]     symvec_t;
  typedef logic signed [MT-1:0][W-1:0]         wvec_t;
  typedef logic signed [MT-1:0][MT-1:0][W-1:0] wmat_t;   // [row][col]

  // Tree node as stored in the partial candidate memory S. The PED is the
  // most significant field so that the heap compares the top PED_W bits.
  typedef struct packed {
    ped_t              d;     // PED of this node
    ped_t              dpar;  // PED of its parent (for the next sibling)
    logic [LVL_W-1:0]  lvl;   // lowest fixed layer (0 = complete vector)
    sym_t              rank;  // Schnorr-Euchner rank of x[lvl] (0 = closest)
    symvec_t           x;     // symbol indices, x[j] valid for j >= lvl
  } node_t;

  // Complete candidate as stored in the final list L.
  typedef struct packed {
    ped_t    d;
    symvec_t x;
  } cand_t;

  localparam int NODE_W = $bits(node_t);
  localparam int CAND_W = $bits(cand_t);

  // Heap operations.
  typedef enum logic [1:0] {
    HOP_INSERT  = 2'd0,  // append at the next free address, up-heap
    HOP_REPLACE = 2'd1,  // overwrite the top, down-heap
    HOP_POP     = 2'd2   // move the last element to the top, down-heap
  } heap_op_e;

  // Why a search ended.
  typedef enum logic [1:0] {
    STOP_NONE   = 2'd0,
    STOP_LIMIT  = 2'd1,  // D_max iterations used
    STOP_EMPTY  = 2'd2,  // whole tree visited
    STOP_RADIUS = 2'd3   // smallest open node not inside C_0
  } stop_e;

  // Real PAM value of symbol index k for Q = 2**qlog levels.
  function automatic logic signed [4:0] sym_val(input sym_t k, input logic [QLOG_W-1:0] qlog);
    logic signed [4:0] q;
    q = 5'sd1 <<< qlog;
    return $signed({1'b0, k, 1'b0}) - (q - 5'sd1);
  endfunction

  // Saturating unsigned PED addition.
  function automatic ped_t ped_add(input ped_t a, input ped_t b);
    logic [PED_W:0] s;
    s = {1'b0, a} + {1'b0, b};
    return s[PED_W] ? PED_MAX : s[PED_W-1:0];
  endfunction

endpackage
