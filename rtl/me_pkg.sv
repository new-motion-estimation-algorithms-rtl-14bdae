// me_pkg: types and constants shared by the multi-point diamond search
// (MPDS / DMPDS) motion estimation engine.
//
// All block matching works on 4:1 sub-sampled luma: a 16x16 macroblock
// keeps every second sample in both directions and becomes an 8x8 block of
// 8-bit samples. Every diamond-search core holds a 34x34 sample reference
// window; the centre candidate of the first large diamond sits at window
// position (13,13), so 13 samples of motion fit on each side: 2 for the
// first large diamond, 2 for each of five further large-diamond iterations
// and 1 for the final small diamond (2 + 5*2 + 1 = 13, 8 + 2*13 = 34).
// Coordinates and motion vectors are in sub-sampled samples, x to the
// right and y downwards.
package me_pkg;

  localparam int PIX_W    = 8;          // sample width
  localparam int BLK      = 8;          // sub-sampled block edge (16x16 at 4:1)
  localparam int WIN      = 34;         // reference window edge
  localparam int CENTER   = 13;         // window position of the (0,0) candidate
  localparam int SAD_W    = 14;         // 64 * 255 = 16320 < 2**14
  localparam int POS_W    = 6;          // window coordinate 0..33
  localparam int MV_W     = 8;          // signed vector component
  localparam int N_LDSP   = 9;          // candidates of the large diamond
  localparam int N_SDSP   = 4;          // extra candidates of the small diamond
  localparam int N_CAND   = N_LDSP + N_SDSP;
  localparam int N_CORES  = 5;          // centre core and sectors A..D
  localparam int LDSP_CTR = 4;          // index of the centre candidate (PU 5)

  typedef logic [PIX_W-1:0]            pix_t;
  typedef logic [SAD_W-1:0]            sad_t;
  typedef logic [POS_W-1:0]            pos_t;
  typedef logic signed [MV_W-1:0]      mv_t;
  typedef pix_t [WIN-1:0]              win_row_t;   // one reference window row
  typedef pix_t [BLK-1:0]              blk_row_t;   // one block row
  typedef blk_row_t [1:0]              line_pair_t; // the two lines a PU takes per cycle

  typedef struct packed {
    mv_t  x;
    mv_t  y;
  } vec_t;

  typedef struct packed {
    vec_t vec;       // vector relative to the core's start point
    sad_t sad;       // SAD of the chosen candidate
    logic [3:0] ldsp;// large diamonds evaluated
  } core_result_t;

  localparam int COORD_W = 16;         // frame coordinate (sub-sampled samples)
  localparam int D_W     = 8;          // multi-point distance d
  localparam int FSAD_W  = 32;         // SAD total of one frame

  typedef logic signed [COORD_W-1:0] coord_t;
  typedef logic [D_W-1:0]            dist_t;

  // One block in flight: its position in the frame, whether it closes the
  // frame, and the distance d its sector cores used.
  typedef struct packed {
    coord_t x;
    coord_t y;
    logic   last;
    dist_t  d;
  } blk_tag_t;

  // One fetch from the frame memory: a reference window row (34 samples
  // starting at (ref_x, ref_y)) and, on the first eight beats of a fill, a
  // current block row (8 samples starting at (cur_x, cur_y)).
  typedef struct packed {
    coord_t ref_x;
    coord_t ref_y;
    logic   cur_en;
    coord_t cur_x;
    coord_t cur_y;
  } fetch_t;

  // Candidate offsets: entries 0..8 are the large diamond (MEM 1..9, entry
  // 4 the centre), entries 9..12 the small diamond (MEM A..D).
  function automatic logic signed [2:0] cand_dx(input int i);
    case (i)
      0: return 0;   1: return -1;  2: return 1;
      3: return -2;  4: return 0;   5: return 2;
      6: return -1;  7: return 1;   8: return 0;
      9: return 0;  10: return -1; 11: return 1;
      default: return 0;
    endcase
  endfunction

  function automatic logic signed [2:0] cand_dy(input int i);
    case (i)
      0: return -2;  1: return -1;  2: return -1;
      3: return 0;   4: return 0;   5: return 0;
      6: return 1;   7: return 1;   8: return 2;
      9: return -1; 10: return 0;  11: return 0;
      default: return 1;
    endcase
  endfunction

endpackage
