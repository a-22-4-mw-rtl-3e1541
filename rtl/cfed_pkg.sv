// Shared types and constants of the competitive fuzzy edge detection (C-FED)
// processor.
//
// Pixels are 8 bits. A directional gradient is |p5-pa|+|p5-pb| and needs 9
// bits. The fuzzy membership value is 10 bits wide, as in the classifier
// datapath. The four gradient directions, indexed 0..3, are horizontal
// (P4-P5-P6), vertical (P2-P5-P8), main diagonal (P1-P5-P9) and anti-diagonal
// (P3-P5-P7) of the 3x3 neighbourhood P1..P9 around the center P5. The
// direction numbering and the class threshold vectors of the edge classes are
// this design's own choice; the background class vector [Lo Lo Lo Lo] is the
// algorithm's.
package cfed_pkg;

  localparam int PW       = 8;   // pixel width
  localparam int GW       = 9;   // directional gradient width
  localparam int FW       = 10;  // fuzzy membership width
  localparam int NDIR     = 4;   // gradient directions
  localparam int NCLASS   = 6;   // class 0 BGND, 1..4 edges, 5 speckle
  localparam int WIN      = 5;   // window is WIN x WIN pixels
  localparam int SHW      = 3;   // width of the membership shift amount s

  typedef logic [PW-1:0] pix_t;
  typedef logic [GW-1:0] grad_t;
  typedef logic [FW-1:0] memb_t;
  typedef pix_t  win_t  [WIN][WIN];   // [row][col], row 0 on top
  typedef grad_t gvec_t [NDIR];

  // Window register operations (one per clock).
  typedef enum logic [1:0] {
    WOP_HOLD  = 2'd0,
    WOP_LEFT  = 2'd1,   // contents move left, new rightmost column enters
    WOP_RIGHT = 2'd2,   // contents move right, new leftmost column enters
    WOP_UP    = 2'd3    // contents move up, bottom row is refilled
  } win_op_e;

  // Offsets of the two outer pixels of each direction, relative to the
  // center: first pixel (dy0,dx0), second pixel (-dy0,-dx0).
  function automatic int dir_dy(input int d);
    case (d)
      0: return 0;
      1: return -1;
      2: return -1;
      default: return -1;
    endcase
  endfunction

  function automatic int dir_dx(input int d);
    case (d)
      0: return -1;
      1: return 0;
      2: return -1;
      default: return 1;
    endcase
  endfunction

  // Threshold vector component of class c in direction d. An edge of class
  // k (1..4) runs along direction k-1: the gradient along the edge is low
  // and the three others are high. Class 0 is all-Lo, class 5 all-Hi.
  function automatic grad_t class_comp(input int c, input int d,
                                       input grad_t lo, input grad_t hi);
    if (c == 0) return lo;
    if (c == NCLASS - 1) return hi;
    return (d == c - 1) ? lo : hi;
  endfunction

  // Direction across an edge that runs along direction d.
  function automatic logic [1:0] across_dir(input logic [1:0] d);
    return d ^ 2'd1;
  endfunction

endpackage
