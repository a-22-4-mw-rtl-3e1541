// Edge detector: FSM and datapath of the window processor.
//
// Decides one pixel, the center of the 5x5 window, in one or two clocks.
//
// Stage 1 (edge calculation, first clock): the BGND detector checks the 3x3
// neighbourhood with the threshold adaptive bit test. Four gradient units
// (GCUs) compute the gradients of the center along the four directions, six
// fuzzy classifiers give the linearized membership of that gradient vector to
// each class, and a MAX unit picks the class. When the BGND detector fires the
// class is BGND without looking at the classifiers, and the GCU operands are
// forced to zero so the gradient and classifier logic does not toggle. A
// BGND (class 0) or speckle (class 5) pixel is finished here: done is high in
// this clock and nothing is marked.
//
// Stage 2 (competition, second clock, edge classes 1..4 only): the same four
// GCUs are reused. For an edge running along direction e, the competition is
// across it, along direction a = e ^ 1. The GCU of direction a keeps computing
// the center's gradient along a (its operands do not change), and the two
// other lowest-numbered GCUs compute the gradient along a of the two
// neighbours of the center on either side of the edge. The fourth GCU keeps
// its stage-1 operands. A 4:3 switch hands these three gradients to a MAX
// unit; the strongest of the three pixels is marked as an edge (set_en with
// its offset set_dy/set_dx from the center), the center winning ties. done is
// high in this clock.
//
// Thus a BGND or speckle pixel takes 1 clock and an edge-class pixel 2 clocks,
// as in the measured chip. The set of class vectors, the choice of which GCUs
// serve the neighbours, the tie rules and the marking of the winner (which may
// be a neighbour) are this design's reading of the algorithm.
// active must stay high while the window holds a pixel to be decided; the
// window may only move in the clock where done is high. Async active-low reset.
module edge_detector
  import cfed_pkg::*;
#(
  parameter int NUM_UNITS = 4
) (
  input  logic           clk,
  input  logic           rst_n,
  input  win_t           win,
  input  logic           active,
  input  grad_t          lo,
  input  grad_t          hi,
  input  logic [SHW-1:0] fz_shift,
  input  memb_t          fz_offset,
  output logic           done,
  output logic           set_en,
  output logic signed [1:0] set_dy,
  output logic signed [1:0] set_dx,
  output logic [2:0]     cls,        // stage-1 class (valid in stage 1)
  output logic           tabc_hit,   // BGND detector fired (stage 1)
  output logic           stage2      // FSM is in the competition stage
);

  typedef enum logic {ST_EDGE_CALC = 1'b0, ST_COMPETE = 1'b1} state_e;
  state_e     state;
  logic [1:0] along_q;              // edge direction found in stage 1

  // ---------------------------------------------------------------- operands
  pix_t ct [NDIR][3];               // center triple for each direction
  pix_t na [NDIR][3];               // neighbour A triple, gradient along d
  pix_t nb [NDIR][3];               // neighbour B triple, gradient along d
  pix_t p3x3 [9];

  always_comb begin
    for (int d = 0; d < NDIR; d++) begin
      automatic int dy = dir_dy(d);
      automatic int dx = dir_dx(d);
      ct[d][0] = win[2][2];
      ct[d][1] = win[2+dy][2+dx];
      ct[d][2] = win[2-dy][2-dx];
      na[d][0] = win[2+dy][2+dx];
      na[d][1] = win[2+2*dy][2+2*dx];
      na[d][2] = win[2][2];
      nb[d][0] = win[2-dy][2-dx];
      nb[d][1] = win[2][2];
      nb[d][2] = win[2-2*dy][2-2*dx];
    end
    for (int i = 0; i < 9; i++) p3x3[i] = win[1 + i/3][1 + i%3];
  end

  // ------------------------------------------------------------ BGND detector
  logic [3:0] k_unused;
  logic       bgnd_hit;
  bgnd_detector #(.NUM_UNITS(NUM_UNITS)) u_bgnd (
    .pix(p3x3), .lo(lo), .hi(hi), .k(k_unused), .bgnd(bgnd_hit));

  // ------------------------------------------------------- shared GCUs + muxes
  logic [1:0] acr;                  // competition direction
  logic [1:0] ia, ib;               // GCUs serving neighbours A and B
  pix_t  gin [NDIR][3];
  gvec_t g;

  always_comb begin
    acr = across_dir(along_q);
    ia  = (acr == 2'd0) ? 2'd1 : 2'd0;
    ib  = (acr >= 2'd2) ? 2'd1 : 2'd2;
    for (int d = 0; d < NDIR; d++) begin
      if (state == ST_COMPETE) begin
        if (2'(d) == ia)      gin[d] = na[acr];
        else if (2'(d) == ib) gin[d] = nb[acr];
        else                  gin[d] = ct[d];
      end else begin
        for (int j = 0; j < 3; j++) gin[d][j] = bgnd_hit ? '0 : ct[d][j];
      end
    end
  end

  for (genvar d = 0; d < NDIR; d++) begin : g_gcu
    gcu u_gcu (.pc(gin[d][0]), .pa(gin[d][1]), .pb(gin[d][2]), .grad(g[d]));
  end

  // ------------------------------------------------------ fuzzy classifiers
  memb_t memb [NCLASS];
  for (genvar c = 0; c < NCLASS; c++) begin : g_cls
    gvec_t cv;
    always_comb
      for (int d = 0; d < NDIR; d++) cv[d] = class_comp(c, d, lo, hi);
    fuzzy_classifier u_fc (.grad(g), .cvec(cv), .shift(fz_shift),
                           .offset(fz_offset), .memb(memb[c]));
  end

  logic [2:0] cls_max;
  memb_t      memb_max_unused;
  max_select #(.N(NCLASS), .VW(FW)) u_max1 (
    .vals(memb), .idx(cls_max), .max_val(memb_max_unused));

  // ------------------------------------------------------ competition (4:3)
  grad_t      cand [3];
  logic [1:0] win_idx;
  grad_t      cand_max_unused;
  always_comb begin
    cand[0] = g[acr];
    cand[1] = g[ia];
    cand[2] = g[ib];
  end
  max_select #(.N(3), .VW(GW)) u_max2 (
    .vals(cand), .idx(win_idx), .max_val(cand_max_unused));

  // ------------------------------------------------------------------ control
  logic is_edge_cls;
  always_comb begin
    cls         = bgnd_hit ? 3'd0 : cls_max;
    tabc_hit    = bgnd_hit;
    is_edge_cls = (cls >= 3'd1) && (cls <= 3'd4);
    stage2      = (state == ST_COMPETE);
    done        = 1'b0;
    set_en      = 1'b0;
    set_dy      = '0;
    set_dx      = '0;
    if (active) begin
      if (state == ST_EDGE_CALC) begin
        done = !is_edge_cls;
      end else begin
        done   = 1'b1;
        set_en = 1'b1;
        unique case (win_idx)
          2'd1: begin
            set_dy = 2'(dir_dy(int'(acr)));
            set_dx = 2'(dir_dx(int'(acr)));
          end
          2'd2: begin
            set_dy = 2'(-dir_dy(int'(acr)));
            set_dx = 2'(-dir_dx(int'(acr)));
          end
          default: ;
        endcase
      end
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state   <= ST_EDGE_CALC;
      along_q <= '0;
    end else if (active) begin
      if (state == ST_EDGE_CALC) begin
        if (is_edge_cls) begin
          state   <= ST_COMPETE;
          along_q <= 2'(cls - 3'd1);
        end
      end else begin
        state <= ST_EDGE_CALC;
      end
    end
  end

endmodule
