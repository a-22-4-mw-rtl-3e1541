// Window processor: 5x5x8-bit window registers, edge detector and edge
// register.
//
// The window registers are moved by the controller (win_op, col_in, bot_*).
// The edge detector decides the center pixel at (cur_row, cur_col) in one
// clock (BGND or speckle) or two (edge classes, with competition) and raises
// pix_done in the deciding clock. The edge register captures, on that edge,
// the absolute position of the pixel the competition marks; edge_we is high
// for exactly the following clock, so an edge flag leaves the processor one
// clock after the decision. Async active-low reset of the edge register.
module window_processor
  import cfed_pkg::*;
#(
  parameter int IMG_W     = 300,
  parameter int IMG_H     = 300,
  parameter int NUM_UNITS = 4,
  localparam int CW       = $clog2(IMG_W),
  localparam int RW       = $clog2(IMG_H + 1)
) (
  input  logic           clk,
  input  logic           rst_n,
  // window movement
  input  win_op_e        win_op,
  input  pix_t           col_in [WIN],
  input  logic           bot_we,
  input  logic [2:0]     bot_idx,
  input  pix_t           bot_pix,
  // pixel under decision
  input  logic           active,
  input  logic [RW-1:0]  cur_row,
  input  logic [CW-1:0]  cur_col,
  // thresholds and membership shape
  input  grad_t          lo,
  input  grad_t          hi,
  input  logic [SHW-1:0] fz_shift,
  input  memb_t          fz_offset,
  // results
  output logic           pix_done,
  output logic           edge_we,
  output logic [RW-1:0]  edge_row,
  output logic [CW-1:0]  edge_col,
  output logic [2:0]     cls,
  output logic           tabc_hit,
  output logic           stage2
);

  win_t win;
  logic set_en;
  logic signed [1:0] set_dy, set_dx;

  window_regs u_regs (
    .clk(clk), .op(win_op), .col_in(col_in), .bot_we(bot_we),
    .bot_idx(bot_idx), .bot_pix(bot_pix), .win(win));

  edge_detector #(.NUM_UNITS(NUM_UNITS)) u_ed (
    .clk(clk), .rst_n(rst_n), .win(win), .active(active), .lo(lo), .hi(hi),
    .fz_shift(fz_shift), .fz_offset(fz_offset), .done(pix_done),
    .set_en(set_en), .set_dy(set_dy), .set_dx(set_dx), .cls(cls),
    .tabc_hit(tabc_hit), .stage2(stage2));

  // Edge register
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      edge_we  <= 1'b0;
      edge_row <= '0;
      edge_col <= '0;
    end else begin
      edge_we  <= pix_done && set_en;
      edge_row <= cur_row + RW'(set_dy);
      edge_col <= cur_col + CW'(set_dx);
    end
  end

endmodule
