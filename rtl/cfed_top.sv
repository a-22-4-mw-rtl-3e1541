// Competitive fuzzy edge detection (C-FED) processor, top level.
//
// Pixels (8 bits, two per 16-bit input word, raster order) stream in through
// the memory controller into six input line memories. The controller unit
// moves a 5x5 window over the image in a meander and the window processor
// decides each interior pixel: one clock for a background or speckle pixel,
// two for an edge-class pixel, whose competition marks the strongest of it
// and its two neighbours across the edge. Marks collect in four output line
// memories, and each finished row leaves as IMG_W/OW words of OW edge flags
// (bit i of word k is column k*OW+i). Pixels in the two-pixel border are
// never centers and are only marked through a neighbour's competition.
//
// lo/hi are the Lo and Hi gradient thresholds of the class vectors;
// fz_shift and fz_offset are s and t of the linearized membership
// u = max(0, t - (SAD << s)). They must be held stable during a frame.
// Both streams use valid/ready; frame_done pulses after the last row has
// gone out, and the next frame may already be streaming in behind it.
// The nets cls, tabc_hit, stage2 and dir_left drive no logic here; they are
// kept as named observation points of the decision and the scan direction
// for simulation, which is why lint reports them as unused.
module cfed_top
  import cfed_pkg::*;
#(
  parameter int IMG_W     = 300,
  parameter int IMG_H     = 300,
  parameter int OW        = 10,
  parameter int NUM_UNITS = 4,
  localparam int CW       = $clog2(IMG_W),
  localparam int RW       = $clog2(IMG_H + 1),
  localparam int NWD      = (IMG_W + OW - 1) / OW,
  localparam int WDW      = (NWD > 1) ? $clog2(NWD) : 1
) (
  input  logic           clk,
  input  logic           rst_n,
  input  grad_t          lo,
  input  grad_t          hi,
  input  logic [SHW-1:0] fz_shift,
  input  memb_t          fz_offset,
  input  logic           in_valid,
  output logic           in_ready,
  input  logic [15:0]    in_data,
  output logic           out_valid,
  input  logic           out_ready,
  output logic [OW-1:0]  out_data,
  output logic [RW-1:0]  out_row,
  output logic [WDW-1:0] out_word,
  output logic           frame_done
);

  // memory controller <-> line buffers
  logic           lm_we;
  logic [2:0]     lm_slot;
  logic [CW-1:0]  lm_col;
  pix_t           lm_pix;
  logic           ob_rd_en;
  logic [1:0]     ob_rd_slot;
  logic [WDW-1:0] ob_rd_word;
  logic [OW-1:0]  ob_rd_data;
  // controller
  logic [RW-1:0]  rows_in, rows_out, cur_row, last_done_row;
  logic [CW-1:0]  cur_col, col_addr, bot_addr;
  logic           all_done, active, bot_we, dir_left, pix_done;
  logic [2:0]     bot_idx, base;
  win_op_e        win_op;
  pix_t           col_pix [WIN];
  pix_t           bot_pix;
  // window processor
  logic           edge_we;
  logic [RW-1:0]  edge_row;
  logic [CW-1:0]  edge_col;
  logic [2:0]     cls;
  logic           tabc_hit, stage2;

  memory_controller #(.IMG_W(IMG_W), .IMG_H(IMG_H), .OW(OW)) u_memctl (
    .clk(clk), .rst_n(rst_n),
    .in_valid(in_valid), .in_ready(in_ready), .in_data(in_data),
    .lm_we(lm_we), .lm_slot(lm_slot), .lm_col(lm_col), .lm_pix(lm_pix),
    .ob_rd_en(ob_rd_en), .ob_rd_slot(ob_rd_slot), .ob_rd_word(ob_rd_word),
    .ob_rd_data(ob_rd_data),
    .out_valid(out_valid), .out_ready(out_ready), .out_data(out_data),
    .out_row(out_row), .out_word(out_word),
    .cur_row(cur_row), .last_done_row(last_done_row), .all_done(all_done),
    .frame_done(frame_done), .rows_in(rows_in), .rows_out(rows_out));

  input_line_buffer #(.IMG_W(IMG_W)) u_inbuf (
    .clk(clk), .we(lm_we), .wr_slot(lm_slot), .wr_col(lm_col), .wr_pix(lm_pix),
    .base(base), .col_addr(col_addr), .col_out(col_pix),
    .bot_addr(bot_addr), .bot_out(bot_pix));

  controller_unit #(.IMG_W(IMG_W), .IMG_H(IMG_H)) u_ctrl (
    .clk(clk), .rst_n(rst_n), .rows_in(rows_in), .rows_out(rows_out),
    .pix_done(pix_done), .win_op(win_op), .col_addr(col_addr),
    .bot_we(bot_we), .bot_idx(bot_idx), .bot_addr(bot_addr), .base(base),
    .active(active), .cur_row(cur_row), .cur_col(cur_col),
    .dir_left(dir_left), .last_done_row(last_done_row),
    .all_done(all_done), .frame_done(frame_done));

  window_processor #(.IMG_W(IMG_W), .IMG_H(IMG_H), .NUM_UNITS(NUM_UNITS)) u_wp (
    .clk(clk), .rst_n(rst_n), .win_op(win_op), .col_in(col_pix),
    .bot_we(bot_we), .bot_idx(bot_idx), .bot_pix(bot_pix),
    .active(active), .cur_row(cur_row), .cur_col(cur_col),
    .lo(lo), .hi(hi), .fz_shift(fz_shift), .fz_offset(fz_offset),
    .pix_done(pix_done), .edge_we(edge_we), .edge_row(edge_row),
    .edge_col(edge_col), .cls(cls), .tabc_hit(tabc_hit), .stage2(stage2));

  output_line_buffer #(.IMG_W(IMG_W), .NLM(4), .OW(OW)) u_outbuf (
    .clk(clk), .rst_n(rst_n), .set_en(edge_we), .set_slot(edge_row[1:0]),
    .set_col(edge_col), .rd_en(ob_rd_en), .rd_slot(ob_rd_slot),
    .rd_word(ob_rd_word), .rd_data(ob_rd_data));

  // A mark may only go to a row that is still open (not yet sent).
  assert property (@(posedge clk) disable iff (!rst_n)
    edge_we |-> (edge_row >= rows_out));

endmodule
