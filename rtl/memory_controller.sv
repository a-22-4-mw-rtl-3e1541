// Memory controller: feeds image rows into the input line memories and
// sends finished edge rows out.
//
// Input side. Pixels arrive two per 16-bit word on a valid/ready stream in
// raster order; the Hi/Lo select hands out the low byte first, then the high
// byte, one pixel per clock, and the word is accepted (in_ready) with its
// second pixel. Image row n is written into input line memory n mod 6. Row n
// may only be written while the scan works on center row cur_row >= n - 3,
// because the memory it overwrites held row n - 6, last used by band n - 4.
// rows_in counts the completed rows. After the last row of a frame the input
// waits for frame_done.
//
// Output side. Row m of edge flags is final once no band can mark it any
// more: the band with center row m + 1 has finished (m + 1 <= last_done_row),
// or all bands of the frame have (all_done). Each final row is sent as
// ceil(IMG_W/OW) words of OW flags on a valid/ready stream, bit i of word k
// being column k*OW + i; each word is cleared in the output line memory as it
// leaves. rows_out counts the rows sent. frame_done restarts both sides.
//
// The byte order, the handshakes and the output packing into 10-bit words
// are this design's choices. Async active-low reset.
module memory_controller #(
  parameter int IMG_W = 300,
  parameter int IMG_H = 300,
  parameter int OW    = 10,
  localparam int CW   = $clog2(IMG_W),
  localparam int RW   = $clog2(IMG_H + 1),
  localparam int NWD  = (IMG_W + OW - 1) / OW,
  localparam int WDW  = (NWD > 1) ? $clog2(NWD) : 1
) (
  input  logic           clk,
  input  logic           rst_n,
  // pixel input stream
  input  logic           in_valid,
  output logic           in_ready,
  input  logic [15:0]    in_data,
  // to the input line buffer
  output logic           lm_we,
  output logic [2:0]     lm_slot,
  output logic [CW-1:0]  lm_col,
  output logic [7:0]     lm_pix,
  // to the output line buffer
  output logic           ob_rd_en,
  output logic [1:0]     ob_rd_slot,
  output logic [WDW-1:0] ob_rd_word,
  input  logic [OW-1:0]  ob_rd_data,
  // edge output stream
  output logic           out_valid,
  input  logic           out_ready,
  output logic [OW-1:0]  out_data,
  output logic [RW-1:0]  out_row,
  output logic [WDW-1:0] out_word,
  // scan progress
  input  logic [RW-1:0]  cur_row,
  input  logic [RW-1:0]  last_done_row,
  input  logic           all_done,
  input  logic           frame_done,
  output logic [RW-1:0]  rows_in,
  output logic [RW-1:0]  rows_out
);

  // ----------------------------------------------------------- input side
  logic [RW-1:0] wr_row;
  logic [CW-1:0] wr_col;
  logic [2:0]    wr_slot;
  logic          hi_sel;
  logic          can_wr, last_pix;

  always_comb begin
    can_wr   = in_valid && (wr_row < RW'(IMG_H)) &&
               ({1'b0, wr_row} <= {1'b0, cur_row} + (RW+1)'(3));
    last_pix = (wr_row == RW'(IMG_H - 1)) && (wr_col == CW'(IMG_W - 1));
    in_ready = can_wr && (hi_sel || last_pix);
    lm_we    = can_wr;
    lm_slot  = wr_slot;
    lm_col   = wr_col;
    lm_pix   = hi_sel ? in_data[15:8] : in_data[7:0];
    rows_in  = wr_row;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      wr_row  <= '0;
      wr_col  <= '0;
      wr_slot <= '0;
      hi_sel  <= 1'b0;
    end else if (frame_done) begin
      wr_row  <= '0;
      wr_col  <= '0;
      wr_slot <= '0;
      hi_sel  <= 1'b0;
    end else if (can_wr) begin
      hi_sel <= last_pix ? 1'b0 : ~hi_sel;
      if (wr_col == CW'(IMG_W - 1)) begin
        wr_col  <= '0;
        wr_row  <= wr_row + 1'b1;
        wr_slot <= (wr_slot == 3'd5) ? 3'd0 : wr_slot + 3'd1;
      end else begin
        wr_col <= wr_col + 1'b1;
      end
    end
  end

  // ---------------------------------------------------------- output side
  logic [RW-1:0]  rd_row;
  logic [WDW-1:0] rd_word;
  logic           row_final;

  always_comb begin
    row_final  = ({1'b0, rd_row} + (RW+1)'(1) <= {1'b0, last_done_row}) || all_done;
    out_valid  = row_final && (rd_row < RW'(IMG_H));
    ob_rd_en   = out_valid && out_ready;
    ob_rd_slot = rd_row[1:0];
    ob_rd_word = rd_word;
    out_data   = ob_rd_data;
    out_row    = rd_row;
    out_word   = rd_word;
    rows_out   = rd_row;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      rd_row  <= '0;
      rd_word <= '0;
    end else if (frame_done) begin
      rd_row  <= '0;
      rd_word <= '0;
    end else if (ob_rd_en) begin
      if (rd_word == WDW'(NWD - 1)) begin
        rd_word <= '0;
        rd_row  <= rd_row + 1'b1;
      end else begin
        rd_word <= rd_word + 1'b1;
      end
    end
  end

endmodule
