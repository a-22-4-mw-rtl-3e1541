// 5x5 window of 8-bit pixel registers.
//
// The window follows the meander scan. While the window travels right the
// registers shift left and the new rightmost column enters from col_in;
// while it travels left they shift right and col_in fills the leftmost
// column; when it steps down they shift up. The bottom row is then refilled
// one register per clock through bot_we/bot_idx/bot_pix, which may be used
// in the same clock as WOP_UP (the write lands in the shifted row). col_in[i]
// is the pixel for window row i. All updates happen on the rising clock
// edge; there is no reset because every register is loaded before it is used.
module window_regs
  import cfed_pkg::*;
(
  input  logic         clk,
  input  win_op_e      op,
  input  pix_t         col_in [WIN],
  input  logic         bot_we,
  input  logic [2:0]   bot_idx,
  input  pix_t         bot_pix,
  output win_t         win
);

  win_t nxt;

  always_comb begin
    nxt = win;
    unique case (op)
      WOP_LEFT: begin
        for (int r = 0; r < WIN; r++) begin
          for (int c = 0; c < WIN - 1; c++) nxt[r][c] = win[r][c+1];
          nxt[r][WIN-1] = col_in[r];
        end
      end
      WOP_RIGHT: begin
        for (int r = 0; r < WIN; r++) begin
          for (int c = WIN - 1; c > 0; c--) nxt[r][c] = win[r][c-1];
          nxt[r][0] = col_in[r];
        end
      end
      WOP_UP: begin
        for (int r = 0; r < WIN - 1; r++) nxt[r] = win[r+1];
      end
      default: ;
    endcase
    if (bot_we && int'(bot_idx) < WIN) nxt[WIN-1][bot_idx] = bot_pix;
  end

  always_ff @(posedge clk) win <= nxt;

endmodule
