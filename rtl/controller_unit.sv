// Controller unit: meander scan of the 5x5 window over the image.
//
// The window's center visits rows 2 .. IMG_H-3 band by band. In even bands
// (the first, third, ...) it travels right from column 2 to IMG_W-3, in odd
// bands left back to column 2; between bands it steps down one row. Border
// pixels (two rows and columns on each side) are never centers.
//
//  WAIT_BAND  before the first band: wait until rows 0..4 are in the line
//             memories.
//  FILL       five clocks: shift the window left and load columns 0..4.
//  RUN        the edge detector works on the center (active). In the clock
//             its decision is done, the window moves one column: shifts
//             left and takes column x+3 (going right) or shifts right and
//             takes column x-3 (going left). At the end of a band, go on.
//  BAND_END   one clock for the last mark to reach the output memory, then
//             publish the band as finished (last_done_row).
//  DOWN_WAIT  wait until row r+3 is complete in the spare input line memory
//             and the output row that band r+1 will reuse has been sent.
//  DOWN       five clocks: shift up, refill the bottom row from the spare
//             memory, one register per clock; then the memories rotate
//             (base + 1) and the direction reverses.
//  DONE       after the last band, wait until every row has been sent,
//             pulse frame_done and start the next frame.
//
// The meander order and the rotation of line memories follow the published
// scan sequence; the one-register-per-clock bottom refill and the exact wait
// conditions are this design's choices. Async active-low reset.
module controller_unit
  import cfed_pkg::*;
#(
  parameter int IMG_W = 300,
  parameter int IMG_H = 300,
  localparam int CW   = $clog2(IMG_W),
  localparam int RW   = $clog2(IMG_H + 1)
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic [RW-1:0] rows_in,
  input  logic [RW-1:0] rows_out,
  input  logic          pix_done,
  output win_op_e       win_op,
  output logic [CW-1:0] col_addr,
  output logic          bot_we,
  output logic [2:0]    bot_idx,
  output logic [CW-1:0] bot_addr,
  output logic [2:0]    base,
  output logic          active,
  output logic [RW-1:0] cur_row,
  output logic [CW-1:0] cur_col,
  output logic          dir_left,
  output logic [RW-1:0] last_done_row,
  output logic          all_done,
  output logic          frame_done
);

  typedef enum logic [2:0] {
    S_WAIT_BAND, S_FILL, S_RUN, S_BAND_END, S_DOWN_WAIT, S_DOWN, S_DONE
  } state_e;

  state_e        state;
  logic [RW-1:0] r;
  logic [CW-1:0] x;
  logic [2:0]    j;
  logic          at_end;

  always_comb begin
    at_end     = dir_left ? (x == CW'(2)) : (x == CW'(IMG_W - 3));
    win_op     = WOP_HOLD;
    col_addr   = '0;
    bot_we     = 1'b0;
    bot_idx    = j;
    bot_addr   = x - CW'(2) + CW'(j);
    active     = (state == S_RUN);
    frame_done = (state == S_DONE) && (rows_out == RW'(IMG_H));
    cur_row    = r;
    cur_col    = x;
    unique case (state)
      S_FILL: begin
        win_op   = WOP_LEFT;
        col_addr = CW'(j);
      end
      S_RUN: begin
        if (pix_done && !at_end) begin
          win_op   = dir_left ? WOP_RIGHT : WOP_LEFT;
          col_addr = dir_left ? x - CW'(3) : x + CW'(3);
        end
      end
      S_DOWN: begin
        win_op = (j == 3'd0) ? WOP_UP : WOP_HOLD;
        bot_we = 1'b1;
      end
      default: ;
    endcase
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state         <= S_WAIT_BAND;
      r             <= RW'(2);
      x             <= '0;
      j             <= '0;
      dir_left      <= 1'b0;
      base          <= '0;
      last_done_row <= RW'(1);
      all_done      <= 1'b0;
    end else begin
      unique case (state)
        S_WAIT_BAND:
          if (rows_in >= RW'(5)) begin
            state <= S_FILL;
            j     <= '0;
          end
        S_FILL: begin
          j <= j + 3'd1;
          if (j == 3'd4) begin
            j        <= '0;
            x        <= CW'(2);
            dir_left <= 1'b0;
            state    <= S_RUN;
          end
        end
        S_RUN:
          if (pix_done) begin
            if (at_end) state <= S_BAND_END;
            else        x <= dir_left ? x - CW'(1) : x + CW'(1);
          end
        S_BAND_END: begin
          last_done_row <= r;
          if (r == RW'(IMG_H - 3)) begin
            all_done <= 1'b1;
            state    <= S_DONE;
          end else begin
            state <= S_DOWN_WAIT;
          end
        end
        S_DOWN_WAIT:
          if (({1'b0, rows_in} >= {1'b0, r} + (RW+1)'(4)) &&
              ({1'b0, rows_out} + (RW+1)'(1) >= {1'b0, r})) begin
            state <= S_DOWN;
            j     <= '0;
          end
        S_DOWN: begin
          j <= j + 3'd1;
          if (j == 3'd4) begin
            j        <= '0;
            r        <= r + 1'b1;
            base     <= (base == 3'd5) ? 3'd0 : base + 3'd1;
            dir_left <= ~dir_left;
            state    <= S_RUN;
          end
        end
        S_DONE:
          if (frame_done) begin
            state         <= S_WAIT_BAND;
            r             <= RW'(2);
            base          <= '0;
            dir_left      <= 1'b0;
            last_done_row <= RW'(1);
            all_done      <= 1'b0;
          end
        default: state <= S_WAIT_BAND;
      endcase
    end
  end

  // The first band may only start once rows 0..4 are present.
  initial assert (IMG_W >= 5 && IMG_H >= 5)
    else $error("image must be at least 5x5");

endmodule
