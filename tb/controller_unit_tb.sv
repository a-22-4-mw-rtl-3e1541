// Self-checking testbench of the controller unit at a reduced image of 9x8
// pixels, over two frames. The line memories and the output side are
// modelled: rows arrive at random times under the same overwrite rule as the
// memory controller, finished rows leave at random times. The testbench
// applies the controller's window operations to a model 5x5 window over a
// known image and checks, whenever a pixel is under decision, that the window
// holds exactly the 5x5 neighbourhood of (cur_row, cur_col), that the centers
// follow the meander order, that the memory rotation (base) matches the band,
// and that the rows the window needs are present. The edge detector is
// replaced by random 1- or 2-clock decisions. It counts leftward bands,
// downward steps and clocks spent waiting for rows.
module controller_unit_tb;
  import cfed_pkg::*;
  localparam int W = 9, H = 8;
  int checks = 0, failures = 0;
  int n_left = 0, n_down = 0, n_wait = 0, n_frames = 0;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic [3:0] rows_in = 0, rows_out = 0, cur_row, last_done_row;
  logic [3:0] col_addr, bot_addr, cur_col;
  logic pix_done, bot_we, active, dir_left, all_done, frame_done;
  logic [2:0] bot_idx, base;
  win_op_e win_op;

  controller_unit #(.IMG_W(W), .IMG_H(H)) dut (.clk(clk), .rst_n(rst_n),
    .rows_in(rows_in), .rows_out(rows_out), .pix_done(pix_done), .win_op(win_op),
    .col_addr(col_addr), .bot_we(bot_we), .bot_idx(bot_idx), .bot_addr(bot_addr),
    .base(base), .active(active), .cur_row(cur_row), .cur_col(cur_col),
    .dir_left(dir_left), .last_done_row(last_done_row), .all_done(all_done),
    .frame_done(frame_done));

  function automatic int img(input int frame, input int r, input int c);
    return (frame * 97 + r * 16 + c) & 255;
  endfunction

  task automatic chk(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s", what);
    end
  endtask

  int mw [5][5];
  int exp_r = 2, exp_c = 2, frame = 0;
  bit exp_left = 0;
  bit second = 0;          // second clock of a two-clock decision
  bit two;

  // decision model: random 1- or 2-clock decisions while active
  always_comb pix_done = active && (second || !two);

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1;
  end

  always @(posedge clk) if (rst_n) begin
    int nw [5][5];
    // --- check the window when a decision completes
    if (active && pix_done) begin
      chk(int'(cur_row) == exp_r && int'(cur_col) == exp_c,
          $sformatf("center (%0d,%0d) exp (%0d,%0d)", cur_row, cur_col, exp_r, exp_c));
      chk(int'(base) == (exp_r - 2) % 6, "line memory rotation");
      chk(int'(rows_in) >= exp_r + 3, "window rows not yet loaded");
      for (int y = 0; y < 5; y++) for (int x = 0; x < 5; x++)
        if (mw[y][x] != img(frame, exp_r - 2 + y, exp_c - 2 + x)) begin
          chk(0, $sformatf("window[%0d][%0d] at (%0d,%0d)", y, x, exp_r, exp_c));
          y = 5; x = 5;
        end
      checks++;
      // next meander position
      if (!exp_left && exp_c < W - 3) exp_c++;
      else if (exp_left && exp_c > 2) exp_c--;
      else begin
        exp_r++;
        exp_left = !exp_left;
        if (exp_r > H - 3) begin
          exp_r = 2; exp_c = 2; exp_left = 0;
        end
      end
    end
    if (active && !dir_left && pix_done && int'(cur_col) == W - 3) n_left++;
    if (int'(dut.state) == 4) n_wait++;   // DOWN_WAIT
    if (bot_we && bot_idx == 0) n_down++;
    // --- window model
    nw = mw;
    case (win_op)
      WOP_LEFT:  for (int y = 0; y < 5; y++) begin
                   for (int x = 0; x < 4; x++) nw[y][x] = mw[y][x+1];
                   nw[y][4] = img(frame, int'(cur_row) - 2 + y, int'(col_addr));
                 end
      WOP_RIGHT: for (int y = 0; y < 5; y++) begin
                   for (int x = 1; x < 5; x++) nw[y][x] = mw[y][x-1];
                   nw[y][0] = img(frame, int'(cur_row) - 2 + y, int'(col_addr));
                 end
      WOP_UP:    for (int y = 0; y < 4; y++) nw[y] = mw[y+1];
      default: ;
    endcase
    if (bot_we) nw[4][bot_idx] = img(frame, int'(cur_row) + 3, int'(bot_addr));
    mw = nw;
    // --- decision model
    if (active) begin
      if (pix_done) begin second = 0; two = 1'($urandom_range(0, 1)); end
      else second = 1;
    end
    // --- memory models
    if (frame_done) begin
      n_frames++;
      frame++;
      rows_in <= 0;
      rows_out <= 0;
    end else begin
      if (int'(rows_in) < H && int'(rows_in) <= int'(cur_row) + 3 && $urandom_range(0, 5) == 0)
        rows_in <= rows_in + 1;
      if (int'(rows_out) < H && (int'(rows_out) + 1 <= int'(last_done_row) || all_done)
          && $urandom_range(0, 3) == 0)
        rows_out <= rows_out + 1;
    end
  end

  initial begin
    two = 0;
    wait (n_frames == 2);
    @(negedge clk);
    $display("left_bands=%0d down_steps=%0d wait_cycles=%0d frames=%0d", n_left, n_down, n_wait, n_frames);
    chk(n_left > 0, "no leftward band");
    chk(n_down > 0, "no downward step");
    chk(n_wait > 0, "never waited for rows");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
