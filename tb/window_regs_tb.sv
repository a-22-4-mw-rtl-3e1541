// Self-checking testbench of the 5x5 window registers: random shift
// operations, column loads and bottom-row writes against an array model.
module window_regs_tb;
  import cfed_pkg::*;
  int checks = 0, failures = 0;
  logic clk = 0;
  always #5 clk = ~clk;
  win_op_e op;
  pix_t col_in [WIN];
  logic bot_we;
  logic [2:0] bot_idx;
  pix_t bot_pix;
  win_t win;
  int m [5][5];

  window_regs dut (.clk(clk), .op(op), .col_in(col_in), .bot_we(bot_we),
                   .bot_idx(bot_idx), .bot_pix(bot_pix), .win(win));

  initial begin
    int nm [5][5];
    op = WOP_HOLD; bot_we = 0; bot_idx = 0; bot_pix = 0;
    // fill: five left shifts
    for (int c = 0; c < 5; c++) begin
      @(negedge clk);
      op = WOP_LEFT;
      for (int r = 0; r < 5; r++) begin
        col_in[r] = 8'($urandom);
        nm[r] = m[r];
      end
      for (int r = 0; r < 5; r++) begin
        for (int k = 0; k < 4; k++) m[r][k] = nm[r][k+1];
        m[r][4] = col_in[r];
      end
    end
    for (int i = 0; i < 4000; i++) begin
      @(negedge clk);
      // compare the state produced by the previous operation
      if (i > 0) begin
        checks++;
        for (int r = 0; r < 5; r++) for (int c = 0; c < 5; c++)
          if (int'(win[r][c]) != m[r][c]) begin
            failures++;
            $display("FAIL at step %0d reg[%0d][%0d] got %0d exp %0d", i, r, c, win[r][c], m[r][c]);
            r = 5; c = 5;
          end
      end
      op = win_op_e'($urandom_range(0, 3));
      for (int r = 0; r < 5; r++) col_in[r] = 8'($urandom);
      bot_we = 1'($urandom_range(0, 1));
      bot_idx = 3'($urandom_range(0, 4));
      bot_pix = 8'($urandom);
      nm = m;
      case (op)
        WOP_LEFT:  for (int r = 0; r < 5; r++) begin
                     for (int c = 0; c < 4; c++) nm[r][c] = m[r][c+1];
                     nm[r][4] = col_in[r];
                   end
        WOP_RIGHT: for (int r = 0; r < 5; r++) begin
                     for (int c = 1; c < 5; c++) nm[r][c] = m[r][c-1];
                     nm[r][0] = col_in[r];
                   end
        WOP_UP:    for (int r = 0; r < 4; r++) nm[r] = m[r+1];
        default: ;
      endcase
      if (bot_we) nm[4][bot_idx] = bot_pix;
      m = nm;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
