// Self-checking testbench of the window processor. Each random structured
// window is shifted in column by column (leftward or rightward shifts), then
// decided at a random (row, col). Checks the decision latency (1 or 2
// clocks), that the edge register raises edge_we exactly one clock after the
// deciding clock, and the absolute position it carries, against the integer
// reference model.
module window_processor_tb;
  import cfed_pkg::*;
  import cfed_ref_pkg::*;
  int checks = 0, failures = 0, n_marks = 0, n_bg = 0;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  win_op_e win_op;
  pix_t col_in [WIN];
  logic bot_we = 0;
  logic [2:0] bot_idx = 0;
  pix_t bot_pix = 0;
  logic active = 0;
  logic [8:0] cur_row, edge_row;
  logic [8:0] cur_col, edge_col;
  grad_t lo = 25, hi = 110;
  logic [SHW-1:0] s = 0;
  memb_t t = 1023;
  logic pix_done, edge_we, tabc_hit, stage2;
  logic [2:0] cls;

  window_processor dut (.clk(clk), .rst_n(rst_n), .win_op(win_op), .col_in(col_in),
    .bot_we(bot_we), .bot_idx(bot_idx), .bot_pix(bot_pix), .active(active),
    .cur_row(cur_row), .cur_col(cur_col), .lo(lo), .hi(hi), .fz_shift(s),
    .fz_offset(t), .pix_done(pix_done), .edge_we(edge_we), .edge_row(edge_row),
    .edge_col(edge_col), .cls(cls), .tabc_hit(tabc_hit), .stage2(stage2));

  task automatic chk(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s", what);
    end
  endtask

  initial begin
    win5_t w;
    ref_dec_t r;
    int n, exp_n, rr, cc;
    bit rightward;
    win_op = WOP_HOLD;
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int i = 0; i < 3000; i++) begin
      w = rand_window();
      r = decide(w, lo, hi, s, t);
      rightward = 1'($urandom_range(0, 1));
      for (int k = 0; k < 5; k++) begin
        @(negedge clk);
        active = 0;
        chk(!edge_we || k > 0, "edge write without a decision");
        win_op = rightward ? WOP_RIGHT : WOP_LEFT;
        for (int y = 0; y < 5; y++) col_in[y] = 8'(w[y][rightward ? 4 - k : k]);
      end
      @(negedge clk);
      win_op = WOP_HOLD;
      rr = $urandom_range(2, 297);
      cc = $urandom_range(2, 297);
      cur_row = 9'(rr);
      cur_col = 9'(cc);
      active = 1;
      n = 0;
      forever begin
        #1;
        n++;
        if (pix_done || n > 4) break;
        @(negedge clk);
        chk(!edge_we, "edge write before the decision");
      end
      exp_n = (r.cls >= 1 && r.cls <= 4) ? 2 : 1;
      chk(n == exp_n, $sformatf("latency got %0d exp %0d", n, exp_n));
      @(negedge clk);
      active = 0;
      #1;
      chk(edge_we == r.mark, "edge register write");
      if (r.mark) begin
        n_marks++;
        chk(int'(edge_row) == rr + r.dy && int'(edge_col) == cc + r.dx,
            $sformatf("edge at (%0d,%0d) exp (%0d,%0d)", edge_row, edge_col, rr + r.dy, cc + r.dx));
      end else n_bg++;
    end
    chk(n_marks > 0 && n_bg > 0, "marks and non-marks both seen");
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
