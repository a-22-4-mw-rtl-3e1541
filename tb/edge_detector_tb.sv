// Self-checking testbench of the edge detector (window processor FSM and
// datapath). Random structured 5x5 windows and random thresholds are decided
// by the DUT and by the integer reference model (which has no background
// shortcut). Checks: the stage-1 class, the number of clocks (1 for BGND and
// speckle, 2 for an edge class), the marked pixel, and that the decision
// holds while active is low. Counts how often the shortcut, the competition,
// a neighbour winning and the speckle class occur and fails if one never did.
module edge_detector_tb;
  import cfed_pkg::*;
  import cfed_ref_pkg::*;
  int checks = 0, failures = 0, cur_i = 0;
  int n_tabc = 0, n_comp = 0, n_nbr = 0, n_speckle = 0, n_bgnd = 0;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  win_t win;
  logic active = 0;
  grad_t lo, hi;
  logic [SHW-1:0] s;
  memb_t t;
  logic done, set_en, tabc_hit, stage2;
  logic signed [1:0] set_dy, set_dx;
  logic [2:0] cls;

  edge_detector dut (.clk(clk), .rst_n(rst_n), .win(win), .active(active),
    .lo(lo), .hi(hi), .fz_shift(s), .fz_offset(t), .done(done), .set_en(set_en),
    .set_dy(set_dy), .set_dx(set_dx), .cls(cls), .tabc_hit(tabc_hit), .stage2(stage2));

  task automatic chk(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL i=%0d %s", cur_i, what);
    end
  endtask

  initial begin
    win5_t w;
    ref_dec_t r;
    int n, exp_n;
    lo = 20; hi = 120; s = 0; t = 1023;
    repeat (3) @(negedge clk);
    rst_n = 1;
    for (int i = 0; i < 20000; i++) begin
      @(negedge clk);
      // thresholds change only between decisions
      if (i % 200 == 0) begin
        lo = 9'($urandom_range(8, 60));
        hi = 9'(int'(lo) + $urandom_range(40, 250));
        s  = 3'($urandom_range(0, 2));
        t  = (i % 400 == 0) ? 10'd1023 : 10'($urandom_range(300, 1023));
      end
      cur_i = i;
      w = rand_window();
      r = decide(w, lo, hi, s, t);
      for (int y = 0; y < 5; y++) for (int x = 0; x < 5; x++) win[y][x] = 8'(w[y][x]);
      active = 1;
      n = 0;
      forever begin
        #1;
        n++;
        if (n == 1) begin
          chk(int'(cls) == r.cls, $sformatf("class got %0d exp %0d", cls, r.cls));
          if (tabc_hit) n_tabc++;
          if (r.cls == 5) n_speckle++;
          if (r.cls == 0) n_bgnd++;
        end
        if (n == 2) begin
          n_comp++;
          // a stall: drop active for a few clocks, the decision must wait
          if (i % 7 == 0) begin
            active = 0;
            #1;
            chk(!done, "done while inactive");
            repeat (2) @(negedge clk);
            active = 1;
            #1;
            chk(stage2, "left the competition stage while inactive");
          end
        end
        if (done || n > 4) break;
        @(negedge clk);
      end
      exp_n = (r.cls >= 1 && r.cls <= 4) ? 2 : 1;
      chk(n == exp_n, $sformatf("cycles got %0d exp %0d", n, exp_n));
      chk(set_en == r.mark, "mark enable");
      if (r.mark) begin
        chk(int'(set_dy) == r.dy && int'(set_dx) == r.dx,
            $sformatf("mark at (%0d,%0d) exp (%0d,%0d)", set_dy, set_dx, r.dy, r.dx));
        if (r.dy != 0 || r.dx != 0) n_nbr++;
      end
    end
    @(negedge clk);
    active = 0;
    $display("tabc=%0d bgnd=%0d competitions=%0d neighbour_wins=%0d speckle=%0d",
             n_tabc, n_bgnd, n_comp, n_nbr, n_speckle);
    chk(n_tabc > 0, "background shortcut never used");
    chk(n_comp > 0, "competition never happened");
    chk(n_nbr > 0, "a neighbour never won");
    chk(n_speckle > 0, "speckle class never seen");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
