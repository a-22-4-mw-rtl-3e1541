// End-to-end testbench of the C-FED processor at its full size (300x300
// pixels, all parameters at their defaults), two frames back to back.
//
// Each frame is a synthetic image: a noisy, slowly varying background with a
// bright disc, a dark rectangle, a diagonal bar, thin lines and isolated
// speckles. Pixels are streamed in two per word with random gaps, edge words
// are taken out with random back-pressure. The edge map is compared bit for
// bit with the integer reference model applied to every interior pixel.
//
// Also checked: each frame's decision clocks equal one per pixel plus one
// per edge-class pixel, and the frame time is within 109,800 clocks, the
// 1821.5 frames/s at 200 MHz reported for the fabricated chip. Counted, and required to happen at least once: the background
// shortcut, competitions, a neighbour winning, speckle pixels, leftward
// bands, downward steps, waits for input rows, input stalls, output
// back-pressure and frame completions.
module cfed_top_tb;
  import cfed_pkg::*;
  import cfed_ref_pkg::*;
  localparam int W = 300, H = 300, OW = 10, NWD = W / OW;
  localparam int LO = 20, HI = 100, S = 0, T = 1023;
  localparam int NFRAMES = 2;

  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic in_valid = 0, in_ready, out_valid, out_ready = 0, frame_done;
  logic [15:0] in_data = 0;
  logic [OW-1:0] out_data;
  logic [8:0] out_row;
  logic [4:0] out_word;

  cfed_top dut (.clk(clk), .rst_n(rst_n), .lo(9'(LO)), .hi(9'(HI)), .fz_shift(3'(S)),
    .fz_offset(10'(T)), .in_valid(in_valid), .in_ready(in_ready), .in_data(in_data),
    .out_valid(out_valid), .out_ready(out_ready), .out_data(out_data),
    .out_row(out_row), .out_word(out_word), .frame_done(frame_done));

  task automatic chk(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL %s", what);
    end
  endtask

  byte unsigned img [NFRAMES][H][W];
  bit          expm [NFRAMES][H][W];
  bit          got  [H][W];
  int          n_exp_edgecls [NFRAMES];

  function automatic int clip(input int v);
    return (v < 0) ? 0 : (v > 255) ? 255 : v;
  endfunction

  task automatic make_image(input int f);
    int cy = 150 + 20 * f, cx = 140 - 10 * f;
    for (int r = 0; r < H; r++)
      for (int c = 0; c < W; c++) begin
        int v = 50 + (r + c) / 20 + $urandom_range(0, 6);
        if ((r - cy) * (r - cy) + (c - cx) * (c - cx) < 70 * 70) v = 190 + $urandom_range(0, 6);
        if (r > 30 && r < 90 && c > 200 && c < 270) v = 15 + $urandom_range(0, 4);
        if (c - r > 100 && c - r < 112) v = 140;
        if (r == 250 && c > 20 && c < 280) v = 230;
        if (c == 40 && r > 100) v = 10;
        if ($urandom_range(0, 399) == 0) v = 255;
        img[f][r][c] = 8'(clip(v));
      end
  endtask

  task automatic reference(input int f);
    win5_t w;
    ref_dec_t d;
    n_exp_edgecls[f] = 0;
    for (int r = 0; r < H; r++) for (int c = 0; c < W; c++) expm[f][r][c] = 0;
    for (int r = 2; r < H - 2; r++)
      for (int c = 2; c < W - 2; c++) begin
        for (int y = 0; y < 5; y++) for (int x = 0; x < 5; x++) w[y][x] = img[f][r-2+y][c-2+x];
        d = decide(w, LO, HI, S, T);
        if (d.mark) begin
          expm[f][r + d.dy][c + d.dx] = 1;
          n_exp_edgecls[f]++;
        end
      end
  endtask

  // ---------------------------------------------------------------- streams
  int in_f = 0, in_k = 0;        // frame and word being sent
  always @(negedge clk) if (rst_n) begin
    out_ready <= ($urandom_range(0, 7) != 0);
    if (!in_valid && in_f < NFRAMES && $urandom_range(0, 15) != 0) begin
      automatic int p = 2 * in_k;
      in_valid <= 1;
      in_data <= {img[in_f][(p + 1) / W][(p + 1) % W], img[in_f][p / W][p % W]};
    end
  end

  int out_f = 0, rows_seen = 0;
  longint cyc = 0, t_start [NFRAMES], t_end [NFRAMES];
  int dec_clk [NFRAMES], dec_pix [NFRAMES];
  int n_tabc = 0, n_comp = 0, n_nbr = 0, n_spk = 0, n_left = 0, n_down = 0;
  int n_rowwait = 0, n_in_stall = 0, n_out_bp = 0, n_frames = 0;

  always @(posedge clk) if (rst_n) begin
    cyc++;
    if (in_valid && in_ready) begin
      if (in_k == 0) t_start[in_f] = cyc;
      in_valid <= 0;
      in_k++;
      if (in_k == W * H / 2) begin in_k = 0; in_f++; end
    end
    if (in_valid && !in_ready) n_in_stall++;
    if (out_valid && !out_ready) n_out_bp++;
    if (out_valid && out_ready && out_f < NFRAMES) begin
      for (int b = 0; b < OW; b++) got[out_row][int'(out_word) * OW + b] = out_data[b];
      if (int'(out_word) == NWD - 1) rows_seen++;
    end
    // mechanisms inside the design
    if (dut.active && out_f < NFRAMES) begin
      dec_clk[out_f]++;
      if (dut.pix_done) dec_pix[out_f]++;
    end
    if (dut.active && !dut.stage2 && dut.tabc_hit) n_tabc++;
    if (dut.active && dut.stage2) n_comp++;
    if (dut.active && dut.stage2 && (dut.u_wp.set_dy != 0 || dut.u_wp.set_dx != 0)) n_nbr++;
    if (dut.active && !dut.stage2 && dut.cls == 3'd5) n_spk++;
    if (dut.active && dut.dir_left) n_left++;
    if (dut.bot_we && dut.bot_idx == 0) n_down++;
    if (int'(dut.u_ctrl.state) == 4 || int'(dut.u_ctrl.state) == 0) n_rowwait++;
    if (frame_done) begin
      t_end[out_f] = cyc;
      n_frames++;
      chk(rows_seen == H, $sformatf("frame %0d: %0d rows sent", out_f, rows_seen));
      for (int r = 0; r < H; r++) for (int c = 0; c < W; c++)
        chk(got[r][c] == expm[out_f][r][c],
            $sformatf("frame %0d edge bit (%0d,%0d) got %0b exp %0b", out_f, r, c, got[r][c], expm[out_f][r][c]));
      rows_seen = 0;
      out_f++;
    end
  end

  initial begin
    for (int f = 0; f < NFRAMES; f++) begin
      make_image(f);
      reference(f);
    end
    repeat (3) @(negedge clk);
    rst_n = 1;
    wait (n_frames == NFRAMES);
    @(negedge clk);
    for (int f = 0; f < NFRAMES; f++) begin
      automatic longint fc = t_end[f] - t_start[f];
      $display("frame %0d: %0d clocks, %0.1f frames/s at 200 MHz; %0d decisions in %0d clocks, %0d edge-class pixels",
               f, fc, 200.0e6 / real'(fc), dec_pix[f], dec_clk[f], n_exp_edgecls[f]);
      // the published rate: 1821.5 frames/s at 200 MHz, 109,800 clocks
      chk(fc <= 109800, "frame slower than 1821.5 frames/s at 200 MHz");
      chk(fc >= W * H / 2, "frame faster than the input stream allows");
      chk(dec_pix[f] == (W - 4) * (H - 4), "one decision per interior pixel");
      chk(dec_clk[f] == dec_pix[f] + n_exp_edgecls[f], "one clock per pixel plus one per edge-class pixel");
    end
    $display("tabc=%0d competitions=%0d neighbour_wins=%0d speckle=%0d left_clocks=%0d down_steps=%0d row_waits=%0d in_stalls=%0d out_backpressure=%0d frames=%0d",
             n_tabc, n_comp, n_nbr, n_spk, n_left, n_down, n_rowwait, n_in_stall, n_out_bp, n_frames);
    chk(n_tabc > 0, "background shortcut never used");
    chk(n_comp > 0, "no competition");
    chk(n_nbr > 0, "no neighbour won");
    chk(n_spk > 0, "no speckle pixel");
    chk(n_left > 0, "no leftward band");
    chk(n_down > 0, "no downward step");
    chk(n_rowwait > 0, "never waited for rows");
    chk(n_in_stall > 0, "input never stalled");
    chk(n_out_bp > 0, "output never back-pressured");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2000000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
