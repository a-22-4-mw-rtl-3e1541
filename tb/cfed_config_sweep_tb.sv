// End-to-end testbench of the C-FED processor at a reduced image size
// (40x24 pixels), over eight back-to-back frames, each with its own
// thresholds and membership shape. Some frames use thresholds low enough that
// the background shortcut must stay off (K > 4), some use a membership shift
// s > 0 or a small offset t, so that memberships clamp at zero. Every frame's
// edge map is compared bit for bit with the integer reference model; the
// thresholds are changed only while the processor is idle between frames.
module cfed_config_sweep_tb;
  import cfed_pkg::*;
  import cfed_ref_pkg::*;
  localparam int W = 40, H = 24, OW = 10, NWD = W / OW;
  localparam int NFRAMES = 8;

  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic in_valid = 0, in_ready, out_valid, out_ready = 0, frame_done;
  logic [15:0] in_data = 0;
  logic [OW-1:0] out_data;
  logic [4:0] out_row;
  logic [1:0] out_word;
  grad_t lo, hi;
  logic [SHW-1:0] s;
  memb_t t;

  cfed_top #(.IMG_W(W), .IMG_H(H), .OW(OW)) dut (.clk(clk), .rst_n(rst_n),
    .lo(lo), .hi(hi), .fz_shift(s), .fz_offset(t), .in_valid(in_valid),
    .in_ready(in_ready), .in_data(in_data), .out_valid(out_valid),
    .out_ready(out_ready), .out_data(out_data), .out_row(out_row),
    .out_word(out_word), .frame_done(frame_done));

  task automatic chk(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL %s", what);
    end
  endtask

  int cfg_lo [NFRAMES] = '{20, 6, 12, 30, 8, 25, 15, 40};
  int cfg_hi [NFRAMES] = '{100, 40, 60, 200, 30, 90, 120, 160};
  int cfg_s  [NFRAMES] = '{0, 0, 1, 2, 0, 1, 0, 0};
  int cfg_t  [NFRAMES] = '{1023, 1023, 600, 900, 300, 1023, 250, 700};

  byte unsigned img [H][W];
  bit expm [H][W];
  bit got [H][W];

  task automatic make_frame(input int f);
    win5_t w;
    ref_dec_t d;
    for (int r = 0; r < H; r++)
      for (int c = 0; c < W; c++) begin
        automatic int v = 40 + f * 9 + $urandom_range(0, 5);
        if ((r - 12) * (r - 12) + (c - 14 - f) * (c - 14 - f) < 49) v = 170;
        if (c - r > 20 && c - r < 24) v = 110;
        if (r == 18 && c > 25) v = 220;
        if ($urandom_range(0, 99) == 0) v = 250;
        img[r][c] = 8'((v > 255) ? 255 : v);
        expm[r][c] = 0;
      end
    for (int r = 2; r < H - 2; r++)
      for (int c = 2; c < W - 2; c++) begin
        for (int y = 0; y < 5; y++) for (int x = 0; x < 5; x++) w[y][x] = img[r-2+y][c-2+x];
        d = decide(w, cfg_lo[f], cfg_hi[f], cfg_s[f], cfg_t[f]);
        if (d.mark) expm[r + d.dy][c + d.dx] = 1;
      end
  endtask

  int n_tabc = 0, n_tabc_off_frames = 0, n_marks = 0, n_acc = 0;

  always @(posedge clk) if (rst_n) begin
    if (in_valid && in_ready) n_acc++;
    if (out_valid && out_ready)
      for (int b = 0; b < OW; b++) got[out_row][int'(out_word) * OW + b] = out_data[b];
    if (dut.active && !dut.stage2 && dut.tabc_hit) n_tabc++;
    if (dut.edge_we) n_marks++;
  end

  always @(negedge clk) out_ready <= ($urandom_range(0, 3) != 0);

  initial begin
    repeat (3) @(negedge clk);
    rst_n = 1;
    for (int f = 0; f < NFRAMES; f++) begin
      automatic int tabc_before = n_tabc;
      automatic int th = (cfg_lo[f] + cfg_hi[f]) / 2;
      make_frame(f);
      lo = 9'(cfg_lo[f]); hi = 9'(cfg_hi[f]); s = 3'(cfg_s[f]); t = 10'(cfg_t[f]);
      for (int p = 0; p < W * H; p += 2) begin
        automatic int n0 = n_acc;
        @(negedge clk);
        in_valid = 1;
        in_data = {img[(p + 1) / W][(p + 1) % W], img[p / W][p % W]};
        while (n_acc == n0) @(negedge clk);
        in_valid = 0;
      end
      @(posedge frame_done);
      @(negedge clk);
      for (int r = 0; r < H; r++) for (int c = 0; c < W; c++)
        chk(got[r][c] == expm[r][c], $sformatf("frame %0d bit (%0d,%0d) got %0b exp %0b", f, r, c, got[r][c], expm[r][c]));
      if (th < 32) begin
        // K > 4: the shortcut has too few compare units and must stay off
        n_tabc_off_frames++;
        chk(n_tabc == tabc_before, $sformatf("frame %0d: shortcut fired with K > 4", f));
      end
    end
    $display("shortcut_hits=%0d frames_with_shortcut_off=%0d marks=%0d", n_tabc, n_tabc_off_frames, n_marks);
    chk(n_tabc > 0, "shortcut never used");
    chk(n_tabc_off_frames > 0, "no frame with the shortcut switched off");
    chk(n_marks > 0, "no edge marked");
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
