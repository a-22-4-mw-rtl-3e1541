// Self-checking testbench of the memory controller at a reduced image of
// 20x12 pixels (two 10-bit output words per row), over two frames. The scan
// is modelled: the center row advances when the rows it needs are in, and
// bands finish at random times. Checks on the input side: every line-memory
// write goes to memory row mod 6 at the right column with the right pixel
// (low byte of a word first), in raster order, and never to a row beyond
// center row + 3. On the output side: words leave in row and word order, only
// from finished rows, read from memory row mod 4, with the data the output
// memory model returns. Random valid/ready on both streams; counts stalls.
module memory_controller_tb;
  localparam int W = 20, H = 12, OW = 10;
  int checks = 0, failures = 0, n_in_stall = 0, n_out_stall = 0, n_frames = 0;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic in_valid = 0, in_ready, lm_we, ob_rd_en, out_valid, out_ready = 0;
  logic [15:0] in_data = 0;
  logic [2:0] lm_slot;
  logic [4:0] lm_col;
  logic [7:0] lm_pix;
  logic [1:0] ob_rd_slot;
  logic ob_rd_word, out_word;
  logic [OW-1:0] ob_rd_data, out_data;
  logic [3:0] out_row, cur_row = 2, last_done_row = 1, rows_in, rows_out;
  logic all_done = 0, frame_done;

  memory_controller #(.IMG_W(W), .IMG_H(H), .OW(OW)) dut (.clk(clk), .rst_n(rst_n),
    .in_valid(in_valid), .in_ready(in_ready), .in_data(in_data),
    .lm_we(lm_we), .lm_slot(lm_slot), .lm_col(lm_col), .lm_pix(lm_pix),
    .ob_rd_en(ob_rd_en), .ob_rd_slot(ob_rd_slot), .ob_rd_word(ob_rd_word),
    .ob_rd_data(ob_rd_data), .out_valid(out_valid), .out_ready(out_ready),
    .out_data(out_data), .out_row(out_row), .out_word(out_word),
    .cur_row(cur_row), .last_done_row(last_done_row), .all_done(all_done),
    .frame_done(frame_done), .rows_in(rows_in), .rows_out(rows_out));

  function automatic int pix(input int frame, input int idx);
    return (idx * 7 + frame * 31 + idx / 13) & 255;
  endfunction

  task automatic chk(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s", what);
    end
  endtask

  // output memory model: data depends on the slot and word read
  assign ob_rd_data = OW'(int'(ob_rd_slot) * 100 + int'(ob_rd_word) * 7 + n_frames * 3 + 1);
  assign frame_done = all_done && (int'(rows_out) == H);

  int in_word = 0, exp_pix = 0, exp_row = 0, exp_word = 0, frame = 0;

  always @(posedge clk) if (rst_n) begin
    // input side
    if (in_valid && !in_ready) n_in_stall++;
    if (lm_we) begin
      automatic int r = exp_pix / W, c = exp_pix % W;
      chk(int'(lm_slot) == r % 6 && int'(lm_col) == c && int'(lm_pix) == pix(frame, exp_pix),
          $sformatf("write #%0d slot %0d col %0d pix %0d", exp_pix, lm_slot, lm_col, lm_pix));
      chk(r <= int'(cur_row) + 3, "row written too early");
      exp_pix++;
    end
    if (in_valid && in_ready) begin
      in_word++;
      in_valid <= 0;
    end
    // output side
    if (out_valid && !out_ready) n_out_stall++;
    if (out_valid) begin
      chk(exp_row + 1 <= int'(last_done_row) || all_done, "row sent before it was final");
      chk(int'(out_row) == exp_row && int'(out_word) == exp_word, "output order");
    end
    if (ob_rd_en) begin
      chk(int'(ob_rd_slot) == exp_row % 4, "output memory slot");
      chk(out_data == OW'((exp_row % 4) * 100 + exp_word * 7 + n_frames * 3 + 1), "output data");
      exp_word++;
      if (exp_word == 2) begin exp_word = 0; exp_row++; end
    end
    // scan model
    if (frame_done) begin
      n_frames++;
      frame++;
      exp_pix = 0; exp_row = 0; exp_word = 0; in_word = 0;
      cur_row <= 2; last_done_row <= 1; all_done <= 0;
    end else if (!all_done && int'(rows_in) >= int'(cur_row) + 3 && $urandom_range(0, 9) == 0) begin
      last_done_row <= cur_row;
      if (int'(cur_row) == H - 3) all_done <= 1;
      else cur_row <= cur_row + 1;
    end
  end

  // stream drivers
  always @(negedge clk) if (rst_n) begin
    out_ready <= ($urandom_range(0, 2) != 0);
    if (!in_valid && in_word < W * H / 2 && $urandom_range(0, 3) != 0) begin
      in_valid <= 1;
      in_data <= {8'(pix(frame, 2 * in_word + 1)), 8'(pix(frame, 2 * in_word))};
    end
  end

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1;
    wait (n_frames == 2);
    @(negedge clk);
    $display("in_stalls=%0d out_stalls=%0d", n_in_stall, n_out_stall);
    chk(exp_pix == 0, "all pixels written");
    chk(n_in_stall > 0 && n_out_stall > 0, "stalls on both streams");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
