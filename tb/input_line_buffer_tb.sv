// Self-checking testbench of the input line buffer (six line memories, write
// DEMUX, rotating read X-Bar) at a reduced width of 24 pixels. Rows are
// written to random memories; then, for every base and many columns, the
// five window-row reads and the spare-memory read are compared with a model.
module input_line_buffer_tb;
  import cfed_pkg::*;
  localparam int W = 24;
  int checks = 0, failures = 0;
  logic clk = 0;
  always #5 clk = ~clk;
  logic we = 0;
  logic [2:0] wr_slot = 0, base = 0;
  logic [4:0] wr_col = 0, col_addr = 0, bot_addr = 0;
  pix_t wr_pix = 0, bot_out;
  pix_t col_out [WIN];
  int m [6][W];

  input_line_buffer #(.IMG_W(W)) dut (.clk(clk), .we(we), .wr_slot(wr_slot),
    .wr_col(wr_col), .wr_pix(wr_pix), .base(base), .col_addr(col_addr),
    .col_out(col_out), .bot_addr(bot_addr), .bot_out(bot_out));

  initial begin
    for (int round = 0; round < 20; round++) begin
      // write all memories, in a random order of memories
      for (int s = 0; s < 6; s++)
        for (int c = 0; c < W; c++) begin
          @(negedge clk);
          we = 1;
          wr_slot = 3'((s + round) % 6);
          wr_col = 5'(c);
          wr_pix = 8'($urandom);
          m[(s + round) % 6][c] = wr_pix;
        end
      @(negedge clk);
      we = 0;
      for (int b = 0; b < 6; b++)
        for (int k = 0; k < 40; k++) begin
          base = 3'(b);
          col_addr = 5'($urandom_range(0, W - 1));
          bot_addr = 5'($urandom_range(0, W - 1));
          #1;
          for (int j = 0; j < 5; j++) begin
            checks++;
            if (int'(col_out[j]) != m[(b + j) % 6][col_addr]) begin
              failures++;
              $display("FAIL base %0d row %0d col %0d", b, j, col_addr);
            end
          end
          checks++;
          if (int'(bot_out) != m[(b + 5) % 6][bot_addr]) begin
            failures++;
            $display("FAIL spare base %0d col %0d", b, bot_addr);
          end
        end
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
