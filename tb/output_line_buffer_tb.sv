// Self-checking testbench of the output line buffer (four 1-bit line
// memories, 10-bit word reads that clear) at a reduced width of 25 pixels,
// which leaves a partial last word. Random marks and reads are compared with
// a bit-array model; the reset clear is checked first.
module output_line_buffer_tb;
  localparam int W = 25, OW = 10, NWD = 3;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic set_en = 0, rd_en = 0;
  logic [1:0] set_slot = 0, rd_slot = 0;
  logic [4:0] set_col = 0;
  logic [1:0] rd_word = 0;
  logic [OW-1:0] rd_data;
  bit m [4][NWD*OW];

  output_line_buffer #(.IMG_W(W), .NLM(4), .OW(OW)) dut (.clk(clk), .rst_n(rst_n),
    .set_en(set_en), .set_slot(set_slot), .set_col(set_col), .rd_en(rd_en),
    .rd_slot(rd_slot), .rd_word(rd_word), .rd_data(rd_data));

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int i = 0; i < 20000; i++) begin
      @(negedge clk);
      set_en = 1'($urandom_range(0, 1));
      set_slot = 2'($urandom_range(0, 3));
      set_col = 5'($urandom_range(0, W - 1));
      rd_en = ($urandom_range(0, 3) == 0);
      rd_slot = 2'($urandom_range(0, 3));
      rd_word = 2'($urandom_range(0, NWD - 1));
      if (set_en && rd_en && set_slot == rd_slot) set_en = 0;
      #1;
      checks++;
      for (int b = 0; b < OW; b++)
        if (rd_data[b] != m[rd_slot][rd_word*OW + b]) begin
          failures++;
          $display("FAIL slot %0d word %0d bit %0d", rd_slot, rd_word, b);
          break;
        end
      @(posedge clk);
      if (set_en) m[set_slot][set_col] = 1;
      if (rd_en) for (int b = 0; b < OW; b++) m[rd_slot][rd_word*OW + b] = 0;
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
