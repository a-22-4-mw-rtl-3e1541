// Self-checking testbench of the max decision unit with six 10-bit inputs:
// random values and forced ties; the expected index is the first maximum.
module max_select_tb;
  int checks = 0, failures = 0;
  logic clk = 0;
  always #5 clk = ~clk;
  logic [9:0] v [6];
  logic [2:0] idx;
  logic [9:0] mx;
  max_select #(.N(6), .VW(10)) dut (.vals(v), .idx(idx), .max_val(mx));

  initial begin
    for (int i = 0; i < 5000; i++) begin
      automatic int ei = 0, ev;
      automatic int tie = $urandom_range(0, 2);
      for (int k = 0; k < 6; k++)
        v[k] = (tie == 0) ? 10'($urandom_range(0, 1023)) : 10'($urandom_range(0, 3));
      ev = v[0];
      for (int k = 1; k < 6; k++) if (int'(v[k]) > ev) begin ev = v[k]; ei = k; end
      #1;
      checks++;
      if (int'(idx) != ei || int'(mx) != ev) begin
        failures++;
        $display("FAIL got idx %0d max %0d exp %0d %0d", idx, mx, ei, ev);
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
