// Self-checking testbench of the fuzzy classifier: random gradient vectors,
// class vectors, shifts and offsets against max(0, t - SAD * 2^s) in integers,
// including values that clamp to zero.
module fuzzy_classifier_tb;
  import cfed_pkg::*;
  int checks = 0, failures = 0, zeros = 0;
  logic clk = 0;
  always #5 clk = ~clk;
  gvec_t g, c;
  logic [SHW-1:0] s;
  memb_t t, u;
  fuzzy_classifier dut (.grad(g), .cvec(c), .shift(s), .offset(t), .memb(u));

  initial begin
    for (int i = 0; i < 5000; i++) begin
      automatic int sad = 0, exp;
      automatic int near = $urandom_range(0, 1);
      for (int d = 0; d < NDIR; d++) begin
        c[d] = 9'($urandom_range(0, 510));
        if (near) g[d] = 9'(int'(c[d]) + $urandom_range(0, 20) > 510 ? 510 : int'(c[d]) + $urandom_range(0, 20));
        else      g[d] = 9'($urandom_range(0, 510));
        sad += (g[d] > c[d]) ? int'(g[d]) - int'(c[d]) : int'(c[d]) - int'(g[d]);
      end
      s = 3'($urandom_range(0, 7));
      t = 10'($urandom_range(0, 1023));
      #1;
      exp = int'(t) - sad * (1 << int'(s));
      if (exp < 0) exp = 0;
      if (exp == 0) zeros++;
      checks++;
      if (int'(u) != exp) begin
        failures++;
        $display("FAIL sad=%0d s=%0d t=%0d got %0d exp %0d", sad, s, t, u, exp);
      end
    end
    checks++;
    if (zeros == 0 || zeros == 5000) begin
      failures++;
      $display("FAIL clamp coverage zeros=%0d", zeros);
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
