// Self-checking testbench of the gradient calculation unit: corner values and
// random triples against |pc-pa| + |pc-pb| computed with integers.
module gcu_tb;
  import cfed_pkg::*;
  int checks = 0, failures = 0;
  logic clk = 0;
  always #5 clk = ~clk;
  pix_t pc, pa, pb;
  grad_t grad;
  gcu dut (.pc(pc), .pa(pa), .pb(pb), .grad(grad));

  task automatic check(input int c, input int a, input int b);
    int exp;
    pc = 8'(c); pa = 8'(a); pb = 8'(b);
    #1;
    exp = ((c > a) ? c - a : a - c) + ((c > b) ? c - b : b - c);
    checks++;
    if (int'(grad) != exp) begin
      failures++;
      $display("FAIL gcu pc=%0d pa=%0d pb=%0d got %0d exp %0d", c, a, b, grad, exp);
    end
  endtask

  initial begin
    check(0, 0, 0); check(255, 0, 0); check(0, 255, 255); check(128, 127, 129);
    check(255, 255, 0); check(7, 7, 7);
    for (int i = 0; i < 5000; i++)
      check($urandom_range(0, 255), $urandom_range(0, 255), $urandom_range(0, 255));
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
