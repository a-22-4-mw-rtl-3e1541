// Self-checking testbench of the BGND detector with threshold adaptive bit
// control. For random near-flat and random 3x3 patches and random thresholds
// it checks K = 9 - floor(log2((Lo+Hi)/2)), the detector output against an
// integer model (K <= 4 and the top K bits of all nine pixels equal), and
// that every detected pixel has all four gradients below (Lo+Hi)/2, which is
// what makes the shortcut safe.
module bgnd_detector_tb;
  import cfed_pkg::*;
  int checks = 0, failures = 0, hits = 0;
  logic clk = 0;
  always #5 clk = ~clk;
  pix_t pix [9];
  grad_t lo, hi;
  logic [3:0] k;
  logic bgnd;
  bgnd_detector #(.NUM_UNITS(4)) dut (.pix(pix), .lo(lo), .hi(hi), .k(k), .bgnd(bgnd));

  function automatic int gabs(input int v);
    return v < 0 ? -v : v;
  endfunction

  initial begin
    for (int i = 0; i < 20000; i++) begin
      int th, ek, lg, base, spread, eb, gmax;
      base = $urandom_range(0, 255);
      spread = (i % 3 == 0) ? 255 : $urandom_range(0, 40);
      for (int p = 0; p < 9; p++) begin
        automatic int v = base + $urandom_range(0, spread) - spread / 2;
        pix[p] = 8'((v < 0) ? 0 : (v > 255) ? 255 : v);
      end
      lo = 9'($urandom_range(0, 200));
      hi = 9'(int'(lo) + $urandom_range(0, 300));
      if (i < 5) begin lo = 0; hi = 0; end
      #1;
      th = (int'(lo) + int'(hi)) / 2;
      lg = 0;
      for (int b = 0; b < 9; b++) if (th >= (1 << b)) lg = b;
      ek = 9 - lg;
      eb = (th > 0) && (ek <= 4);
      for (int p = 0; p < 9; p++)
        if ((int'(pix[p]) >> (8 - ek)) != (int'(pix[4]) >> (8 - ek))) eb = 0;
      checks++;
      if (th > 0 && int'(k) != ek) begin
        failures++;
        $display("FAIL K lo=%0d hi=%0d got %0d exp %0d", lo, hi, k, ek);
      end
      checks++;
      if (bgnd != eb[0]) begin
        failures++;
        $display("FAIL bgnd lo=%0d hi=%0d got %0b exp %0b", lo, hi, bgnd, eb[0]);
      end
      if (bgnd) begin
        hits++;
        gmax = 0;
        // directions through the center: (3,5) (1,7) (0,8) (2,6)
        gmax = gabs(pix[4]-pix[3]) + gabs(pix[4]-pix[5]);
        if (gabs(pix[4]-pix[1]) + gabs(pix[4]-pix[7]) > gmax) gmax = gabs(pix[4]-pix[1]) + gabs(pix[4]-pix[7]);
        if (gabs(pix[4]-pix[0]) + gabs(pix[4]-pix[8]) > gmax) gmax = gabs(pix[4]-pix[0]) + gabs(pix[4]-pix[8]);
        if (gabs(pix[4]-pix[2]) + gabs(pix[4]-pix[6]) > gmax) gmax = gabs(pix[4]-pix[2]) + gabs(pix[4]-pix[6]);
        checks++;
        if (gmax >= th) begin
          failures++;
          $display("FAIL unsafe detection gmax=%0d th=%0d", gmax, th);
        end
      end
    end
    checks++;
    if (hits < 100) begin
      failures++;
      $display("FAIL only %0d detections", hits);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (1000000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
