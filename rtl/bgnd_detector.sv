// Background (BGND) pixel detector with threshold adaptive bit control (TABC).
//
// A pixel whose 3x3 neighbourhood P1..P9 agrees in its K most significant
// bits has |P5 - Pi| < 2^(8-K) for every neighbour, so each directional
// gradient is below 2^(9-K). K is chosen from the thresholds as
//   K = 9 - floor(log2((Lo + Hi) / 2)),
// which makes 2^(9-K) <= (Lo+Hi)/2: every gradient then lies on the Lo side
// of the midpoint between the Lo and Hi class centres, so the pixel is
// certainly classified BGND. The test is sufficient, never a false positive.
//
// One bit-compare unit per MSB (unit 0 checks bit 7, unit 1 bit 6, ...)
// XORs that bit of each pixel with the center's bit and ANDs the results.
// Units at or beyond K are switched off: their pixel bits are gated to zero
// so the LSB logic does not toggle, and a multiplexer feeds a constant 1 to
// the final AND in their place. NUM_UNITS defaults to the four units shown in
// the published detector diagram; when the thresholds ask for more MSBs than
// there are units (small thresholds), or (Lo+Hi)/2 is zero, the detector
// reports nothing and the full classifier decides. That fallback is this
// design's choice. Combinational.
module bgnd_detector
  import cfed_pkg::*;
#(
  parameter int NUM_UNITS = 4
) (
  input  pix_t        pix [9],     // P1..P9 in raster order, pix[4] = center
  input  grad_t       lo,
  input  grad_t       hi,
  output logic [3:0]  k,
  output logic        bgnd
);

  logic [GW:0]    sum;             // Lo + Hi
  grad_t          th;
  logic [3:0]     lg;              // floor(log2(th))
  logic           k_ok;
  logic [NUM_UNITS-1:0] unit_en, unit_out;

  always_comb begin
    sum = {1'b0, lo} + {1'b0, hi};
    th  = GW'(sum >> 1);
    lg  = '0;
    for (int b = 0; b < GW; b++)
      if (th[b]) lg = 4'(b);
    k    = 4'(GW) - lg;
    k_ok = (th != '0) && (int'(k) <= NUM_UNITS);
  end

  for (genvar u = 0; u < NUM_UNITS; u++) begin : g_unit
    localparam int B = PW - 1 - u;  // bit examined by this unit
    logic [8:0] bits;
    logic       same;
    always_comb begin
      unit_en[u] = k_ok && (u < int'(k));
      for (int i = 0; i < 9; i++) bits[i] = pix[i][B] & unit_en[u];
      same = 1'b1;
      for (int i = 0; i < 9; i++) same &= ~(bits[i] ^ bits[4]);
      unit_out[u] = unit_en[u] ? same : 1'b1;
    end
  end

  assign bgnd = k_ok & (&unit_out);

endmodule
