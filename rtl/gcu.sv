// Gradient calculation unit (GCU).
//
// Computes the gradient of a center pixel along one direction as the sum of
// its absolute differences with the two pixels on either side:
// grad = |pc - pa| + |pc - pb|. Each absolute difference is formed the way a
// carry generator and XOR row do it: pc + ~px + 1 gives the difference and
// its sign (the carry); when pc < px the difference is complemented and 1 is
// added back, which the final adder absorbs through its carry inputs.
// Purely combinational, no latency. Structure follows the unit's published
// block diagram; the bit-level form of the carry handling is this design's.
module gcu
  import cfed_pkg::*;
(
  input  pix_t  pc,
  input  pix_t  pa,
  input  pix_t  pb,
  output grad_t grad
);

  logic [PW:0] da, db;         // pc - px with carry out in the top bit
  logic        ca, cb;         // carry: 1 when pc >= px
  logic [PW-1:0] ma, mb;       // magnitudes before the +1 correction

  always_comb begin
    da = {1'b0, pc} + {1'b0, ~pa} + (PW+1)'(1);
    db = {1'b0, pc} + {1'b0, ~pb} + (PW+1)'(1);
    ca = da[PW];
    cb = db[PW];
    // XOR row: keep the difference when pc >= px, complement it otherwise.
    ma = da[PW-1:0] ^ {PW{~ca}};
    mb = db[PW-1:0] ^ {PW{~cb}};
    // Adder: the two +1 corrections enter as carry-ins.
    grad = GW'(ma) + GW'(mb) + {{(GW-1){1'b0}}, ~ca} + {{(GW-1){1'b0}}, ~cb};
  end

endmodule
