// Input line buffer: six 8-bit line memories with a write DEMUX and a read
// X-Bar.
//
// Five line memories feed the five rows of the 5x5 window; the sixth is
// filled with the next image row while the window scans the current band, so
// the row fetch is hidden behind the scan. Image row n always lives in line
// memory n mod 6, so the roles rotate by one memory per band.
//
// Write: when we is high, wr_pix is stored in memory wr_slot at column
// wr_col on the rising edge (the DEMUX).
// Read (the X-Bar): base names the memory holding window row 0. col_out[j]
// is column col_addr of memory (base + j) mod 6, the column that enters the
// window when it moves sideways. bot_out is column bot_addr of the spare
// memory (base + 5) mod 6, used to refill the bottom row when the window
// steps down. Reads are combinational.
module input_line_buffer
  import cfed_pkg::*;
#(
  parameter int IMG_W = 300,
  parameter int NLM   = 6,
  localparam int CW   = $clog2(IMG_W)
) (
  input  logic          clk,
  input  logic          we,
  input  logic [2:0]    wr_slot,
  input  logic [CW-1:0] wr_col,
  input  pix_t          wr_pix,
  input  logic [2:0]    base,
  input  logic [CW-1:0] col_addr,
  output pix_t          col_out [WIN],
  input  logic [CW-1:0] bot_addr,
  output pix_t          bot_out
);

  logic [CW-1:0] raddr [NLM];
  pix_t          rdata [NLM];

  for (genvar m = 0; m < NLM; m++) begin : g_lm
    // logical window row served by this memory
    logic [2:0] lrow;
    always_comb begin
      lrow     = 3'((m + NLM - int'(base)) % NLM);
      raddr[m] = (lrow == 3'(NLM - 1)) ? bot_addr : col_addr;
    end
    line_memory #(.DEPTH(IMG_W), .DW(PW)) u_lm (
      .clk(clk), .we(we && (wr_slot == 3'(m))), .waddr(wr_col), .wdata(wr_pix),
      .raddr(raddr[m]), .rdata(rdata[m]));
  end

  always_comb begin
    for (int j = 0; j < WIN; j++) col_out[j] = rdata[(int'(base) + j) % NLM];
    bot_out = rdata[(int'(base) + NLM - 1) % NLM];
  end

endmodule
