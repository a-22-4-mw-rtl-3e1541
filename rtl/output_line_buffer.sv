// Output line buffer: four 1-bit line memories of edge flags with a DEMUX for
// marking and an X-BAR for reading out.
//
// The competition of a center pixel in row r may mark a pixel in row r-1, r
// or r+1, so three rows are open for marking while a fourth, finished row is
// sent out; image row n lives in memory n mod 4. A mark (set_en) sets bit
// set_col of memory set_slot on the rising edge; bits are only ever set, so
// marks from different centers simply accumulate. A read returns OW
// consecutive bits (word rd_word) of memory rd_slot combinationally; when
// rd_en is high the word is cleared on the same edge, leaving the memory
// clean for the row that reuses it. A mark and a clear of the same bit in the
// same clock never happen in the intended use; the clear would win. All
// memories are cleared by the asynchronous active-low reset.
module output_line_buffer #(
  parameter int IMG_W = 300,
  parameter int NLM   = 4,
  parameter int OW    = 10,
  localparam int CW   = $clog2(IMG_W),
  localparam int NWD  = (IMG_W + OW - 1) / OW,
  localparam int WDW  = (NWD > 1) ? $clog2(NWD) : 1,
  localparam int SW   = $clog2(NLM)
) (
  input  logic           clk,
  input  logic           rst_n,
  input  logic           set_en,
  input  logic [SW-1:0]  set_slot,
  input  logic [CW-1:0]  set_col,
  input  logic           rd_en,
  input  logic [SW-1:0]  rd_slot,
  input  logic [WDW-1:0] rd_word,
  output logic [OW-1:0]  rd_data
);

  logic [NWD*OW-1:0] bits [NLM];

  assign rd_data = bits[rd_slot][int'(rd_word)*OW +: OW];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int m = 0; m < NLM; m++) bits[m] <= '0;
    end else begin
      if (set_en) bits[set_slot][set_col] <= 1'b1;
      if (rd_en)  bits[rd_slot][int'(rd_word)*OW +: OW] <= '0;
    end
  end

endmodule
