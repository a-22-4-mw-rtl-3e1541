// One line memory: DEPTH words of DW bits holding one image row.
//
// One write port (written on the rising edge when we is high) and one read
// port whose data follows the address in the same clock (register-file
// style). No reset: a word is always written before it is read.
module line_memory #(
  parameter int DEPTH = 300,
  parameter int DW    = 8,
  localparam int AW   = $clog2(DEPTH)
) (
  input  logic          clk,
  input  logic          we,
  input  logic [AW-1:0] waddr,
  input  logic [DW-1:0] wdata,
  input  logic [AW-1:0] raddr,
  output logic [DW-1:0] rdata
);

  logic [DW-1:0] mem [DEPTH];

  always_ff @(posedge clk)
    if (we) mem[waddr] <= wdata;

  assign rdata = mem[raddr];

endmodule
