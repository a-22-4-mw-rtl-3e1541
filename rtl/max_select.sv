// Max decision unit.
//
// Returns the index of the largest of N unsigned values. On a tie the lowest
// index wins, so the order of the inputs sets the priority: the classifier
// stage puts the background class first and the competition stage puts the
// center pixel first. The tie rule is this design's choice. Combinational.
module max_select #(
  parameter int N  = 6,
  parameter int VW = 10,
  localparam int IW = (N > 1) ? $clog2(N) : 1
) (
  input  logic [VW-1:0] vals [N],
  output logic [IW-1:0] idx,
  output logic [VW-1:0] max_val
);

  always_comb begin
    idx     = '0;
    max_val = vals[0];
    for (int i = 1; i < N; i++) begin
      if (vals[i] > max_val) begin
        max_val = vals[i];
        idx     = IW'(i);
      end
    end
  end

endmodule
