// column_rotator: puts the tentative word of the variable-node-shift decoder
// back in natural order.
//
// After k iterations every value has moved k positions along its base column,
// so variable node j of column i sits at position (j + k) mod Z. Given
// offset = k mod Z, this unit rotates each group of Z bits right by offset:
// out[i*Z+j] = in[i*Z + (j+offset) mod Z]. The document does not describe
// how the decoded word leaves the decoder; this combinational rotator is this
// design's choice. offset must be below Z.
module column_rotator #(
  parameter int Z  = 54,
  parameter int NC = 24,
  localparam int OW = (Z > 1) ? $clog2(Z) : 1
) (
  input  logic [NC*Z-1:0] in,
  input  logic [OW-1:0]   offset,
  output logic [NC*Z-1:0] out
);
  for (genvar i = 0; i < NC; i++) begin : g_col
    logic [2*Z-1:0] dbl;
    logic [OW:0]    idx;
    assign dbl = {in[i*Z +: Z], in[i*Z +: Z]};
    assign idx = {1'b0, offset};
    assign out[i*Z +: Z] = dbl[idx +: Z];
  end
endmodule
