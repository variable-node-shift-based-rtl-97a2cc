// cnu: check node unit. Its output is the parity (XOR) of the DC variable
// node values connected to it: 0 when the check is satisfied, 1 when not.
// Purely combinational; the document's CNU, nothing added.
module cnu #(
  parameter int DC = 6
) (
  input  logic [DC-1:0] v,  // values of the connected variable nodes
  output logic          c   // check value
);
  assign c = ^v;
endmodule
