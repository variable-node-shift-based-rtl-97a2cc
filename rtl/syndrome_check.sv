// syndrome_check: reports whether every parity check of the code is
// satisfied, i.e. whether the current tentative word is a codeword. It takes
// the M check values from the check node units (1 = unsatisfied) and ORs
// them; ok is 1 when none is set. The order of the check values does not
// matter, so it works on the rotated check vector of the variable-node-shift
// decoder unchanged. Purely combinational.
module syndrome_check #(
  parameter int M = 648
) (
  input  logic [M-1:0] c,   // check values
  output logic         ok   // 1: all checks satisfied
);
  assign ok = ~|c;
endmodule
