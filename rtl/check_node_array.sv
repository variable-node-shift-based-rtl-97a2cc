// check_node_array: connection network 1, the M check node units and
// connection network 2 of a quasi-cyclic LDPC decoder.
//
// Base circulant e of base column i sits in base row a = base_row(i,e) with
// shift s = base_shift(i,e) (see vnsa_pkg). For that circulant, check node b
// of row a is connected to variable node (b + s) mod Z of column i.
// Connection network 1 therefore picks, for each check node unit, the group
// of Z values of every base column present in its base row and rotates it by
// s; connection network 2 rotates each group of Z check values back by s and
// hands variable position j the check value of unit (j - s) mod Z. Both
// networks are fixed wiring; the only logic is the CNUs' XORs.
//
// In the variable-node-shift decoder the inputs are rotated by the number of
// iterations done so far; because every column is rotated alike, each CNU
// then computes the check of a rotated index and network 2 routes it back to
// the position that now holds the right variable node (the document's
// argument in its description of the architecture). This module does not
// need to know the rotation.
//
// Interface: v[i*Z+j] is the value at position j of base column i;
// c[a*Z+b] is the output of CNU b of base row a; cn[(i*Z+j)*DV+e] is the
// check value position j of column i receives on its e-th edge.
// Purely combinational.
module check_node_array #(
  parameter int Z  = 54,
  parameter int NC = 24,
  parameter int NR = 12,
  parameter int DV = 3,
  localparam int DC = DV * NC / NR,
  localparam int N  = NC * Z,
  localparam int M  = NR * Z
) (
  input  logic [N-1:0]    v,
  output logic [M-1:0]    c,
  output logic [N*DV-1:0] cn
);
  import vnsa_pkg::*;

  // Connection network 1 and the CNUs.
  for (genvar a = 0; a < NR; a++) begin : g_row
    for (genvar b = 0; b < Z; b++) begin : g_cnu
      logic [DC-1:0] vin;
      for (genvar d = 0; d < DC; d++) begin : g_edge
        localparam int I = row_col(a, d, NC, NR, DV);
        localparam int E = row_edge(a, d, NC, NR, DV);
        localparam int S = base_shift(I, E, Z);
        assign vin[d] = v[I*Z + (b + S) % Z];
      end
      cnu #(.DC(DC)) u_cnu (.v(vin), .c(c[a*Z + b]));
    end
  end

  // Connection network 2.
  for (genvar i = 0; i < NC; i++) begin : g_col
    for (genvar j = 0; j < Z; j++) begin : g_vn
      for (genvar e = 0; e < DV; e++) begin : g_edge
        localparam int A = base_row(i, e, NR);
        localparam int S = base_shift(i, e, Z);
        assign cn[(i*Z + j)*DV + e] = c[A*Z + (j - S + Z) % Z];
      end
    end
  end
endmodule
