// max_finder: maximum of NIN unsigned energy values of EW bits each.
//
// The energies of a bit-flipping decoder take only a handful of values
// (0..DV+1), so instead of a comparator tree this unit works level by level:
// for every level t = 1 .. 2^EW-1 it ORs the flags (e_k >= t) of all inputs
// (first within groups of 64 inputs, then across the groups),
// and the maximum is the highest level whose OR is set. Cost is one small
// comparator per input and level plus one wide OR per level. The document
// gives the function (the maximum over N energies, or over the p0*N type-1
// energies in the imprecise decoder) but not the circuit; this circuit is
// this design's choice. Purely combinational.
module max_finder #(
  parameter int NIN = 1296,
  parameter int EW  = 3
) (
  input  logic [NIN*EW-1:0] e,     // energies, input k at bits [k*EW +: EW]
  output logic [EW-1:0]     emax   // largest of them
);
  localparam int LEVELS = (1 << EW) - 1;

  localparam int G  = 64;                // inputs per group
  localparam int NG = (NIN + G - 1) / G;  // groups

  logic [LEVELS:1] grp_ge [NG];  // grp_ge[g][t]: some input of group g is >= t
  logic [LEVELS:1] any_ge;       // any_ge[t]: some input is >= t

  for (genvar g = 0; g < NG; g++) begin : g_grp
    localparam int CNT = (NIN - g * G < G) ? NIN - g * G : G;
    always_comb begin
      grp_ge[g] = '0;
      for (int k = 0; k < CNT; k++)
        for (int t = 1; t <= LEVELS; t++)
          if (e[(g*G + k)*EW +: EW] >= EW'(t)) grp_ge[g][t] = 1'b1;
    end
  end

  always_comb begin
    any_ge = '0;
    for (int g = 0; g < NG; g++) any_ge |= grp_ge[g];
    emax = '0;
    for (int t = 1; t <= LEVELS; t++)
      if (any_ge[t]) emax = EW'(t);
  end
endmodule
