// vnsa_pgdbf_decoder: probabilistic gradient-descent bit-flipping (PGDBF)
// decoder for a regular QC-LDPC code on the binary symmetric channel, built
// on the variable-node-shift architecture (VNSA). One decoding iteration
// takes one clock cycle (flooding schedule).
//
// PGDBF flips, in every iteration, the variable nodes whose energy
// E = (v xor y) + (number of unsatisfied checks) equals the maximum energy,
// but each only with probability p0. Here no random source exists. Instead,
// each base column holds Z variable node units of two kinds: round(p0*Z)
// type-1 units, which flip when E equals the maximum, and the rest, which
// never flip. After every iteration each unit hands its updated value and
// its channel bit to the next unit of the same column (position j to
// (j+1) mod Z), so a variable node meets a different unit, and thus a
// different "random" decision, in every iteration. Because all columns move
// alike, the fixed connection networks still bring every node its own
// checks; only the positions are rotated.
//
// IMPRECISE = 0 builds VNSA-PGDBF: the non-flipping units are type 2, which
// still compute their energy, and the maximum finder sees all N energies.
// IMPRECISE = 1 builds VNSA-IM-PGDBF: they are type 3 (registers only) and
// the maximum is taken over the type-1 energies alone. P0_PCT = 100 gives a
// plain GDBF decoder on the same architecture.
//
// Interface: pulse start for one cycle with the received word on y_in
// (bit i*Z+j is node j of base column i). The decoder loads it, iterates
// until every parity check holds or ITMAX iterations are done, then raises
// done (held until the next start) with success = 1 if the syndrome is zero.
// codeword holds the tentative word in natural order at all times; iters the
// iterations performed. With start sampled at edge 0, done rises at edge
// iters+2.
//
// Follows the document: the unit types, the shift connection, the maximum
// finder inputs, the stop rule, the defaults (Z = 54, 24 x 12 base matrix,
// dv = 3, p0 = 0.7, 300 iterations). This design's own choices: the base
// matrix itself (vnsa_pkg), the placement of the unit types, the maximum
// finder circuit, the control handshake and the output rotator.
module vnsa_pgdbf_decoder #(
  parameter int Z         = 54,   // circulant size
  parameter int NC        = 24,   // base columns
  parameter int NR        = 12,   // base rows
  parameter int DV        = 3,    // variable node degree
  parameter int P0_PCT    = 70,   // share of type-1 units per column, percent
  parameter int ITMAX     = 300,  // maximum number of iterations
  parameter bit IMPRECISE = 1'b0, // 0: VNSA-PGDBF, 1: VNSA-IM-PGDBF
  localparam int N  = NC * Z,
  localparam int M  = NR * Z,
  localparam int IW = $clog2(ITMAX + 1)
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          start,
  input  logic [N-1:0]  y_in,
  output logic [N-1:0]  codeword,
  output logic          busy,
  output logic          done,
  output logic          success,
  output logic [IW-1:0] iters
);
  import vnsa_pkg::*;

  localparam int EW  = energy_width(DV);
  localparam int N1  = n_type1(Z, P0_PCT);          // type-1 units per column
  localparam int NMF = IMPRECISE ? NC * N1 : N;     // maximum finder inputs
  localparam int OW  = (Z > 1) ? $clog2(Z) : 1;

  logic [N-1:0]    v;       // B registers (rotated order)
  logic [N-1:0]    y;       // C registers (rotated order)
  logic [N-1:0]    bu;      // updated values
  logic [M-1:0]    c;       // check values
  logic [N*DV-1:0] cn;      // check values per variable position
  logic [NMF*EW-1:0] e_mf;  // energies seen by the maximum finder
  logic [EW-1:0]   emax;
  logic            syn_ok, load, en;
  logic [OW-1:0]   offset;

  // Variable node units, chained per base column.
  for (genvar i = 0; i < NC; i++) begin : g_col
    for (genvar j = 0; j < Z; j++) begin : g_pos
      localparam int P    = i * Z + j;
      localparam int PREV = i * Z + (j + Z - 1) % Z;
      if (is_type1(i, j, Z, P0_PCT)) begin : g_t1
        localparam int K = IMPRECISE ? i * N1 + type1_rank(i, j, Z, P0_PCT) : P;
        vnu_type1 #(.DV(DV), .EW(EW)) u_vnu (
          .clk, .rst_n, .load, .en,
          .y_load(y_in[P]), .v_prev(bu[PREV]), .y_prev(y[PREV]),
          .cn(cn[P*DV +: DV]), .emax,
          .v(v[P]), .y(y[P]), .bu(bu[P]), .e(e_mf[K*EW +: EW]));
      end else if (!IMPRECISE) begin : g_t2
        vnu_type2 #(.DV(DV), .EW(EW)) u_vnu (
          .clk, .rst_n, .load, .en,
          .y_load(y_in[P]), .v_prev(bu[PREV]), .y_prev(y[PREV]),
          .cn(cn[P*DV +: DV]),
          .v(v[P]), .y(y[P]), .bu(bu[P]), .e(e_mf[P*EW +: EW]));
      end else begin : g_t3
        vnu_type3 u_vnu (
          .clk, .rst_n, .load, .en,
          .y_load(y_in[P]), .v_prev(bu[PREV]), .y_prev(y[PREV]),
          .v(v[P]), .y(y[P]), .bu(bu[P]));
      end
    end
  end

  check_node_array #(.Z(Z), .NC(NC), .NR(NR), .DV(DV)) u_cna (
    .v, .c, .cn);

  max_finder #(.NIN(NMF), .EW(EW)) u_mf (.e(e_mf), .emax);

  syndrome_check #(.M(M)) u_syn (.c, .ok(syn_ok));

  decode_ctrl #(.ITMAX(ITMAX), .Z(Z)) u_ctrl (
    .clk, .rst_n, .start, .syn_ok, .load, .en, .busy, .done, .success,
    .iters, .offset);

  column_rotator #(.Z(Z), .NC(NC)) u_rot (.in(v), .offset, .out(codeword));
endmodule
