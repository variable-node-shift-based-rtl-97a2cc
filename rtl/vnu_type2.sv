// vnu_type2: non-flipping variable node unit of the VNSA-PGDBF decoder (the
// PGDBF VNU with its random input tied to 0).
//
// Like the type-1 unit it owns the B (tentative value v) and C (channel bit y)
// registers, which take the preceding unit's v_prev / y_prev on every shift
// (en=1) and the channel bit y_load on load. It still computes the energy
// e = (v xor y) + sum(cn) because the precise decoder's maximum finder looks
// at every variable node, but it has no comparator and no flip gate: the
// updated value bu is simply v. Reset, load and enable are this design's
// choices.
//
// Timing: v, y are register outputs; e is combinational from the registers
// and cn; bu equals v.
module vnu_type2 #(
  parameter int DV = 3,
  parameter int EW = vnsa_pkg::energy_width(DV)
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          load,
  input  logic          en,
  input  logic          y_load,
  input  logic          v_prev,
  input  logic          y_prev,
  input  logic [DV-1:0] cn,
  output logic          v,
  output logic          y,
  output logic          bu,
  output logic [EW-1:0] e
);
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      v <= 1'b0;
      y <= 1'b0;
    end else if (load) begin
      v <= y_load;
      y <= y_load;
    end else if (en) begin
      v <= v_prev;
      y <= y_prev;
    end
  end

  always_comb begin
    e = EW'(v ^ y);
    for (int d = 0; d < DV; d++) e += EW'(cn[d]);
  end

  assign bu = v;
endmodule
