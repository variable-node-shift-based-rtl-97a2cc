// vnu_type1: flipping variable node unit of the VNSA-PGDBF decoder (the GDBF
// VNU, i.e. the PGDBF VNU with its random input tied to 1).
//
// The unit owns two one-bit registers: B holds the tentative value v of the
// variable node it currently processes and C that node's channel bit y. Each
// clock with en=1 the registers take the values of the preceding unit of the
// same base column (v_prev, y_prev): this is the variable-node shift, which
// moves every node one position along its column per iteration. load=1
// instead writes the channel bit y_load into both registers.
//
// Combinationally the unit forms the energy e = (v xor y) + sum(cn), where
// cn are the DV check values routed to this position, and the updated value
// bu = v xor (e == emax), which the next unit stores. Both follow the
// document's VNU; the synchronous load, the enable and the active-low reset
// to 0 are this design's choices.
//
// Timing: v, y are register outputs; e and bu are combinational from the
// registers, cn and emax. One iteration per clock.
module vnu_type1 #(
  parameter int DV = 3,
  parameter int EW = vnsa_pkg::energy_width(DV)
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          load,     // write y_load into B and C
  input  logic          en,       // shift: take v_prev / y_prev
  input  logic          y_load,   // channel bit for this position
  input  logic          v_prev,   // updated value of the preceding unit
  input  logic          y_prev,   // channel bit of the preceding unit
  input  logic [DV-1:0] cn,       // check values from connection network 2
  input  logic [EW-1:0] emax,     // maximum energy from the maximum finder
  output logic          v,        // current value (to connection network 1)
  output logic          y,        // channel bit (to the next unit)
  output logic          bu,       // updated value (to the next unit)
  output logic [EW-1:0] e         // energy (to the maximum finder)
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

  assign bu = v ^ (e == emax);
endmodule
