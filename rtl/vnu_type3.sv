// vnu_type3: variable node unit of the imprecise decoder (VNSA-IM-PGDBF).
//
// It replaces the type-2 unit and keeps nothing but its two memory elements:
// B (tentative value v) and C (channel bit y). It computes no energy, so the
// maximum finder of the imprecise decoder does not see the nodes it holds;
// the value it passes on (bu) is v unchanged. On a shift (en=1) it stores the
// preceding unit's v_prev / y_prev, on load the channel bit y_load. Reset,
// load and enable are this design's choices.
//
// Timing: v, y are register outputs, bu equals v.
module vnu_type3 (
  input  logic clk,
  input  logic rst_n,
  input  logic load,
  input  logic en,
  input  logic y_load,
  input  logic v_prev,
  input  logic y_prev,
  output logic v,
  output logic y,
  output logic bu
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

  assign bu = v;
endmodule
