// decode_ctrl: iteration control of the one-iteration-per-clock bit-flipping
// decoder.
//
// A start pulse (sampled on a rising clock edge) loads the channel word into
// the variable node registers (load=1 for that cycle) and enters RUN with the
// iteration count k = 0. In RUN, every cycle looks at the syndrome check:
// if all checks are satisfied, or k has reached ITMAX, decoding ends (DONE,
// success tells which); otherwise en=1 makes the variable node units store
// their updated values one position further along their base column, and k
// and the rotation offset (k mod Z) count up. These stop rules follow the
// document's algorithm; the state machine, the start/done handshake and the
// offset counter (used to put the output word back in order) are this
// design's own.
//
// Timing: with start sampled at edge 0, the word is loaded at edge 0,
// iteration k is done at edge k+1, and done rises at edge K+2 when decoding
// stops after K iterations. done, success, iters and offset hold until the
// next start. A start during RUN restarts decoding. The two assertions are
// switched off during reset; lint therefore sees rst_n used both as an
// asynchronous reset and as a synchronous signal, which is intended.
module decode_ctrl #(
  parameter int ITMAX = 300,
  parameter int Z     = 54,
  localparam int IW = $clog2(ITMAX + 1),
  localparam int OW = (Z > 1) ? $clog2(Z) : 1
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          start,    // begin decoding the word on the channel input
  input  logic          syn_ok,   // all parity checks satisfied
  output logic          load,     // write the channel word into B and C
  output logic          en,       // perform one iteration (shift + update)
  output logic          busy,     // decoding in progress
  output logic          done,     // decoding finished (level, until next start)
  output logic          success,  // finished on a zero syndrome
  output logic [IW-1:0] iters,    // iterations performed
  output logic [OW-1:0] offset    // iters mod Z: rotation of every base column
);
  typedef enum logic [1:0] {S_IDLE, S_RUN, S_DONE} state_t;
  state_t state;

  logic at_max;
  assign at_max = (iters == IW'(ITMAX));

  assign load = start;
  assign busy = (state == S_RUN);
  assign done = (state == S_DONE);
  assign en   = busy && !start && !syn_ok && !at_max;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state   <= S_IDLE;
      iters   <= '0;
      offset  <= '0;
      success <= 1'b0;
    end else if (start) begin
      state   <= S_RUN;
      iters   <= '0;
      offset  <= '0;
      success <= 1'b0;
    end else if (state == S_RUN) begin
      if (syn_ok) begin
        state   <= S_DONE;
        success <= 1'b1;
      end else if (at_max) begin
        state   <= S_DONE;
      end else begin
        iters  <= iters + 1'b1;
        offset <= (offset == OW'(Z - 1)) ? '0 : offset + 1'b1;
      end
    end
  end

  assert property (@(posedge clk) disable iff (!rst_n) iters <= IW'(ITMAX))
    else $error("iteration count beyond ITMAX");
  assert property (@(posedge clk) disable iff (!rst_n) offset < OW'(Z))
    else $error("rotation offset out of range");
endmodule
