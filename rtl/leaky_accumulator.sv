// leaky_accumulator: multiplier-free weighted time surface of one synapse.
//
// On an event the synapse output jumps to C*w, C = 2^N_BITS - 1, and decays
// back to zero. The product is never formed with a multiplier:
//   * DECAY_LINEAR (main configuration): the register U2 is loaded with
//     w << N_BITS. The output is U2 - w, and every following clock U2 is
//     reduced by w until the output reaches zero, so the output after k clocks
//     is (2^N_BITS - (k+1)) * w = (C - k) * w, exactly what a decay counter
//     times a weight multiplier gives.
//   * DECAY_EXP: the register is loaded with (w << N_BITS) - w = C*w and
//     shifted right one place per clock, giving (C*w) >> k.
// The shift-and-subtract scheme and the two decay shapes follow the
// multiplier-free ODESA synapse; the 8-bit default widths are own choices.
// Beside the weighted value an N_BITS decay counter (C - k, or C >> k) holds
// the unweighted time surface, which the training module reads.
//
// The weight is captured when the event arrives and used for the whole decay,
// so a weight update during a decay cannot leave a residue: this capture is
// this design's own choice. A new event restarts the decay from C*w.
//
// Timing: `ev` at clock edge t, `wout` = C*w and `count` = C from edge t+1.
module leaky_accumulator
  import odesa_pkg::*;
#(
  parameter int     N_BITS = 8,
  parameter int     W_BITS = 8,
  parameter decay_e DECAY  = DECAY_LINEAR
) (
  input  logic                     clk,
  input  logic                     rst_n,
  input  logic                     ev,      // one-cycle event pulse
  input  logic [W_BITS-1:0]        weight,  // current synapse weight
  output logic [N_BITS-1:0]        count,   // unweighted decay counter
  output logic [W_BITS+N_BITS-1:0] wout     // weighted synapse output
);
  localparam int A_BITS = W_BITS + N_BITS;
  localparam logic [N_BITS-1:0] C = '1;

  logic [A_BITS-1:0] u2;       // shift/subtract register
  logic [A_BITS-1:0] w_q;      // weight captured at the event, zero-extended
  logic [A_BITS-1:0] w_ext;
  logic [A_BITS-1:0] w_shl;

  assign w_ext = A_BITS'(weight);
  assign w_shl = w_ext << N_BITS;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      u2    <= '0;
      w_q   <= '0;
      count <= '0;
    end else if (ev) begin
      w_q   <= w_ext;
      count <= C;
      if (DECAY == DECAY_LINEAR) u2 <= w_shl;
      else                       u2 <= w_shl - w_ext;
    end else begin
      if (DECAY == DECAY_LINEAR) begin
        if (u2 != w_q) u2 <= u2 - w_q;
        if (count != '0) count <= count - 1'b1;
      end else begin
        u2    <= u2 >> 1;
        count <= count >> 1;
      end
    end
  end

  always_comb begin
    if (DECAY == DECAY_LINEAR) wout = u2 - w_q;
    else                       wout = u2;
  end
endmodule
