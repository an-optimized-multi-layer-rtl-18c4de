// synapse: one synapse of an ODESA neuron.
//
// The input event is synchronized into the layer clock (spike_sync), drives
// the multiplier-free leaky accumulator, and the accumulator's decay counter
// is copied every clock into a trace register. `wout` is the weighted synapse
// output that the neuron sums; `trace` is the unweighted time surface that the
// training module uses. The weight itself lives in the layer's training
// module and arrives on `weight`. This composition follows the ODESA synapse;
// latching the unweighted counter (rather than the weighted value) as the
// trace is this design's reading of what the training module needs.
//
// Timing: `ev` pulses three clocks after the input rises; `wout` carries C*w
// from the clock after `ev`; `trace` follows the decay counter one clock
// later.
module synapse
  import odesa_pkg::*;
#(
  parameter int     N_BITS = 8,
  parameter int     W_BITS = 8,
  parameter decay_e DECAY  = DECAY_LINEAR
) (
  input  logic                     clk,
  input  logic                     rst_n,
  input  logic                     spike_in,  // asynchronous input event
  input  logic [W_BITS-1:0]        weight,
  output logic                     ev,        // synchronized event pulse
  output logic [W_BITS+N_BITS-1:0] wout,      // weighted output
  output logic [N_BITS-1:0]        trace      // trace register
);
  logic [N_BITS-1:0] count;

  spike_sync u_sync (
    .clk      (clk),
    .rst_n    (rst_n),
    .spike_in (spike_in),
    .ev       (ev)
  );

  leaky_accumulator #(
    .N_BITS (N_BITS),
    .W_BITS (W_BITS),
    .DECAY  (DECAY)
  ) u_acc (
    .clk    (clk),
    .rst_n  (rst_n),
    .ev     (ev),
    .weight (weight),
    .count  (count),
    .wout   (wout)
  );

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) trace <= '0;
    else        trace <= count;
  end
endmodule
