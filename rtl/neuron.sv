// neuron: an ODESA neuron with N_SYN multiplier-free synapses.
//
// Each input channel has its own synapse. The weighted synapse outputs are
// added every clock into the registered membrane potential `potential`, and
// `above` tells whether that potential exceeds the neuron's threshold. The
// weights and the threshold come from the layer's training module. Whether
// the neuron actually fires is decided by the layer's comparator, which lets
// only the strongest neuron above threshold spike (winner takes all).
//
// The synapses-sum-threshold structure follows the ODESA neuron; the single
// register after the adder and the margin score are own choices.
//
// Timing: for an input event seen as `ev_any` at clock edge t, the synapse
// outputs change at t+1 and `potential`/`above`/`score` include the event from t+2.
// `ev_any` is the OR of the synapses' synchronized event pulses.
module neuron
  import odesa_pkg::*;
#(
  parameter int     N_SYN  = 4,
  parameter int     N_BITS = 8,
  parameter int     W_BITS = 8,
  parameter decay_e DECAY  = DECAY_LINEAR,
  localparam int    P_BITS = pot_width(W_BITS, N_BITS, N_SYN)
) (
  input  logic                               clk,
  input  logic                               rst_n,
  input  logic [N_SYN-1:0]                   spike_in,
  input  logic [N_SYN-1:0][W_BITS-1:0]       weights,
  input  logic [P_BITS-1:0]                  threshold,
  output logic                               ev_any,
  output logic [N_SYN-1:0][N_BITS-1:0]       traces,
  output logic [P_BITS-1:0]                  potential,
  output logic                               above,
  output logic [P_BITS-1:0]                  score
);
  logic [N_SYN-1:0]                     ev;
  logic [N_SYN-1:0][W_BITS+N_BITS-1:0]  wout;
  logic [P_BITS-1:0]                    sum;

  for (genvar i = 0; i < N_SYN; i++) begin : g_syn
    synapse #(
      .N_BITS (N_BITS),
      .W_BITS (W_BITS),
      .DECAY  (DECAY)
    ) u_syn (
      .clk      (clk),
      .rst_n    (rst_n),
      .spike_in (spike_in[i]),
      .weight   (weights[i]),
      .ev       (ev[i]),
      .wout     (wout[i]),
      .trace    (traces[i])
    );
  end

  always_comb begin
    sum = '0;
    for (int i = 0; i < N_SYN; i++) sum = sum + P_BITS'(wout[i]);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) potential <= '0;
    else        potential <= sum;
  end

  assign above  = potential > threshold;
  assign score  = above ? potential - threshold : '0;
  assign ev_any = |ev;
endmodule
