// wta_spike_gen: comparator and spike generator of an ODESA layer.
//
// When `eval` is high the comparator looks at every neuron whose potential is
// above its threshold and picks the one with the largest score (on a tie, the
// lowest index). In the layer the score is the margin potential - threshold.
// That winner, and only it, spikes: lateral inhibition gives winner-takes-all
// behaviour. If no neuron is above threshold the layer
// stays silent for this event. The outputs are registered.
//
// Timing: `eval` at clock edge t gives, from edge t+1 for one clock,
// `done` = 1, and if a winner exists `spike_valid` = 1, `spike` one-hot and
// `winner` its index. The tie rule is this design's own choice. Two
// assertions check that at most one neuron spikes and that a spike comes
// only with `done`; their use of `rst_n` to disable them is what Verilator
// reports as a reset used both synchronously and asynchronously.
module wta_spike_gen #(
  parameter int N_NEUR = 6,
  parameter int P_BITS = 18,
  localparam int IDX_BITS = (N_NEUR > 1) ? $clog2(N_NEUR) : 1
) (
  input  logic                          clk,
  input  logic                          rst_n,
  input  logic                          eval,
  input  logic [N_NEUR-1:0][P_BITS-1:0] score,
  input  logic [N_NEUR-1:0]             above,
  output logic                          done,
  output logic                          spike_valid,
  output logic [N_NEUR-1:0]             spike,
  output logic [IDX_BITS-1:0]           winner
);
  logic                found;
  logic [IDX_BITS-1:0] best;
  logic [P_BITS-1:0]   best_pot;

  always_comb begin
    found    = 1'b0;
    best     = '0;
    best_pot = '0;
    for (int j = 0; j < N_NEUR; j++) begin
      if (above[j] && (!found || score[j] > best_pot)) begin
        found    = 1'b1;
        best     = IDX_BITS'(j);
        best_pot = score[j];
      end
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      done        <= 1'b0;
      spike_valid <= 1'b0;
      spike       <= '0;
      winner      <= '0;
    end else begin
      done        <= eval;
      spike_valid <= eval && found;
      spike       <= (eval && found) ? (N_NEUR'(1) << best) : '0;
      if (eval && found) winner <= best;
    end
  end

  assert property (@(posedge clk) disable iff (!rst_n) $onehot0(spike));
  assert property (@(posedge clk) disable iff (!rst_n) spike_valid |-> done);
endmodule
