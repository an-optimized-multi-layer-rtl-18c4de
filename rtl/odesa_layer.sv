// odesa_layer: one layer of an ODESA spiking network.
//
// N_NEUR neurons share the same N_IN input channels; each neuron has one
// synapse per channel, so every neuron in the layer has as many synapses as
// the previous layer has neurons. The comparator and spike generator lets the
// neuron that exceeds its threshold by the widest margin spike, and the layer's own training module
// supplies every weight and threshold and adapts them.
//
// Event flow (all in `clk`):
//   edge t   : synchronized input event (any channel); gas/label sampled
//   edge t+1 : synapse outputs loaded
//   edge t+2 : neuron potentials registered, comparator evaluates
//   edge t+3 : `done` and, if a neuron won, the one-hot `spike_out`
//   edge t+4 : training update written, `las_out` pulse
// `gas`/`label` must be held from the input event until it is synchronized.
// Events closer than four clocks apart are each evaluated on their own, but
// the potential then also includes the earlier event's decay.
//
// The neuron/comparator/trainer organisation follows the ODESA hardware. Own
// choices: ranking candidates by margin over threshold, and, in an output
// layer while training, letting a label restrict the competition to the
// labelled class's group (so "the group did not answer" means none of its
// neurons crossed threshold). The event is taken from neuron 0's
// synchronizers; the other neurons' identical copies are left unused, and
// the linter reports them as unused bits of `ev_any`.
module odesa_layer
  import odesa_pkg::*;
#(
  parameter int     N_IN         = 4,
  parameter int     N_NEUR       = 6,
  parameter int     N_BITS       = 8,
  parameter int     W_BITS       = 8,
  parameter decay_e DECAY        = DECAY_LINEAR,
  parameter bit     OUTPUT_LAYER = 1'b0,
  parameter int     N_CLASSES    = 1,
  parameter int     ETA_W        = 2,
  parameter int     ETA_T        = 2,
  parameter int     THR_STEP     = 64,
  parameter int     INIT_THR     = 0,
  parameter int     LAS_WINDOW   = 32,
  localparam int    P_BITS       = pot_width(W_BITS, N_BITS, N_IN),
  localparam int    IDX_BITS     = (N_NEUR > 1) ? $clog2(N_NEUR) : 1,
  localparam int    SYN_BITS     = (N_IN > 1) ? $clog2(N_IN) : 1,
  localparam int    LBL_BITS     = (N_CLASSES > 1) ? $clog2(N_CLASSES) : 1
) (
  input  logic                clk,
  input  logic                rst_n,
  input  logic [N_IN-1:0]     spike_in,
  input  logic                train_en,
  input  logic                gas,
  input  logic [LBL_BITS-1:0] label,
  input  logic                las_in,
  output logic                las_out,
  input  logic                cfg_we,
  input  logic                cfg_thr,
  input  logic [IDX_BITS-1:0] cfg_neuron,
  input  logic [SYN_BITS-1:0] cfg_syn,
  input  logic [P_BITS-1:0]   cfg_data,
  output logic                done,
  output logic                spike_valid,
  output logic [N_NEUR-1:0]   spike_out,
  output logic [IDX_BITS-1:0] winner
);
  logic [N_NEUR-1:0][N_IN-1:0][W_BITS-1:0] weights;
  logic [N_NEUR-1:0][P_BITS-1:0]           thresholds;
  logic [N_NEUR-1:0][P_BITS-1:0]           potential;
  logic [N_NEUR-1:0]                       above;
  logic [N_NEUR-1:0][P_BITS-1:0]           score;
  logic [N_NEUR-1:0]                       ev_any;
  logic [N_NEUR-1:0][N_IN-1:0][N_BITS-1:0] traces;

  logic                ev_d1, ev_d2;
  logic                gas_d1, gas_d2, gas_d3;
  logic [LBL_BITS-1:0] lbl_d1, lbl_d2, lbl_d3;

  for (genvar j = 0; j < N_NEUR; j++) begin : g_neur
    neuron #(
      .N_SYN  (N_IN),
      .N_BITS (N_BITS),
      .W_BITS (W_BITS),
      .DECAY  (DECAY)
    ) u_neuron (
      .clk       (clk),
      .rst_n     (rst_n),
      .spike_in  (spike_in),
      .weights   (weights[j]),
      .threshold (thresholds[j]),
      .ev_any    (ev_any[j]),
      .traces    (traces[j]),
      .potential (potential[j]),
      .above     (above[j]),
      .score     (score[j])
    );
  end

  // event and label pipeline, aligned with the potentials
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      ev_d1  <= 1'b0;
      ev_d2  <= 1'b0;
      gas_d1 <= 1'b0;
      gas_d2 <= 1'b0;
      gas_d3 <= 1'b0;
      lbl_d1 <= '0;
      lbl_d2 <= '0;
      lbl_d3 <= '0;
    end else begin
      ev_d1  <= ev_any[0];
      ev_d2  <= ev_d1;
      gas_d1 <= ev_any[0] & gas;
      gas_d2 <= gas_d1;
      gas_d3 <= gas_d2;
      lbl_d1 <= label;
      lbl_d2 <= lbl_d1;
      lbl_d3 <= lbl_d2;
    end
  end

  // While training, a label restricts the output layer's competition to the
  // neurons of the labelled class: only that group may answer it.
  localparam int GROUP = (N_NEUR / N_CLASSES > 0) ? N_NEUR / N_CLASSES : 1;
  logic [N_NEUR-1:0] eligible;

  always_comb begin
    for (int j = 0; j < N_NEUR; j++) begin
      if (OUTPUT_LAYER && train_en && gas_d2) eligible[j] = above[j] && (j / GROUP == int'(lbl_d2));
      else                                    eligible[j] = above[j];
    end
  end

  wta_spike_gen #(
    .N_NEUR (N_NEUR),
    .P_BITS (P_BITS)
  ) u_wta (
    .clk         (clk),
    .rst_n       (rst_n),
    .eval        (ev_d2),
    .score       (score),
    .above       (eligible),
    .done        (done),
    .spike_valid (spike_valid),
    .spike       (spike_out),
    .winner      (winner)
  );

  // Traces of the input channels: every neuron holds identical copies, the
  // winner's are used.
  logic [N_IN-1:0][N_BITS-1:0] win_traces;
  logic [P_BITS-1:0]           win_pot;
  logic [P_BITS-1:0]           pot_q [N_NEUR];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int j = 0; j < N_NEUR; j++) pot_q[j] <= '0;
    end else if (ev_d2) begin
      for (int j = 0; j < N_NEUR; j++) pot_q[j] <= potential[j];
    end
  end

  assign win_traces = traces[winner];
  assign win_pot    = pot_q[winner];

  layer_trainer #(
    .N_NEUR       (N_NEUR),
    .N_SYN        (N_IN),
    .N_BITS       (N_BITS),
    .W_BITS       (W_BITS),
    .OUTPUT_LAYER (OUTPUT_LAYER),
    .N_CLASSES    (N_CLASSES),
    .ETA_W        (ETA_W),
    .ETA_T        (ETA_T),
    .THR_STEP     (THR_STEP),
    .INIT_THR     (INIT_THR),
    .LAS_WINDOW   (LAS_WINDOW)
  ) u_trainer (
    .clk         (clk),
    .rst_n       (rst_n),
    .train_en    (train_en),
    .done        (done),
    .spike_valid (spike_valid),
    .winner      (winner),
    .win_pot     (win_pot),
    .traces      (win_traces),
    .gas         (gas_d3),
    .label       (lbl_d3),
    .las_in      (las_in),
    .las_out     (las_out),
    .cfg_we      (cfg_we),
    .cfg_thr     (cfg_thr),
    .cfg_neuron  (cfg_neuron),
    .cfg_syn     (cfg_syn),
    .cfg_data    (cfg_data),
    .weights     (weights),
    .thresholds  (thresholds)
  );
endmodule
