// odesa_top: two-layer ODESA spiking neural network without multipliers,
// configured by default as the 4_6_3_3 network: 4 input spike channels, a
// hidden layer L1 of 6 neurons and an output layer L2 of 3 neurons for 3
// classes (one neuron per class). That makes 4*6 + 6*3 = 42 synapses.
//
// The sizes and the layer/attention-signal structure follow the ODESA
// network; the single shared clock and the configuration port are own
// choices.
//
// L1's one-hot output spikes are L2's input channels. During training the
// label arrives as the Global Attention Signal (`gas`, `label`), seen by both
// layers; when L2 rewards a neuron it sends a Local Attention Signal to L1,
// which then rewards its most recent winner. L1's own attention output
// (`l1_las`) is brought out for an event source in front of the network.
//
// Interface: `in_spike` are asynchronous event levels (see spike_sync). The
// label must be held from a labelled input event until L2 has decided on it
// (about 10 clocks). `class_valid` pulses with `class_id` when the output
// layer spikes; `l2_done` pulses for every event L2 evaluated. The
// configuration port writes a weight or threshold of either layer
// (`cfg_layer` 0 = L1, 1 = L2); its index and data ports are as wide as the
// larger layer needs (3, 3 and 19 bits by default) and are truncated for the
// smaller one. One clock drives both layers. The linter reports `l1_valid`
// and `l1_winner` as unused: L1's decision reaches L2 through its spike
// vector.
module odesa_top
  import odesa_pkg::*;
#(
  parameter int     N_IN       = 4,
  parameter int     N_L1       = 6,
  parameter int     N_L2       = 3,
  parameter int     N_CLASSES  = 3,
  parameter int     N_BITS_L1  = 8,
  parameter int     N_BITS_L2  = 8,
  parameter int     W_BITS     = 8,
  parameter decay_e DECAY      = DECAY_LINEAR,
  parameter int     ETA_W      = 2,
  parameter int     ETA_T      = 2,
  parameter int     THR_STEP   = 2048,
  parameter int     LAS_WINDOW = 32,
  localparam int    LBL_BITS   = (N_CLASSES > 1) ? $clog2(N_CLASSES) : 1,
  localparam int    CLS_BITS   = (N_L2 > 1) ? $clog2(N_L2) : 1,
  localparam int    I1_BITS    = (N_L1 > 1) ? $clog2(N_L1) : 1,
  localparam int    S1_BITS    = (N_IN > 1) ? $clog2(N_IN) : 1,
  localparam int    P1_BITS    = pot_width(W_BITS, N_BITS_L1, N_IN),
  localparam int    P2_BITS    = pot_width(W_BITS, N_BITS_L2, N_L1),
  // configuration port widths: wide enough for the larger layer
  localparam int    CN_BITS    = (I1_BITS > CLS_BITS) ? I1_BITS : CLS_BITS,
  localparam int    CS_BITS    = (S1_BITS > I1_BITS) ? S1_BITS : I1_BITS,
  localparam int    CD_BITS    = (P1_BITS > P2_BITS) ? P1_BITS : P2_BITS
) (
  input  logic                  clk,
  input  logic                  rst_n,
  input  logic [N_IN-1:0]       in_spike,
  input  logic                  train_en,
  input  logic                  gas,
  input  logic [LBL_BITS-1:0]   label,
  input  logic                  cfg_we,
  input  logic                  cfg_layer,
  input  logic                  cfg_thr,
  input  logic [CN_BITS-1:0]    cfg_neuron,
  input  logic [CS_BITS-1:0]    cfg_syn,
  input  logic [CD_BITS-1:0]    cfg_data,
  output logic [N_L1-1:0]       l1_spike,
  output logic                  l1_done,
  output logic                  l1_las,
  output logic [N_L2-1:0]       l2_spike,
  output logic                  l2_done,
  output logic                  class_valid,
  output logic [LBL_BITS-1:0]   class_id
);
  localparam int GROUP   = (N_L2 / N_CLASSES > 0) ? N_L2 / N_CLASSES : 1;
  localparam int S2_BITS = I1_BITS;

  logic                l1_valid;    // L1's spike vector already carries these
  logic [I1_BITS-1:0]  l1_winner;
  logic                l2_las;
  logic [CLS_BITS-1:0] l2_winner;

  odesa_layer #(
    .N_IN         (N_IN),
    .N_NEUR       (N_L1),
    .N_BITS       (N_BITS_L1),
    .W_BITS       (W_BITS),
    .DECAY        (DECAY),
    .OUTPUT_LAYER (1'b0),
    .N_CLASSES    (N_CLASSES),
    .ETA_W        (ETA_W),
    .ETA_T        (ETA_T),
    .THR_STEP     (THR_STEP),
    .LAS_WINDOW   (LAS_WINDOW)
  ) u_l1 (
    .clk         (clk),
    .rst_n       (rst_n),
    .spike_in    (in_spike),
    .train_en    (train_en),
    .gas         (gas),
    .label       (label),
    .las_in      (l2_las),
    .las_out     (l1_las),
    .cfg_we      (cfg_we && !cfg_layer),
    .cfg_thr     (cfg_thr),
    .cfg_neuron  (I1_BITS'(cfg_neuron)),
    .cfg_syn     (S1_BITS'(cfg_syn)),
    .cfg_data    (P1_BITS'(cfg_data)),
    .done        (l1_done),
    .spike_valid (l1_valid),
    .spike_out   (l1_spike),
    .winner      (l1_winner)
  );

  odesa_layer #(
    .N_IN         (N_L1),
    .N_NEUR       (N_L2),
    .N_BITS       (N_BITS_L2),
    .W_BITS       (W_BITS),
    .DECAY        (DECAY),
    .OUTPUT_LAYER (1'b1),
    .N_CLASSES    (N_CLASSES),
    .ETA_W        (ETA_W),
    .ETA_T        (ETA_T),
    .THR_STEP     (THR_STEP),
    .LAS_WINDOW   (LAS_WINDOW)
  ) u_l2 (
    .clk         (clk),
    .rst_n       (rst_n),
    .spike_in    (l1_spike),
    .train_en    (train_en),
    .gas         (gas),
    .label       (label),
    .las_in      (1'b0),
    .las_out     (l2_las),
    .cfg_we      (cfg_we && cfg_layer),
    .cfg_thr     (cfg_thr),
    .cfg_neuron  (CLS_BITS'(cfg_neuron)),
    .cfg_syn     (S2_BITS'(cfg_syn)),
    .cfg_data    (P2_BITS'(cfg_data)),
    .done        (l2_done),
    .spike_valid (class_valid),
    .spike_out   (l2_spike),
    .winner      (l2_winner)
  );

  assign class_id = LBL_BITS'(int'(l2_winner) / GROUP);
endmodule
