// layer_trainer: the training module of one ODESA layer.
//
// It holds every synapse weight and every neuron threshold of its layer and
// adapts them with local, event-driven rules:
//   * reward neuron j: each of its weights moves toward the synapse trace,
//       w <- w + ((trace - w) >>> ETA_W)
//     and its threshold moves toward the potential it fired with,
//       th <- th + ((pot - th) >>> ETA_T)
//     A reward is also sent as a one-clock Local Attention Signal (`las_out`)
//     to the previous layer.
//   * punish: thresholds are lowered by THR_STEP (not below zero), making the
//     neurons more receptive.
// Output layer (OUTPUT_LAYER = 1), when a decision arrives (`done`) with the
// Global Attention Signal `gas` and class `label`: if the winner belongs to
// the label's group of N_NEUR/N_CLASSES neurons it is rewarded, otherwise the
// thresholds of all neurons of that group are lowered.
// Hidden layer: the winner of the last spike is remembered for LAS_WINDOW
// clocks; an `las_in` pulse from the next layer inside that window rewards it.
// A labelled event (`gas`) for which the layer did not spike lowers the
// thresholds of all its neurons.
// Training happens only while `train_en` is high. A configuration port
// writes any weight or threshold; it has priority over training.
//
// That rewards raise thresholds and adapt weights, that punishment lowers
// thresholds, and the group and LAS/GAS structure follow the ODESA method.
// The exact update formulas, learning-rate shifts, window, reset values and
// configuration port are this design's own choices.
//
// Timing: updates are written at the clock edge after `done` (or `las_in`);
// `las_out` pulses in that same clock.
module layer_trainer
  import odesa_pkg::*;
#(
  parameter int N_NEUR       = 6,
  parameter int N_SYN        = 4,
  parameter int N_BITS       = 8,
  parameter int W_BITS       = 8,
  parameter bit OUTPUT_LAYER = 1'b0,
  parameter int N_CLASSES    = 1,
  parameter int ETA_W        = 2,
  parameter int ETA_T        = 2,
  parameter int THR_STEP     = 64,
  parameter int INIT_THR     = 0,
  parameter int LAS_WINDOW   = 32,
  localparam int P_BITS      = pot_width(W_BITS, N_BITS, N_SYN),
  localparam int IDX_BITS    = (N_NEUR > 1) ? $clog2(N_NEUR) : 1,
  localparam int SYN_BITS    = (N_SYN > 1) ? $clog2(N_SYN) : 1,
  localparam int LBL_BITS    = (N_CLASSES > 1) ? $clog2(N_CLASSES) : 1
) (
  input  logic                                  clk,
  input  logic                                  rst_n,
  input  logic                                  train_en,
  // decision of the layer's comparator
  input  logic                                  done,
  input  logic                                  spike_valid,
  input  logic [IDX_BITS-1:0]                   winner,
  input  logic [P_BITS-1:0]                     win_pot,
  // trace registers of the layer's synapses (input channels)
  input  logic [N_SYN-1:0][N_BITS-1:0]          traces,
  // attention signals, label held with the event that `done` belongs to
  input  logic                                  gas,
  input  logic [LBL_BITS-1:0]                   label,
  input  logic                                  las_in,
  output logic                                  las_out,
  // configuration write port
  input  logic                                  cfg_we,
  input  logic                                  cfg_thr,     // 1: threshold, 0: weight
  input  logic [IDX_BITS-1:0]                   cfg_neuron,
  input  logic [SYN_BITS-1:0]                   cfg_syn,
  input  logic [P_BITS-1:0]                     cfg_data,
  // state
  output logic [N_NEUR-1:0][N_SYN-1:0][W_BITS-1:0] weights,
  output logic [N_NEUR-1:0][P_BITS-1:0]            thresholds
);
  localparam int GROUP = (N_NEUR / N_CLASSES > 0) ? N_NEUR / N_CLASSES : 1;
  localparam int WIN_BITS = $clog2(LAS_WINDOW + 1);

  logic                reward, punish_all, punish_grp;
  logic [IDX_BITS-1:0] rew_idx;
  logic [P_BITS-1:0]   rew_pot;

  // hidden layer: last winner memory
  logic [IDX_BITS-1:0] last_win;
  logic [P_BITS-1:0]   last_pot;
  logic [WIN_BITS-1:0] window;

  // trace scaled to weight width
  function automatic logic [W_BITS-1:0] trace_to_w(input logic [N_BITS-1:0] t);
    if (N_BITS >= W_BITS) return W_BITS'(t >> (N_BITS - W_BITS));
    else                  return W_BITS'(t) << (W_BITS - N_BITS);
  endfunction

  function automatic logic [W_BITS-1:0] w_update(input logic [W_BITS-1:0] w,
                                                 input logic [N_BITS-1:0] t);
    logic signed [W_BITS+1:0] diff;
    diff = $signed({2'b00, trace_to_w(t)}) - $signed({2'b00, w});
    return W_BITS'($signed({2'b00, w}) + (diff >>> ETA_W));
  endfunction

  function automatic logic [P_BITS-1:0] th_update(input logic [P_BITS-1:0] th,
                                                  input logic [P_BITS-1:0] p);
    logic signed [P_BITS+1:0] diff;
    diff = $signed({2'b00, p}) - $signed({2'b00, th});
    return P_BITS'($signed({2'b00, th}) + (diff >>> ETA_T));
  endfunction

  function automatic logic [P_BITS-1:0] th_lower(input logic [P_BITS-1:0] th);
    return (th > P_BITS'(THR_STEP)) ? th - P_BITS'(THR_STEP) : '0;
  endfunction

  // decide what to do this clock
  always_comb begin
    reward     = 1'b0;
    punish_all = 1'b0;
    punish_grp = 1'b0;
    rew_idx    = winner;
    rew_pot    = win_pot;
    if (train_en) begin
      if (OUTPUT_LAYER) begin
        if (done && gas) begin
          if (spike_valid && (int'(winner) / GROUP == int'(label))) reward = 1'b1;
          else                                                       punish_grp = 1'b1;
        end
      end else begin
        if (las_in && window != '0) begin
          reward  = 1'b1;
          rew_idx = last_win;
          rew_pot = last_pot;
        end
        if (done && gas && !spike_valid) punish_all = 1'b1;
      end
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int j = 0; j < N_NEUR; j++) begin
        thresholds[j] <= P_BITS'(INIT_THR);
        for (int i = 0; i < N_SYN; i++)
          weights[j][i] <= W_BITS'(init_weight(j, i, W_BITS));
      end
      las_out  <= 1'b0;
      last_win <= '0;
      last_pot <= '0;
      window   <= '0;
    end else begin
      las_out <= reward;
      // last-winner window (hidden layers)
      if (done && spike_valid) begin
        last_win <= winner;
        last_pot <= win_pot;
        window   <= WIN_BITS'(LAS_WINDOW);
      end else if (reward) begin
        window <= '0;
      end else if (window != '0) begin
        window <= window - 1'b1;
      end
      if (cfg_we) begin
        if (cfg_thr) thresholds[cfg_neuron] <= cfg_data;
        else         weights[cfg_neuron][cfg_syn] <= W_BITS'(cfg_data);
      end else begin
        for (int j = 0; j < N_NEUR; j++) begin
          if (reward && IDX_BITS'(j) == rew_idx) begin
            thresholds[j] <= th_update(thresholds[j], rew_pot);
            for (int i = 0; i < N_SYN; i++)
              weights[j][i] <= w_update(weights[j][i], traces[i]);
          end else if (punish_all || (punish_grp && j / GROUP == int'(label))) begin
            thresholds[j] <= th_lower(thresholds[j]);
          end
        end
      end
    end
  end
endmodule
