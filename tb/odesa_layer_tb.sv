// odesa_layer_tb: checks a hidden ODESA layer with 4 inputs and 6 neurons.
//
// Phase 1 (inference): random weights and thresholds are written through the
// configuration port, then random input events arrive one channel at a time.
// For an input that rises before clock edge P the layer must report `done`
// after edge P+4. The reference computes every neuron's potential at the
// decision, sum over channels of (C - (P - P_i)) * w, with real
// multiplications, and from it the winner (widest margin of potential over
// threshold, lowest index on a tie) or silence.
// Phase 2 (training): a labelled event that no neuron answers must lower all
// thresholds by THR_STEP; an LAS pulse shortly after a spike must pulse
// `las_out` and move the winner's threshold a quarter of the way toward its
// potential.
// Phase 3 (output layer, 3 classes of 2 neurons): with neuron 0 strongest, a
// labelled training event for class 2 must be answered by neuron 4 (the
// label gates the competition) and reward it; the same event without
// training must be won by neuron 0; a labelled event whose group cannot
// answer must lower only that group's thresholds.
module odesa_layer_tb;
  import odesa_pkg::*;
  localparam int NI = 4, NN = 6, N = 8, W = 8;
  localparam int C = (1 << N) - 1;
  localparam int P = pot_width(W, N, NI);

  logic clk = 1'b0;
  logic rst_n;
  logic [NI-1:0] spike_in;
  logic train_en, gas, las_in, las_out;
  logic [0:0] label;
  logic cfg_we, cfg_thr;
  logic [2:0] cfg_neuron;
  logic [1:0] cfg_syn;
  logic [P-1:0] cfg_data;
  logic done, spike_valid;
  logic [NN-1:0] spike_out;
  logic [2:0] winner;
  int checks = 0, failures = 0;
  int cyc = 0;
  int n_win = 0, n_silent = 0;

  odesa_layer #(.N_IN(NI), .N_NEUR(NN), .N_BITS(N), .W_BITS(W), .OUTPUT_LAYER(1'b0),
                .N_CLASSES(1), .THR_STEP(64), .LAS_WINDOW(32)) dut (
    .clk(clk), .rst_n(rst_n), .spike_in(spike_in), .train_en(train_en), .gas(gas),
    .label(label), .las_in(las_in), .las_out(las_out), .cfg_we(cfg_we), .cfg_thr(cfg_thr),
    .cfg_neuron(cfg_neuron), .cfg_syn(cfg_syn), .cfg_data(cfg_data), .done(done),
    .spike_valid(spike_valid), .spike_out(spike_out), .winner(winner));

  // output layer instance
  logic [1:0] label2;
  logic cfg_we2, las_out2, done2, spike_valid2;
  logic [NN-1:0] spike_out2;
  logic [2:0] winner2;

  odesa_layer #(.N_IN(NI), .N_NEUR(NN), .N_BITS(N), .W_BITS(W), .OUTPUT_LAYER(1'b1),
                .N_CLASSES(3), .THR_STEP(64), .LAS_WINDOW(32)) dut2 (
    .clk(clk), .rst_n(rst_n), .spike_in(spike_in), .train_en(train_en), .gas(gas),
    .label(label2), .las_in(1'b0), .las_out(las_out2), .cfg_we(cfg_we2), .cfg_thr(cfg_thr),
    .cfg_neuron(cfg_neuron), .cfg_syn(cfg_syn), .cfg_data(cfg_data), .done(done2),
    .spike_valid(spike_valid2), .spike_out(spike_out2), .winner(winner2));

  always #5 clk = ~clk;
  always @(posedge clk) cyc <= cyc + 1;

  int rw [NN][NI];
  longint rth [NN];
  int p_ch [NI];

  task automatic check(input string what, input longint got, input longint want);
    checks++;
    if (got != want) begin
      failures++;
      if (failures < 20) $display("FAIL %s at cycle %0d: got %0d want %0d", what, cyc, got, want);
    end
  endtask

  task automatic cfg_write(input logic thr, input int j, input int i, input longint d);
    cfg_we = 1'b1; cfg_thr = thr; cfg_neuron = 3'(j); cfg_syn = 2'(i); cfg_data = P'(d);
    @(negedge clk);
    cfg_we = 1'b0;
  endtask

  task automatic cfg_write2(input logic thr, input int j, input int i, input longint d);
    cfg_we2 = 1'b1; cfg_thr = thr; cfg_neuron = 3'(j); cfg_syn = 2'(i); cfg_data = P'(d);
    @(negedge clk);
    cfg_we2 = 1'b0;
  endtask

  // wait for the output layer's decision of an event fired at edge p
  task automatic wait_done2(input int p);
    int guard = 0;
    while (!done2 && guard < 20) begin @(negedge clk); guard++; end
    check("output layer done latency", cyc, p + 4);
  endtask

  // fire channel ch; return the edge number P
  task automatic fire(input int ch, output int p);
    spike_in[ch] = 1'b1;
    p = cyc + 1;
    @(negedge clk);
    spike_in[ch] = 1'b0;
  endtask

  function automatic longint pot_at(input int j, input int p);
    longint s = 0;
    for (int i = 0; i < NI; i++) begin
      int k;
      k = p - p_ch[i];
      if (p_ch[i] > -1000 && k >= 0 && k <= C) s += longint'(C - k) * rw[j][i];
    end
    return s;
  endfunction

  // wait for the decision of an event fired at edge p, check its time
  task automatic wait_done(input int p);
    int guard = 0;
    while (!done && guard < 20) begin @(negedge clk); guard++; end
    check("done latency", cyc, p + 4);
  endtask

  initial begin
    #5000000;
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    rst_n = 1'b0;
    spike_in = '0; train_en = 1'b0; gas = 1'b0; las_in = 1'b0; label = '0;
    label2 = '0; cfg_we2 = 1'b0;
    cfg_we = 1'b0; cfg_thr = 1'b0; cfg_neuron = '0; cfg_syn = '0; cfg_data = '0;
    for (int i = 0; i < NI; i++) p_ch[i] = -100000;
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    @(negedge clk);
    // ---- phase 1: inference against the reference
    for (int j = 0; j < NN; j++) begin
      for (int i = 0; i < NI; i++) begin
        rw[j][i] = $urandom_range(0, 255);
        cfg_write(1'b0, j, i, rw[j][i]);
      end
      rth[j] = $urandom_range(30000, 110000);
      cfg_write(1'b1, j, 0, rth[j]);
    end
    for (int e = 0; e < 150; e++) begin
      int ch, p, best;
      longint best_pot;
      ch = $urandom_range(0, NI - 1);
      fire(ch, p);
      p_ch[ch] = p;
      best = -1; best_pot = 0;
      for (int j = NN - 1; j >= 0; j--) begin
        longint v;
        v = pot_at(j, p);
        if (v > rth[j] && (best < 0 || v - rth[j] >= best_pot)) begin best = j; best_pot = v - rth[j]; end
      end
      wait_done(p);
      check("spike_valid", spike_valid, best >= 0);
      check("spike_out", spike_out, (best >= 0) ? (1 << best) : 0);
      if (best >= 0) begin check("winner", winner, best); n_win++; end
      else n_silent++;
      repeat ($urandom_range(3, 60)) @(negedge clk);
    end
    // ---- phase 2: training
    repeat (C + 10) @(negedge clk);            // let every trace decay
    train_en = 1'b1;
    // (a) no neuron can fire: all thresholds at the maximum of the range
    for (int j = 0; j < NN; j++) begin rth[j] = 400000; cfg_write(1'b1, j, 0, rth[j]); end
    gas = 1'b1;
    begin
      int p;
      fire(1, p);
      wait_done(p);
      check("silent when thresholds high", spike_valid, 0);
      @(negedge clk);
      gas = 1'b0;
      for (int j = 0; j < NN; j++) check("punished threshold", dut.u_trainer.thresholds[j], rth[j] - 64);
      for (int j = 0; j < NN; j++) rth[j] -= 64;
    end
    // (b) spike of neuron 3, then an LAS pulse: neuron 3 is rewarded
    repeat (C + 10) @(negedge clk);
    for (int j = 0; j < NN; j++) begin rth[j] = (j == 3) ? 1000 : 400000; cfg_write(1'b1, j, 0, rth[j]); end
    begin
      int p;
      longint pot, want;
      for (int i = 0; i < NI; i++) p_ch[i] = -100000;
      fire(2, p);
      p_ch[2] = p;
      pot = pot_at(3, p);
      wait_done(p);
      check("neuron 3 wins", winner, 3);
      check("neuron 3 spikes", spike_valid, 1);
      repeat (5) @(negedge clk);
      las_in = 1'b1;
      @(negedge clk);
      las_in = 1'b0;
      check("las_out", las_out, 1);
      want = 1000 + ((pot - 1000) >>> 2);
      check("rewarded threshold", dut.u_trainer.thresholds[3], want);
      check("other threshold", dut.u_trainer.thresholds[2], 400000);
      // a second LAS after the window has been used gives no reward
      repeat (3) @(negedge clk);
      las_in = 1'b1;
      @(negedge clk);
      las_in = 1'b0;
      check("no second reward", las_out, 0);
    end
    // ---- phase 3: output layer
    train_en = 1'b0;
    for (int j = 0; j < NN; j++) begin
      for (int i = 0; i < NI; i++) cfg_write2(1'b0, j, i, (j == 0) ? 255 : 10);
      cfg_write2(1'b1, j, 0, 1000);
    end
    repeat (C + 10) @(negedge clk);
    begin
      int p;
      longint pot4;
      // (c) labelled training event for class 2: only neurons 4 and 5 compete
      train_en = 1'b1; gas = 1'b1; label2 = 2'd2;
      fire(0, p);
      wait_done2(p);
      check("label gates winner", winner2, 4);
      check("label gates spike", spike_out2, 6'b010000);
      pot4 = longint'(C) * 10;
      @(negedge clk);
      check("output reward las", las_out2, 1);
      check("output reward threshold", dut2.u_trainer.thresholds[4], 1000 + ((pot4 - 1000) >>> 2));
      check("not rewarded", dut2.u_trainer.thresholds[0], 1000);
      gas = 1'b0; train_en = 1'b0;
      // (d) the same event without training: the strongest neuron wins
      repeat (C + 10) @(negedge clk);
      fire(0, p);
      wait_done2(p);
      check("ungated winner", winner2, 0);
      // (e) class 1's group cannot answer: only its thresholds drop
      cfg_write2(1'b1, 2, 0, 400000);
      cfg_write2(1'b1, 3, 0, 400000);
      repeat (C + 10) @(negedge clk);
      train_en = 1'b1; gas = 1'b1; label2 = 2'd1;
      fire(1, p);
      wait_done2(p);
      check("group silent", spike_valid2, 0);
      @(negedge clk);
      check("group punished 2", dut2.u_trainer.thresholds[2], 400000 - 64);
      check("group punished 3", dut2.u_trainer.thresholds[3], 400000 - 64);
      check("other group kept", dut2.u_trainer.thresholds[0], 1000);
      check("no reward las", las_out2, 0);
      gas = 1'b0; train_en = 1'b0;
    end
    checks++;
    if (n_win == 0 || n_silent == 0) begin
      failures++;
      $display("FAIL: coverage win=%0d silent=%0d", n_win, n_silent);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
