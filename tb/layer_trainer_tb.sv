// layer_trainer_tb: checks the training module of an output layer and of a
// hidden layer.
//
// Both instances (6 neurons, 4 synapses) see the same random stream of
// decisions, labels, traces, attention pulses and configuration writes. A
// reference model holds its own copy of every weight and threshold and
// applies the rules with integer arithmetic:
//   reward  w += floor((trace - w) / 4), th += floor((pot - th) / 4)
//   punish  th -= 64, not below 0
// output layer: label group = 2 neurons per class; hidden layer: a reward
// comes from an LAS pulse within 8 clocks of the layer's last spike. After
// every clock all weights, thresholds and `las_out` are compared.
module layer_trainer_tb;
  import odesa_pkg::*;
  localparam int NN = 6, NS = 4, N = 8, W = 8, NC = 3, WIN = 8;
  localparam int P = pot_width(W, N, NS);

  logic clk = 1'b0;
  logic rst_n;
  logic train_en, done, spike_valid, gas, las_in;
  logic [2:0] winner;
  logic [P-1:0] win_pot;
  logic [NS-1:0][N-1:0] traces;
  logic [1:0] label;
  logic cfg_we, cfg_thr;
  logic [2:0] cfg_neuron;
  logic [1:0] cfg_syn;
  logic [P-1:0] cfg_data;
  logic las_o, las_h;
  logic [NN-1:0][NS-1:0][W-1:0] w_o, w_h;
  logic [NN-1:0][P-1:0] th_o, th_h;
  int checks = 0, failures = 0;
  int n_rew_o = 0, n_pun_o = 0, n_rew_h = 0, n_pun_h = 0, n_cfg = 0, n_expired = 0;

  layer_trainer #(.N_NEUR(NN), .N_SYN(NS), .N_BITS(N), .W_BITS(W), .OUTPUT_LAYER(1'b1),
                  .N_CLASSES(NC), .ETA_W(2), .ETA_T(2), .THR_STEP(64), .INIT_THR(0),
                  .LAS_WINDOW(WIN)) dut_o (
    .clk(clk), .rst_n(rst_n), .train_en(train_en), .done(done), .spike_valid(spike_valid),
    .winner(winner), .win_pot(win_pot), .traces(traces), .gas(gas), .label(label),
    .las_in(1'b0), .las_out(las_o), .cfg_we(cfg_we), .cfg_thr(cfg_thr),
    .cfg_neuron(cfg_neuron), .cfg_syn(cfg_syn), .cfg_data(cfg_data),
    .weights(w_o), .thresholds(th_o));

  layer_trainer #(.N_NEUR(NN), .N_SYN(NS), .N_BITS(N), .W_BITS(W), .OUTPUT_LAYER(1'b0),
                  .N_CLASSES(NC), .ETA_W(2), .ETA_T(2), .THR_STEP(64), .INIT_THR(0),
                  .LAS_WINDOW(WIN)) dut_h (
    .clk(clk), .rst_n(rst_n), .train_en(train_en), .done(done), .spike_valid(spike_valid),
    .winner(winner), .win_pot(win_pot), .traces(traces), .gas(gas), .label(label),
    .las_in(las_in), .las_out(las_h), .cfg_we(cfg_we), .cfg_thr(cfg_thr),
    .cfg_neuron(cfg_neuron), .cfg_syn(cfg_syn), .cfg_data(cfg_data),
    .weights(w_h), .thresholds(th_h));

  always #5 clk = ~clk;

  // reference state
  int rw_o [NN][NS], rw_h [NN][NS];
  longint rt_o [NN], rt_h [NN];
  int last_win = 0, window = 0;
  longint last_pot = 0;
  int exp_las_o = 0, exp_las_h = 0;

  function automatic longint fshift(input longint d, input int s);
    if (d >= 0) return d >>> s;
    return -((-d + (longint'(1) << s) - 1) >>> s);
  endfunction

  task automatic check(input string what, input longint got, input longint want);
    checks++;
    if (got != want) begin
      failures++;
      if (failures < 20) $display("FAIL %s: got %0d want %0d", what, got, want);
    end
  endtask

  task automatic compare_all();
    for (int j = 0; j < NN; j++) begin
      check("out thr", th_o[j], rt_o[j]);
      check("hid thr", th_h[j], rt_h[j]);
      for (int i = 0; i < NS; i++) begin
        check("out w", w_o[j][i], rw_o[j][i]);
        check("hid w", w_h[j][i], rw_h[j][i]);
      end
    end
    check("out las", las_o, exp_las_o);
    check("hid las", las_h, exp_las_h);
  endtask

  initial begin
    #2000000;
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    rst_n = 1'b0;
    {train_en, done, spike_valid, gas, las_in, cfg_we, cfg_thr} = '0;
    winner = '0; win_pot = '0; traces = '0; label = '0;
    cfg_neuron = '0; cfg_syn = '0; cfg_data = '0;
    for (int j = 0; j < NN; j++) begin
      rt_o[j] = 0; rt_h[j] = 0;
      for (int i = 0; i < NS; i++) begin
        rw_o[j][i] = int'(init_weight(j, i, W));
        rw_h[j][i] = rw_o[j][i];
      end
    end
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    @(negedge clk);
    compare_all();
    for (int t = 0; t < 4000; t++) begin
      logic rew_o, pun_o, rew_h, pun_h;
      int ri;
      longint rp;
      // stimulus
      train_en    = ($urandom_range(0, 9) != 0);
      done        = ($urandom_range(0, 2) == 0);
      spike_valid = done && ($urandom_range(0, 3) != 0);
      winner      = 3'($urandom_range(0, NN - 1));
      win_pot     = P'($urandom_range(0, 200000));
      for (int i = 0; i < NS; i++) traces[i] = N'($urandom);
      gas         = ($urandom_range(0, 1) == 0);
      label       = 2'($urandom_range(0, NC - 1));
      las_in      = ($urandom_range(0, 3) == 0);
      cfg_we      = ($urandom_range(0, 30) == 0);
      cfg_thr     = $urandom_range(0, 1);
      cfg_neuron  = 3'($urandom_range(0, NN - 1));
      cfg_syn     = 2'($urandom_range(0, NS - 1));
      cfg_data    = P'($urandom_range(0, 100000));
      // reference decisions
      rew_o = train_en && done && gas && spike_valid && (int'(winner) / 2 == int'(label));
      pun_o = train_en && done && gas && !rew_o;
      rew_h = train_en && las_in && window != 0;
      pun_h = train_en && done && gas && !spike_valid;
      ri = last_win;
      rp = last_pot;
      if (cfg_we) begin
        n_cfg++;
        if (cfg_thr) begin rt_o[cfg_neuron] = cfg_data; rt_h[cfg_neuron] = cfg_data; end
        else begin rw_o[cfg_neuron][cfg_syn] = int'(cfg_data) & 255; rw_h[cfg_neuron][cfg_syn] = int'(cfg_data) & 255; end
      end else begin
        for (int j = 0; j < NN; j++) begin
          if (rew_o && j == winner) begin
            rt_o[j] += fshift(longint'(win_pot) - rt_o[j], 2);
            for (int i = 0; i < NS; i++) rw_o[j][i] += int'(fshift(longint'(traces[i]) - rw_o[j][i], 2));
          end else if (pun_o && j / 2 == label) begin
            rt_o[j] = (rt_o[j] > 64) ? rt_o[j] - 64 : 0;
          end
          if (rew_h && j == ri) begin
            rt_h[j] += fshift(rp - rt_h[j], 2);
            for (int i = 0; i < NS; i++) rw_h[j][i] += int'(fshift(longint'(traces[i]) - rw_h[j][i], 2));
          end else if (pun_h) begin
            rt_h[j] = (rt_h[j] > 64) ? rt_h[j] - 64 : 0;
          end
        end
      end
      if (rew_o) n_rew_o++;
      if (pun_o) n_pun_o++;
      if (rew_h) n_rew_h++;
      if (pun_h) n_pun_h++;
      if (train_en && las_in && window == 0) n_expired++;
      exp_las_o = rew_o;
      exp_las_h = rew_h;
      if (done && spike_valid) begin
        last_win = winner; last_pot = win_pot; window = WIN;
      end else if (rew_h) window = 0;
      else if (window != 0) window--;
      @(negedge clk);
      compare_all();
      // hold quiet periods now and then so that the LAS window expires
      if (t % 200 == 199) begin
        {done, spike_valid, las_in, cfg_we} = '0;
        for (int q = 0; q < WIN + 2; q++) begin
          exp_las_o = 0; exp_las_h = 0;
          if (window != 0) window--;
          @(negedge clk);
          compare_all();
        end
      end
    end
    checks++;
    if (n_rew_o == 0 || n_pun_o == 0 || n_rew_h == 0 || n_pun_h == 0 || n_cfg == 0 || n_expired == 0) begin
      failures++;
      $display("FAIL: coverage rew_o=%0d pun_o=%0d rew_h=%0d pun_h=%0d cfg=%0d expired=%0d",
               n_rew_o, n_pun_o, n_rew_h, n_pun_h, n_cfg, n_expired);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
