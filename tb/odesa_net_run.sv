// odesa_net_run: training-and-test run of one network configuration, used by
// the workload testbench. It instantiates odesa_top with the given sizes and
// presents N_CLASSES classes of short spatio-temporal spike patterns (class
// c fires channels 5c, 5c+7 and 5c+13 modulo N_IN, 12 clocks apart; odd
// classes stop after two events), with the label held from the last event.
// After EPOCHS training epochs it tests with training off. For every event
// it checks:
//   * each synchronized input event gives one L1 decision 4 clocks later;
//   * each L1 spike gives one L2 decision 4 clocks after it reaches L2;
//   * `class_id` names the neuron that spiked in the output layer;
//   * each output-layer reward sends an LAS to L1, which rewards its last
//     winner: `l1_las` 2 clocks later.
// It counts each mechanism (L1 spike, L1 silence, L1 punishment, L2 reward,
// L2 punishment, L1 reward by LAS, configuration write); one that never
// happened is a failure, as is a test accuracy below MIN_PCT percent.
// `finished` rises when the run is over; `checks`/`failures` are its counts.
module odesa_net_run #(
  parameter int N_IN      = 20,
  parameter int N_L1      = 10,
  parameter int N_L2      = 4,
  parameter int N_CLASSES = 4,
  parameter int EPOCHS    = 150,
  parameter int MIN_PCT   = 80
) (
  output logic finished,
  output int   checks,
  output int   failures
);
  localparam int LB = (N_CLASSES > 1) ? $clog2(N_CLASSES) : 1;
  // configuration port widths, as odesa_top derives them (8-bit weights and
  // decay counters)
  localparam int I1 = (N_L1 > 1) ? $clog2(N_L1) : 1;
  localparam int I2 = (N_L2 > 1) ? $clog2(N_L2) : 1;
  localparam int S1 = (N_IN > 1) ? $clog2(N_IN) : 1;
  localparam int P1 = odesa_pkg::pot_width(8, 8, N_IN);
  localparam int P2 = odesa_pkg::pot_width(8, 8, N_L1);
  localparam int CN = (I1 > I2) ? I1 : I2;
  localparam int CS = (S1 > I1) ? S1 : I1;
  localparam int CD = (P1 > P2) ? P1 : P2;
  logic clk = 1'b0;
  logic rst_n;
  logic [N_IN-1:0] in_spike;
  logic train_en, gas;
  logic [LB-1:0] label;
  logic cfg_we, cfg_layer, cfg_thr;
  logic [CN-1:0] cfg_neuron;
  logic [CS-1:0] cfg_syn;
  logic [CD-1:0] cfg_data;
  logic [N_L1-1:0] l1_spike;
  logic l1_done, l1_las;
  logic [N_L2-1:0] l2_spike;
  logic l2_done, class_valid;
  logic [LB-1:0] class_id;

  odesa_top #(.N_IN(N_IN), .N_L1(N_L1), .N_L2(N_L2), .N_CLASSES(N_CLASSES)) dut (
    .clk(clk), .rst_n(rst_n), .in_spike(in_spike), .train_en(train_en), .gas(gas),
    .label(label), .cfg_we(cfg_we), .cfg_layer(cfg_layer), .cfg_thr(cfg_thr),
    .cfg_neuron(cfg_neuron), .cfg_syn(cfg_syn), .cfg_data(cfg_data),
    .l1_spike(l1_spike), .l1_done(l1_done), .l1_las(l1_las), .l2_spike(l2_spike),
    .l2_done(l2_done), .class_valid(class_valid), .class_id(class_id));

  always #5 clk = ~clk;

  initial begin checks = 0; failures = 0; finished = 1'b0; end
  int cyc = 0;
  always @(posedge clk) cyc <= cyc + 1;

  task automatic check(input string what, input longint got, input longint want);
    checks++;
    if (got != want) begin
      failures++;
      if (failures < 20) $display("FAIL %s at cycle %0d: got %0d want %0d", what, cyc, got, want);
    end
  endtask

  // expected decision times
  int exp_l1 [$];
  int exp_l2 [$];
  int exp_las [$];
  int n_l1_spike = 0, n_l1_silent = 0, n_l1_punish = 0, n_l2_reward = 0;
  int n_l2_punish = 0, n_l1_reward = 0, n_cfg = 0;
  logic gas_q;

  always @(negedge clk) begin
    if (rst_n) begin
      // L1 decisions
      if (exp_l1.size() > 0 && exp_l1[0] == cyc) begin
        void'(exp_l1.pop_front());
        check("l1_done", l1_done, 1);
      end else check("no l1_done", l1_done, 0);
      if (l1_done) begin
        if (l1_spike != 0) begin
          n_l1_spike++;
          check("l1 one-hot", $onehot(l1_spike), 1);
          // reaches L2 at the next edge (P), decision 4 edges later
          exp_l2.push_back(cyc + 5);
        end else begin
          n_l1_silent++;
          if (train_en && gas) n_l1_punish++;
        end
      end
      // L2 decisions
      if (exp_l2.size() > 0 && exp_l2[0] == cyc) begin
        void'(exp_l2.pop_front());
        check("l2_done", l2_done, 1);
      end else check("no l2_done", l2_done, 0);
      if (l2_done) begin
        check("class_valid", class_valid, l2_spike != 0);
        if (class_valid) begin
          check("class_id", 1 << class_id, l2_spike);
        end
        if (train_en && gas) begin
          if (class_valid && class_id == label) begin
            n_l2_reward++;
            exp_las.push_back(cyc + 2);
          end else n_l2_punish++;
        end
      end
      // L1 rewards through the LAS
      if (exp_las.size() > 0 && exp_las[0] == cyc) begin
        void'(exp_las.pop_front());
        check("l1_las", l1_las, 1);
      end else check("no l1_las", l1_las, 0);
      if (l1_las) n_l1_reward++;
    end
  end

  // patterns: channel sequences per class
  // class c: channels 5c, 5c+7, 5c+13 (modulo N_IN); odd classes use two events
  function automatic int pat_ch(input int c, input int s);
    if (s == 2 && c % 2 == 1) return -1;
    return (5 * c + ((s == 0) ? 0 : (s == 1) ? 7 : 13)) % N_IN;
  endfunction

  task automatic present(input int cls, input bit labelled);
    for (int s = 0; s < 3; s++) begin
      int ch;
      ch = pat_ch(cls, s);
      if (ch >= 0) begin
        bit last;
        last = (s == 2) || (pat_ch(cls, s + 1) < 0);
        if (last && labelled) begin gas = 1'b1; label = LB'(cls); end
        in_spike[ch] = 1'b1;
        // first sampled at edge P = cyc+1, decided 4 edges later
        exp_l1.push_back(cyc + 1 + 4);
        @(negedge clk);
        in_spike[ch] = 1'b0;
        repeat (11) @(negedge clk);
      end
    end
    gas = 1'b0;
    repeat (300) @(negedge clk);     // let all traces decay
  endtask


  int correct = 0, total = 0;
  initial begin
    rst_n = 1'b0;
    in_spike = '0; train_en = 1'b0; gas = 1'b0; label = '0;
    cfg_we = 1'b0; cfg_layer = 1'b0; cfg_thr = 1'b0;
    cfg_neuron = '0; cfg_syn = '0; cfg_data = '0;
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    repeat (3) @(negedge clk);
    // configuration port: start the output layer with a small threshold
    for (int j = 0; j < N_L2; j++) begin
      cfg_we = 1'b1; cfg_layer = 1'b1; cfg_thr = 1'b1; cfg_neuron = CN'(j); cfg_data = CD'(8000);
      @(negedge clk);
      n_cfg++;
    end
    cfg_we = 1'b0;
    @(negedge clk);
    check("cfg readback", dut.u_l2.u_trainer.thresholds[1], 8000);
    // a hidden layer that cannot answer a labelled pattern is punished
    for (int j = 0; j < N_L1; j++) begin
      cfg_we = 1'b1; cfg_layer = 1'b0; cfg_thr = 1'b1; cfg_neuron = CN'(j); cfg_data = CD'(400000);
      @(negedge clk);
      n_cfg++;
    end
    cfg_we = 1'b0;
    train_en = 1'b1;
    present(1, 1'b1);
    for (int j = 0; j < N_L1; j++)
      check("l1 punished", dut.u_l1.u_trainer.thresholds[j], 400000 - 2048);
    for (int j = 0; j < N_L1; j++) begin
      cfg_we = 1'b1; cfg_layer = 1'b0; cfg_thr = 1'b1; cfg_neuron = CN'(j); cfg_data = '0;
      @(negedge clk);
    end
    cfg_we = 1'b0;
    // training
    for (int ep = 0; ep < EPOCHS; ep++)
      for (int c = 0; c < N_CLASSES; c++) present((c + ep) % N_CLASSES, 1'b1);
    train_en = 1'b0;
    // test
    for (int ep = 0; ep < 5; ep++)
      for (int c = 0; c < N_CLASSES; c++) begin
        int got;
        got = -1;
        fork
          present(c, 1'b0);
          begin
            // the class after the last event of the pattern
            repeat (40) begin
              @(negedge clk);
              if (class_valid) got = class_id;
            end
          end
        join
        total++;
        if (got == c) correct++;
      end
    $display("%0d_%0d_%0d_%0d mechanisms: l1_spike=%0d l1_silent=%0d l1_punish=%0d l2_reward=%0d l2_punish=%0d l1_reward=%0d cfg=%0d",
             N_IN, N_L1, N_L2, N_CLASSES, n_l1_spike, n_l1_silent, n_l1_punish, n_l2_reward, n_l2_punish, n_l1_reward, n_cfg);
    $display("%0d_%0d_%0d_%0d test accuracy %0d / %0d", N_IN, N_L1, N_L2, N_CLASSES, correct, total);
    checks++;
    if (n_l1_spike == 0 || n_l1_silent == 0 || n_l1_punish == 0 || n_l2_reward == 0 ||
        n_l2_punish == 0 || n_l1_reward == 0 || n_cfg == 0) begin
      failures++;
      $display("FAIL: a mechanism never happened");
    end
    checks++;
    if (correct * 100 < total * MIN_PCT) begin
      failures++;
      $display("FAIL: accuracy below %0d%%", MIN_PCT, "");
    end
    finished = 1'b1;
  end
endmodule
