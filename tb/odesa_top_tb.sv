// odesa_top_tb: end-to-end test of the 4_6_3_3 network at its default sizes.
//
// Three classes of short spatio-temporal spike patterns on the four input
// channels are presented (each pattern is two or three events, 12 clocks
// apart, with the label held from its last event). The network is trained
// online for a number of epochs with the attention signals, then tested with
// training off. The test checks, for every event:
//   * each synchronized input event gives one L1 decision 4 clocks later;
//   * each L1 spike gives one L2 decision 4 clocks after it reaches L2;
//   * `class_id` names the neuron that spiked in the output layer;
//   * each output-layer reward (correct labelled spike while training) sends
//     an LAS to L1, which rewards its last winner: `l1_las` 2 clocks later.
// It counts how often each mechanism happened: L1 spike, L1 silence, L1
// punishment, L2 reward, L2 punishment, L1 reward through LAS, configuration
// write; any that never happened counts as a failure. Finally the trained
// network must classify at least 80% of the test patterns.
module odesa_top_tb;
  logic clk = 1'b0;
  logic rst_n;
  logic [3:0] in_spike;
  logic train_en, gas;
  logic [1:0] label;
  logic cfg_we, cfg_layer, cfg_thr;
  logic [2:0] cfg_neuron, cfg_syn;
  logic [18:0] cfg_data;
  logic [5:0] l1_spike;
  logic l1_done, l1_las;
  logic [2:0] l2_spike;
  logic l2_done, class_valid;
  logic [1:0] class_id;

  odesa_top dut (
    .clk(clk), .rst_n(rst_n), .in_spike(in_spike), .train_en(train_en), .gas(gas),
    .label(label), .cfg_we(cfg_we), .cfg_layer(cfg_layer), .cfg_thr(cfg_thr),
    .cfg_neuron(cfg_neuron), .cfg_syn(cfg_syn), .cfg_data(cfg_data),
    .l1_spike(l1_spike), .l1_done(l1_done), .l1_las(l1_las), .l2_spike(l2_spike),
    .l2_done(l2_done), .class_valid(class_valid), .class_id(class_id));

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
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
  int pat [3][3] = '{'{0, 1, 3}, '{2, 3, -1}, '{3, 0, 2}};

  task automatic present(input int cls, input bit labelled);
    for (int s = 0; s < 3; s++) begin
      int ch;
      ch = pat[cls][s];
      if (ch >= 0) begin
        bit last;
        last = (s == 2) || (pat[cls][s + 1] < 0);
        if (last && labelled) begin gas = 1'b1; label = 2'(cls); end
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

  initial begin
    #200000000;
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

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
    for (int j = 0; j < 3; j++) begin
      cfg_we = 1'b1; cfg_layer = 1'b1; cfg_thr = 1'b1; cfg_neuron = 3'(j); cfg_data = 19'd8000;
      @(negedge clk);
      n_cfg++;
    end
    cfg_we = 1'b0;
    @(negedge clk);
    check("cfg readback", dut.u_l2.u_trainer.thresholds[1], 8000);
    // a hidden layer that cannot answer a labelled pattern is punished
    for (int j = 0; j < 6; j++) begin
      cfg_we = 1'b1; cfg_layer = 1'b0; cfg_thr = 1'b1; cfg_neuron = 3'(j); cfg_data = 19'd400000;
      @(negedge clk);
      n_cfg++;
    end
    cfg_we = 1'b0;
    train_en = 1'b1;
    present(1, 1'b1);
    for (int j = 0; j < 6; j++)
      check("l1 punished", dut.u_l1.u_trainer.thresholds[j], 400000 - 2048);
    for (int j = 0; j < 6; j++) begin
      cfg_we = 1'b1; cfg_layer = 1'b0; cfg_thr = 1'b1; cfg_neuron = 3'(j); cfg_data = 19'd0;
      @(negedge clk);
    end
    cfg_we = 1'b0;
    // training
    for (int ep = 0; ep < 60; ep++)
      for (int c = 0; c < 3; c++) present((c + ep) % 3, 1'b1);
    train_en = 1'b0;
    // test
    for (int ep = 0; ep < 5; ep++)
      for (int c = 0; c < 3; c++) begin
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
    $display("mechanisms: l1_spike=%0d l1_silent=%0d l1_punish=%0d l2_reward=%0d l2_punish=%0d l1_reward=%0d cfg=%0d",
             n_l1_spike, n_l1_silent, n_l1_punish, n_l2_reward, n_l2_punish, n_l1_reward, n_cfg);
    $display("test accuracy %0d / %0d", correct, total);
    checks++;
    if (n_l1_spike == 0 || n_l1_silent == 0 || n_l1_punish == 0 || n_l2_reward == 0 ||
        n_l2_punish == 0 || n_l1_reward == 0 || n_cfg == 0) begin
      failures++;
      $display("FAIL: a mechanism never happened");
    end
    checks++;
    if (correct * 5 < total * 4) begin
      failures++;
      $display("FAIL: accuracy below 80%");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
