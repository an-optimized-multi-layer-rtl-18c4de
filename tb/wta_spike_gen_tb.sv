// wta_spike_gen_tb: checks the comparator and spike generator.
//
// Random potentials (often with ties) and above-threshold flags are presented
// for 6 neurons, with `eval` high in some clocks. The reference scans the
// neurons from the highest index down and keeps the candidate with the
// greater-or-equal potential, which gives the largest potential and, on a
// tie, the lowest index. One clock after `eval` the block must report `done`,
// whether a neuron won, the one-hot spike and the winner's index; without
// `eval` it must stay silent.
module wta_spike_gen_tb;
  localparam int NN = 6, P = 18;

  logic clk = 1'b0;
  logic rst_n;
  logic eval;
  logic [NN-1:0][P-1:0] potential;
  logic [NN-1:0] above;
  logic done, spike_valid;
  logic [NN-1:0] spike;
  logic [2:0] winner;
  int checks = 0, failures = 0;
  int n_win = 0, n_silent = 0, n_tie = 0;

  wta_spike_gen #(.N_NEUR(NN), .P_BITS(P)) dut (
    .clk(clk), .rst_n(rst_n), .eval(eval), .score(potential), .above(above),
    .done(done), .spike_valid(spike_valid), .spike(spike), .winner(winner));

  always #5 clk = ~clk;

  task automatic check(input string what, input longint got, input longint want);
    checks++;
    if (got != want) begin
      failures++;
      if (failures < 20) $display("FAIL %s: got %0d want %0d", what, got, want);
    end
  endtask

  initial begin
    #1000000;
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    rst_n = 1'b0;
    eval = 1'b0;
    potential = '0;
    above = '0;
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    for (int t = 0; t < 3000; t++) begin
      int best, best_pot, n_best;
      logic ev;
      ev = ($urandom_range(0, 3) != 0);
      for (int j = 0; j < NN; j++) begin
        potential[j] = (t % 3 == 0) ? P'($urandom_range(0, 3) * 1000) : P'($urandom);
        above[j] = ($urandom_range(0, 2) != 0);
      end
      if (t % 50 == 0) above = '0;
      eval = ev;
      best = -1;
      best_pot = 0;
      for (int j = NN - 1; j >= 0; j--)
        if (above[j] && (best < 0 || int'(potential[j]) >= best_pot)) begin
          best = j;
          best_pot = int'(potential[j]);
        end
      n_best = 0;
      for (int j = 0; j < NN; j++) if (above[j] && int'(potential[j]) == best_pot) n_best++;
      @(negedge clk);
      check("done", done, ev);
      check("spike_valid", spike_valid, ev && best >= 0);
      check("spike", spike, (ev && best >= 0) ? (1 << best) : 0);
      if (ev && best >= 0) begin
        check("winner", winner, best);
        n_win++;
        if (n_best > 1) n_tie++;
      end else if (ev) n_silent++;
    end
    checks++;
    if (n_win == 0 || n_silent == 0 || n_tie == 0) begin
      failures++;
      $display("FAIL: cases not covered win=%0d silent=%0d tie=%0d", n_win, n_silent, n_tie);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
