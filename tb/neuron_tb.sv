// neuron_tb: checks a neuron with 4 synapses.
//
// Random input events on the four channels, some overlapping, drive the
// neuron with random weights. A reference keeps, per channel, the clock of
// the running decay and the weight captured for it, forms the expected sum of
// (C-k)*w with real multiplications, and compares it one clock later with the
// registered potential. `above` is compared with potential > threshold and
// `score` with the margin potential - threshold, for a threshold that changes
// now and then, and `ev_any` with the expected
// synchronized event pulses.
module neuron_tb;
  import odesa_pkg::*;
  localparam int NS = 4, N = 8, W = 8;
  localparam int C = (1 << N) - 1;
  localparam int P = pot_width(W, N, NS);

  logic clk = 1'b0;
  logic rst_n;
  logic [NS-1:0] spike_in;
  logic [NS-1:0][W-1:0] weights;
  logic [P-1:0] threshold;
  logic ev_any;
  logic [NS-1:0][N-1:0] traces;
  logic [P-1:0] potential;
  logic above;
  logic [P-1:0] score;
  int checks = 0, failures = 0;
  int cyc = 0;
  int p_new [NS];
  int p_ev [NS];
  int ref_w [NS];
  longint prev_sum = 0;
  int n_above = 0, n_below = 0;

  neuron #(.N_SYN(NS), .N_BITS(N), .W_BITS(W), .DECAY(DECAY_LINEAR)) dut (
    .clk(clk), .rst_n(rst_n), .spike_in(spike_in), .weights(weights),
    .threshold(threshold), .ev_any(ev_any), .traces(traces),
    .potential(potential), .above(above), .score(score));

  always #5 clk = ~clk;
  always @(posedge clk) begin
    cyc <= cyc + 1;
    for (int i = 0; i < NS; i++)
      if (cyc + 1 == p_new[i] + 2) begin
        ref_w[i] = weights[i];
        p_ev[i]  = p_new[i];
      end
  end

  task automatic check(input string what, input longint got, input longint want);
    checks++;
    if (got != want) begin
      failures++;
      if (failures < 20) $display("FAIL %s at cycle %0d: got %0d want %0d", what, cyc, got, want);
    end
  endtask

  always @(negedge clk) begin
    if (rst_n && cyc > 4) begin
      longint sum;
      logic any;
      sum = 0;
      any = 1'b0;
      for (int i = 0; i < NS; i++) begin
        int k;
        k = cyc - (p_ev[i] + 2);
        if (k >= 0 && k <= C) sum += longint'(C - k) * ref_w[i];
        if (cyc == p_new[i] + 1) any = 1'b1;
      end
      check("potential", potential, prev_sum);
      check("above", above, prev_sum > longint'(threshold));
      check("score", score, (prev_sum > longint'(threshold)) ? prev_sum - longint'(threshold) : 0);
      check("ev_any", ev_any, any);
      if (above) n_above++; else n_below++;
      prev_sum = sum;
    end
  end

  initial begin
    #5000000;
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < NS; i++) begin p_new[i] = -1000; p_ev[i] = -1000; ref_w[i] = 0; end
    spike_in = '0;
    weights = '0;
    threshold = P'(60000);
    rst_n = 1'b0;
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    repeat (5) @(negedge clk);
    for (int e = 0; e < 120; e++) begin
      int ch;
      ch = $urandom_range(0, NS - 1);
      for (int i = 0; i < NS; i++) weights[i] = W'($urandom);
      if (e % 10 == 0) threshold = P'($urandom_range(0, 150000));
      // a channel may fire again only once its previous input has been low
      if (!spike_in[ch]) begin
        spike_in[ch] = 1'b1;
        p_new[ch] = cyc + 1;
      end
      @(negedge clk);
      spike_in = '0;
      repeat ($urandom_range(2, 90)) @(negedge clk);
    end
    repeat (C + 5) @(negedge clk);
    checks++;
    if (n_above == 0 || n_below == 0) begin
      failures++;
      $display("FAIL: threshold comparison not exercised both ways");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
