// synapse_tb: checks one synapse end to end.
//
// Input events are placed at random points off the clock edge. For an input
// that rises before clock edge P the synchronized pulse `ev` must follow edge
// P+1, the weighted output must read (C-k)*w from edge P+2 on (k clocks after
// P+2), and the trace register must read C-k one clock later. The weight is
// the one present at edge P+2. The reference uses a real multiplication.
// A second synapse with exponential decay sees the same inputs; its output
// must be (C*w) >> k and its trace C >> k, one clock later.
module synapse_tb;
  import odesa_pkg::*;
  localparam int N = 8, W = 8;
  localparam int C = (1 << N) - 1;

  logic clk = 1'b0;
  logic rst_n;
  logic spike_in;
  logic [W-1:0] weight;
  logic ev;
  logic [W+N-1:0] wout;
  logic [N-1:0] trace;
  logic ev_x;
  logic [W+N-1:0] wout_x;
  logic [N-1:0] trace_x;
  longint prev_cnt_x = 0;
  int checks = 0, failures = 0;
  int cyc = 0;
  int p_new = -1000;   // edge number P of the last input event
  int p_ev = -1000;    // event whose decay is running (taken over at P+2)
  int ref_w = 0;
  longint prev_cnt = 0;

  synapse #(.N_BITS(N), .W_BITS(W), .DECAY(DECAY_LINEAR)) dut (
    .clk(clk), .rst_n(rst_n), .spike_in(spike_in), .weight(weight),
    .ev(ev), .wout(wout), .trace(trace));

  synapse #(.N_BITS(N), .W_BITS(W), .DECAY(DECAY_EXP)) dut_x (
    .clk(clk), .rst_n(rst_n), .spike_in(spike_in), .weight(weight),
    .ev(ev_x), .wout(wout_x), .trace(trace_x));

  always #5 clk = ~clk;
  always @(posedge clk) begin
    cyc <= cyc + 1;
    if (cyc + 1 == p_new + 2) begin
      ref_w = weight;
      p_ev  = p_new;
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
      int k;
      longint cnt;
      k   = cyc - (p_ev + 2);
      cnt = (k >= 0 && k <= C) ? C - k : 0;
      check("ev", ev, cyc == p_new + 1);
      check("wout", wout, cnt * ref_w);
      check("trace", trace, prev_cnt);
      prev_cnt = cnt;
      begin
        longint cx;
        cx = (k >= 0 && k < 40) ? C >> k : 0;
        check("exp wout", wout_x, (k >= 0 && k < 40) ? (longint'(C) * ref_w) >> k : 0);
        check("exp trace", trace_x, prev_cnt_x);
        prev_cnt_x = cx;
      end
    end
  end

  initial begin
    #2000000;
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    spike_in = 1'b0;
    weight = 8'd100;
    rst_n = 1'b0;
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    repeat (5) @(negedge clk);
    for (int e = 0; e < 16; e++) begin
      weight = W'($urandom);
      #($urandom_range(0, 4));
      spike_in = 1'b1;
      p_new = cyc + 1;
      repeat ($urandom_range(1, 3)) @(negedge clk);
      spike_in = 1'b0;
      repeat ((e % 4 == 3) ? $urandom_range(3, 60) : C + 8) @(negedge clk);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
