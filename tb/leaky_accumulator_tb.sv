// leaky_accumulator_tb: checks the multiplier-free weighted decay.
//
// A linear and an exponential instance (8-bit counter, 8-bit weight) get the
// same events and random weights. After an event the linear output must be
// (C-k)*w and the exponential output (C*w) >> k, computed here with a real
// multiplication; the decay counters must read C-k and C >> k. Events restart
// the decay in mid-course, and the weight input changes during a decay, which
// must not affect the running decay.
module leaky_accumulator_tb;
  import odesa_pkg::*;
  localparam int N = 8, W = 8;
  localparam int C = (1 << N) - 1;

  logic clk = 1'b0;
  logic rst_n;
  logic ev;
  logic [W-1:0] weight;
  logic [N-1:0] cnt_l, cnt_e;
  logic [W+N-1:0] out_l, out_e;
  int checks = 0, failures = 0;

  leaky_accumulator #(.N_BITS(N), .W_BITS(W), .DECAY(DECAY_LINEAR)) dut_l (
    .clk(clk), .rst_n(rst_n), .ev(ev), .weight(weight), .count(cnt_l), .wout(out_l));
  leaky_accumulator #(.N_BITS(N), .W_BITS(W), .DECAY(DECAY_EXP)) dut_e (
    .clk(clk), .rst_n(rst_n), .ev(ev), .weight(weight), .count(cnt_e), .wout(out_e));

  always #5 clk = ~clk;

  // reference state: weight captured at the event, clocks since the event
  int ref_w = 0;
  int ref_k = -1;   // -1: no event yet

  task automatic check(input string what, input longint got, input longint want);
    checks++;
    if (got != want) begin
      failures++;
      if (failures < 20) $display("FAIL %s: got %0d want %0d (w=%0d k=%0d)", what, got, want, ref_w, ref_k);
    end
  endtask

  always @(posedge clk) begin
    if (rst_n) begin
      if (ev) begin ref_w = weight; ref_k = 0; end
      else if (ref_k >= 0) ref_k++;
    end
  end

  always @(negedge clk) begin
    if (rst_n) begin
      longint lin, ex, cl, ce;
      if (ref_k < 0) begin
        lin = 0; ex = 0; cl = 0; ce = 0;
      end else begin
        lin = (ref_k <= C) ? longint'(C - ref_k) * ref_w : 0;
        ex  = (ref_k < 40) ? (longint'(C) * ref_w) >> ref_k : 0;
        cl  = (ref_k <= C) ? C - ref_k : 0;
        ce  = (ref_k < 40) ? C >> ref_k : 0;
      end
      check("linear wout", out_l, lin);
      check("exp wout", out_e, ex);
      check("linear count", cnt_l, cl);
      check("exp count", cnt_e, ce);
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
    ev = 1'b0;
    weight = '0;
    rst_n = 1'b0;
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    repeat (3) @(negedge clk);
    // full decays with edge weights and random weights
    for (int e = 0; e < 12; e++) begin
      case (e)
        0: weight = '1;
        1: weight = '0;
        2: weight = 8'd1;
        default: weight = W'($urandom);
      endcase
      ev = 1'b1;
      @(negedge clk);
      ev = 1'b0;
      // change the weight input during the decay
      repeat (10) @(negedge clk);
      weight = W'($urandom);
      repeat (C + 5) @(negedge clk);
    end
    // restarts in mid-decay
    for (int e = 0; e < 20; e++) begin
      weight = W'($urandom);
      ev = 1'b1;
      @(negedge clk);
      ev = 1'b0;
      repeat ($urandom_range(1, 120)) @(negedge clk);
    end
    repeat (C + 5) @(negedge clk);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
