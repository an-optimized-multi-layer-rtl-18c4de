// spike_sync_tb: checks the synapse input synchronizer.
//
// Input events of random length and spacing are driven off the clock edge.
// Every rising input must give exactly one single-cycle `ev` pulse, two
// clock edges after the first edge that samples the new level, and no pulse
// may appear otherwise.
module spike_sync_tb;
  logic clk = 1'b0;
  logic rst_n;
  logic spike_in;
  logic ev;
  int checks = 0, failures = 0;
  int cyc = 0;

  spike_sync dut (.clk(clk), .rst_n(rst_n), .spike_in(spike_in), .ev(ev));

  always #5 clk = ~clk;
  always @(posedge clk) cyc <= cyc + 1;

  // expected pulse cycles, recorded by the stimulus
  int exp_q[$];

  always @(negedge clk) begin
    if (rst_n) begin
      if (exp_q.size() > 0 && exp_q[0] == cyc) begin
        checks++;
        if (!ev) begin failures++; $display("FAIL: no ev at cycle %0d", cyc); end
        void'(exp_q.pop_front());
      end else if (ev) begin
        checks++;
        failures++;
        $display("FAIL: unexpected ev at cycle %0d", cyc);
      end
    end
  end

  initial begin
    #200000;
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int hi, lo;
    spike_in = 1'b0;
    rst_n    = 1'b0;
    repeat (3) @(posedge clk);
    #1 rst_n = 1'b1;
    repeat (3) @(posedge clk);
    for (int e = 0; e < 200; e++) begin
      hi = 1 + $urandom_range(0, 4);
      lo = 1 + $urandom_range(0, 4);
      @(negedge clk);
      #($urandom_range(0, 4));   // asynchronous placement inside the low phase
      spike_in = 1'b1;
      // first sampling edge is the next posedge (number cyc+1); pulse is
      // visible after edge cyc+2
      exp_q.push_back(cyc + 2);
      repeat (hi) @(negedge clk);
      spike_in = 1'b0;
      repeat (lo) @(negedge clk);
    end
    repeat (6) @(negedge clk);
    checks++;
    if (exp_q.size() != 0) begin failures++; $display("FAIL: %0d pulses missing", exp_q.size()); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
