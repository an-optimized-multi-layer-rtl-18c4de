// odesa_workloads_tb: runs the network configuration 20_10_4_4 (20 input
// channels, 10 hidden neurons, 4 output neurons for 4 classes, 240
// synapses) through odesa_net_run: online training on four spike patterns,
// then a test with training off, with every timing and mechanism check of
// the end-to-end test.
module odesa_workloads_tb;
  logic fin_a;
  int   chk_a, fail_a;

  odesa_net_run #(.N_IN(20), .N_L1(10), .N_L2(4), .N_CLASSES(4), .EPOCHS(250), .MIN_PCT(80))
    u_20_10_4_4 (.finished(fin_a), .checks(chk_a), .failures(fail_a));

  initial begin
    #400000000;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", chk_a, fail_a + 1);
    $finish;
  end

  initial begin
    wait (fin_a);
    $display("TB_RESULT checks=%0d failures=%0d", chk_a, fail_a);
    $finish;
  end
endmodule
