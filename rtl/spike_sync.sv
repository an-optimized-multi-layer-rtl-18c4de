// spike_sync: input synchronizer of a synapse.
//
// An input event may come from outside the layer's clock domain. It passes a
// two-flop synchronizer and a rising-edge detector, so each event becomes a
// single-cycle pulse `ev` in the `clk` domain, however long the input level is
// held. Using a synchronizer at every synapse input follows the ODESA
// hardware organisation; the two-flop form and the edge detection are this
// design's own choice.
//
// Timing: a rising edge of `spike_in` that is seen at clock edge t gives
// `ev` = 1 during the cycle after edge t+2 (three flops in total). An input
// must stay high for at least one clock period and low for at least one clock
// period between events, or two events merge into one.
module spike_sync (
  input  logic clk,
  input  logic rst_n,
  input  logic spike_in,   // asynchronous event level
  output logic ev          // one-cycle event pulse, clk domain
);
  logic s1, s2, s3;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      s1 <= 1'b0;
      s2 <= 1'b0;
      s3 <= 1'b0;
    end else begin
      s1 <= spike_in;
      s2 <= s1;
      s3 <= s2;
    end
  end

  assign ev = s2 & ~s3;
endmodule
