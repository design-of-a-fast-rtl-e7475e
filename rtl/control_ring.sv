// Control unit: a ring of N delay elements in which a single 1 circulates.
//
// Reset puts the 1 in position 0; every clock moves it one position on, so it
// makes one full turn per sample (N = 14 clocks). ph[k] is high in phase k of
// the sample frame. The taps tell each serial adder when a new word starts (its
// carry preset), tell the halving cells when to repeat the sign, and time the
// loading of words on and off the chip. Because the clock generator stops after
// exactly N clocks, the ring rests at phase 0 between samples.
module control_ring
  import lwdf_pkg::*;
#(
  parameter int unsigned N = CYCLES
) (
  input  logic         clk,
  input  logic         rst_n,
  output logic [N-1:0] ph
);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) ph <= N'(1);
    else        ph <= {ph[N-2:0], ph[N-1]};
  end

  // exactly one position holds the 1
  a_onehot: assert property (@(posedge clk) disable iff (!rst_n) $onehot(ph));

endmodule
