// Clock generator: one burst of N_CYCLES clock pulses per trigger.
//
// The filter is not clocked from outside. Once per sample a trigger pulse
// arrives, and the generator passes exactly N_CYCLES periods of the on-chip
// oscillator `osc` to the filter clock `clk`, then holds `clk` low until the
// next trigger. The oscillator itself is an input here. The gating is done on
// the falling edge of `osc`: `trig` is sampled there, a rising edge of it sets
// the enable, and the enable is cleared after N_CYCLES complete pulses. Because
// the enable only changes while `osc` is low, clk = osc & enable has no
// glitches. A trigger that arrives during a burst is ignored. The burst
// length follows the design; the falling-edge gating is this design's own.
module clock_gen
  import lwdf_pkg::*;
#(
  parameter int unsigned N_CYCLES = CYCLES
) (
  input  logic osc,
  input  logic rst_n,
  input  logic trig,
  output logic clk,
  output logic busy
);

  localparam int unsigned CW = $clog2(N_CYCLES + 1);

  logic          trig_q;
  logic          en_q;
  logic [CW-1:0] count_q;

  always_ff @(negedge osc or negedge rst_n) begin
    if (!rst_n) begin
      trig_q  <= 1'b0;
      en_q    <= 1'b0;
      count_q <= '0;
    end else begin
      trig_q <= trig;
      if (en_q) begin
        if (count_q == CW'(N_CYCLES - 1)) begin
          en_q    <= 1'b0;
          count_q <= '0;
        end else begin
          count_q <= count_q + 1'b1;
        end
      end else if (trig && !trig_q) begin
        en_q <= 1'b1;
      end
    end
  end

  assign clk  = osc & en_q;
  assign busy = en_q;

endmodule
