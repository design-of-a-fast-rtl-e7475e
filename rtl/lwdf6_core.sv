// Sixth-order lattice wave digital filter core, bit-serial.
//
// Two identical third-order links (alpha0 = 0, alpha1 = 0.5, alpha2 = 0) in
// cascade. Words move least significant bit first, N = 14 bit-clock cycles
// per sample. The input word has its LSB in phase 0 of the control unit's
// one-hot phase `ph`; each link adds LINK_LAT = 5 cycles, so the output word
// has its LSB in phase 10 of the same frame. Apart from that frame shift the
// core has no extra sample latency: y[n] depends on x[n], x[n-1], ...
//   H(z) = [0.5 * (z^-1 + (0.5 + z^-2)/(1 + 0.5 z^-2))]^2
// The low-pass response and the coefficients follow the sixth-order filter of
// the design; the pipeline and phase numbers are this implementation's.
module lwdf6_core
  import lwdf_pkg::*;
#(
  parameter int unsigned N = CYCLES
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic [N-1:0] ph,
  input  logic         x,
  output logic         y
);

  logic mid;

  lwdf3_link #(.N(N), .OFF(0)) u_link1 (
    .clk, .rst_n, .ph, .x(x), .y(mid)
  );

  lwdf3_link #(.N(N), .OFF(LINK_LAT)) u_link2 (
    .clk, .rst_n, .ph, .x(mid), .y(y)
  );

endmodule
