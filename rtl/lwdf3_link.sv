// One third-order link of the lattice wave digital filter, bit-serial.
//
// A lattice link sums two all-pass branches driven by the same input. With the
// coefficients of the sixth-order design, alpha0 = alpha2 = 0, the adaptors of
// those coefficients reduce to plain connections and only the alpha1 = 0.5
// adaptor remains:
//   upper branch: a one-sample memory,                    u[n] = x[n-1]
//   lower branch: the alpha1 adaptor with B2 fed back to A2 through two
//                 one-sample memories; its port-1 output is the all-pass
//                 B1 = (0.5 + z^-2) / (1 + 0.5 z^-2)
//   output:       y[n] = (u[n] + B1[n]) / 2
// so H(z) = 0.5 * (z^-1 + (0.5 + z^-2)/(1 + 0.5 z^-2)), unity gain at DC. The
// final halving (a free shift) is a choice of this design that keeps the gain
// of each link at one.
//
// Timing: the input word has its LSB in phase OFF of the one-hot frame phase
// `ph` (N cycles per sample). The adaptor outputs start at OFF+3, the output
// adder result at OFF+4 and the halved output at OFF+5 (LINK_LAT). Every
// memory is a chain of delay elements whose length makes its loop or branch a
// whole number of frames: the upper branch holds N+3 bits (one sample plus the
// shimming to the adaptor latency), the feedback loop N-3 plus N bits.
module lwdf3_link
  import lwdf_pkg::*;
#(
  parameter int unsigned N   = CYCLES,
  parameter int unsigned OFF = 0
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic [N-1:0] ph,
  input  logic         x,
  output logic         y
);

  localparam int unsigned P0 = OFF % N;
  localparam int unsigned P1 = (OFF + 1) % N;
  localparam int unsigned P2 = (OFF + 2) % N;
  localparam int unsigned P3 = (OFF + ADAPTOR_LAT) % N;
  localparam int unsigned P4 = (OFF + ADAPTOR_LAT + 1) % N;

  logic a2;      // A2 of the adaptor, LSB at OFF
  logic b1;      // B1, LSB at OFF+3
  logic b2;      // B2, LSB at OFF+3
  logic b2_t1;   // B2 one sample later, LSB at OFF
  logic x_t;     // upper branch: x one sample later, LSB at OFF+3
  logic sum_y;   // x[n-1] + B1[n], LSB at OFF+4

  adaptor_half u_adaptor (
    .clk, .rst_n,
    .st0(ph[P0]), .st1(ph[P1]), .st2(ph[P2]),
    .a1(x), .a2(a2), .b1(b1), .b2(b2)
  );

  // lower branch feedback: two T-blocks
  serial_delay #(.LEN(N - ADAPTOR_LAT)) u_t_loop1 (.clk, .rst_n, .d(b2),    .q(b2_t1));
  serial_delay #(.LEN(N))               u_t_loop2 (.clk, .rst_n, .d(b2_t1), .q(a2));

  // upper branch: T-block plus shimming to the adaptor output phase
  serial_delay #(.LEN(N + ADAPTOR_LAT)) u_t_upper (.clk, .rst_n, .d(x), .q(x_t));

  serial_adder #(.SUB(1'b0)) u_out_add (
    .clk, .rst_n, .start(ph[P3]), .a(x_t), .b(b1), .s(sum_y)
  );

  serial_half u_out_scale (
    .clk, .rst_n, .hold(ph[P4]), .d(sum_y), .q(y)
  );

endmodule
