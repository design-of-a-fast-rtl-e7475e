// Symmetric two-port wave digital adaptor with coefficient alpha = 0.5,
// bit-serial.
//
// The adaptor computes
//     d  = A1 - A2
//     B1 = A2 + alpha*d
//     B2 = A1 + alpha*d
// with one subtractor (carry preset to 1, A2 inverted), a multiplication by
// 0.5 that is only a one-bit shift, and two adders. These are the cells of the
// alpha1 data path of the sixth-order filter. In this sign convention the
// two-sample feedback loop of the lattice link is a plain pair of memories:
// the sign inversion that the lattice structure places in that loop is taken
// up by the choice of sign for alpha.
//
// Timing: a1 and a2 share a word frame that starts where st0 is high. The
// difference is ready one cycle later. The halving reads it one more cycle
// later and needs no delay element (see serial_half). The two output adders
// add a further cycle, so b1 and b2 start three cycles (ADAPTOR_LAT) after the
// inputs. Two delay elements on each input line them up with alpha*d. st1 and
// st2 are the phases one and two cycles after st0.
//
// Range: inside a lattice link, |A2| and |B2| reach three times the input
// amplitude and |d| four times. That is what the two guard bits of the
// internal word allow for.
module adaptor_half (
  input  logic clk,
  input  logic rst_n,
  input  logic st0,
  input  logic st1,
  input  logic st2,
  input  logic a1,
  input  logic a2,
  output logic b1,
  output logic b2
);

  logic diff_s;  // A1 - A2, frame at +1
  logic half_e;  // (A1 - A2)/2, frame at +2
  logic a1_d;    // A1 at +2
  logic a2_d;    // A2 at +2

  serial_adder #(.SUB(1'b1)) u_diff (
    .clk, .rst_n, .start(st0), .a(a1), .b(a2), .s(diff_s)
  );

  serial_half u_mul (
    .clk, .rst_n, .hold(st1), .d(diff_s), .q(half_e)
  );

  serial_delay #(.LEN(2)) u_shim1 (.clk, .rst_n, .d(a1), .q(a1_d));
  serial_delay #(.LEN(2)) u_shim2 (.clk, .rst_n, .d(a2), .q(a2_d));

  serial_adder #(.SUB(1'b0)) u_b1 (
    .clk, .rst_n, .start(st2), .a(a2_d), .b(half_e), .s(b1)
  );

  serial_adder #(.SUB(1'b0)) u_b2 (
    .clk, .rst_n, .start(st2), .a(a1_d), .b(half_e), .s(b2)
  );

endmodule
