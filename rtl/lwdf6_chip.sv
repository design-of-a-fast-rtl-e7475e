// Stand-alone sixth-order LWDF filter chip.
//
// Ties together the clock generator, the control unit, the two halves of the
// I/O unit and the bit-serial filter core. Per sample the host applies x_in and
// pulses `trig`; the clock generator then runs N = 14 bit clocks from the
// oscillator `osc`. At the first of them the input word is taken; the core
// produces the output word with its LSB ten cycles into the frame, so its last
// bit arrives in phase 9 of the next sample's burst, where the output
// register is loaded. y_out therefore shows the filtered sample n once the
// tenth clock of burst n+1 has passed, and holds it until the tenth clock of
// burst n+2. busy is high while a clock burst runs. rst_n clears all state
// asynchronously.
module lwdf6_chip
  import lwdf_pkg::*;
(
  input  logic               osc,
  input  logic               rst_n,
  input  logic               trig,
  input  logic [SYS_LEN-1:0] x_in,
  output logic [SYS_LEN-1:0] y_out,
  output logic               y_sat,
  output logic               busy
);

  localparam int unsigned N       = CYCLES;
  localparam int unsigned OUT_OFF = 2 * LINK_LAT;
  localparam int unsigned P_DONE  = (OUT_OFF + N - 1) % N;

  logic         clk;
  logic [N-1:0] ph;
  logic         x_ser;
  logic         y_ser;

  clock_gen #(.N_CYCLES(N)) u_clock (
    .osc, .rst_n, .trig, .clk, .busy
  );

  control_ring #(.N(N)) u_control (
    .clk, .rst_n, .ph
  );

  io_in #(.N(N), .XW(SYS_LEN)) u_io_in (
    .clk, .rst_n, .load(ph[0]), .x_in, .sdo(x_ser)
  );

  lwdf6_core #(.N(N)) u_core (
    .clk, .rst_n, .ph, .x(x_ser), .y(y_ser)
  );

  io_out #(.N(N), .XW(SYS_LEN)) u_io_out (
    .clk, .rst_n, .done(ph[P_DONE]), .sdi(y_ser), .y_out, .y_sat
  );

endmodule
