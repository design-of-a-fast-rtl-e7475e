// Input half of the I/O unit: parallel to serial.
//
// In the cycle where `load` is high (phase 0 of the sample frame) the parallel
// input word x_in is taken, sign-extended from XW to N bits, and its LSB is
// passed straight to `sdo`; the remaining bits go into a shift register of
// delay elements that shifts right once per cycle, repeating the sign bit, so
// that phase k carries bit k of the word. The two guard bits and the extra
// frame cycles are therefore sign extension. x_in must be stable at the first
// clock edge of each sample's clock burst.
module io_in
  import lwdf_pkg::*;
#(
  parameter int unsigned N  = CYCLES,
  parameter int unsigned XW = SYS_LEN
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          load,
  input  logic [XW-1:0] x_in,
  output logic          sdo
);

  logic [N-1:0] x_ext;
  logic [N-2:0] sr;

  assign x_ext = N'(signed'(x_in));
  assign sdo   = load ? x_ext[0] : sr[0];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)    sr <= '0;
    else if (load) sr <= x_ext[N-1:1];
    else           sr <= {sr[N-2], sr[N-2:1]};
  end

endmodule
