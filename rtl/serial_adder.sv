// Bit-serial adder / subtractor cell.
//
// Operands arrive least significant bit first, one bit per clock. The cell is a
// full adder whose carry is kept in a flip-flop; `start` marks the LSB cycle of
// the operand words, and in that cycle the stored carry is replaced by its
// preset value: 0 for an adder, 1 for a subtractor (SUB=1), which together with
// the inverted `b` input forms a - b in two's complement. The sum bit is
// registered, so the result word starts one cycle after the operand words.
// This matches the adder cells with their d0/d1 carry delay element and the
// delay element that follows each adder in the data path; registering every sum
// (so that no path crosses more than one adder) is a choice of this design.
module serial_adder #(
  parameter bit SUB = 1'b0
) (
  input  logic clk,
  input  logic rst_n,
  input  logic start,
  input  logic a,
  input  logic b,
  output logic s
);

  logic carry_q;
  logic carry_in;
  logic b_eff;

  always_comb begin
    b_eff    = b ^ SUB;
    carry_in = start ? SUB : carry_q;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      carry_q <= SUB;
      s       <= 1'b0;
    end else begin
      carry_q <= (a & b_eff) | (a & carry_in) | (b_eff & carry_in);
      s       <= a ^ b_eff ^ carry_in;
    end
  end

endmodule
