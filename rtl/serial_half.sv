// Bit-serial fixed-coefficient multiplier by 0.5.
//
// With words sent least significant bit first, halving a word is a right
// shift: the result word is the same bit stream read one position later, so it
// needs no delay element at all. The result frame therefore starts one cycle
// after the source frame. Its last bit must be the sign again (arithmetic
// shift), and at that moment the source stream already carries the LSB of the
// next word; a single flip-flop keeps the previous bit so the sign can be
// repeated. `hold` is high in that cycle, which is the LSB cycle of the source
// word. The rounding is truncation towards minus infinity. The coefficient
// 0.5 (binary 0.1) is the alpha1 of the sixth-order filter; the sign-hold
// flip-flop is this design's way of finishing the word.
module serial_half (
  input  logic clk,
  input  logic rst_n,
  input  logic hold,
  input  logic d,
  output logic q
);

  logic d_q;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) d_q <= 1'b0;
    else        d_q <= d;
  end

  assign q = hold ? d_q : d;

endmodule
