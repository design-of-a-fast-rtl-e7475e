// Chain of delay elements.
//
// A shift register of LEN flip-flops that delays a serial bit stream by LEN
// clock cycles. It is used both for the T-blocks (one-sample memories) and for
// the shimming delays that line up word frames in the bit-serial data path; as
// in the data path it models, each memory bit is a plain delay element. Reset
// clears the chain, so the filter starts from the zero state.
module serial_delay #(
  parameter int unsigned LEN = 14
) (
  input  logic clk,
  input  logic rst_n,
  input  logic d,
  output logic q
);

  logic [LEN-1:0] chain;

  if (LEN == 1) begin : g_one
    always_ff @(posedge clk or negedge rst_n) begin
      if (!rst_n) chain <= '0;
      else        chain <= d;
    end
  end else begin : g_chain
    always_ff @(posedge clk or negedge rst_n) begin
      if (!rst_n) chain <= '0;
      else        chain <= {chain[LEN-2:0], d};
    end
  end

  assign q = chain[LEN-1];

endmodule
