// Output half of the I/O unit: serial to parallel.
//
// Serial bits enter the top of a shift register of delay elements that shifts
// right every cycle. `done` is high in the cycle that carries the word's last
// (most significant) frame bit; at the end of that cycle the whole N-bit word is
// present and the output register is loaded. The N-bit word is limited to the
// XW-bit system word (saturation to the largest or smallest value), and y_sat
// reports that the limit was applied. The saturation is this design's
// choice for mapping the guard bits back to the I/O word.
module io_out
  import lwdf_pkg::*;
#(
  parameter int unsigned N  = CYCLES,
  parameter int unsigned XW = SYS_LEN
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          done,
  input  logic          sdi,
  output logic [XW-1:0] y_out,
  output logic          y_sat
);

  localparam logic signed [N-1:0] MAXV = N'((1 << (XW - 1)) - 1);
  localparam logic signed [N-1:0] MINV = -N'(1 << (XW - 1));

  logic [N-2:0]        sr;
  logic signed [N-1:0] word;

  assign word = {sdi, sr};

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      sr    <= '0;
      y_out <= '0;
      y_sat <= 1'b0;
    end else begin
      sr <= {sdi, sr[N-2:1]};
      if (done) begin
        if (word > MAXV) begin
          y_out <= MAXV[XW-1:0];
          y_sat <= 1'b1;
        end else if (word < MINV) begin
          y_out <= MINV[XW-1:0];
          y_sat <= 1'b1;
        end else begin
          y_out <= word[XW-1:0];
          y_sat <= 1'b0;
        end
      end
    end
  end

endmodule
