// Testbench for io_out: 14-bit words are shifted in LSB first, with `done` on
// the last bit. After that clock y_out must hold the word limited to 10 bits
// and y_sat must say whether it was limited; y_out must not change while the
// next word is shifted in. Words are random over the 14-bit range, so both
// limits and the pass-through case all occur; they are counted.
module io_out_tb;
  import lwdf_ref_pkg::*;
  localparam int N = 14;
  localparam int FRAMES = 300;

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  logic done, sdi;
  logic [9:0] y_out;
  logic y_sat;
  int checks = 0, failures = 0;
  int n_hi = 0, n_lo = 0, n_pass = 0;

  io_out #(.N(N), .XW(10)) dut (.clk, .rst_n, .done, .sdi, .y_out, .y_sat);

  always #5 clk = ~clk;

  initial begin
    #(10 * (FRAMES + 10) * N);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int w, want;
    logic want_sat;
    logic [N-1:0] v;
    logic [9:0] prev;
    done = 1'b0; sdi = 1'b0;
    repeat (2) @(posedge clk);
    @(negedge clk);
    rst_n = 1'b1;
    for (int f = 0; f < FRAMES; f++) begin
      w = (f % 3 == 0) ? sext($urandom, 10) : sext($urandom, N);
      if (f == 1) w = 511;
      if (f == 2) w = 512;
      if (f == 4) w = -512;
      if (f == 5) w = -513;
      v = N'(w);
      prev = y_out;
      for (int k = 0; k < N; k++) begin
        done = (k == N - 1);
        sdi = v[k];
        @(negedge clk);
        if (k < N - 1 && y_out !== prev) begin
          failures++;
          $display("frame %0d: y_out changed early", f);
        end
      end
      want = (w > 511) ? 511 : (w < -512) ? -512 : w;
      want_sat = (w > 511) || (w < -512);
      if (w > 511) n_hi++; else if (w < -512) n_lo++; else n_pass++;
      checks++;
      if (y_out !== 10'(want) || y_sat !== want_sat) begin
        failures++;
        $display("frame %0d: word %0d want %0d/%0d got %0d/%0d", f, w, want, want_sat,
                 sext(int'(y_out), 10), y_sat);
      end
    end
    checks++;
    if (n_hi == 0 || n_lo == 0 || n_pass == 0) begin
      failures++;
      $display("cases not covered: hi=%0d lo=%0d pass=%0d", n_hi, n_lo, n_pass);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
