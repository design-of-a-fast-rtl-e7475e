// Testbench for serial_delay: three chains (1, 3 and 14 elements) receive a
// random bit stream; each output must equal the input of LEN cycles before.
// After reset every chain must read zero until the first bit arrives.
module serial_delay_tb;
  localparam int CYC = 400;

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  logic d;
  logic q1, q3, q14;
  logic hist [CYC];
  int checks = 0, failures = 0;

  serial_delay #(.LEN(1))  dut1  (.clk, .rst_n, .d, .q(q1));
  serial_delay #(.LEN(3))  dut3  (.clk, .rst_n, .d, .q(q3));
  serial_delay #(.LEN(14)) dut14 (.clk, .rst_n, .d, .q(q14));

  always #5 clk = ~clk;

  initial begin
    #(10 * (CYC + 20));
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic logic expect_bit(int t, int len);
    return (t - len >= 0) ? hist[t - len] : 1'b0;
  endfunction

  initial begin
    d = 1'b0;
    repeat (2) @(posedge clk);
    @(negedge clk);
    rst_n = 1'b1;
    for (int t = 0; t < CYC; t++) begin
      hist[t] = 1'($urandom);
      d = hist[t];
      #1;
      checks += 3;
      if (q1  !== expect_bit(t, 1))  begin failures++; $display("len1 t=%0d", t);  end
      if (q3  !== expect_bit(t, 3))  begin failures++; $display("len3 t=%0d", t);  end
      if (q14 !== expect_bit(t, 14)) begin failures++; $display("len14 t=%0d", t); end
      @(negedge clk);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
