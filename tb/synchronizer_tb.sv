// synchronizer_tb: self-checking test of the valid flag stage.
//
// Random input bits; q must equal the bit applied one clock before, and
// reset must clear it.
module synchronizer_tb;
  logic clock = 1'b0;
  logic reset, d, q;
  logic prev;

  int checks = 0, failures = 0;

  synchronizer dut (.*);

  always #5 clock = ~clock;

  initial begin
    repeat (5000) @(posedge clock);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    reset = 1'b1; d = 1'b1;
    repeat (2) @(posedge clock); #1;
    checks++;
    if (q !== 1'b0) begin failures++; $display("FAIL reset"); end
    for (int n = 0; n < 2000; n++) begin
      @(negedge clock);
      reset = (n == 700);
      d     = 1'($urandom);
      prev  = reset ? 1'b0 : d;
      @(posedge clock); #1;
      checks++;
      if (q != prev) begin
        failures++;
        $display("FAIL n=%0d q=%0b exp=%0b", n, q, prev);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
