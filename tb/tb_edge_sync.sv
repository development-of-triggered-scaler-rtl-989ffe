// tb_edge_sync: self-checking test of the input synchroniser.
//
// Drives the input with random levels that change only between clock edges
// (high and low phases of 1 to 6 clocks, and some long ones), keeps a
// delayed copy of the sampled input in the test, and checks on every clock
// that `pulse` is high exactly when the input was sampled high two edges
// earlier and low three edges earlier: one pulse per rising edge, with a
// fixed latency.  Also checks that the number of pulses equals the number of
// rising edges sent.
module tb_edge_sync;
  logic clk = 0, rst_n = 0, din = 0;
  logic pulse;

  edge_sync dut (.*);

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  int rises = 0, pulses = 0;
  logic [3:0] hist = '0;   // hist[0]: din sampled at the last edge

  always @(posedge clk) begin
    if (rst_n) begin
      checks++;
      // hist is still the value before this edge: hist[0] = previous edge
      if (pulse !== (hist[1] & ~hist[2])) begin
        failures++;
        $display("FAIL @%0t: pulse %0d, expected %0d", $time, pulse, hist[1] & ~hist[2]);
      end
      if (pulse) pulses++;
      hist <= {hist[2:0], din};
    end
  end

  initial begin
    repeat (3) @(negedge clk);
    rst_n = 1;
    repeat (4) @(negedge clk);
    for (int i = 0; i < 2000; i++) begin
      int len;
      len = (i % 50 == 0) ? 40 : $urandom_range(6, 1);
      if (!din) rises++;
      din = 1;
      repeat (len) @(negedge clk);
      din = 0;
      len = (i % 37 == 0) ? 25 : $urandom_range(6, 1);
      repeat (len) @(negedge clk);
    end
    repeat (6) @(negedge clk);
    checks++;
    if (pulses != rises) begin
      failures++;
      $display("FAIL: %0d pulses for %0d rising edges", pulses, rises);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
