// edge_sync: brings one asynchronous input into the clock domain and turns
// its rising edge into a single-cycle pulse.
//
// Two flip-flops synchronise the input; a third holds the previous value and
// `pulse` is high for the one cycle in which the synchronised level goes from
// 0 to 1.  Latency from the input edge to `pulse` is 2 to 3 clock cycles.  An
// input must stay high for at least one clock and low for at least one clock
// between pulses to be counted once.  The input stages are this design's own
// choice: the module's input conditioning is not specified further than that
// each pulse is counted.
module edge_sync (
  input  logic clk,
  input  logic rst_n,
  input  logic din,     // asynchronous input level
  output logic pulse    // one-cycle pulse per rising edge of din
);
  logic [2:0] sh;

  always_ff @(posedge clk) begin
    if (!rst_n) sh <= '0;
    else        sh <= {sh[1:0], din};
  end

  assign pulse = sh[1] & ~sh[2];
endmodule
