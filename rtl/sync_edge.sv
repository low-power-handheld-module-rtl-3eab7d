// sync_edge: brings an asynchronous input (measured signal, button or
// external bit clock) into the IN20M clock domain and marks its rising edges.
//
// Two flip-flops resynchronise the input; a third holds the previous sample,
// so `rise` is a one-cycle strobe two to three clock cycles after the input
// goes high.  `level` is the synchronised level.  Every input of the
// instrument goes through one of these: the whole design runs on the single
// 20 MHz clock with enable strobes, which is this design's choice (the
// original CPLD design clocked some registers directly from derived clocks).
// Inputs faster than half the clock frequency cannot be counted.
module sync_edge (
  input  logic clk,
  input  logic rst_n,
  input  logic d,      // asynchronous input
  output logic level,  // synchronised level
  output logic rise    // one-cycle strobe on a rising edge
);
  logic [2:0] sh;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) sh <= '0;
    else        sh <= {sh[1:0], d};
  end

  assign level = sh[1];
  assign rise  = sh[1] & ~sh[2];
endmodule
