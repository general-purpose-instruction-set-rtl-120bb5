// gpisp_int_latch -- interrupt request latch.
//
// A one-bit register set in any cycle in which one of the 15 button inputs
// is high while the interrupt enable bit is 0 (interrupts accepted). It holds
// its value until the control clears it with latch_reset during the
// interrupt sequence; a reset request has priority over a new set. Its
// output makes the next fetch load the interrupt op-code into the IR instead
// of the memory word. Synchronous reset to 0. Gating by the enable bit and
// the reset priority are this design's reading of the data-path sketch.
module gpisp_int_latch (
  input  logic        clk,
  input  logic        rst,
  input  logic [14:0] buttons,
  input  logic        int_disabled,   // interrupt enable bit of $bs (1 = ignore)
  input  logic        latch_reset,
  output logic        pending
);
  always_ff @(posedge clk) begin
    if (rst || latch_reset)             pending <= 1'b0;
    else if (|buttons && !int_disabled) pending <= 1'b1;
  end
endmodule
