// gpisp_bsr -- button state register ($bs) with the interrupt enable bit.
//
// Bits 14..0 each remember one push button. A bit that is 0 is set to 1 in
// the cycle its button input is high; it then stays 1 until software writes
// the register (for example with an AND mask). While the bit is 0 and its
// button is high the button wins over a software write of that bit; a 1 is
// never cleared by a button.
// Bit 15 is the interrupt enable bit: 0 = interrupts accepted, 1 = ignored.
// It is loaded from wdata[15] on a software write, or from interrupt_enable
// when the control asserts write_int_enable (the interrupt sequence sets it,
// returning through $ir clears it); the control write wins.
// All bits are edge-triggered flip-flops cleared by the synchronous reset,
// so interrupts are enabled after reset (reset value is this design's choice).
module gpisp_bsr (
  input  logic        clk,
  input  logic        rst,
  input  logic        we,                 // register-file write addressed to $bs
  input  logic [15:0] wdata,
  input  logic [14:0] buttons,            // one level per button
  input  logic        write_int_enable,
  input  logic        interrupt_enable,
  output logic [15:0] q,
  output logic        int_enable_out      // = q[15]
);
  logic [14:0] set_bit;

  assign set_bit        = buttons & ~q[14:0];
  assign int_enable_out = q[15];

  always_ff @(posedge clk) begin
    if (rst) begin
      q <= '0;
    end else begin
      for (int i = 0; i < 15; i++) begin
        if (set_bit[i])      q[i] <= 1'b1;
        else if (we)         q[i] <= wdata[i];
      end
      if (write_int_enable)  q[15] <= interrupt_enable;
      else if (we)           q[15] <= wdata[15];
    end
  end
endmodule
