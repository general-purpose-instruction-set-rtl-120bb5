// tb_gpisp_int_latch -- self-checking test of the interrupt request latch.
// A one-cycle button pulse must set the latch when interrupts are enabled
// and be held until latch_reset; with the enable bit set, presses are
// ignored; reset has priority over a set in the same cycle.
module tb_gpisp_int_latch;
  logic        clk = 0, rst = 1;
  logic [14:0] buttons;
  logic        dis, lrst, pending, model;
  int          checks = 0, failures = 0;

  gpisp_int_latch dut (.clk(clk), .rst(rst), .buttons(buttons), .int_disabled(dis),
                       .latch_reset(lrst), .pending(pending));

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic cyc(input logic [14:0] b, input logic d, input logic r);
    @(negedge clk); buttons = b; dis = d; lrst = r;
    @(posedge clk); #1;
    if (r)                model = 1'b0;
    else if (|b && !d)    model = 1'b1;
    checks++;
    if (pending !== model) begin failures++; $display("FAIL b=%h d=%b r=%b p=%b", b, d, r, pending); end
  endtask

  initial begin
    buttons = 0; dis = 0; lrst = 0;
    @(posedge clk); @(posedge clk);
    rst = 0; model = 0;
    cyc(15'h0000, 0, 0);
    cyc(15'h4000, 0, 0);   // pulse on button 14
    cyc(15'h0000, 0, 0);   // held
    cyc(15'h0000, 1, 0);   // held while disabled
    cyc(15'h0000, 0, 1);   // cleared
    cyc(15'h0001, 1, 0);   // ignored while disabled
    cyc(15'h0001, 0, 1);   // reset wins
    for (int i = 0; i < 2000; i++)
      cyc(($urandom % 4 == 0) ? 15'($urandom) : 15'h0, 1'($urandom), ($urandom % 5 == 0));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
