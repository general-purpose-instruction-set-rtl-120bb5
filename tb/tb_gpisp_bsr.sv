// tb_gpisp_bsr -- self-checking test of the button state register.
// Keeps a reference model of the 16 bits (buttons set a 0 bit, software
// writes load bits that are not being set, control writes of bit 15 win)
// and compares it with the register after every clock under random stimulus.
module tb_gpisp_bsr;
  logic        clk = 0, rst = 1;
  logic        we, wie, ie;
  logic [15:0] wdata, q, model;
  logic [14:0] buttons;
  logic        ieo;
  int          checks = 0, failures = 0;
  int          n_btn_set = 0, n_ctl_write = 0;

  gpisp_bsr dut (.clk(clk), .rst(rst), .we(we), .wdata(wdata), .buttons(buttons),
                 .write_int_enable(wie), .interrupt_enable(ie), .q(q), .int_enable_out(ieo));

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic step;
    logic [15:0] nxt;
    nxt = model;
    for (int i = 0; i < 15; i++) begin
      if (buttons[i] && !model[i]) begin nxt[i] = 1'b1; n_btn_set++; end
      else if (we) nxt[i] = wdata[i];
    end
    if (wie) begin nxt[15] = ie; n_ctl_write++; end
    else if (we) nxt[15] = wdata[15];
    @(posedge clk);
    model = nxt;
    #1;
    checks++;
    if (q !== model || ieo !== model[15]) begin
      failures++;
      $display("FAIL q=%h model=%h", q, model);
    end
  endtask

  initial begin
    we = 0; wie = 0; ie = 0; wdata = 0; buttons = 0;
    @(posedge clk); @(posedge clk);
    rst = 0; model = 16'h0000;
    #1;
    checks++; if (q !== 16'h0) failures++;
    // a button press sets only its bit and it stays set
    buttons = 15'h0004; step();
    buttons = 15'h0000; step();
    if (q !== 16'h0004) begin failures++; $display("FAIL hold"); end
    // software clears it with a write
    we = 1; wdata = 16'h0000; step(); we = 0;
    // the control sets and clears the enable bit
    wie = 1; ie = 1; step(); wie = 0; ie = 0;
    checks++; if (!ieo) begin failures++; $display("FAIL ie set"); end
    wie = 1; step(); wie = 0;
    checks++; if (ieo) begin failures++; $display("FAIL ie clear"); end
    // button against a software write of 0 in the same cycle: button wins
    buttons = 15'h0001; we = 1; wdata = 16'h0000; step();
    checks++; if (q[0] !== 1'b1) begin failures++; $display("FAIL priority"); end
    buttons = 0; we = 0;
    for (int i = 0; i < 3000; i++) begin
      buttons = ($urandom % 4 == 0) ? 15'($urandom) : 15'h0;
      we      = ($urandom % 3 == 0);
      wdata   = 16'($urandom);
      wie     = ($urandom % 5 == 0);
      ie      = 1'($urandom);
      step();
    end
    checks++;
    if (n_btn_set == 0 || n_ctl_write == 0) failures++;
    $display("button sets=%0d control writes=%0d", n_btn_set, n_ctl_write);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
