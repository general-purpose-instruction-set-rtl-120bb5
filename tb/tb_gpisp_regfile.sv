// tb_gpisp_regfile -- self-checking test of the register file.
// Random writes through the decoder and random reads on all three ports are
// compared with an array model: register 0 stays 0, the button state
// register keeps button bits and the enable bit as gpisp_bsr specifies.
module tb_gpisp_regfile;
  import gpisp_pkg::*;
  logic        clk = 0, rst = 1;
  logic [3:0]  ra1, ra2, ra3, wa;
  logic [15:0] rd1, rd2, rd3, wd, bs;
  logic        we, wie, ie, ieo;
  logic [14:0] buttons;
  logic [15:0] model [16];
  int          checks = 0, failures = 0;

  gpisp_regfile dut (.clk(clk), .rst(rst), .raddr1(ra1), .raddr2(ra2), .raddr3(ra3),
                     .rdata1(rd1), .rdata2(rd2), .rdata3(rd3), .we(we), .waddr(wa),
                     .wdata(wd), .buttons(buttons), .write_int_enable(wie),
                     .interrupt_enable(ie), .int_enable_out(ieo), .bs_q(bs));

  always #5 clk = ~clk;

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check_reads;
    ra1 = 4'($urandom); ra2 = 4'($urandom); ra3 = 4'($urandom);
    #1;
    checks++;
    if (rd1 !== model[ra1] || rd2 !== model[ra2] || rd3 !== model[ra3] ||
        ieo !== model[REG_BS][15] || bs !== model[REG_BS]) begin
      failures++;
      $display("FAIL r%0d=%h/%h r%0d=%h/%h r%0d=%h/%h", ra1, rd1, model[ra1],
               ra2, rd2, model[ra2], ra3, rd3, model[ra3]);
    end
  endtask

  initial begin
    we = 0; wie = 0; ie = 0; buttons = 0; wa = 0; wd = 0; ra1 = 0; ra2 = 0; ra3 = 0;
    @(posedge clk); @(posedge clk);
    rst = 0;
    foreach (model[i]) model[i] = '0;
    // fill every register once, reading all back
    for (int r = 0; r < 16; r++) begin
      @(negedge clk); we = 1; wa = 4'(r); wd = 16'h1111 * 16'(r) ^ 16'h5A00;
      @(posedge clk); #1;
      if (r != 0) model[r] = wd;
    end
    we = 0;
    for (int r = 0; r < 16; r++) begin
      ra1 = 4'(r); #1; checks++;
      if (rd1 !== model[r]) begin failures++; $display("FAIL fill r%0d %h %h", r, rd1, model[r]); end
    end
    for (int i = 0; i < 5000; i++) begin
      logic [15:0] nxt;
      @(negedge clk);
      we = 1'($urandom); wa = 4'($urandom); wd = 16'($urandom);
      buttons = ($urandom % 8 == 0) ? 15'($urandom) : 15'h0;
      wie = ($urandom % 6 == 0); ie = 1'($urandom);
      check_reads();
      nxt = model[REG_BS];
      for (int b = 0; b < 15; b++) begin
        if (buttons[b] && !model[REG_BS][b]) nxt[b] = 1'b1;
        else if (we && wa == REG_BS) nxt[b] = wd[b];
      end
      if (wie) nxt[15] = ie;
      else if (we && wa == REG_BS) nxt[15] = wd[15];
      @(posedge clk); #1;
      if (we && wa != REG_BS && wa != REG_ZERO) model[wa] = wd;
      model[REG_BS] = nxt;
    end
    @(negedge clk); we = 0; wie = 0; buttons = 0;
    check_reads();
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
