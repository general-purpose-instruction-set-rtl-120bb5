// tb_gpisp_special -- self-checking test of the special register bank.
// $vr must follow the switches one clock later, $dr must take only writes
// addressed to it, other addresses read 0 and writes to $vr are ignored.
module tb_gpisp_special;
  import gpisp_pkg::*;
  logic        clk = 0, rst = 1;
  logic [15:0] sw, rdata, wdata, disp;
  logic [3:0]  raddr, waddr;
  logic        we;
  logic [15:0] m_vr, m_dr;
  int          checks = 0, failures = 0;

  gpisp_special dut (.clk(clk), .rst(rst), .switches(sw), .raddr(raddr), .rdata(rdata),
                     .we(we), .waddr(waddr), .wdata(wdata), .display(disp));

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    sw = 0; we = 0; waddr = 0; wdata = 0; raddr = 0;
    @(posedge clk); @(posedge clk);
    rst = 0; m_vr = 0; m_dr = 0;
    for (int i = 0; i < 3000; i++) begin
      @(negedge clk);
      sw = 16'($urandom); we = 1'($urandom); wdata = 16'($urandom);
      waddr = ($urandom % 2) ? SREG_DR : 4'($urandom);
      raddr = ($urandom % 3 == 0) ? 4'($urandom) : 4'($urandom % 2);
      #1;
      checks++;
      if (rdata !== ((raddr == SREG_VR) ? m_vr : (raddr == SREG_DR) ? m_dr : 16'h0) || disp !== m_dr) begin
        failures++;
        $display("FAIL raddr=%0d rdata=%h vr=%h dr=%h disp=%h", raddr, rdata, m_vr, m_dr, disp);
      end
      @(posedge clk); #1;
      m_vr = sw;
      if (we && waddr == SREG_DR) m_dr = wdata;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
