// tb_gpisp_alu -- self-checking test of the 16-bit ALU.
// Drives directed corner cases (overflowing subtractions for SLT, zero
// results) and random operands for all four operations, and compares result,
// zero and overflow with reference values computed from integer arithmetic.
module tb_gpisp_alu;
  import gpisp_pkg::*;

  logic [15:0] a, b, y;
  aluop_e      op;
  logic        zero, ovf;
  int          checks = 0, failures = 0;

  gpisp_alu dut (.a(a), .b(b), .op(op), .result(y), .zero(zero), .overflow(ovf));

  task automatic check(input logic [15:0] ta, input logic [15:0] tb_, input aluop_e top);
    logic [15:0] exp;
    logic        exp_ovf;
    int          sa, sb;
    a = ta; b = tb_; op = top;
    #1;
    sa = int'($signed(ta));
    sb = int'($signed(tb_));
    unique case (top)
      ALU_ADD: begin exp = ta + tb_; exp_ovf = ((sa + sb) > 32767) || ((sa + sb) < -32768); end
      ALU_SUB: begin exp = ta - tb_; exp_ovf = ((sa - sb) > 32767) || ((sa - sb) < -32768); end
      ALU_AND: begin exp = ta & tb_; exp_ovf = 1'b0; end
      default: begin exp = (sa < sb) ? 16'd1 : 16'd0; exp_ovf = ((sa - sb) > 32767) || ((sa - sb) < -32768); end
    endcase
    checks++;
    if (y !== exp || zero !== (exp == 16'd0) || (top != ALU_AND && ovf !== exp_ovf)) begin
      failures++;
      $display("FAIL op=%0d a=%h b=%h y=%h exp=%h zero=%b ovf=%b exp_ovf=%b", top, ta, tb_, y, exp, zero, ovf, exp_ovf);
    end
  endtask

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    check(16'h0003, 16'h0004, ALU_ADD);
    check(16'hFFFF, 16'h0001, ALU_ADD);
    check(16'h7FFF, 16'h0001, ALU_ADD);
    check(16'h0005, 16'h0005, ALU_SUB);
    check(16'h8000, 16'h0001, ALU_SUB);
    check(16'h00F0, 16'h0F0F, ALU_AND);
    check(16'h8000, 16'h7FFF, ALU_SLT);   // -32768 < 32767, A-B overflows
    check(16'h7FFF, 16'h8000, ALU_SLT);   // 32767 < -32768 is false, overflows
    check(16'hFFFF, 16'h0000, ALU_SLT);
    check(16'h0000, 16'hFFFF, ALU_SLT);
    check(16'h1234, 16'h1234, ALU_SLT);
    for (int i = 0; i < 4000; i++)
      check(16'($urandom), 16'($urandom), aluop_e'(i % 4));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
