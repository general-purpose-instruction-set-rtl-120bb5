// tb_gpisp_beq_program -- runs the original design's branch-on-equal test program.
// The program clears $t0 and $s0, loads 3 and 1 with lli, then counts $t0
// down in a loop that leaves through `beq $s1, $t0, $zero` once $t0 is 0
// (the jump target sits in $s1, loaded with the lui/lli pair of the `load`
// pseudo-instruction) and otherwise jumps back with `jr $s1`. After the loop
// it tries to write $zero, which must stay 0.
// Checks: final register values, how often each branch outcome and jr
// occurred, and the number of clock cycles from reset to the fetch of the
// first instruction after the loop, worked out from the per-instruction
// cycle counts of the control state diagram (1 reset cycle, add/sub 4,
// lui/lli 3, beq 3 not taken / 4 taken, jr 3): 1 + 14 + 22 + 22 + 14 = 73.
module tb_gpisp_beq_program;
  import gpisp_pkg::*;
  import gpisp_asm_pkg::*;

  localparam logic [3:0] S0 = 4'd1, S1 = 4'd2, T0 = 4'd5, T1 = 4'd6, T2 = 4'd7, T3 = 4'd8;
  localparam logic [3:0] ZERO = REG_ZERO;
  localparam int         EXPECTED_CYCLES = 73;

  logic        clk = 0, rst = 1;
  logic [15:0] mem_addr, mem_wdata, mem_rdata, display, pc, ir, bs;
  logic        mem_read, mem_write, pending;
  state_e      state;
  int          checks = 0, failures = 0;
  int          cycles = 0, n_beq_taken = 0, n_beq_not = 0, n_jr = 0, n_sub = 0;
  int          end_cycle = -1;
  logic [15:0] end_addr, loop_addr;

  gpisp_cpu dut (
    .clk(clk), .rst(rst),
    .mem_addr(mem_addr), .mem_read(mem_read), .mem_write(mem_write),
    .mem_wdata(mem_wdata), .mem_rdata(mem_rdata),
    .buttons(15'h0), .switches(16'h0), .display(display),
    .pc_q(pc), .ir_q(ir), .state(state), .int_pending(pending), .bs_q(bs)
  );

  gpisp_tb_mem mem (.clk(clk), .addr(mem_addr), .re(mem_read), .we(mem_write),
                    .wdata(mem_wdata), .rdata(mem_rdata));

  always #5 clk = ~clk;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(posedge clk) if (!rst) begin
    cycles++;
    if (state == S_BEQ4A) n_beq_taken++;
    if (state == S_BEQ3 && dut.zero == 1'b0) n_beq_not++;
    if (state == S_JR3) n_jr++;
    if (state == S_SUB3) n_sub++;
    if (state == S_FETCH && pc == end_addr && end_cycle < 0) end_cycle = cycles - 1;
  end

  task automatic expect_reg(input logic [3:0] r, input logic [15:0] v, input string what);
    checks++;
    if (dut.u_rf.regs[r] !== v) begin
      failures++;
      $display("FAIL %s: r%0d=%h expected %h", what, r, dut.u_rf.regs[r], v);
    end
  endtask

  initial begin
    logic [15:0] prog [$];
    loop_addr = 16'h0008;   // word 4
    end_addr  = 16'h0016;   // word 11
    prog = '{add_(T0, ZERO, ZERO), lli_(T0, 8'h03), add_(S0, ZERO, ZERO), lli_(S0, 8'h01),
             // loop:
             sub_(T0, T0, S0),
             lui_(S1, end_addr[15:8]), lli_(S1, end_addr[7:0]),
             beq_(S1, T0, ZERO),
             lui_(S1, loop_addr[15:8]), lli_(S1, loop_addr[7:0]),
             jr_(S1),
             // end:
             add_(ZERO, T0, S0), add_(ZERO, S1, S0), add_(T1, T2, T3), add_(ZERO, ZERO, ZERO)};
    foreach (prog[i]) mem.poke(16'(2 * i), prog[i]);
    repeat (3) @(posedge clk);
    @(negedge clk) rst = 0;
    repeat (200) @(posedge clk);
    #1;
    expect_reg(T0, 16'h0000, "$t0 counted down");
    expect_reg(S0, 16'h0001, "$s0");
    expect_reg(S1, end_addr, "$s1 holds the exit address");
    expect_reg(T1, 16'h0000, "$t1 = $t2 + $t3");
    expect_reg(ZERO, 16'h0000, "$zero after writes");
    checks++;
    if (n_beq_taken != 1 || n_beq_not != 2 || n_jr != 2 || n_sub != 3) begin
      failures++;
      $display("FAIL counts beq taken=%0d not=%0d jr=%0d sub=%0d", n_beq_taken, n_beq_not, n_jr, n_sub);
    end
    checks++;
    if (end_cycle != EXPECTED_CYCLES) begin
      failures++;
      $display("FAIL loop exit reached after %0d cycles, expected %0d", end_cycle, EXPECTED_CYCLES);
    end
    $display("beq taken=%0d not taken=%0d jr=%0d exit after %0d cycles", n_beq_taken, n_beq_not, n_jr, end_cycle);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
