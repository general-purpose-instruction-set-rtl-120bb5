// tb_gpisp_relprime -- "relative prime" workload on the processor at its
// default parameters.
// The program reads n from the DIP switches ($vr), searches m = 2, 3, ...
// for the first m with gcd(n, m) == 1, and writes m to the display ($dr).
// gcd is a procedure called with jal and returning with jr $ar; it uses
// Euclid's subtraction form, since the machine has no divider or shifter.
// The testbench runs several inputs, among them 0x13B0 (answer 0x000B),
// each from reset, and compares the display with the answer computed here
// with integer arithmetic. It reports clock cycles, instructions and cycles
// per instruction of every run.
module tb_gpisp_relprime;
  import gpisp_pkg::*;
  import gpisp_asm_pkg::*;

  localparam logic [3:0] S0 = 4'd1, S1 = 4'd2, S2 = 4'd3, S3 = 4'd4;
  localparam logic [3:0] T0 = 4'd5, T1 = 4'd6, T2 = 4'd7;
  localparam logic [3:0] A0 = 4'd9, V0 = 4'd11;
  localparam logic [3:0] AR = REG_AR, ZERO = REG_ZERO;

  logic        clk = 0, rst = 1;
  logic [15:0] mem_addr, mem_wdata, mem_rdata, display, pc, ir, bs;
  logic        mem_read, mem_write, pending;
  logic [14:0] buttons = '0;
  logic [15:0] switches = '0;
  state_e      state;
  int          checks = 0, failures = 0;
  longint      cycles = 0, instrs = 0;

  gpisp_cpu dut (
    .clk(clk), .rst(rst),
    .mem_addr(mem_addr), .mem_read(mem_read), .mem_write(mem_write),
    .mem_wdata(mem_wdata), .mem_rdata(mem_rdata),
    .buttons(buttons), .switches(switches), .display(display),
    .pc_q(pc), .ir_q(ir), .state(state), .int_pending(pending), .bs_q(bs)
  );

  gpisp_tb_mem mem (.clk(clk), .addr(mem_addr), .re(mem_read), .we(mem_write),
                    .wdata(mem_wdata), .rdata(mem_rdata));

  always #5 clk = ~clk;
  always @(posedge clk) if (!rst) begin
    cycles++;
    if (state == S_FETCH) instrs++;
  end

  initial begin
    repeat (3000000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  logic [15:0] at;
  logic [15:0] lbl [string];
  bit          write_pass;

  task automatic emit(input logic [15:0] w);
    if (write_pass) mem.poke(at, w);
    at += 16'd2;
  endtask
  task automatic label(input string name);
    lbl[name] = at;
  endtask
  function automatic logic [15:0] addr_of(input string name);
    return lbl.exists(name) ? lbl[name] : 16'h0000;
  endfunction
  task automatic load(input logic [3:0] r, input logic [15:0] v);
    emit(lui_(r, v[15:8]));
    emit(lli_(r, v[7:0]));
  endtask

  task automatic build;
    at = 16'h0000;
    emit(rv_(A0, SREG_VR));                 // n
    load(S0, 16'd2);                        // m
    load(S1, 16'd1);                        // constant 1
    label("LOOP");
    emit(add_(T0, A0, ZERO));
    emit(add_(T1, S0, ZERO));
    load(S2, addr_of("GCD"));
    emit(jal_(S2));
    load(S2, addr_of("FOUND"));
    emit(beq_(S2, V0, S1));                 // gcd == 1
    emit(add_(S0, S0, S1));
    load(S2, addr_of("LOOP"));
    emit(jr_(S2));
    label("FOUND");
    emit(ov_(SREG_DR, S0));
    label("HALT");
    load(S2, addr_of("HALT"));
    emit(jr_(S2));
    // v0 = gcd(t0, t1)
    label("GCD");
    load(S3, addr_of("GZERO"));
    emit(beq_(S3, T0, ZERO));
    label("GLOOP");
    load(S3, addr_of("GDONE"));
    emit(beq_(S3, T1, ZERO));
    emit(slt_(T2, T1, T0));
    load(S3, addr_of("AGTB"));
    emit(bne_(S3, T2, ZERO));
    emit(sub_(T1, T1, T0));
    load(S3, addr_of("GLOOP"));
    emit(jr_(S3));
    label("AGTB");
    emit(sub_(T0, T0, T1));
    load(S3, addr_of("GLOOP"));
    emit(jr_(S3));
    label("GZERO");
    emit(add_(V0, T1, ZERO));
    emit(jr_(AR));
    label("GDONE");
    emit(add_(V0, T0, ZERO));
    emit(jr_(AR));
  endtask

  function automatic int gcd(int a, int b);
    while (b != 0) begin
      int t = a % b;
      a = b;
      b = t;
    end
    return a;
  endfunction

  function automatic int relprime(int n);
    int m = 2;
    while (gcd(n, m) != 1) m++;
    return m;
  endfunction

  task automatic run(input logic [15:0] n);
    int exp;
    exp = relprime(int'(n));
    rst = 1; switches = n;
    repeat (3) @(negedge clk);
    cycles = 0; instrs = 0;
    rst = 0;
    wait (display != 16'h0000 || cycles > 2000000);
    checks++;
    if (display !== 16'(exp)) begin
      failures++;
      $display("FAIL n=%h display=%h expected %h", n, display, exp);
    end
    $display("n=0x%h result=0x%h cycles=%0d instructions=%0d cpi=%0.2f",
             n, display, cycles, instrs, real'(cycles) / real'(instrs));
  endtask

  initial begin
    write_pass = 0; build();
    write_pass = 1; build();
    run(16'h0006);
    run(16'h001E);
    run(16'h0D2F);
    run(16'h13B0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
