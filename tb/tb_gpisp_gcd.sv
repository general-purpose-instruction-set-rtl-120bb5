// tb_gpisp_gcd -- greatest common divisor workload on the processor at its
// default parameters.
// The program reads a from the DIP switches ($vr) and b from a data word in
// memory (lw), computes gcd(a, b) in a procedure called with jal, stores the
// result to a second data word (sw) and writes it to the display ($dr).
// The gcd procedure uses Euclid's subtraction form (slt decides which
// operand to reduce), since the machine has no divider. A gcd of 0 with
// the other operand returns that operand.
// Each pair runs from reset. The testbench compares the display and the
// stored word with gcd computed here by the remainder form. Operands are
// positive 15-bit numbers, because slt compares signed values. Random
// pairs keep both operands at 0x0100 or more, which bounds the number of
// subtraction steps so that every run ends within its cycle limit.
module tb_gpisp_gcd;
  import gpisp_pkg::*;
  import gpisp_asm_pkg::*;

  localparam logic [3:0] S2 = 4'd3, S3 = 4'd4;
  localparam logic [3:0] T0 = 4'd5, T1 = 4'd6, T2 = 4'd7;
  localparam logic [3:0] A0 = 4'd9, A1 = 4'd10, V0 = 4'd11;
  localparam logic [3:0] AR = REG_AR, ZERO = REG_ZERO;
  localparam logic [15:0] B_ADDR   = 16'h1000;   // operand b
  localparam logic [15:0] RES_ADDR = 16'h1002;   // result
  localparam int          RUN_LIMIT = 200000;    // cycles per pair

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
    emit(rv_(A0, SREG_VR));                 // a
    load(S2, B_ADDR);
    emit(lw_(A1, S2, ZERO));                // b
    emit(add_(T0, A0, ZERO));
    emit(add_(T1, A1, ZERO));
    load(S2, addr_of("GCD"));
    emit(jal_(S2));
    load(S2, RES_ADDR);
    emit(sw_(V0, S2, ZERO));
    emit(ov_(SREG_DR, V0));
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

  task automatic run(input logic [15:0] a, input logic [15:0] b);
    int exp;
    exp = gcd(int'(a), int'(b));
    rst = 1; switches = a;
    mem.poke(B_ADDR, b);
    mem.poke(RES_ADDR, 16'h0000);
    repeat (3) @(negedge clk);
    cycles = 0; instrs = 0;
    rst = 0;
    wait (display != 16'h0000 || cycles > RUN_LIMIT);
    checks += 2;
    if (display !== 16'(exp)) begin
      failures++;
      $display("FAIL gcd(%h,%h) display=%h expected %h", a, b, display, exp);
    end
    if (mem.peek(RES_ADDR) !== 16'(exp)) begin
      failures++;
      $display("FAIL gcd(%h,%h) stored=%h expected %h", a, b, mem.peek(RES_ADDR), exp);
    end
    $display("gcd(0x%h,0x%h)=0x%h cycles=%0d instructions=%0d", a, b, display,
             cycles, instrs);
  endtask

  initial begin
    logic [15:0] a, b;
    write_pass = 0; build();
    write_pass = 1; build();
    run(16'd12,   16'd18);
    run(16'd18,   16'd12);
    run(16'd17,   16'd5);
    run(16'd0,    16'd42);
    run(16'd42,   16'd0);
    run(16'd1234, 16'd1234);
    run(16'h13B0, 16'd15);
    run(16'h7FFF, 16'h7FF0);
    for (int i = 0; i < 8; i++) begin
      a = 16'($urandom_range(16'h0100, 16'h7FFF));
      b = 16'($urandom_range(16'h0100, 16'h7FFF));
      run(a, b);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
