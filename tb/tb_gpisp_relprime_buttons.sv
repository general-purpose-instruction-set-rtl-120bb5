// tb_gpisp_relprime_buttons -- the relative-prime workload driven through
// the board I/O, the way the processor is operated with buttons.
// The main program spins until a start flag is set. Every button press
// raises an interrupt; the handler at 0xE000 inspects $bs:
//   button 0: copy the DIP switches ($vr) into the input register and echo
//             them on the display ($dr);
//   button 1: set the start flag;
// then clears the button bits and returns with jr $ir. The main program then
// computes the smallest m >= 2 with gcd(n, m) == 1 and shows it.
// The testbench sets the switches to 0x13B0, presses button 0, waits for the
// echo, presses button 1 and checks that the display shows 0x000B, computed
// here with integer arithmetic. It reports the cycles from the start press.
module tb_gpisp_relprime_buttons;
  import gpisp_pkg::*;
  import gpisp_asm_pkg::*;

  localparam logic [3:0] S0 = 4'd1, S1 = 4'd2, S2 = 4'd3, S3 = 4'd4;
  localparam logic [3:0] T0 = 4'd5, T1 = 4'd6, T2 = 4'd7, T3 = 4'd8;
  localparam logic [3:0] A0 = 4'd9, A1 = 4'd10, V0 = 4'd11, V1 = 4'd12;
  localparam logic [3:0] AR = REG_AR, BS = REG_BS, IRR = REG_IR, ZERO = REG_ZERO;
  localparam logic [15:0] N = 16'h13B0;

  logic        clk = 0, rst = 1;
  logic [15:0] mem_addr, mem_wdata, mem_rdata, display, pc, ir, bs;
  logic        mem_read, mem_write, pending;
  logic [14:0] buttons = '0;
  logic [15:0] switches = '0;
  state_e      state;
  int          checks = 0, failures = 0, n_int = 0;
  longint      cycles = 0;

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
  always @(posedge clk) begin
    cycles++;
    if (state == S_INT3) n_int++;
  end

  initial begin
    repeat (2000000) @(posedge clk);
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
    load(S1, 16'd1);
    load(S2, addr_of("WAIT"));
    label("WAIT");
    emit(beq_(S2, V1, ZERO));               // spin until the start flag is set
    load(S0, 16'd2);
    label("LOOP");
    emit(add_(T0, A0, ZERO));
    emit(add_(T1, S0, ZERO));
    load(S2, addr_of("GCD"));
    emit(jal_(S2));
    load(S2, addr_of("FOUND"));
    emit(beq_(S2, V0, S1));
    emit(add_(S0, S0, S1));
    load(S2, addr_of("LOOP"));
    emit(jr_(S2));
    label("FOUND");
    emit(ov_(SREG_DR, S0));
    label("HALT");
    load(S2, addr_of("HALT"));
    emit(jr_(S2));
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
    // interrupt handler: uses only $t2, $t3 and $a1
    at = 16'hE000;
    load(A1, 16'h0001);
    emit(and_(T2, BS, A1));
    load(T3, addr_of("NOT0"));
    emit(beq_(T3, T2, ZERO));
    emit(rv_(A0, SREG_VR));                 // button 0: take the switch value
    emit(ov_(SREG_DR, A0));
    label("NOT0");
    load(A1, 16'h0002);
    emit(and_(T2, BS, A1));
    load(T3, addr_of("NOT1"));
    emit(beq_(T3, T2, ZERO));
    load(V1, 16'h0001);                     // button 1: start
    label("NOT1");
    load(A1, 16'h8000);
    emit(add_(BS, A1, ZERO));               // clear button bits, stay disabled
    emit(jr_(IRR));
  endtask

  function automatic int gcd(int a, int b);
    while (b != 0) begin
      int t = a % b;
      a = b;
      b = t;
    end
    return a;
  endfunction

  task automatic press(input int b);
    @(negedge clk) buttons = 15'(1 << b);
    @(negedge clk) buttons = '0;
  endtask

  initial begin
    int     m;
    longint t0;
    m = 2;
    while (gcd(int'(N), m) != 1) m++;
    write_pass = 0; build();
    write_pass = 1; build();
    switches = N;
    repeat (3) @(negedge clk);
    rst = 0;
    repeat (50) @(negedge clk);
    press(0);
    repeat (200) @(negedge clk);
    checks++;
    if (display !== N) begin failures++; $display("FAIL echo %h", display); end
    switches = 16'hFFFF;                     // later switch changes must not matter
    press(1);
    t0 = cycles;
    while (display == N && cycles - t0 < 1500000) @(negedge clk);
    checks++;
    if (display !== 16'(m)) begin failures++; $display("FAIL result %h expected %h", display, m); end
    checks++;
    if (n_int != 2) begin failures++; $display("FAIL interrupts taken %0d", n_int); end
    $display("n=0x%h result=0x%h interrupts=%0d cycles after start=%0d", N, display, n_int, cycles - t0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
