// tb_gpisp_cpu -- end-to-end test of the processor with its default
// parameters.
// A test program is assembled into the behavioural memory. It runs every
// instruction (including the unused op-code, which must do nothing), stores
// its results to memory, and then goes through two interrupt scenarios
// driven by the testbench through the display register handshake:
//   0xA001 on the display: interrupts are enabled and the program spins;
//          the testbench pulses button 2 for one cycle. The handler at
//          0xE000 counts the interrupt, saves $bs and $ir, and returns with
//          jr $ir, which re-enables interrupts.
//   0xA002: the program has disabled interrupts by writing $bs; the
//          testbench pulses button 5, which must only be recorded in $bs.
//   0xD0E0: done. The testbench then compares the stored words with values
//          worked out by hand.
// It also counts how often each control state and each mechanism (taken and
// untaken branches, interrupt entry, ignored request, return through $ir,
// reset state, unused op-code) occurred and fails any that never did.
module tb_gpisp_cpu;
  import gpisp_pkg::*;
  import gpisp_asm_pkg::*;

  localparam logic [3:0] S0 = 4'd1, S1 = 4'd2, S2 = 4'd3, S3 = 4'd4;
  localparam logic [3:0] T0 = 4'd5, T1 = 4'd6, T2 = 4'd7, T3 = 4'd8;
  localparam logic [3:0] A0 = 4'd9, A1 = 4'd10, V0 = 4'd11, V1 = 4'd12;
  localparam logic [3:0] AR = REG_AR, BS = REG_BS, IRR = REG_IR, ZERO = REG_ZERO;
  localparam logic [3:0] VR = SREG_VR, DR = SREG_DR;
  localparam logic [15:0] SWITCHES = 16'h5A3C;

  logic        clk = 0, rst = 1;
  logic [15:0] mem_addr, mem_wdata, mem_rdata, display, pc, ir, bs;
  logic        mem_read, mem_write, pending;
  logic [14:0] buttons = '0;
  logic [15:0] switches = SWITCHES;
  state_e      state;
  int          checks = 0, failures = 0;
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
  always @(posedge clk) cycles++;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ---------------- two-pass program builder ----------------
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
  task automatic store(input logic [3:0] r, input logic [7:0] off);  // mem[0x200+off] = r
    emit(lli_(S3, off));
    emit(sw_(r, S2, S3));
  endtask

  task automatic build;
    at = 16'h0000;
    emit(lui_(S0, 8'h12)); emit(lli_(S0, 8'h34));            // s0 = 0x1234
    emit(lli_(S1, 8'h05)); emit(lui_(S1, 8'hF0));            // s1 = 0xF005
    emit(lui_(S2, 8'h02)); emit(lli_(S2, 8'h00));            // s2 = 0x0200
    emit(add_(T0, S0, S1)); store(T0, 8'h00);
    emit(sub_(T0, S0, S1)); store(T0, 8'h02);
    emit(and_(T0, S0, S1)); store(T0, 8'h04);
    emit(slt_(T0, S1, S0)); store(T0, 8'h06);
    emit(slt_(T0, S0, S1)); store(T0, 8'h08);
    emit(lui_(A1, 8'h80));                                    // a1 = 0x8000
    emit(lui_(V0, 8'h7F)); emit(lli_(V0, 8'hFF));            // v0 = 0x7FFF
    emit(slt_(T0, A1, V0)); store(T0, 8'h0A);                // overflowing compare
    emit(slt_(T0, V0, A1)); store(T0, 8'h0C);
    emit(lli_(S3, 8'h02)); emit(lw_(T1, S2, S3)); store(T1, 8'h0E);
    emit(rv_(T1, VR)); store(T1, 8'h10);
    emit(ov_(DR, T1));
    // branches
    load(A0, addr_of("L1"));
    emit(beq_(A0, S0, S1));                                   // not taken
    emit(bne_(A0, S0, S1));                                   // taken
    emit(lli_(T2, 8'hEE));                                    // skipped
    label("L1");
    load(A0, addr_of("L2"));
    emit(beq_(A0, S0, S0));                                   // taken
    emit(lli_(T2, 8'hEE));                                    // skipped
    label("L2");
    load(A0, addr_of("BAD"));
    emit(bne_(A0, S0, S0));                                   // not taken
    emit(beq_(A0, S0, S1));                                   // not taken
    // procedure call
    load(A0, addr_of("SUB"));
    emit(jal_(A0));
    label("RET");
    store(V1, 8'h12);
    store(AR, 8'h14);
    store(T2, 8'h16);
    emit(16'h8123);                                           // unused op-code
    store(S0, 8'h18);
    // interrupt accepted
    emit(lui_(V0, 8'h00)); emit(lli_(V0, 8'h01));            // v0 = 1
    emit(lui_(T0, 8'hA0)); emit(lli_(T0, 8'h01)); emit(ov_(DR, T0));
    load(A0, addr_of("W1"));
    label("W1");
    emit(beq_(A0, T3, ZERO));                                 // spin while t3 == 0
    store(T3, 8'h1E);
    // interrupt request ignored
    emit(add_(BS, A1, ZERO));                                 // $bs = 0x8000: disabled
    emit(lui_(T0, 8'hA0)); emit(lli_(T0, 8'h02)); emit(ov_(DR, T0));
    emit(lui_(T1, 8'h00)); emit(lli_(T1, 8'h40));
    load(A0, addr_of("D1"));
    label("D1");
    emit(sub_(T1, T1, V0));
    emit(bne_(A0, T1, ZERO));
    store(BS, 8'h20);
    store(T3, 8'h22);
    emit(add_(BS, ZERO, ZERO));
    emit(lui_(T0, 8'hD0)); emit(lli_(T0, 8'hE0)); emit(ov_(DR, T0));
    label("HALT");
    load(A0, addr_of("HALT"));
    emit(jr_(A0));
    // subroutine
    label("SUB");
    emit(lli_(V1, 8'h99));
    emit(jr_(AR));
    label("BAD");
    emit(lli_(T2, 8'hBB));
    load(A0, addr_of("HALT"));
    emit(jr_(A0));
    // interrupt handler
    at = 16'hE000;
    emit(add_(T3, T3, V0));
    store(BS, 8'h1A);
    store(IRR, 8'h1C);
    emit(jr_(IRR));
  endtask

  // ---------------- mechanism counters ----------------
  int n_state [state_e];
  int n_unused = 0, n_ignored = 0, n_int_req = 0, n_display_sw = 0;

  always @(posedge clk) if (!rst) begin
    n_state[state] = n_state.exists(state) ? n_state[state] + 1 : 1;
    if (state == S_DECODE && ir[15:12] == 4'd8) n_unused++;
    if (|buttons && bs[15]) n_ignored++;
    if (|buttons && !bs[15]) n_int_req++;
    if (display == SWITCHES) n_display_sw++;
  end

  task automatic expect_word(input logic [7:0] off, input logic [15:0] exp, input string what);
    logic [15:0] got;
    got = mem.peek(16'h0200 + 16'(off));
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: mem[%h]=%h expected %h", what, 16'h0200 + 16'(off), got, exp);
    end
  endtask

  // wait for a display marker, at most max_cycles; a missing marker fails
  task automatic wait_display(input logic [15:0] v, input int max_cycles);
    int n = 0;
    while (display !== v && n < max_cycles) begin
      @(negedge clk);
      n++;
    end
    checks++;
    if (display !== v) begin
      failures++;
      $display("FAIL display marker %h not reached (display=%h pc=%h)", v, display, pc);
    end
  endtask

  task automatic expect_count(input string what, input int n);
    checks++;
    if (n == 0) begin failures++; $display("FAIL mechanism never seen: %s", what); end
  endtask

  initial begin
    write_pass = 0; build();
    write_pass = 1; build();
    repeat (3) @(posedge clk);
    @(negedge clk) rst = 0;

    wait_display(16'hA001, 4000);
    repeat (10) @(negedge clk);
    buttons = 15'h0004;
    @(negedge clk) buttons = '0;

    wait_display(16'hA002, 4000);
    repeat (20) @(negedge clk);
    buttons = 15'h0020;
    @(negedge clk) buttons = '0;

    wait_display(16'hD0E0, 4000);
    repeat (20) @(negedge clk);

    expect_word(8'h00, 16'h0239, "add");
    expect_word(8'h02, 16'h222F, "sub");
    expect_word(8'h04, 16'h1004, "and");
    expect_word(8'h06, 16'h0001, "slt true");
    expect_word(8'h08, 16'h0000, "slt false");
    expect_word(8'h0A, 16'h0001, "slt with overflow, true");
    expect_word(8'h0C, 16'h0000, "slt with overflow, false");
    expect_word(8'h0E, 16'h222F, "lw");
    expect_word(8'h10, SWITCHES,  "rv $vr");
    expect_word(8'h12, 16'h0099, "subroutine result");
    expect_word(8'h14, addr_of("RET"), "jal link");
    expect_word(8'h16, 16'h0000, "skipped instructions");
    expect_word(8'h18, 16'h1234, "unused op-code");
    expect_word(8'h1A, 16'h8004, "$bs in handler");
    expect_word(8'h1C, addr_of("W1"), "$ir");
    expect_word(8'h1E, 16'h0001, "interrupt count");
    expect_word(8'h20, 16'h8020, "$bs with interrupts disabled");
    expect_word(8'h22, 16'h0001, "no interrupt while disabled");
    checks++;
    if (bs !== 16'h0000) begin failures++; $display("FAIL final $bs %h", bs); end

    for (int s = 0; s <= int'(S_JAL3); s++) begin
      state_e st;
      st = state_e'(s);
      expect_count(st.name(), n_state.exists(st) ? n_state[st] : 0);
    end
    expect_count("unused op-code", n_unused);
    expect_count("interrupt request accepted", n_int_req);
    expect_count("interrupt request ignored", n_ignored);
    expect_count("ov to display", n_display_sw);
    $display("cycles=%0d interrupts=%0d returns via $ir=%0d taken bne=%0d taken beq=%0d",
             cycles, n_state[S_INT3], n_state[S_JR4A], n_state[S_BNE4A], n_state[S_BEQ4A]);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
