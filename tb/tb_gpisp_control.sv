// tb_gpisp_control -- self-checking test of the control state machine.
// For every op-code and both values of the ALU zero flag the machine is run
// from fetch to the next fetch. The testbench checks the number of cycles
// of that instruction and, from an independent table, how often each write
// enable fires and which multiplexer selects accompany the register, PC and
// memory writes. It also checks the one-cycle reset state and the fetch
// control word.
module tb_gpisp_control;
  import gpisp_pkg::*;
  logic    clk = 0, rst = 1;
  opcode_e op;
  logic    zero;
  ctrl_t   ctrl;
  state_e  state;
  int      checks = 0, failures = 0;

  gpisp_control dut (.clk(clk), .rst(rst), .op(op), .zero(zero), .ctrl(ctrl), .state(state));

  always #5 clk = ~clk;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // expected behaviour of one instruction
  typedef struct {
    int       cycles;      // fetch .. last execute state
    int       regw;        // register writes
    int       pcw;         // PC writes after fetch
    int       memw;
    int       spw;
    int       wie;
    logic [2:0] wdata_sel; // mux_write_data at the register write
    logic [1:0] wreg_sel;  // mux_write_reg at the register write
    logic [1:0] pc_sel;    // mux_pc_in at the PC write after fetch
  } exp_t;

  function automatic exp_t expected(opcode_e o, logic z);
    exp_t e = '{cycles: 0, regw: 0, pcw: 0, memw: 0, spw: 0, wie: 0,
                wdata_sel: 0, wreg_sel: 0, pc_sel: 0};
    case (o)
      OP_ADD, OP_SUB, OP_SLT, OP_AND: begin e.cycles = 4; e.regw = 1; e.wdata_sel = 1; end
      OP_LW:   begin e.cycles = 5; e.regw = 1; e.wdata_sel = 2; end
      OP_SW:   begin e.cycles = 4; e.memw = 1; end
      OP_RV:   begin e.cycles = 3; e.regw = 1; e.wdata_sel = 3; end
      OP_OV:   begin e.cycles = 3; e.spw = 1; end
      OP_NONE: begin e.cycles = 2; end
      OP_BNE:  begin e.cycles = z ? 3 : 4; e.pcw = z ? 0 : 1; e.pc_sel = 1; end
      OP_BEQ:  begin e.cycles = z ? 4 : 3; e.pcw = z ? 1 : 0; e.pc_sel = 1; end
      OP_INT:  begin e.cycles = 4; e.regw = 1; e.wdata_sel = 1; e.wreg_sel = 2;
                     e.pcw = 1; e.pc_sel = 2; e.wie = 1; end
      OP_LUI:  begin e.cycles = 3; e.regw = 1; e.wdata_sel = 4; end
      OP_LLI:  begin e.cycles = 3; e.regw = 1; e.wdata_sel = 5; end
      OP_JR:   begin e.cycles = z ? 4 : 3; e.pcw = 1; e.pc_sel = 1; e.wie = z ? 1 : 0; end
      OP_JAL:  begin e.cycles = 3; e.regw = 1; e.wdata_sel = 0; e.wreg_sel = 1;
                     e.pcw = 1; e.pc_sel = 1; end
      default: ;
    endcase
    return e;
  endfunction

  task automatic run_one(opcode_e o, logic z);
    exp_t e;
    int   cyc = 0, regw = 0, pcw = 0, memw = 0, spw = 0, wie = 0;
    logic bad = 0;
    e = expected(o, z);
    op = o; zero = z;
    // we are at the start of a fetch cycle
    do begin
      if (cyc == 0) begin
        if (!(ctrl.pc_write && ctrl.ir_write && ctrl.mem_read && ctrl.mux_alu2_in == 2'd1 &&
              ctrl.mux_pc_in == 2'd0 && ctrl.mux_alu1_in == 2'd0 && ctrl.alu_op == ALU_ADD)) bad = 1;
      end else begin
        if (ctrl.reg_write) begin
          regw++;
          if (ctrl.mux_write_data != e.wdata_sel || ctrl.mux_write_reg != e.wreg_sel) bad = 1;
        end
        if (ctrl.pc_write) begin
          pcw++;
          if (ctrl.mux_pc_in != e.pc_sel) bad = 1;
        end
        if (ctrl.mem_write) begin
          memw++;
          if (!ctrl.mux_address) bad = 1;
        end
        if (ctrl.sp_reg_write) spw++;
        if (ctrl.write_int_enable) begin
          wie++;
          if (ctrl.interrupt_enable != (o == OP_INT)) bad = 1;
        end
        if (ctrl.ir_write) bad = 1;
      end
      @(posedge clk); #1;
      cyc++;
    end while (state != S_FETCH && cyc < 20);
    checks++;
    if (bad || cyc != e.cycles || regw != e.regw || pcw != e.pcw || memw != e.memw ||
        spw != e.spw || wie != e.wie) begin
      failures++;
      $display("FAIL op=%0d zero=%b cycles=%0d/%0d regw=%0d pcw=%0d memw=%0d spw=%0d wie=%0d bad=%b",
               o, z, cyc, e.cycles, regw, pcw, memw, spw, wie, bad);
    end
  endtask

  initial begin
    op = OP_ADD; zero = 0;
    @(posedge clk); #1;
    rst = 0;
    checks++;
    if (state != S_RESET || ctrl != '0) begin failures++; $display("FAIL reset state"); end
    @(posedge clk); #1;
    checks++;
    if (state != S_FETCH) begin failures++; $display("FAIL no fetch after reset"); end
    for (int rep = 0; rep < 3; rep++)
      for (int o = 0; o < 16; o++)
        for (int z = 0; z < 2; z++)
          run_one(opcode_e'(o), 1'(z));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
