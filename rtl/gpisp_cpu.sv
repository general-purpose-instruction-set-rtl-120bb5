// gpisp_cpu -- 16-bit general purpose multi-cycle processor (top level).
//
// A load-store machine with 16-bit instructions, registers and byte
// addresses; the PC advances by 2 per instruction word. One shared ripple
// ALU does all arithmetic, including the PC increment, the branch compare
// and the return-address adjustment of interrupts, and the control steps
// each instruction through 3 to 5 clock cycles (see gpisp_control).
//
// Data path: PC, IR and the operand registers A (field [7:4]), B ([3:0]) and
// C ([11:8]) read in decode; SUM holds the ALU result and MDR the memory
// word of the previous cycle (A, B, C, SUM and MDR load every cycle).
// Multiplexers, with the select numbering of the control word:
//   ALU in 1: PC | A | 0 | zero-extended rd field      ALU in 2: B | 2 | 15 | 0
//   PC in:    ALU result | C | EXC_ADDR                 address:  PC | SUM
//   write reg: rd | $ar | $ir
//   write data: PC | SUM | MDR | special register | lui merge | lli merge
// lui writes {imm8, C[7:0]} and lli writes {C[15:8], imm8}: each changes only
// its own byte of rd.
//
// Interrupts: a button press while the enable bit ($bs[15]) is 0 sets the
// request latch; the next fetch then loads INT_INSTR into the IR instead of
// the memory word (the PC still advances). That op-code saves PC-2, the
// address of the instruction that was not executed, in $ir, sets the enable
// bit, clears the latch and jumps to EXC_ADDR. `jr $ir` returns and clears
// the enable bit again.
//
// Memory is external: combinational read of the word at mem_addr (byte
// address, bit 0 is 0), write of mem_wdata at the rising edge when
// mem_write is high. Ports: buttons (15 one-bit inputs), switches (16-bit
// DIP input to $vr), display (the $dr register). Synchronous active-high
// reset; the first fetch is from address 0 two cycles after reset ends.
// The ALU overflow output is left unconnected here: the instruction set uses
// overflow only inside the ALU, to correct set-less-than.
// The 0xE000 exception address and 0xB000 interrupt word follow the original
// data-path sketch; the reset address is this design's choice.
module gpisp_cpu
  import gpisp_pkg::*;
#(
  parameter logic [15:0] EXC_ADDR  = 16'hE000,
  parameter logic [15:0] INT_INSTR = 16'hB000
) (
  input  logic        clk,
  input  logic        rst,
  // memory port
  output logic [15:0] mem_addr,
  output logic        mem_read,
  output logic        mem_write,
  output logic [15:0] mem_wdata,
  input  logic [15:0] mem_rdata,
  // board I/O
  input  logic [14:0] buttons,
  input  logic [15:0] switches,
  output logic [15:0] display,
  // observation
  output logic [15:0] pc_q,
  output logic [15:0] ir_q,
  output state_e      state,
  output logic        int_pending,
  output logic [15:0] bs_q
);
  ctrl_t       ctrl;
  logic [15:0] pc, ir, a_q, b_q, c_q, sum_q, mdr_q;
  logic [15:0] rd1, rd2, rd3, sp_rdata;
  logic [15:0] alu_a, alu_b, alu_y, pc_next, wdata;
  logic [3:0]  waddr;
  logic        zero, overflow, int_dis;
  opcode_e     op;

  assign op = opcode_e'(ir[15:12]);

  gpisp_control u_ctrl (
    .clk   (clk),
    .rst   (rst),
    .op    (op),
    .zero  (zero),
    .ctrl  (ctrl),
    .state (state)
  );

  gpisp_int_latch u_latch (
    .clk          (clk),
    .rst          (rst),
    .buttons      (buttons),
    .int_disabled (int_dis),
    .latch_reset  (ctrl.latch_reset),
    .pending      (int_pending)
  );

  gpisp_regfile u_rf (
    .clk              (clk),
    .rst              (rst),
    .raddr1           (ir[7:4]),
    .raddr2           (ir[3:0]),
    .raddr3           (ir[11:8]),
    .rdata1           (rd1),
    .rdata2           (rd2),
    .rdata3           (rd3),
    .we               (ctrl.reg_write),
    .waddr            (waddr),
    .wdata            (wdata),
    .buttons          (buttons),
    .write_int_enable (ctrl.write_int_enable),
    .interrupt_enable (ctrl.interrupt_enable),
    .int_enable_out   (int_dis),
    .bs_q             (bs_q)
  );

  gpisp_special u_sp (
    .clk      (clk),
    .rst      (rst),
    .switches (switches),
    .raddr    (ir[7:4]),
    .rdata    (sp_rdata),
    .we       (ctrl.sp_reg_write),
    .waddr    (ir[11:8]),
    .wdata    (a_q),
    .display  (display)
  );

  gpisp_alu #(.WIDTH(16)) u_alu (
    .a        (alu_a),
    .b        (alu_b),
    .op       (ctrl.alu_op),
    .result   (alu_y),
    .zero     (zero),
    .overflow (overflow)
  );

  // multiplexers
  always_comb begin
    unique case (ctrl.mux_alu1_in)
      2'd0:    alu_a = pc;
      2'd1:    alu_a = a_q;
      2'd3:    alu_a = {12'd0, ir[11:8]};
      default: alu_a = '0;
    endcase
    unique case (ctrl.mux_alu2_in)
      2'd0:    alu_b = b_q;
      2'd1:    alu_b = 16'd2;
      2'd2:    alu_b = 16'd15;
      default: alu_b = '0;
    endcase
    unique case (ctrl.mux_pc_in)
      2'd1:    pc_next = c_q;
      2'd2:    pc_next = EXC_ADDR;
      default: pc_next = alu_y;
    endcase
    unique case (ctrl.mux_write_reg)
      2'd1:    waddr = REG_AR;
      2'd2:    waddr = REG_IR;
      default: waddr = ir[11:8];
    endcase
    unique case (ctrl.mux_write_data)
      3'd0:    wdata = pc;
      3'd1:    wdata = sum_q;
      3'd2:    wdata = mdr_q;
      3'd3:    wdata = sp_rdata;
      3'd4:    wdata = {ir[7:0], c_q[7:0]};
      3'd5:    wdata = {c_q[15:8], ir[7:0]};
      default: wdata = '0;
    endcase
  end

  assign mem_addr  = ctrl.mux_address ? sum_q : pc;
  assign mem_read  = ctrl.mem_read;
  assign mem_write = ctrl.mem_write;
  assign mem_wdata = c_q;

  // data-path registers
  always_ff @(posedge clk) begin
    if (rst) begin
      pc    <= '0;
      ir    <= '0;
      a_q   <= '0;
      b_q   <= '0;
      c_q   <= '0;
      sum_q <= '0;
      mdr_q <= '0;
    end else begin
      if (ctrl.pc_write) pc <= pc_next;
      if (ctrl.ir_write) ir <= int_pending ? INT_INSTR : mem_rdata;
      a_q   <= rd1;
      b_q   <= rd2;
      c_q   <= rd3;
      sum_q <= alu_y;
      mdr_q <= mem_rdata;
    end
  end

  assign pc_q = pc;
  assign ir_q = ir;
endmodule
