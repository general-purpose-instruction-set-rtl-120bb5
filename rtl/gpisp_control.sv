// gpisp_control -- multi-cycle control unit (Moore state machine).
//
// Every instruction starts with the same two states:
//   S_FETCH  (STATE0): IR <- instruction (or the interrupt op-code), PC <- PC+2
//   S_DECODE (STATE1): A, B, C <- registers named by the three fields;
//                      the next state is chosen by the op-code.
// Execute states then follow per op-code, and the last one returns to fetch:
//   add/sub/slt/and  3: ALU on A,B           4: write SUM to rd
//   lw               3: SUM <- A+B  4: read memory at SUM   5: write to rd
//   sw               3: SUM <- A+B  4: memory[SUM] <- C
//   rv 3: rd <- special register     ov 3: special[rd] <- A
//   bne/beq          3: A-B; taken -> 4a: PC <- C
//   lui/lli          3: merge the immediate into rd
//   jr               3: PC <- C, compare rd with 15; if rd is $ir -> 4a:
//                       clear the interrupt enable bit (return from interrupt)
//   jal              3: PC <- C, $ar <- PC
//   interrupt        3: SUM <- PC-2, set the interrupt enable bit, clear the
//                       request latch   4: $ir <- SUM, PC <- 0xE000
// So the instructions take 3 (rv, ov, lui, lli, jal, untaken branch, jr),
// 4 (ALU ops, sw, taken branch, jr $ir, interrupt) or 5 (lw) cycles.
// The unused op-code 8 goes straight back to fetch. After reset the machine
// spends one cycle in S_RESET before the first fetch.
// The states and the signal values they assert follow the original control state
// diagram. This design adds what that diagram leaves out: MuxPCIn of jr/jal
// (C register) and of the interrupt (exception address), a subtract in jr3
// for its compare with 15, the latch reset in the interrupt sequence, and a
// memory read in lw4. bne is taken when A-B is non-zero and beq when it is
// zero, as the instruction names say.
// Interface: `op` and `zero` (from the ALU, combinational) in, the control
// word `ctrl` (gpisp_pkg::ctrl_t) and the state out. The state register uses
// a synchronous, active-high reset.
module gpisp_control
  import gpisp_pkg::*;
(
  input  logic       clk,
  input  logic       rst,
  input  opcode_e    op,
  input  logic       zero,
  output ctrl_t      ctrl,
  output state_e     state
);
  state_e next;

  always_ff @(posedge clk) begin
    if (rst) state <= S_RESET;
    else     state <= next;
  end

  // next state
  always_comb begin
    next = S_FETCH;
    unique case (state)
      S_RESET:  next = S_FETCH;
      S_FETCH:  next = S_DECODE;
      S_DECODE: begin
        unique case (op)
          OP_ADD:  next = S_ADD3;
          OP_SUB:  next = S_SUB3;
          OP_LW:   next = S_LW3;
          OP_SW:   next = S_SW3;
          OP_RV:   next = S_RV3;
          OP_OV:   next = S_OV3;
          OP_SLT:  next = S_SLT3;
          OP_AND:  next = S_AND3;
          OP_NONE: next = S_FETCH;
          OP_BNE:  next = S_BNE3;
          OP_BEQ:  next = S_BEQ3;
          OP_INT:  next = S_INT3;
          OP_LUI:  next = S_LUI3;
          OP_LLI:  next = S_LLI3;
          OP_JR:   next = S_JR3;
          OP_JAL:  next = S_JAL3;
          default: next = S_FETCH;
        endcase
      end
      S_ADD3:  next = S_ADD4;
      S_SUB3:  next = S_SUB4;
      S_LW3:   next = S_LW4;
      S_LW4:   next = S_LW5;
      S_SW3:   next = S_SW4;
      S_SLT3:  next = S_SLT4;
      S_AND3:  next = S_AND4;
      S_BNE3:  next = zero ? S_FETCH : S_BNE4A;
      S_BEQ3:  next = zero ? S_BEQ4A : S_FETCH;
      S_INT3:  next = S_INT4;
      S_JR3:   next = zero ? S_JR4A : S_FETCH;
      default: next = S_FETCH;
    endcase
  end

  // outputs
  always_comb begin
    ctrl = '0;          // all selects 0: PC into the ALU, B, add, rd, PC address
    unique case (state)
      S_FETCH: begin
        ctrl.mux_alu2_in = 2'd1;
        ctrl.pc_write    = 1'b1;
        ctrl.mem_read    = 1'b1;
        ctrl.ir_write    = 1'b1;
      end
      S_ADD3: ctrl.mux_alu1_in = 2'd1;
      S_SUB3: begin
        ctrl.mux_alu1_in = 2'd1;
        ctrl.alu_op      = ALU_SUB;
      end
      S_SLT3: begin
        ctrl.mux_alu1_in = 2'd1;
        ctrl.alu_op      = ALU_SLT;
      end
      S_AND3: begin
        ctrl.mux_alu1_in = 2'd1;
        ctrl.alu_op      = ALU_AND;
      end
      S_ADD4, S_SUB4, S_SLT4, S_AND4: begin
        ctrl.mux_write_data = 3'd1;
        ctrl.reg_write      = 1'b1;
      end
      S_LW3, S_SW3: ctrl.mux_alu1_in = 2'd1;
      S_LW4: begin
        ctrl.mux_address = 1'b1;
        ctrl.mem_read    = 1'b1;
      end
      S_LW5: begin
        ctrl.mux_write_data = 3'd2;
        ctrl.reg_write      = 1'b1;
      end
      S_SW4: begin
        ctrl.mux_address = 1'b1;
        ctrl.mem_write   = 1'b1;
      end
      S_RV3: begin
        ctrl.mux_write_data = 3'd3;
        ctrl.reg_write      = 1'b1;
      end
      S_OV3: ctrl.sp_reg_write = 1'b1;
      S_BNE3, S_BEQ3: begin
        ctrl.mux_alu1_in = 2'd1;
        ctrl.alu_op      = ALU_SUB;
      end
      S_BNE4A, S_BEQ4A: begin
        ctrl.pc_write  = 1'b1;
        ctrl.mux_pc_in = 2'd1;
      end
      S_INT3: begin
        ctrl.write_int_enable = 1'b1;
        ctrl.interrupt_enable = 1'b1;
        ctrl.alu_op           = ALU_SUB;
        ctrl.mux_alu2_in      = 2'd1;
        ctrl.latch_reset      = 1'b1;
      end
      S_INT4: begin
        ctrl.reg_write      = 1'b1;
        ctrl.pc_write       = 1'b1;
        ctrl.mux_pc_in      = 2'd2;
        ctrl.mux_write_reg  = 2'd2;
        ctrl.mux_write_data = 3'd1;
      end
      S_LUI3: begin
        ctrl.reg_write      = 1'b1;
        ctrl.mux_write_data = 3'd4;
      end
      S_LLI3: begin
        ctrl.reg_write      = 1'b1;
        ctrl.mux_write_data = 3'd5;
      end
      S_JR3: begin
        ctrl.pc_write    = 1'b1;
        ctrl.mux_pc_in   = 2'd1;
        ctrl.mux_alu1_in = 2'd3;
        ctrl.mux_alu2_in = 2'd2;
        ctrl.alu_op      = ALU_SUB;
      end
      S_JR4A: ctrl.write_int_enable = 1'b1;   // interrupt_enable stays 0
      S_JAL3: begin
        ctrl.mux_write_reg  = 2'd1;
        ctrl.reg_write      = 1'b1;
        ctrl.pc_write       = 1'b1;
        ctrl.mux_pc_in      = 2'd1;
        ctrl.mux_write_data = 3'd0;
      end
      default: ;
    endcase
  end

  // memory is never read and written in the same cycle
  a_mem_rw_exclusive: assert property (@(posedge clk) disable iff (rst)
    !(ctrl.mem_read && ctrl.mem_write));
endmodule
