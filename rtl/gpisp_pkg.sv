// gpisp_pkg -- shared types and constants of the 16-bit general purpose
// instruction set processor.
//
// Instruction word (bit 15 is the most significant):
//   [15:12] op-code  [11:8] destination  [7:4] argument 1  [3:0] argument 2
// I-type instructions merge the two argument fields into an 8-bit immediate.
// Op-codes whose two top bits are not both one (0..11) are A-type, 12/13 are
// the I-type loads (third bit 0) and 14/15 the J-type jumps (third bit 1).
// The numeric op-code of each instruction follows the control state diagram;
// op-code 8 is the unused one and simply returns to fetch. Op-code 11 is the
// internal interrupt op-code, injected into the IR as 0xB000.
//
// The numbers of $ar and $bs are this design's choice (the register naming
// convention fixes only their count); $zero is register 0 and the interrupt
// return register $ir is register 15.
package gpisp_pkg;

  typedef enum logic [3:0] {
    OP_ADD  = 4'd0,
    OP_SUB  = 4'd1,
    OP_LW   = 4'd2,
    OP_SW   = 4'd3,
    OP_RV   = 4'd4,
    OP_OV   = 4'd5,
    OP_SLT  = 4'd6,
    OP_AND  = 4'd7,
    OP_NONE = 4'd8,
    OP_BNE  = 4'd9,
    OP_BEQ  = 4'd10,
    OP_INT  = 4'd11,
    OP_LUI  = 4'd12,
    OP_LLI  = 4'd13,
    OP_JR   = 4'd14,
    OP_JAL  = 4'd15
  } opcode_e;

  // ALU operation; bit 0 doubles as the B-invert / carry-in of the ALU.
  typedef enum logic [1:0] {
    ALU_ADD = 2'd0,
    ALU_SUB = 2'd1,
    ALU_AND = 2'd2,
    ALU_SLT = 2'd3
  } aluop_e;

  // Register numbers of the calling convention.
  localparam logic [3:0] REG_ZERO = 4'd0;
  localparam logic [3:0] REG_S0   = 4'd1;   // $s0..$s3 = 1..4
  localparam logic [3:0] REG_T0   = 4'd5;   // $t0..$t3 = 5..8
  localparam logic [3:0] REG_A0   = 4'd9;   // $a0,$a1  = 9,10
  localparam logic [3:0] REG_V0   = 4'd11;  // $v0,$v1  = 11,12
  localparam logic [3:0] REG_AR   = 4'd13;  // return address of jal
  localparam logic [3:0] REG_BS   = 4'd14;  // button state register
  localparam logic [3:0] REG_IR   = 4'd15;  // interrupt return register

  // Special register bank numbers.
  localparam logic [3:0] SREG_VR = 4'd0;    // value register (DIP switches)
  localparam logic [3:0] SREG_DR = 4'd1;    // display register

  // Multiplexer selects, named as in the control state diagram.
  typedef struct packed {
    logic [1:0] mux_pc_in;       // 0 ALU result, 1 C register, 2 exception address
    logic [1:0] mux_alu1_in;     // 0 PC, 1 A, 3 zero-extended destination field
    logic [1:0] mux_alu2_in;     // 0 B, 1 constant 2, 2 constant 15
    aluop_e     alu_op;
    logic [1:0] mux_write_reg;   // 0 destination field, 1 $ar, 2 $ir
    logic [2:0] mux_write_data;  // 0 PC, 1 SUM, 2 memory data, 3 special, 4 lui, 5 lli
    logic       mux_address;     // 0 PC, 1 SUM
    logic       pc_write;
    logic       mem_read;
    logic       mem_write;
    logic       ir_write;
    logic       reg_write;
    logic       sp_reg_write;
    logic       write_int_enable;
    logic       interrupt_enable;
    logic       latch_reset;
  } ctrl_t;

  // Control states. S_RESET is the one-cycle start-up state.
  typedef enum logic [4:0] {
    S_RESET,
    S_FETCH,    // STATE0
    S_DECODE,   // STATE1
    S_ADD3, S_ADD4,
    S_SUB3, S_SUB4,
    S_LW3, S_LW4, S_LW5,
    S_SW3, S_SW4,
    S_RV3,
    S_OV3,
    S_SLT3, S_SLT4,
    S_AND3, S_AND4,
    S_BNE3, S_BNE4A,
    S_BEQ3, S_BEQ4A,
    S_INT3, S_INT4,
    S_LUI3,
    S_LLI3,
    S_JR3, S_JR4A,
    S_JAL3
  } state_e;

endpackage
