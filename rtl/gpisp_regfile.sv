// gpisp_regfile -- 16 x 16-bit general purpose register file.
//
// Three combinational read ports (the A, B and C operands are read in the
// same decode cycle) and one write port. The write address is decoded to one
// enable per register, gated by `we`; the write happens at the rising clock
// edge. Register 0 ($zero) always reads 0 and ignores writes. Register
// gpisp_pkg::REG_BS is the button state register (gpisp_bsr), which also
// takes the button inputs and the interrupt enable controls and reports the
// interrupt enable bit. The other registers clear on reset (this design's
// choice; the original design does not give a reset value).
module gpisp_regfile
  import gpisp_pkg::REG_BS;
(
  input  logic        clk,
  input  logic        rst,
  input  logic [3:0]  raddr1,
  input  logic [3:0]  raddr2,
  input  logic [3:0]  raddr3,
  output logic [15:0] rdata1,
  output logic [15:0] rdata2,
  output logic [15:0] rdata3,
  input  logic        we,
  input  logic [3:0]  waddr,
  input  logic [15:0] wdata,
  input  logic [14:0] buttons,
  input  logic        write_int_enable,
  input  logic        interrupt_enable,
  output logic        int_enable_out,
  output logic [15:0] bs_q              // button state register, for observation
);
  logic [15:0] regs [16];
  logic [15:0] dec;

  // write decoder
  always_comb begin
    dec = '0;
    if (we) dec[waddr] = 1'b1;
  end

  gpisp_bsr u_bsr (
    .clk              (clk),
    .rst              (rst),
    .we               (dec[REG_BS]),
    .wdata            (wdata),
    .buttons          (buttons),
    .write_int_enable (write_int_enable),
    .interrupt_enable (interrupt_enable),
    .q                (bs_q),
    .int_enable_out   (int_enable_out)
  );

  for (genvar r = 1; r < 16; r++) begin : g_reg
    if (r == int'(REG_BS)) begin : g_bs
      assign regs[r] = bs_q;
    end else begin : g_gp
      always_ff @(posedge clk) begin
        if (rst)         regs[r] <= '0;
        else if (dec[r]) regs[r] <= wdata;
      end
    end
  end
  assign regs[0] = '0;

  assign rdata1 = regs[raddr1];
  assign rdata2 = regs[raddr2];
  assign rdata3 = regs[raddr3];
endmodule
