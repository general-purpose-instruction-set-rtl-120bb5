// gpisp_special -- special register bank, reached only by rv and ov.
//
// Two 16-bit registers share a 4-bit address space: the value register $vr
// (number gpisp_pkg::SREG_VR) samples the DIP-switch input every clock, so it
// always follows the switches; the display register $dr (SREG_DR) is written
// by `ov` and drives the seven-segment output port. Software writes to $vr
// are ignored since it is wired to the switches. The read port is
// combinational; addresses other than the two registers read 0. The numbers
// of the two registers, the read value of unused addresses and the clock
// sampling of the switches are this design's choices.
module gpisp_special
  import gpisp_pkg::SREG_VR, gpisp_pkg::SREG_DR;
(
  input  logic        clk,
  input  logic        rst,
  input  logic [15:0] switches,
  input  logic [3:0]  raddr,
  output logic [15:0] rdata,
  input  logic        we,
  input  logic [3:0]  waddr,
  input  logic [15:0] wdata,
  output logic [15:0] display
);
  logic [15:0] vr;
  logic [15:0] dr;

  always_ff @(posedge clk) begin
    if (rst) begin
      vr <= '0;
      dr <= '0;
    end else begin
      vr <= switches;
      if (we && waddr == SREG_DR) dr <= wdata;
    end
  end

  always_comb begin
    unique case (raddr)
      SREG_VR: rdata = vr;
      SREG_DR: rdata = dr;
      default: rdata = '0;
    endcase
  end

  assign display = dr;
endmodule
