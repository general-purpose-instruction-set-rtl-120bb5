// gpisp_alu -- WIDTH-bit ripple-carry ALU (ADD, SUB, AND, SLT).
//
// WIDTH one-bit slices (gpisp_alu_bit) are chained carry-out to carry-in.
// The carry into the least significant slice is op[0], so subtract and
// set-less-than add the inverted B plus one; there is no separate B-invert
// control. Overflow is the carry into the top slice XOR its carry out. It is
// used only to correct set-less-than: the sign of A-B XOR overflow is fed to
// the `less` input of slice 0, every other slice gets zero, so SLT yields
// 0x0001 or 0x0000 and is right even when A-B overflows. Plain add and
// subtract wrap. `zero` is the NOR of all result bits (used by the branches
// and the jr check). Purely combinational; op encoding as gpisp_pkg::aluop_e.
// Structure and encodings follow the original design; nothing here is this design's
// own choice beyond the port names.
module gpisp_alu
  import gpisp_pkg::aluop_e;
#(
  parameter int unsigned WIDTH = 16
) (
  input  logic [WIDTH-1:0] a,
  input  logic [WIDTH-1:0] b,
  input  aluop_e           op,
  output logic [WIDTH-1:0] result,
  output logic             zero,
  output logic             overflow
);
  logic [WIDTH:0]   carry;
  logic [WIDTH-1:0] sum;
  logic             set;

  assign carry[0] = op[0];

  for (genvar i = 0; i < WIDTH; i++) begin : g_bit
    gpisp_alu_bit u_bit (
      .a    (a[i]),
      .b    (b[i]),
      .cin  (carry[i]),
      .op   (op),
      .less ((i == 0) ? set : 1'b0),
      .out  (result[i]),
      .cout (carry[i+1]),
      .sum  (sum[i])
    );
  end

  assign overflow = carry[WIDTH] ^ carry[WIDTH-1];
  assign set      = sum[WIDTH-1] ^ overflow;
  assign zero     = ~|result;
endmodule
