// gpisp_alu_bit -- one bit slice of the processor's ripple-carry ALU.
//
// The slice holds a full adder whose B input is inverted when op[0] is set
// (subtract and set-less-than share the inverted B and a carry-in of one),
// and an AND of the two operand bits. op selects the output:
//   0 add / 1 subtract -> adder sum,  2 -> a AND b,  3 -> the `less` input.
// `less` is tied to zero in every slice except the least significant one,
// which receives the corrected sign of the subtraction from the top slice.
// `sum` brings the raw adder sum out so that the top slice can form that
// sign. Purely combinational.
module gpisp_alu_bit (
  input  logic       a,
  input  logic       b,
  input  logic       cin,
  input  logic [1:0] op,
  input  logic       less,
  output logic       out,
  output logic       cout,
  output logic       sum
);
  logic bx;

  always_comb begin
    bx   = b ^ op[0];
    sum  = a ^ bx ^ cin;
    cout = (a & bx) | (a & cin) | (bx & cin);
    unique case (op)
      2'd0, 2'd1: out = sum;
      2'd2:       out = a & b;
      default:    out = less;
    endcase
  end
endmodule
