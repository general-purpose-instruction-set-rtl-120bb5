// gpisp_tb_mem -- behavioural model of the processor's main memory
// (testbench only; the real memory is an external part).
// WORDS 16-bit words reached by byte address (bit 0 ignored, word index =
// addr[15:1]). Reads are combinational, writes happen at the rising clock
// edge when `we` is high. The array starts at zero; the testbench loads
// programs and inspects results through the poke/peek tasks.
module gpisp_tb_mem #(
  parameter int unsigned WORDS = 32768
) (
  input  logic        clk,
  input  logic [15:0] addr,
  input  logic        re,
  input  logic        we,
  input  logic [15:0] wdata,
  output logic [15:0] rdata
);
  logic [15:0] mem [WORDS];

  initial foreach (mem[i]) mem[i] = '0;

  assign rdata = mem[addr[15:1] % WORDS];

  always_ff @(posedge clk)
    if (we) mem[addr[15:1] % WORDS] <= wdata;

  // the processor only makes word-aligned accesses
  a_aligned: assert property (@(posedge clk) (re || we) |-> addr[0] == 1'b0);

  function automatic logic [15:0] peek(input logic [15:0] byte_addr);
    return mem[byte_addr[15:1] % WORDS];
  endfunction

  task automatic poke(input logic [15:0] byte_addr, input logic [15:0] data);
    mem[byte_addr[15:1] % WORDS] = data;
  endtask
endmodule
