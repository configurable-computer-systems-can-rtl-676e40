// fu_add: the adder pipeline's functional unit (ADD, SUB).
//
// A non-pipelined 16-bit adder whose result is held in a register (RESULTADD)
// as a token {IAD, RESULT}. Opcode bit 2 selects subtraction (ADD = 000001,
// SUB = 000101); results wrap modulo 2^16.
// Timing: an instruction presented on in_instr with stall low appears as a
// token on tok one clock later. While stall (the FIFO's BUFFERFULL) is high
// the register holds and in_instr is not taken; the caller must keep it.
// The opcodes and the 16-bit width follow the document; the registered
// output and the stall rule are this design's choices.
module fu_add
  import d2_pkg::*;
(
  input  logic      clk,
  input  logic      rst,
  input  fu_instr_t in_instr,
  input  logic      stall,
  output vtoken_t   tok
);
  data_t res;

  always_comb begin
    if (in_instr.opcode[2]) res = in_instr.opd1 - in_instr.opd2;
    else                    res = in_instr.opd1 + in_instr.opd2;
  end

  always_ff @(posedge clk) begin
    if (rst) tok <= '0;
    else if (!stall) begin
      tok.v   <= in_instr.v;
      tok.iad <= in_instr.iad;
      tok.res <= res;
    end
  end
endmodule
