// fu_slc: the shift / logic / compare functional unit.
//
// Opcode bits [5:2] select the operation (class bits [1:0] = 11):
//   0000 AND  0001 OR   0010 NAND 0011 NOR  0100 XOR  0101 NOT
//   0110 EQT  0111 NEQT 1000 GT   1001 LT   1010 GET  1011 LET
//   1100 SHL  1101 SHR  1110 RAL  1111 RAR
// NOT, shifts and rotates are unary on OPD1 and move it by one bit. Compares
// give 0 or 1 in bit 0 of the result; that bit is what clause fields use.
// Compares treat the operands as signed two's-complement numbers.
// Timing: result token one clock after the instruction is taken; while stall
// is high the register holds and in_instr is not taken.
// The opcode table and the boolean result in bit 0 follow the document; the
// one-bit shift distance and signed compares are this design's reading.
module fu_slc
  import d2_pkg::*;
(
  input  logic      clk,
  input  logic      rst,
  input  fu_instr_t in_instr,
  input  logic      stall,
  output vtoken_t   tok
);
  data_t a, b, res;
  logic signed [DATA_W-1:0] sa, sb;

  always_comb begin
    a  = in_instr.opd1;
    b  = in_instr.opd2;
    sa = a;
    sb = b;
    unique case (in_instr.opcode[5:2])
      4'b0000: res = a & b;
      4'b0001: res = a | b;
      4'b0010: res = ~(a & b);
      4'b0011: res = ~(a | b);
      4'b0100: res = a ^ b;
      4'b0101: res = ~a;
      4'b0110: res = data_t'(a == b);
      4'b0111: res = data_t'(a != b);
      4'b1000: res = data_t'(sa > sb);
      4'b1001: res = data_t'(sa < sb);
      4'b1010: res = data_t'(sa >= sb);
      4'b1011: res = data_t'(sa <= sb);
      4'b1100: res = {a[DATA_W-2:0], 1'b0};
      4'b1101: res = {1'b0, a[DATA_W-1:1]};
      4'b1110: res = {a[DATA_W-2:0], a[DATA_W-1]};
      default: res = {a[0], a[DATA_W-1:1]};
    endcase
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
