// tb_fu_mul: self-checking test of the 8 x 8 multiplier unit.
//
// Random instructions (random operands, with a share of equal, zero,
// all-ones and sign-boundary values so that every compare outcome and carry
// occurs) are applied one per clock together with a random stall. Each
// clock the testbench checks the token (RESULT MUL) against its own model: one
// clock after an instruction is taken the token carries its virtual IAD and
// result; while stall is high the token holds its value. After reset the
// token is empty.
module tb_fu_mul;
  import d2_pkg::*;

  logic      clk = 1'b0, rst = 1'b1;
  fu_instr_t in_instr;
  logic      stall;
  vtoken_t   tok;

  fu_mul dut (.clk, .rst, .in_instr, .stall, .tok);

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  localparam logic [5:0] OPS [1] = '{6'b000010};

  function automatic logic [15:0] ref_alu(logic [5:0] op, logic [15:0] a, logic [15:0] b);
    case (op)
      6'b000001: return a + b;
      6'b000101: return a - b;
      6'b000010: return {8'd0, a[7:0]} * {8'd0, b[7:0]};
      6'b000011: return a & b;
      6'b000111: return a | b;
      6'b001011: return ~(a & b);
      6'b001111: return ~(a | b);
      6'b010011: return a ^ b;
      6'b010111: return ~a;
      6'b011011: return (a == b) ? 16'd1 : 16'd0;
      6'b011111: return (a != b) ? 16'd1 : 16'd0;
      6'b100011: return ($signed(a) >  $signed(b)) ? 16'd1 : 16'd0;
      6'b100111: return ($signed(a) <  $signed(b)) ? 16'd1 : 16'd0;
      6'b101011: return ($signed(a) >= $signed(b)) ? 16'd1 : 16'd0;
      6'b101111: return ($signed(a) <= $signed(b)) ? 16'd1 : 16'd0;
      6'b110011: return a << 1;
      6'b110111: return a >> 1;
      6'b111011: return {a[14:0], a[15]};
      default:   return {a[0], a[15:1]};
    endcase
  endfunction

  function automatic logic [15:0] pick();
    case ($urandom % 6)
      0: return 16'h0000;
      1: return 16'hffff;
      2: return 16'h8000;
      3: return 16'h7fff;
      default: return 16'($urandom);
    endcase
  endfunction

  vtoken_t expv;

  initial begin
    in_instr = '0; stall = 1'b0; expv = '0;
    repeat (2) @(negedge clk);
    rst = 1'b0;
    checks++;
    if (tok.v) begin failures++; $display("FAIL token valid after reset"); end
    for (int k = 0; k < 3000; k++) begin
      in_instr.v      = ($urandom % 4) != 0;
      in_instr.opcode = OPS[$urandom % 1];
      in_instr.opd1   = pick();
      in_instr.opd2   = (($urandom % 5) == 0) ? in_instr.opd1 : pick();
      in_instr.iad    = 6'($urandom);
      stall           = ($urandom % 5) == 0;
      if (!stall) begin
        expv.v   = in_instr.v;
        expv.iad = in_instr.iad;
        expv.res = ref_alu(in_instr.opcode, in_instr.opd1, in_instr.opd2);
      end
      @(negedge clk);
      checks++;
      if (tok.v !== expv.v || (expv.v && (tok.iad !== expv.iad || tok.res !== expv.res))) begin
        failures++;
        if (failures < 10)
          $display("FAIL op %b a %h b %h: got v%b iad %0d res %h, expected v%b iad %0d res %h",
                   in_instr.opcode, in_instr.opd1, in_instr.opd2, tok.v, tok.iad, tok.res,
                   expv.v, expv.iad, expv.res);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
