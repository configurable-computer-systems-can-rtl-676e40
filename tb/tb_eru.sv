// tb_eru: self-checking test of the execution-ready unit (three SRAM*,
// ERU-SRAM, functional-unit pipelines and the token FIFO).
//
// The testbench acts as the hardware manager. Each instruction gets a free
// virtual ID; the ID is reused only after its token has been read out. Up
// to two instructions per clock are sent, never two for the same unit, never
// to a unit whose ovf is high and never in a clock in which tokens are read
// (the memory side does one or the other). About half of them wait for the
// result of an instruction still in_eru the unit. Tokens are read at random
// while resultout is high, and always once bufferhalf is set.
// Checks: every instruction produces exactly one token, carrying its own
// virtual ID and the result the testbench computes from its operands (with
// the producer's result in the operand that was missing); and the stall
// mechanisms (BUFFERHALF, BUFFERFULL, a full SRAM*) all occur, for which the
// stores are made small here.
module tb_eru;
  import d2_pkg::*;

  localparam int unsigned SRAMS = 4;
  localparam int unsigned FIFO  = 8;

  logic       clk = 1'b0, rst = 1'b1;
  eru_instr_t in_instr [2];
  logic [2:0] ovf;
  logic       read, resultout, bufferhalf, busy;
  vtoken_t    out_tok [2];

  eru #(.SRAMS_DEPTH(SRAMS), .FIFO_DEPTH(FIFO)) dut (
    .clk, .rst, .in_instr, .ovf, .read, .out_tok, .resultout, .bufferhalf, .busy
  );

  always #5 clk = ~clk;

  int checks = 0, failures = 0;

  function automatic logic [15:0] ref_alu(logic [5:0] op, logic [15:0] a, logic [15:0] b);
    case (op)
      6'b000001: return a + b;
      6'b000101: return a - b;
      6'b000010: return {8'd0, a[7:0]} * {8'd0, b[7:0]};
      6'b000011: return a & b;
      6'b010011: return a ^ b;
      6'b100111: return ($signed(a) < $signed(b)) ? 16'd1 : 16'd0;
      default:   return {a[14:0], 1'b0};   // SHL
    endcase
  endfunction
  localparam logic [5:0] OPS [7] = '{6'b000001, 6'b000101, 6'b000010, 6'b000011,
                                     6'b010011, 6'b100111, 6'b110011};

  logic        in_eru [64];     // ID allocated, token not yet read out
  logic [15:0] result [64];     // expected result of the instruction with that ID
  int          n_in = 0, n_out = 0, n_dep = 0, n_half = 0, n_full = 0, n_ovf = 0;

  task automatic check(logic c, string what);
    checks++;
    if (!c) begin
      failures++;
      if (failures < 10) $display("FAIL %s", what);
    end
  endtask

  initial begin
    for (int i = 0; i < 64; i++) begin in_eru[i] = 1'b0; result[i] = '0; end
    for (int k = 0; k < 2; k++) in_instr[k] = '0;
    read = 1'b0;
    repeat (2) @(negedge clk);
    rst = 1'b0;
    for (int c = 0; c < 6000; c++) begin
      logic [1:0] used_cls;
      for (int k = 0; k < 2; k++) in_instr[k] = '0;
      // phases: fast reading, slow reading
      read = resultout && (bufferhalf || (($urandom % 8) < (((c / 400) % 2) ? 1 : 6)));
      used_cls = 2'b00;
      if (!read && c < 5500)
        for (int k = 0; k < 2; k++) begin
          logic [5:0] op;
          int id, p;
          op = OPS[$urandom % 7];
          id = -1;
          for (int i = 0; i < 64; i++) if (!in_eru[i] && id < 0 && ($urandom % 4) == 0) id = i;
          if (id >= 0 && !ovf[op[1:0] - 1] && op[1:0] != used_cls && ($urandom % 3) != 0) begin
            logic [15:0] a, b;
            used_cls = op[1:0];
            a = 16'($urandom); b = 16'($urandom);
            in_instr[k].v = 1'b1; in_instr[k].opcode = op; in_instr[k].iad = vid_t'(id);
            p = -1;
            if (($urandom % 2) == 0)
              for (int i = 0; i < 64; i++) if (in_eru[i] && p < 0 && ($urandom % 3) == 0) p = i;
            if (p >= 0) begin
              in_instr[k].d = 1'b1; in_instr[k].iid = vid_t'(p); in_instr[k].opfl = 1'($urandom);
              if (in_instr[k].opfl) b = result[p]; else a = result[p];
              n_dep++;
            end
            in_instr[k].opd1 = in_instr[k].opfl && in_instr[k].d ? a : (in_instr[k].d ? 16'hdead : a);
            in_instr[k].opd2 = !in_instr[k].opfl && in_instr[k].d ? b : (in_instr[k].d ? 16'hbeef : b);
            result[id] = ref_alu(op, a, b);
            in_eru[id] = 1'b1;
            n_in++;
          end
        end
      #1;
      if (bufferhalf) n_half++;
      if (dut.bufferfull) n_full++;
      if (|ovf) n_ovf++;
      check(resultout == out_tok[0].v, "resultout means a token is offered");
      if (read)
        for (int k = 0; k < 2; k++)
          if (out_tok[k].v) begin
            int id;
            id = int'(out_tok[k].iad);
            check(in_eru[id], "token for an instruction in_eru the unit");
            check(out_tok[k].res == result[id], "token result");
            if (out_tok[k].res != result[id] && failures < 10)
              $display("  id %0d got %h expected %h", id, out_tok[k].res, result[id]);
            in_eru[id] = 1'b0;
            n_out++;
          end
      @(negedge clk);
    end
    read = 1'b0;
    for (int k = 0; k < 2; k++) in_instr[k] = '0;
    for (int c = 0; c < 300; c++) begin
      read = resultout;
      #1;
      if (read)
        for (int k = 0; k < 2; k++)
          if (out_tok[k].v) begin
            check(in_eru[out_tok[k].iad] && out_tok[k].res == result[out_tok[k].iad], "drained token");
            in_eru[out_tok[k].iad] = 1'b0;
            n_out++;
          end
      @(negedge clk);
    end
    check(!busy, "unit empty at the end");
    check(n_in == n_out, "one token per instruction");
    $display("  %0d instructions, %0d dependent; BUFFERHALF %0d, BUFFERFULL %0d, OVF %0d clocks",
             n_in, n_dep, n_half, n_full, n_ovf);
    check(n_half > 0, "BUFFERHALF seen");
    check(n_full > 0, "BUFFERFULL seen");
    check(n_ovf > 0, "SRAM* full seen");
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
