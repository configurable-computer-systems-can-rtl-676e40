// tb_out_buffer: self-checking test of the out-buffer.
//
// Two EXT-CACHE sides offer random instructions (complete ones and ones
// waiting for one operand); the ERU side is simulated by random ovf,
// resultout, bufferhalf and vid_avail; a set of "producers inside the ERU"
// answers lookup_pid; tokens for waiting instructions appear on the token
// bus. The testbench keeps its own record of what the buffer holds and checks
// every clock:
//   - in_accept follows the fill rule (two free blocks, no token on the bus,
//     no read, and RESERVE more free blocks for a waiting instruction);
//   - read follows the bus turn-around rule;
//   - each instruction sent is held, eligible (its SRAM* not full, and
//     complete or its producer inside), carries the operand delivered by a
//     token, and two sent together need different units;
//   - nothing eligible is left unsent in a clock that may send, and a single
//     send happens only when every eligible block needs the same unit;
//   - every instruction taken is sent exactly once.
module tb_out_buffer;
  import d2_pkg::*;

  localparam int unsigned DEPTH = 12;
  localparam int unsigned NTOK  = 4;
  localparam int unsigned RESERVE = 2;

  logic       clk = 1'b0, rst = 1'b1;
  ob_instr_t  in_instr [2];
  logic [1:0] in_accept;
  token_t     tok [NTOK];
  logic [2:0] ovf;
  pid_t       lookup_pid [DEPTH];
  logic [DEPTH-1:0] lookup_hit;
  logic       vid_avail, resultout, bufferhalf, local_tok, read, busy;
  ob_instr_t  send [2];

  out_buffer #(.DEPTH(DEPTH), .NTOK(NTOK), .RESERVE(RESERVE)) dut (
    .clk, .rst, .in_instr, .in_accept, .tok, .ovf, .lookup_pid, .lookup_hit, .vid_avail,
    .resultout, .bufferhalf, .local_tok, .read, .send, .busy
  );

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  logic      held [128];        // by physical IAD (unique while held)
  ob_instr_t rec  [128];
  logic      in_eru [128];      // producers inside the ERU
  int        n_held = 0, n_in = 0, n_out = 0, n_pair = 0, n_dep_sent = 0;

  always_comb
    for (int i = 0; i < DEPTH; i++) lookup_hit[i] = in_eru[lookup_pid[i]];

  task automatic check(logic c, string what);
    checks++;
    if (!c) begin
      failures++;
      if (failures < 10) $display("FAIL %s (held %0d)", what, n_held);
    end
  endtask

  function automatic logic unit_full(logic [5:0] op);
    return ovf[op[1:0] - 2'd1];
  endfunction

  function automatic logic eligible(int a);
    return held[a] && !unit_full(rec[a].opcode) && (!rec[a].d || in_eru[rec[a].iid]);
  endfunction

  initial begin
    for (int i = 0; i < 128; i++) begin held[i] = 1'b0; in_eru[i] = 1'b0; rec[i] = '0; end
    for (int k = 0; k < 2; k++) in_instr[k] = '0;
    for (int t = 0; t < NTOK; t++) tok[t] = '0;
    ovf = '0; vid_avail = 1'b1; resultout = 1'b0; bufferhalf = 1'b0; local_tok = 1'b0;
    repeat (2) @(negedge clk);
    rst = 1'b0;
    for (int c = 0; c < 6000; c++) begin
      logic any_elig, tok_any, exp_read, may_send;
      int nfree;
      // producers 100..127 come and go inside the ERU
      if (($urandom % 4) == 0) in_eru[100 + $urandom % 28] = 1'($urandom);
      for (int k = 0; k < 2; k++) begin
        int a;
        in_instr[k] = '0;
        a = 1 + $urandom % 99;
        if (!held[a] && ($urandom % 3) != 0 && !(k == 1 && in_instr[0].v && in_instr[0].iad == pid_t'(a))) begin
          in_instr[k] = ob_instr_t'({$urandom, $urandom, $urandom});
          in_instr[k].v = 1'b1; in_instr[k].iad = pid_t'(a);
          in_instr[k].opcode[1:0] = 2'(1 + $urandom % 3);
          in_instr[k].d = ($urandom % 2) == 0;
          in_instr[k].iid = in_instr[k].d ? pid_t'(100 + $urandom % 28) : '0;
        end
      end
      for (int t = 0; t < NTOK; t++) begin
        tok[t] = '0;
        if (($urandom % 16) == 0) begin
          tok[t].v = 1'b1; tok[t].iad = pid_t'(100 + $urandom % 28); tok[t].res = 16'($urandom);
        end
      end
      ovf        = (($urandom % 4) == 0) ? 3'($urandom) : 3'b000;
      vid_avail  = ($urandom % 8) != 0;
      resultout  = ($urandom % 3) == 0;
      bufferhalf = resultout && ($urandom % 3) == 0;
      local_tok  = ($urandom % 16) == 0;
      #1;
      nfree = DEPTH - n_held;
      tok_any = 1'b0;
      for (int t = 0; t < NTOK; t++) tok_any |= tok[t].v;
      any_elig = 1'b0;
      for (int a = 0; a < 128; a++) if (eligible(a)) any_elig = 1'b1;
      exp_read = resultout && (bufferhalf || !any_elig || !vid_avail);
      check(read == exp_read, "read turn-around rule");
      check(busy == (n_held != 0), "busy");
      for (int k = 0; k < 2; k++)
        check(in_accept[k] == (nfree >= 2 && !tok_any && !exp_read &&
                               (!in_instr[k].d || nfree >= 2 + RESERVE)), "in_accept fill rule");
      may_send = any_elig && vid_avail && !exp_read && !local_tok;
      check(send[0].v == may_send, "sends whenever it may");
      check(!send[1].v || send[0].v, "second slot only with the first");
      for (int k = 0; k < 2; k++)
        if (send[k].v) begin
          int a;
          a = int'(send[k].iad);
          check(eligible(a), "sent instruction held and eligible");
          check(send[k] == rec[a], "sent instruction with its operands");
          if (rec[a].d) n_dep_sent++;
        end
      if (send[0].v && send[1].v) begin
        n_pair++;
        check(send[0].opcode[1:0] != send[1].opcode[1:0], "two sends need different units");
      end
      if (send[0].v && !send[1].v)
        for (int a = 0; a < 128; a++)
          if (eligible(a) && a != int'(send[0].iad))
            check(rec[a].opcode[1:0] == send[0].opcode[1:0], "second slot used when possible");
      @(posedge clk);
      for (int k = 0; k < 2; k++)
        if (send[k].v) begin held[send[k].iad] = 1'b0; n_held--; n_out++; end
      for (int a = 0; a < 128; a++)
        if (held[a] && rec[a].d)
          for (int t = 0; t < NTOK; t++)
            if (tok[t].v && tok[t].iad == rec[a].iid && rec[a].d) begin
              if (rec[a].opfl) rec[a].opd2 = tok[t].res; else rec[a].opd1 = tok[t].res;
              rec[a].d = 1'b0;
            end
      for (int k = 0; k < 2; k++)
        if (in_instr[k].v && in_accept[k]) begin
          held[in_instr[k].iad] = 1'b1; rec[in_instr[k].iad] = in_instr[k]; n_held++; n_in++;
        end
      @(negedge clk);
    end
    check(n_in == n_out + n_held, "nothing lost or duplicated");
    check(n_pair > 0 && n_dep_sent > 0, "pairs and dependent instructions sent");
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
