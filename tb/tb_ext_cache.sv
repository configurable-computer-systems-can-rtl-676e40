// tb_ext_cache: self-checking test of one EXT-CACHE (DSRAM) and its cache
// controller.
//
// The DRAM side offers random instructions with 0, 1 or 2 operands missing;
// tokens for their producers appear on the token bus at random; the
// out-buffer side takes the offered block at random (never in a clock with a
// token on the bus, as the out-buffer does). The testbench keeps its own
// copy of every block held and checks every clock:
//   - wr_ready: a free block, no token on the bus, and for an instruction
//     still missing operands more than RESERVE free blocks;
//   - ovf exactly when all blocks are held;
//   - out offers a held block missing at most one operand whenever there is
//     one, a complete one whenever there is one, in the out-buffer format,
//     with the operands its tokens delivered;
//   - every instruction written leaves exactly once.
module tb_ext_cache;
  import d2_pkg::*;

  localparam int unsigned DEPTH = 16;
  localparam int unsigned NTOK  = 4;
  localparam int unsigned RESERVE = 2;

  logic       clk = 1'b0, rst = 1'b1;
  mem_instr_t wr_instr;
  logic       wr_ready, ovf, out_accept, busy;
  token_t     tok [NTOK];
  ob_instr_t  out;

  ext_cache #(.DEPTH(DEPTH), .NTOK(NTOK), .RESERVE(RESERVE)) dut (
    .clk, .rst, .wr_instr, .wr_ready, .ovf, .tok, .out, .out_accept, .busy
  );

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  logic       held [128];
  mem_instr_t rec  [128];
  int         n_held = 0, n_in = 0, n_out = 0, n_ovf = 0, n_one = 0;

  task automatic check(logic c, string what);
    checks++;
    if (!c) begin
      failures++;
      if (failures < 10) $display("FAIL %s (held %0d)", what, n_held);
    end
  endtask

  initial begin
    for (int i = 0; i < 128; i++) begin held[i] = 1'b0; rec[i] = '0; end
    for (int t = 0; t < NTOK; t++) tok[t] = '0;
    wr_instr = '0; out_accept = 1'b0;
    repeat (2) @(negedge clk);
    rst = 1'b0;
    for (int c = 0; c < 6000; c++) begin
      logic tok_any, any_rdy, any_cpl;
      int a;
      wr_instr = '0;
      a = 1 + $urandom % 99;
      if (!held[a] && ($urandom % 4) != 0) begin
        wr_instr = mem_instr_t'({$urandom, $urandom, $urandom});
        wr_instr.v = 1'b1; wr_instr.iad = pid_t'(a);
        wr_instr.iid1 = pid_t'(100 + $urandom % 28);
        wr_instr.iid2 = pid_t'(100 + $urandom % 28);
      end
      for (int t = 0; t < NTOK; t++) begin
        tok[t] = '0;
        if (($urandom % 12) == 0) begin
          tok[t].v = 1'b1; tok[t].iad = pid_t'(100 + $urandom % 28); tok[t].res = 16'($urandom);
        end
      end
      tok_any = 1'b0;
      for (int t = 0; t < NTOK; t++) tok_any |= tok[t].v;
      out_accept = !tok_any && (($urandom % 8) < (((c / 400) % 2) ? 1 : 6));
      #1;
      any_rdy = 1'b0; any_cpl = 1'b0;
      for (int i = 0; i < 128; i++) if (held[i]) begin
        if (rec[i].opfl != 2'b11) any_rdy = 1'b1;
        if (rec[i].opfl == 2'b00) any_cpl = 1'b1;
      end
      check(ovf == (n_held == DEPTH), "ovf");
      check(busy == (n_held != 0), "busy");
      if (ovf) n_ovf++;
      check(wr_ready == (n_held < DEPTH && !tok_any &&
                         (wr_instr.opfl == 2'b00 || DEPTH - n_held > RESERVE)), "wr_ready rule");
      check(out.v == any_rdy, "a ready block is offered when there is one");
      if (out.v) begin
        int o;
        o = int'(out.iad);
        check(held[o] && rec[o].opfl != 2'b11, "offered block is held and ready");
        check(!any_cpl || !out.d, "complete blocks first");
        if (held[o]) check(out == mem_to_ob(rec[o]), "offered block contents");
        if (out.d) n_one++;
      end
      @(posedge clk);
      if (out.v && out_accept) begin held[out.iad] = 1'b0; n_held--; n_out++; end
      for (int i = 0; i < 128; i++)
        if (held[i]) for (int t = 0; t < NTOK; t++) rec[i] = mem_snoop(rec[i], tok[t]);
      if (wr_instr.v && wr_ready) begin held[wr_instr.iad] = 1'b1; rec[wr_instr.iad] = wr_instr; n_held++; n_in++; end
      @(negedge clk);
    end
    check(n_in == n_out + n_held, "nothing lost or duplicated");
    check(n_ovf > 0 && n_one > 0, "cache filled and one-missing blocks forwarded");
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
