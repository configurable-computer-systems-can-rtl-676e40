// tb_sram_star: self-checking test of one SRAM* (reservation store).
//
// The testbench sends random instructions on the two-instruction ERU bus,
// some for this unit's class (ADD) and some for others, which must be
// ignored. About half of the ADD instructions wait for a token (D = 1), naming
// a producer whose result the testbench decides in advance. Tokens are shown
// on the scan inputs at random times. Nothing is sent while ovf is high.
// Checks:
//   - ovf is high exactly when DEPTH instructions are held;
//   - every instruction leaves exactly once, never before the token it waits
//     for has been shown, with that token's result in the operand named by
//     OPFL and the other operand unchanged;
//   - an independent instruction is offered the clock after it is written
//     when nothing else is ready.
module tb_sram_star;
  import d2_pkg::*;

  localparam int unsigned DEPTH = 12;
  localparam int unsigned SCAN  = 4;

  logic       clk = 1'b0, rst = 1'b1;
  eru_instr_t in_instr [2];
  vtoken_t    scan_tok [SCAN];
  logic       ovf, out_ready, busy;
  fu_instr_t  out_instr;

  sram_star #(.DEPTH(DEPTH), .FU(FU_ADD), .SCAN(SCAN)) dut (
    .clk, .rst, .in_instr, .scan_tok, .ovf, .out_instr, .out_ready, .busy
  );

  always #5 clk = ~clk;

  int checks = 0, failures = 0;

  // Per virtual ID: the producer's result, whether it has been shown, and the
  // instruction stored under that IAD (IADs of stored instructions are unique).
  logic [15:0] prod_res [64];
  logic        shown    [64];
  logic        held     [64];
  eru_instr_t  sent     [64];
  int          n_held = 0, n_in = 0, n_out = 0, n_ovf = 0, n_dep = 0;

  task automatic check(logic c, string what);
    checks++;
    if (!c) begin
      failures++;
      if (failures < 10) $display("FAIL %s", what);
    end
  endtask

  initial begin
    for (int i = 0; i < 64; i++) begin
      prod_res[i] = 16'($urandom); shown[i] = 1'b0; held[i] = 1'b0;
    end
    for (int k = 0; k < 2; k++) in_instr[k] = '0;
    for (int t = 0; t < SCAN; t++) scan_tok[t] = '0;
    out_ready = 1'b0;
    repeat (2) @(negedge clk);
    rst = 1'b0;
    for (int c = 0; c < 5000; c++) begin
      // new instructions (IADs 0..47 for this unit, producers 48..63)
      for (int k = 0; k < 2; k++) in_instr[k] = '0;
      if (!ovf && ($urandom % 3) != 0) begin
        int iad;
        iad = $urandom % 48;
        if (!held[iad]) begin
          in_instr[0]        = eru_instr_t'({$urandom, $urandom, $urandom});
          in_instr[0].v      = 1'b1;
          in_instr[0].opcode = (($urandom % 2) == 0) ? OP_ADD : OP_SUB;
          in_instr[0].iad    = vid_t'(iad);
          in_instr[0].d      = ($urandom % 2) == 0;
          in_instr[0].iid    = vid_t'(48 + $urandom % 16);
          if (in_instr[0].d && shown[in_instr[0].iid]) in_instr[0].d = 1'b0;
        end
      end
      // an instruction for another unit on the second slot
      if (($urandom % 2) == 0) begin
        in_instr[1]        = eru_instr_t'({$urandom, $urandom, $urandom});
        in_instr[1].v      = 1'b1;
        in_instr[1].opcode = OP_MUL;
      end
      // tokens: show producer results at random, forget them again at times
      for (int t = 0; t < SCAN; t++) begin
        scan_tok[t] = '0;
        if (($urandom % 8) == 0) begin
          int p;
          p = 48 + $urandom % 16;
          scan_tok[t].v = 1'b1; scan_tok[t].iad = vid_t'(p); scan_tok[t].res = prod_res[p];
        end
      end
      out_ready = ($urandom % 3) == 0;
      #1;
      check(ovf == (n_held == DEPTH), "ovf exactly when all blocks are held");
      check(busy == (n_held != 0), "busy");
      if (n_held == DEPTH) n_ovf++;
      if (out_instr.v) begin
        int a;
        a = int'(out_instr.iad);
        check(held[a], "offered instruction was stored");
        if (held[a]) begin
          logic [15:0] e1, e2;
          e1 = sent[a].opd1; e2 = sent[a].opd2;
          if (sent[a].d) begin
            check(shown[sent[a].iid], "dependent instruction leaves only after its token");
            if (sent[a].opfl) e2 = prod_res[sent[a].iid]; else e1 = prod_res[sent[a].iid];
          end
          check(out_instr.opd1 == e1 && out_instr.opd2 == e2 && out_instr.opcode == sent[a].opcode,
                "operands and opcode");
        end
      end
      @(posedge clk);
      if (out_instr.v && out_ready) begin
        held[out_instr.iad] = 1'b0; n_held--; n_out++;
      end
      if (in_instr[0].v) begin
        held[in_instr[0].iad] = 1'b1; sent[in_instr[0].iad] = in_instr[0]; n_held++; n_in++;
        if (in_instr[0].d) n_dep++;
      end
      for (int t = 0; t < SCAN; t++) if (scan_tok[t].v) shown[scan_tok[t].iad] = 1'b1;
      // now and then a producer's token is withdrawn and its result changes
      if (($urandom % 50) == 0) begin
        int p;
        logic used;
        p = 48 + $urandom % 16;
        used = 1'b0;
        for (int i = 0; i < 48; i++) if (held[i] && sent[i].d && sent[i].iid == vid_t'(p)) used = 1'b1;
        if (!used) begin shown[p] = 1'b0; prod_res[p] = 16'($urandom); end
      end
      @(negedge clk);
    end
    // drain: show every token, take everything
    for (int t = 0; t < SCAN; t++) scan_tok[t] = '0;
    for (int k = 0; k < 2; k++) in_instr[k] = '0;
    out_ready = 1'b1;
    for (int c = 0; c < 200; c++) begin
      scan_tok[0].v = 1'b1; scan_tok[0].iad = vid_t'(48 + c % 16); scan_tok[0].res = prod_res[48 + c % 16];
      @(posedge clk);
      if (out_instr.v) begin held[out_instr.iad] = 1'b0; n_held--; n_out++; end
      @(negedge clk);
    end
    check(n_held == 0 && !busy, "all instructions left");
    check(n_in == n_out, "every instruction left exactly once");
    check(n_ovf > 0 && n_dep > 0, "store filled and dependent instructions waited");
    // timing: one independent instruction into the empty store
    out_ready = 1'b0;
    in_instr[0] = '0; in_instr[0].v = 1'b1; in_instr[0].opcode = OP_ADD; in_instr[0].iad = 6'd5;
    in_instr[0].opd1 = 16'd7; in_instr[0].opd2 = 16'd9;
    @(negedge clk);
    in_instr[0] = '0;
    check(out_instr.v && out_instr.iad == 6'd5 && out_instr.opd1 == 16'd7, "offered one clock after writing");
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
