// tb_dram_pupim: self-checking test of one main-memory module with its
// PU-PIM controller.
//
// Directed cases, each loading a few blocks through the host port (run low),
// then running the controller and checking what it sends, what tokens it
// makes and the blocks read back through the host port:
//   1  host port: every block written is read back; nothing moves while run
//      is low;
//   2  send order: complete blocks first, then one-missing, then two-missing,
//      with the physical address BASE + index, one per clock; a sent block
//      is dissolved (V cleared, CAN cleared, fields kept);
//   3  no send in a clock with a token on the bus, and none while out_accept
//      is low;
//   4  token snoop: operands named by OPFL are filled; a CAD match copies
//      result bit 0 into CAN; a clause block waits for CAN and one answered 0
//      is never sent;
//   5  LOCK fires only with both operands and passes OPD2 on the local token
//      slot, never in a clock in which the ERU sends tokens;
//   6  STOP raises stop, and the local reset clears it;
//   7  MERGE fires on either input and passes the operand that arrived, then
//      waits for a new token;
//   8  an instruction with ORE set stays after it is sent, keeping the
//      marked operand and waiting again for the other;
//   9  quiet is high exactly when nothing can be sent or fire.
module tb_dram_pupim;
  import d2_pkg::*;

  localparam int unsigned DEPTH = 8;
  localparam int unsigned BASE  = 64;
  localparam int unsigned NTOK  = 4;

  logic        clk = 1'b0, rst = 1'b1, lrst = 1'b0, run = 1'b0;
  logic        host_we = 1'b0;
  logic [2:0]  host_addr = '0;
  dram_block_t host_wdata, host_rdata;
  token_t      tok [NTOK];
  logic        eru_tokenout = 1'b0, out_accept = 1'b0;
  mem_instr_t  out;
  token_t      ltok;
  logic        stop, quiet;

  dram_pupim #(.DEPTH(DEPTH), .BASE(BASE), .NTOK(NTOK)) dut (
    .clk, .rst, .lrst, .run, .host_we, .host_addr, .host_wdata, .host_rdata, .tok,
    .eru_tokenout, .out, .out_accept, .ltok, .stop, .quiet
  );

  always #5 clk = ~clk;

  int checks = 0, failures = 0;

  task automatic check(logic c, string what);
    checks++;
    if (!c) begin
      failures++;
      $display("FAIL %s", what);
    end
  endtask

  task automatic clear_tok();
    for (int t = 0; t < NTOK; t++) tok[t] = '0;
  endtask

  function automatic dram_block_t mk(logic [5:0] op, logic [1:0] lp, logic [1:0] ore,
                                     logic [6:0] i1, logic [6:0] i2, logic [15:0] a, logic [15:0] b);
    dram_block_t x;
    x = '0;
    x.v = 1'b1; x.can = 1'b1; x.opcode = op; x.lp = lp; x.ore = ore;
    x.iid1 = i1; x.iid2 = i2; x.opfl = {i2 != '0, i1 != '0};
    x.opd1 = a; x.opd2 = b;
    return x;
  endfunction

  task automatic load(dram_block_t img [DEPTH]);
    run = 1'b0;
    rst = 1'b1; @(negedge clk); rst = 1'b0;
    for (int i = 0; i < DEPTH; i++) begin
      host_we = 1'b1; host_addr = 3'(i); host_wdata = img[i];
      @(negedge clk);
    end
    host_we = 1'b0;
  endtask

  task automatic rd(int i, output dram_block_t r);
    host_addr = 3'(i);
    #1;
    r = host_rdata;
  endtask

  dram_block_t img [DEPTH];
  dram_block_t b;

  initial begin
    clear_tok();
    host_wdata = '0;
    repeat (2) @(negedge clk);
    rst = 1'b0;

    // 1 host port
    for (int i = 0; i < DEPTH; i++) begin
      img[i] = dram_block_t'({$urandom, $urandom, $urandom, $urandom});
      img[i].v = 1'b1;
    end
    load(img);
    for (int i = 0; i < DEPTH; i++) begin
      rd(i, b);
      check(b == img[i], "host read back");
    end
    repeat (3) begin check(!out.v && !ltok.v, "nothing moves while run is low"); @(negedge clk); end

    // 2 and 3: send order, dissolve, stall on tokens
    for (int i = 0; i < DEPTH; i++) img[i] = '0;
    img[1] = mk(OP_ADD, LP_NONE, 2'b00, 7'd10, 7'd11, 16'd0, 16'd0);   // two missing
    img[2] = mk(OP_MUL, LP_NONE, 2'b00, 7'd10, 7'd0, 16'd0, 16'd5);    // one missing
    img[5] = mk(OP_SUB, LP_NONE, 2'b00, 7'd0, 7'd0, 16'd9, 16'd4);     // complete
    load(img);
    run = 1'b1; out_accept = 1'b0;
    #1;
    check(out.v && out.iad == pid_t'(BASE + 5) && out.opfl == 2'b00 && out.opd1 == 16'd9 &&
          out.opd2 == 16'd4 && out.opcode == OP_SUB, "complete block offered first");
    @(negedge clk);
    rd(5, b);
    check(b.v, "not taken while out_accept is low");
    out_accept = 1'b1;
    tok[0].v = 1'b1; tok[0].iad = 7'd99;
    @(negedge clk);
    clear_tok();
    rd(5, b);
    check(b.v, "not taken in a clock with a token on the bus");
    @(negedge clk);
    rd(5, b);
    check(!b.v && !b.can && b.opd1 == 16'd9 && b.opcode == OP_SUB, "sent block dissolved, fields kept");
    #1;
    check(out.v && out.iad == pid_t'(BASE + 2) && out.opfl == 2'b01, "one-missing block second");
    @(negedge clk);
    #1;
    check(out.v && out.iad == pid_t'(BASE + 1) && out.opfl == 2'b11, "two-missing block last");
    @(negedge clk);
    #1;
    check(!out.v && quiet, "all sent, quiet");
    out_accept = 1'b0;

    // 4 snoop and clause
    for (int i = 0; i < DEPTH; i++) img[i] = '0;
    img[0] = mk(OP_ADD, LP_NONE, 2'b00, 7'd20, 7'd21, 16'd0, 16'd0);
    img[1] = mk(OP_ADD, LP_NONE, 2'b00, 7'd0, 7'd0, 16'd1, 16'd2);
    img[1].cr = 1'b1; img[1].can = 1'b0; img[1].cad = 7'd30;
    img[2] = mk(OP_ADD, LP_NONE, 2'b00, 7'd0, 7'd0, 16'd3, 16'd4);
    img[2].cr = 1'b1; img[2].can = 1'b0; img[2].cad = 7'd31;
    load(img);
    run = 1'b1; out_accept = 1'b0;
    tok[0].v = 1'b1; tok[0].iad = 7'd21; tok[0].res = 16'h1234;
    tok[3].v = 1'b1; tok[3].iad = 7'd31; tok[3].res = 16'h0002;   // answer 0
    @(negedge clk);
    clear_tok();
    rd(0, b);
    check(b.opd2 == 16'h1234 && b.opfl == 2'b01 && b.opd1 == 16'd0, "OPD2 filled by its token");
    rd(2, b);
    check(!b.can, "clause answered 0");
    tok[1].v = 1'b1; tok[1].iad = 7'd20; tok[1].res = 16'h5678;
    tok[2].v = 1'b1; tok[2].iad = 7'd30; tok[2].res = 16'h0001;   // answer 1
    @(negedge clk);
    clear_tok();
    rd(0, b);
    check(b.opd1 == 16'h5678 && b.opfl == 2'b00, "OPD1 filled by its token");
    rd(1, b);
    check(b.can, "clause answered 1");
    out_accept = 1'b1;
    for (int k = 0; k < 6; k++) begin
      #1;
      if (out.v) check(out.iad != pid_t'(BASE + 2), "clause block answered 0 never sent");
      @(negedge clk);
    end
    rd(0, b); check(!b.v, "snooped block sent");
    rd(1, b); check(!b.v, "clause block answered 1 sent");
    rd(2, b); check(b.v, "clause block answered 0 stays");
    out_accept = 1'b0;

    // 5 LOCK, 6 STOP
    for (int i = 0; i < DEPTH; i++) img[i] = '0;
    img[3] = mk(OP_LOCK, LP_LOCK, 2'b00, 7'd40, 7'd41, 16'd0, 16'd0);
    img[4] = mk(OP_STOP, LP_LOCK, 2'b00, 7'd42, 7'd0, 16'd0, 16'd0);
    load(img);
    run = 1'b1;
    tok[0].v = 1'b1; tok[0].iad = 7'd40; tok[0].res = 16'd7;
    @(negedge clk);
    clear_tok();
    #1;
    check(!ltok.v, "LOCK waits for both operands");
    tok[0].v = 1'b1; tok[0].iad = 7'd41; tok[0].res = 16'd8;
    @(negedge clk);
    clear_tok();
    eru_tokenout = 1'b1;
    #1;
    check(!ltok.v, "no local token while the ERU sends tokens");
    @(negedge clk);
    eru_tokenout = 1'b0;
    #1;
    check(ltok.v && ltok.iad == pid_t'(BASE + 3) && ltok.res == 16'd8, "LOCK passes OPD2");
    @(negedge clk);
    #1;
    check(!ltok.v, "LOCK fires once");
    rd(3, b); check(!b.v, "LOCK dissolved");
    check(!stop, "no stop yet");
    tok[0].v = 1'b1; tok[0].iad = 7'd42; tok[0].res = 16'd1;
    @(negedge clk);
    clear_tok();
    @(negedge clk);
    check(stop, "STOP raises stop");
    lrst = 1'b1; @(negedge clk); lrst = 1'b0;
    check(!stop, "local reset clears stop");

    // 7 MERGE
    for (int i = 0; i < DEPTH; i++) img[i] = '0;
    img[6] = mk(OP_MERGE, LP_MERGE, 2'b00, 7'd0, 7'd50, 16'd11, 16'd0);   // OPD1 present
    load(img);
    run = 1'b1;
    #1;
    check(ltok.v && ltok.iad == pid_t'(BASE + 6) && ltok.res == 16'd11, "MERGE fires with OPD1");
    @(negedge clk);
    #1;
    check(!ltok.v, "MERGE then waits");
    rd(6, b); check(b.v && b.opfl == 2'b11, "MERGE stays, waiting for a new token");
    tok[2].v = 1'b1; tok[2].iad = 7'd50; tok[2].res = 16'd22;
    @(negedge clk);
    clear_tok();
    #1;
    check(ltok.v && ltok.res == 16'd22, "MERGE passes the token that arrived on its second input");
    @(negedge clk);

    // 8 ORE
    for (int i = 0; i < DEPTH; i++) img[i] = '0;
    img[7] = mk(OP_ADD, LP_NONE, 2'b10, 7'd60, 7'd0, 16'd0, 16'd1);   // keep OPD2
    load(img);
    run = 1'b1; out_accept = 1'b1;
    tok[0].v = 1'b1; tok[0].iad = 7'd60; tok[0].res = 16'd5;
    @(negedge clk);
    clear_tok();
    #1;
    check(out.v && out.iad == pid_t'(BASE + 7) && out.opd1 == 16'd5 && out.opd2 == 16'd1, "ORE block sent complete");
    @(negedge clk);
    rd(7, b);
    check(b.v && b.opfl == 2'b01 && b.opd2 == 16'd1, "ORE block stays, OPD2 kept, OPD1 awaited");
    #1;
    check(!out.v && quiet, "ORE block waits for its next operand");
    tok[0].v = 1'b1; tok[0].iad = 7'd60; tok[0].res = 16'd6;
    @(negedge clk);
    clear_tok();
    #1;
    check(out.v && out.opd1 == 16'd6 && !quiet, "ORE block sent again");
    out_accept = 1'b0; run = 1'b0;

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
