// tb_hw_manager: self-checking test of the hardware manager's virtual /
// physical ID table.
//
// The testbench plays both sides. On the memory side it sends up to two
// instructions per clock (only while vid_avail is high and never in a
// clock in which tokens are read), each with a physical address not already
// inside and, for about half, a producer address that is inside. On the ERU
// side it returns tokens for random instructions inside, reading them with
// tok_read. A table in the testbench records which physical address went
// out under which virtual ID. Checks every clock:
//   - the virtual IDs given out are free and differ from each other;
//   - a waiting operand's IID is translated to its producer's virtual ID;
//   - operands, opcode and flags pass unchanged;
//   - tokens leave with the physical address of their instruction and their
//     result, and only while tok_read is high;
//   - lookup_hit says exactly which physical addresses are inside;
//   - vid_avail is high exactly while at least two IDs are free.
// The send rate is varied so that all 64 IDs get used up and are recycled.
module tb_hw_manager;
  import d2_pkg::*;

  localparam int unsigned NVID  = 64;
  localparam int unsigned NLOOK = 12;

  logic       clk = 1'b0, rst = 1'b1;
  ob_instr_t  ob_instr [2];
  eru_instr_t eru_instr [2];
  vtoken_t    eru_tok [2];
  logic       tok_read, vid_avail, busy;
  token_t     mem_tok [2];
  pid_t       lookup_pid [NLOOK];
  logic [NLOOK-1:0] lookup_hit;

  hw_manager #(.NVID(NVID), .NLOOK(NLOOK)) dut (
    .clk, .rst, .ob_instr, .eru_instr, .eru_tok, .tok_read, .mem_tok,
    .lookup_pid, .lookup_hit, .vid_avail, .busy
  );

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  logic       used [NVID];     // virtual ID in use
  pid_t       phys [NVID];     // its physical address
  logic       pin  [128];      // physical address inside
  int         vof  [128];      // its virtual ID
  int         n_used = 0, n_sent = 0, n_exhaust = 0;

  task automatic check(logic c, string what);
    checks++;
    if (!c) begin
      failures++;
      if (failures < 10) $display("FAIL %s (in use %0d)", what, n_used);
    end
  endtask

  function automatic int pick_free_pid();
    int p;
    do p = 1 + $urandom % 127; while (pin[p]);
    return p;
  endfunction

  initial begin
    for (int i = 0; i < NVID; i++) begin used[i] = 1'b0; phys[i] = '0; end
    for (int i = 0; i < 128; i++) begin pin[i] = 1'b0; vof[i] = 0; end
    for (int k = 0; k < 2; k++) begin ob_instr[k] = '0; eru_tok[k] = '0; end
    for (int j = 0; j < NLOOK; j++) lookup_pid[j] = '0;
    tok_read = 1'b0;
    repeat (2) @(negedge clk);
    rst = 1'b0;
    for (int c = 0; c < 6000; c++) begin
      int send_rate, ret_rate;
      send_rate = ((c / 300) % 2) ? 7 : 3;   // phases that exhaust the table
      ret_rate  = ((c / 300) % 2) ? 1 : 6;
      for (int k = 0; k < 2; k++) begin ob_instr[k] = '0; eru_tok[k] = '0; end
      tok_read = 1'b0;
      #1;
      check(vid_avail == (NVID - n_used >= 2), "vid_avail");
      check(busy == (n_used != 0), "busy");
      if (!vid_avail) n_exhaust++;
      if (n_used > 0 && ($urandom % 8) < ret_rate) begin
        // return up to two tokens
        tok_read = 1'b1;
        for (int k = 0; k < 2; k++) begin
          int v;
          v = $urandom % NVID;
          if (used[v] && (k == 0 || v != int'(eru_tok[0].iad))) begin
            eru_tok[k].v = 1'b1; eru_tok[k].iad = vid_t'(v); eru_tok[k].res = 16'($urandom);
          end
        end
      end else if (vid_avail && ($urandom % 8) < send_rate) begin
        for (int k = 0; k < 2; k++)
          if (k == 0 || ($urandom % 2) == 0) begin
            int p;
            ob_instr[k] = ob_instr_t'({$urandom, $urandom, $urandom});
            ob_instr[k].v = 1'b1;
            do p = pick_free_pid(); while (k == 1 && pid_t'(p) == ob_instr[0].iad);
            ob_instr[k].iad = pid_t'(p);
            ob_instr[k].d = 1'b0; ob_instr[k].iid = '0;
            if (n_used > 0 && ($urandom % 2) == 0) begin
              int v;
              do v = $urandom % NVID; while (!used[v]);
              ob_instr[k].d = 1'b1; ob_instr[k].iid = phys[v];
            end
          end
      end
      for (int j = 0; j < NLOOK; j++) lookup_pid[j] = pid_t'($urandom);
      #1;
      for (int j = 0; j < NLOOK; j++)
        check(lookup_hit[j] == pin[lookup_pid[j]], "lookup_hit");
      for (int k = 0; k < 2; k++) begin
        check(mem_tok[k].v == eru_tok[k].v, "token valid follows tok_read");
        if (eru_tok[k].v)
          check(mem_tok[k].iad == phys[eru_tok[k].iad] && mem_tok[k].res == eru_tok[k].res,
                "token physical address and result");
        if (ob_instr[k].v) begin
          check(eru_instr[k].v && !used[eru_instr[k].iad], "fresh virtual ID");
          check(eru_instr[k].opd1 == ob_instr[k].opd1 && eru_instr[k].opd2 == ob_instr[k].opd2 &&
                eru_instr[k].opcode == ob_instr[k].opcode && eru_instr[k].d == ob_instr[k].d &&
                eru_instr[k].opfl == ob_instr[k].opfl, "fields pass unchanged");
          if (ob_instr[k].d)
            check(eru_instr[k].iid == vid_t'(vof[ob_instr[k].iid]), "IID translated");
        end
      end
      if (ob_instr[0].v && ob_instr[1].v) check(eru_instr[0].iad != eru_instr[1].iad, "two different IDs");
      @(posedge clk);
      for (int k = 0; k < 2; k++)
        if (eru_tok[k].v) begin
          used[eru_tok[k].iad] = 1'b0; pin[phys[eru_tok[k].iad]] = 1'b0; n_used--;
        end
      for (int k = 0; k < 2; k++)
        if (ob_instr[k].v) begin
          used[eru_instr[k].iad] = 1'b1; phys[eru_instr[k].iad] = ob_instr[k].iad;
          pin[ob_instr[k].iad] = 1'b1; vof[ob_instr[k].iad] = int'(eru_instr[k].iad);
          n_used++; n_sent++;
        end
      @(negedge clk);
    end
    check(n_exhaust > 0 && n_sent > NVID, "IDs used up and recycled");
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
