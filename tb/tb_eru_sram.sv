// tb_eru_sram: self-checking test of the ERU-SRAM, the two-entry store in
// front of a functional unit.
//
// Random instructions are offered with random out_ready from the unit. A
// queue in the testbench models the store: it holds at most DEPTH
// instructions, takes a new one when it has room or when one leaves in the
// same clock, and hands them out oldest first. Every clock the testbench
// checks in_ready, busy and the offered instruction against that model, and
// at the end that every instruction came out once, in order.
module tb_eru_sram;
  import d2_pkg::*;

  localparam int unsigned DEPTH = 2;

  logic      clk = 1'b0, rst = 1'b1;
  fu_instr_t in_instr, out_instr;
  logic      in_ready, out_ready, busy;

  eru_sram #(.DEPTH(DEPTH)) dut (.clk, .rst, .in_instr, .in_ready, .out_instr, .out_ready, .busy);

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  fu_instr_t q[$];
  int n_in = 0, n_out = 0, n_full = 0;

  task automatic check(logic c, string what);
    checks++;
    if (!c) begin
      failures++;
      if (failures < 10) $display("FAIL %s (queue %0d)", what, q.size());
    end
  endtask

  initial begin
    in_instr = '0; out_ready = 1'b0;
    repeat (2) @(negedge clk);
    rst = 1'b0;
    for (int k = 0; k < 4000; k++) begin
      logic exp_ready;
      in_instr        = fu_instr_t'({$urandom, $urandom});
      in_instr.v      = ($urandom % 3) != 0;
      out_ready       = (k < 2000) ? ($urandom % 4) == 0 : ($urandom % 3) != 0;
      #1;
      exp_ready = (q.size() < DEPTH) || (out_ready && q.size() != 0);
      check(busy == (q.size() != 0), "busy");
      check(out_instr.v == (q.size() != 0), "out valid");
      if (q.size() != 0) check(out_instr == q[0], "out_instr is the oldest");
      if (q.size() == DEPTH) n_full++;
      // out_ready with an empty store does not make room
      if (q.size() < DEPTH || out_ready) check(in_ready, "in_ready with room");
      else                               check(!in_ready, "in_ready low when full");
      @(posedge clk);
      if (q.size() != 0 && out_ready) begin void'(q.pop_front()); n_out++; end
      if (in_instr.v && in_ready) begin q.push_back(in_instr); n_in++; end
      @(negedge clk);
    end
    check(n_full > 0, "store was full at least once");
    check(n_in == n_out + q.size(), "nothing lost or duplicated");
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
