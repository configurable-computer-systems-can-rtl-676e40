// tb_token_fifo: self-checking test of the ERU token FIFO.
//
// Each clock the three unit inputs carry random tokens and read is raised at
// random. A queue in the testbench models the FIFO: writes happen only while
// bufferfull is low, in unit order; a read removes the two oldest (or the one
// stored). Every clock the testbench checks the two output tokens, the
// BUFFERHALF (at least DEPTH/2 stored) and BUFFERFULL (fewer than three free)
// flags and that the scan outputs show exactly the stored tokens. The write
// and read rates are varied so that the FIFO runs empty, half full and full.
module tb_token_fifo;
  import d2_pkg::*;

  localparam int unsigned DEPTH = 16;

  logic    clk = 1'b0, rst = 1'b1;
  vtoken_t in_tok [3];
  logic    read;
  vtoken_t out_tok [2];
  logic    bufferhalf, bufferfull, not_empty;
  vtoken_t scan [DEPTH];

  token_fifo #(.DEPTH(DEPTH)) dut (.clk, .rst, .in_tok, .read, .out_tok, .bufferhalf,
                                   .bufferfull, .not_empty, .scan);

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  vtoken_t q[$];
  int n_half = 0, n_full = 0;

  task automatic check(logic c, string what);
    checks++;
    if (!c) begin
      failures++;
      if (failures < 10) $display("FAIL %s (stored %0d)", what, q.size());
    end
  endtask

  initial begin
    for (int k = 0; k < 3; k++) in_tok[k] = '0;
    read = 1'b0;
    repeat (2) @(negedge clk);
    rst = 1'b0;
    for (int c = 0; c < 6000; c++) begin
      int wr_rate, rd_rate, nscan;
      wr_rate = ((c / 500) % 3 == 0) ? 1 : 3;   // phases of slow and fast writing
      rd_rate = ((c / 500) % 3 == 2) ? 4 : 1;
      for (int k = 0; k < 3; k++) begin
        in_tok[k]   = vtoken_t'($urandom);
        in_tok[k].v = ($urandom % 4) < wr_rate;
      end
      read = ($urandom % 4) < rd_rate;
      #1;
      check(bufferhalf == (q.size() >= DEPTH / 2), "bufferhalf");
      check(bufferfull == (q.size() > DEPTH - 3), "bufferfull");
      check(not_empty == (q.size() != 0), "not_empty");
      check(out_tok[0].v == (q.size() >= 1) && out_tok[1].v == (q.size() >= 2), "output valid bits");
      if (q.size() >= 1) check(out_tok[0] == q[0], "out_tok[0] is the oldest");
      if (q.size() >= 2) check(out_tok[1] == q[1], "out_tok[1] is the second oldest");
      nscan = 0;
      for (int i = 0; i < DEPTH; i++) if (scan[i].v) nscan++;
      check(nscan == q.size(), "scan shows as many tokens as are stored");
      foreach (q[j]) begin
        logic seen = 1'b0;
        for (int i = 0; i < DEPTH; i++) if (scan[i] == q[j]) seen = 1'b1;
        check(seen, "stored token visible on scan");
      end
      if (bufferhalf) n_half++;
      if (bufferfull) n_full++;
      @(posedge clk);
      if (read) repeat (2) if (q.size() != 0) void'(q.pop_front());
      if (!bufferfull) for (int k = 0; k < 3; k++) if (in_tok[k].v) q.push_back(in_tok[k]);
      @(negedge clk);
    end
    check(n_half > 0 && n_full > 0, "both flags were raised");
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
