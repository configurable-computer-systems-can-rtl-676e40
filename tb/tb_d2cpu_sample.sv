// tb_d2cpu_sample: a conditional followed by a ten-iteration loop on the
// whole processor, every parameter at its default.
//
// The program computes
//     y = 2*x - 10;  if (y > 0) { for i = 1..10: y = 7*y } else y = 7*7
// written for this design's block format (the multiplier takes the low byte
// of each operand, so y soon stops being 2*7^i):
//    1 B  MUL x,2            7 G  SWITCH LET F,10 (clause: itself, keeps 10)
//    2 C  SUB B,10           8 H  MERGE C | I       (the running y)
//    3 D  GT  C,0            9 I  MUL H,7  (clause: G, keeps 7)
//    4 E  LET C,0           10 K  ADD F,1  (clause: G, keeps 1)
//    5 M  ADD D,0 (clause: D; starts the counter with 1 only when y > 0)
//    6 F  MERGE M | K  (the counter i; clause: G)
//   11 L  MUL 7,7 (clause: E, the else branch)
// The testbench watches the token bus and checks, for x = 6 and 7 (loop
// taken) and x = 3 (else branch): how many times I and L fire, the last y, the final
// counter left in G and K, and that the run ends by itself. The counter is
// started by M rather than preloaded so that the loop is part of the
// conditional; the running y is kept by a clause-free MERGE (H).
module tb_d2cpu_sample;
  import d2_pkg::*;

  localparam int unsigned NBLK  = 127;

  logic        clk = 1'b0;
  logic        global_reset = 1'b1;
  logic        ena = 1'b0, wea = 1'b0;
  logic [8:0]  addra = '0;
  logic [31:0] dia = '0, doa;
  logic        done, busy;

  d2cpu_top dut (
    .clk, .global_reset, .ena, .wea, .addra, .dia, .doa, .done, .busy
  );

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  longint cycles = 0;
  always @(posedge clk) cycles++;

  // ------------------------------------------------------------ program image
  logic [31:0] img [3*NBLK];
  logic [31:0] got [3*NBLK];
  logic [31:0] exp_w [3*NBLK];
  logic        chk [3*NBLK];

  function automatic logic [31:0] w0(logic [1:0] ore, logic [1:0] lp);
    return {28'd0, ore, lp};
  endfunction
  function automatic logic [31:0] w1(logic v, logic cr, logic can, logic [6:0] cad,
                                     logic [5:0] op, logic [1:0] opfl,
                                     logic [6:0] iid2, logic [6:0] iid1);
    return {v, cr, can, cad, op, opfl, iid2, iid1};
  endfunction

  task automatic clear_img();
    for (int i = 0; i < 3 * NBLK; i++) begin
      img[i] = '0; exp_w[i] = '0; chk[i] = 1'b0;
    end
  endtask

  task automatic put(int n, logic [31:0] a, logic [31:0] b, logic [31:0] c);
    img[3*(n-1)] = a; img[3*(n-1)+1] = b; img[3*(n-1)+2] = c;
  endtask

  task automatic expect_blk(int n, logic [31:0] a, logic [31:0] b, logic [31:0] c);
    exp_w[3*(n-1)] = a; exp_w[3*(n-1)+1] = b; exp_w[3*(n-1)+2] = c;
    chk[3*(n-1)] = 1'b1; chk[3*(n-1)+1] = 1'b1; chk[3*(n-1)+2] = 1'b1;
  endtask

  // Host: write the image, run, read everything back.
  task automatic run_program(string name, longint max_cycles, output longint run_cycles);
    longint t0;
    global_reset = 1'b1;
    @(negedge clk);
    for (int i = 0; i < 512; i++) begin
      ena = 1'b1; wea = 1'b1; addra = 9'(i);
      dia = (i < 3 * NBLK) ? img[i] : 32'd0;
      @(negedge clk);
    end
    ena = 1'b0; wea = 1'b0;
    @(negedge clk);
    global_reset = 1'b0;
    t0 = cycles;
    while (!done && cycles - t0 < max_cycles) @(negedge clk);
    run_cycles = cycles - t0;
    checks++;
    if (!done) begin
      failures++;
      $display("FAIL %s: no done after %0d cycles", name, max_cycles);
    end
    for (int i = 0; i < 3 * NBLK; i++) begin
      ena = 1'b1; wea = 1'b0; addra = 9'(i);
      @(negedge clk);
      got[i] = doa;
    end
    ena = 1'b0;
    for (int i = 0; i < 3 * NBLK; i++)
      if (chk[i]) begin
        checks++;
        if (got[i] !== exp_w[i]) begin
          failures++;
          $display("FAIL %s: block %0d word %0d got %08h expected %08h",
                   name, i / 3 + 1, i % 3, got[i], exp_w[i]);
        end
      end
  endtask


  // Token bus monitor: results of I (block 9) and L (block 11).
  int n_i = 0, n_l = 0;
  logic [15:0] last_i = '0, last_l = '0;
  always @(posedge clk) if (!global_reset && dut.run)
    for (int t = 0; t < 4; t++)
      if (dut.tok[t].v) begin
        if (dut.tok[t].iad == 7'd9)  begin n_i++; last_i = dut.tok[t].res; end
        if (dut.tok[t].iad == 7'd11) begin n_l++; last_l = dut.tok[t].res; end
      end

  task automatic check(string what, longint got_v, longint exp_v);
    checks++;
    if (got_v != exp_v) begin
      failures++;
      $display("FAIL %s: got %0d expected %0d", what, got_v, exp_v);
    end
  endtask

  task automatic sample(logic [15:0] x);
    longint rc;
    logic [15:0] y, e;
    clear_img();
    put(1,  w0(2'b00, 2'b00), w1(1, 0, 1, 7'd0, 6'b000010, 2'b00, 7'd0,  7'd0), {16'd2, x});
    put(2,  w0(2'b00, 2'b00), w1(1, 0, 1, 7'd0, 6'b000101, 2'b01, 7'd0,  7'd1), {16'd10, 16'd0});
    put(3,  w0(2'b00, 2'b00), w1(1, 0, 1, 7'd0, 6'b100011, 2'b01, 7'd0,  7'd2), {16'd0, 16'd0});
    put(4,  w0(2'b00, 2'b00), w1(1, 0, 1, 7'd0, 6'b101111, 2'b01, 7'd0,  7'd2), {16'd0, 16'd0});
    put(5,  w0(2'b00, 2'b00), w1(1, 1, 0, 7'd3, 6'b000001, 2'b01, 7'd0,  7'd3), {16'd0, 16'd0});
    put(6,  w0(2'b00, 2'b01), w1(1, 1, 1, 7'd7, 6'b000000, 2'b11, 7'd10, 7'd5), {16'd0, 16'd0});
    put(7,  w0(2'b10, 2'b10), w1(1, 1, 1, 7'd7, 6'b101111, 2'b01, 7'd0,  7'd6), {16'd10, 16'd0});
    put(8,  w0(2'b00, 2'b01), w1(1, 0, 1, 7'd0, 6'b000000, 2'b11, 7'd2,  7'd9), {16'd0, 16'd0});
    put(9,  w0(2'b10, 2'b00), w1(1, 1, 0, 7'd7, 6'b000010, 2'b01, 7'd0,  7'd8), {16'd7, 16'd0});
    put(10, w0(2'b10, 2'b00), w1(1, 1, 0, 7'd7, 6'b000001, 2'b01, 7'd0,  7'd6), {16'd1, 16'd0});
    put(11, w0(2'b00, 2'b00), w1(1, 1, 0, 7'd4, 6'b000010, 2'b00, 7'd0,  7'd0), {16'd7, 16'd7});
    n_i = 0; n_l = 0;
    run_program($sformatf("x=%0d", x), 20000, rc);
    y = 16'(2 * x - 10);
    if (!y[15] && y != 0) begin
      e = y;
      for (int k = 0; k < 10; k++) e = 16'(e[7:0]) * 16'd7;   // 8 x 8 multiplier
      check("I firings", n_i, 10);
      check("L firings", n_l, 0);
      check("final y", last_i, e);
      check("G counter", got[3*6+2][15:0], 11);
      check("K counter", got[3*9+2][15:0], 11);
      check("L not run (V)", got[3*10+1][31], 1);
    end else begin
      check("I firings", n_i, 0);
      check("L firings", n_l, 1);
      check("else y", last_l, 49);
      check("M not run (V)", got[3*4+1][31], 1);
    end
    $display("x=%0d: %0d cycles, I fired %0d times, L %0d times", x, rc, n_i, n_l);
  endtask

  initial begin
    sample(16'd6);
    sample(16'd3);
    sample(16'd7);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
