// tb_d2cpu_full: the whole processor system at its real sizes.
//
// The top is built with every parameter at its default: two DRAM/EXT-CACHE
// pairs of 64 and 16 blocks, a 12-block out-buffer, 12-block SRAM*s, a
// 16-token FIFO and 64 virtual IDs. The testbench plays the host as in
// tb_d2cpu_top: it writes a program into the block RAM while global_reset
// is high, waits for done, reads all 127 blocks back and compares them with
// values it works out itself. Programs:
//   P1  the five-block example with two LOCK nodes (expected words by hand);
//   P2  127 random instructions filling both DRAMs completely: all ALU
//       opcodes, random dependencies, LOCK nodes and clause-gated
//       instructions, checked against a model in this file;
//   P3  a counting loop (MERGE, SWITCH, ADD reused through ORE);
//   P4  a STOP node;
//   P5  two interleaved chains of dependent MUL and ADD instructions.
// The mechanism counts are printed; those that must happen at this size
// (two instructions per bus cycle, dependent instructions entering the ERU,
// token reads, local LOCK/MERGE tokens, virtual-ID reuse, a skipped clause,
// STOP) are checked. FIFO and SRAM* stalls need the smaller sizes used in
// tb_d2cpu_top.
module tb_d2cpu_full;
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

  // ---------------------------------------------------------------- counters
  int n_pair = 0, n_dep = 0, n_read = 0, n_half = 0, n_full = 0, n_ovf = 0,
      n_local = 0, n_alloc = 0, n_stop = 0, n_clause_off = 0;
  always @(posedge clk) if (!global_reset && dut.run) begin
    if (dut.h2e[0].v && dut.h2e[1].v) n_pair++;
    for (int k = 0; k < 2; k++) begin
      if (dut.h2e[k].v && dut.h2e[k].d) n_dep++;
      if (dut.h2e[k].v) n_alloc++;
    end
    if (dut.read && dut.resultout) n_read++;
    if (dut.bufferhalf) n_half++;
    if (dut.u_eru.bufferfull) n_full++;
    if (|dut.ovf) n_ovf++;
    if (dut.local_tok) n_local++;
    if (|dut.stop) n_stop++;
  end

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

  // ------------------------------------------------------- reference ALU model
  function automatic logic [15:0] ref_alu(logic [5:0] op, logic [15:0] a, logic [15:0] b);
    case (op)
      6'b000001: return a + b;                                     // ADD
      6'b000101: return a - b;                                     // SUB
      6'b000010: return {8'd0, a[7:0]} * {8'd0, b[7:0]};           // MUL 8x8
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

  localparam logic [5:0] OPS [19] = '{6'b000001, 6'b000101, 6'b000010, 6'b000011, 6'b000111,
    6'b001011, 6'b001111, 6'b010011, 6'b010111, 6'b011011, 6'b011111, 6'b100011, 6'b100111,
    6'b101011, 6'b101111, 6'b110011, 6'b110111, 6'b111011, 6'b111111};

  // ----------------------------------------------------------------- programs
  task automatic prog_table();
    longint rc;
    clear_img();
    put(1, 32'h00000000, 32'hA0010000, 32'h00010001);   // ADD 1,1
    put(2, 32'h00000000, 32'hA0020000, 32'h00020002);   // MUL 2,2
    put(3, 32'h00000000, 32'hA0330000, 32'h00000002);   // SHL 2
    put(4, 32'h00000003, 32'hA000C101, 32'h00000000);   // LOCK *1,*2
    put(5, 32'h00000003, 32'hA000C203, 32'h00000000);   // LOCK *3,*4
    expect_blk(1, 32'h00000000, 32'h00010000, 32'h00010001);
    expect_blk(2, 32'h00000000, 32'h00020000, 32'h00020002);
    expect_blk(3, 32'h00000000, 32'h00330000, 32'h00000002);
    expect_blk(4, 32'h00000003, 32'h00000101, 32'h00040002);
    expect_blk(5, 32'h00000003, 32'h00000203, 32'h00040004);
    run_program("P1", 5000, rc);
    $display("P1 (five-block LOCK example): %0d cycles from reset release to done", rc);
  endtask

  task automatic prog_random(int n);
    logic [15:0] res [NBLK+1];
    logic        live [NBLK+1];     // executes and gives a result
    logic        is_cmp [NBLK+1];
    longint rc;
    clear_img();
    for (int k = 0; k <= NBLK; k++) begin live[k] = 1'b0; is_cmp[k] = 1'b0; res[k] = '0; end
    for (int k = 1; k <= n; k++) begin
      logic [5:0]  op;
      logic [15:0] a, b, fa, fb;
      logic [6:0]  i1, i2, cad;
      logic [1:0]  opfl, lp;
      logic        cr, can, runs;
      int          p;
      a = 16'($urandom); b = 16'($urandom);
      i1 = '0; i2 = '0; cad = '0; cr = 1'b0; can = 1'b1; lp = 2'b00;
      if (k % 11 == 0 && k > 2) begin
        // LOCK of two earlier live results
        op = 6'b000000; lp = 2'b11;
        do p = 1 + int'($urandom % (k - 1)); while (!live[p]);
        i1 = 7'(p);
        do p = 1 + int'($urandom % (k - 1)); while (!live[p]);
        i2 = 7'(p);
        a = '0; b = '0;
      end else begin
        op = OPS[$urandom % 19];
        if (k > 1 && ($urandom % 2) == 0) begin
          do p = 1 + int'($urandom % (k - 1)); while (!live[p]);
          i1 = 7'(p); a = '0;
        end
        if (k > 1 && ($urandom % 3) == 0) begin
          do p = 1 + int'($urandom % (k - 1)); while (!live[p]);
          i2 = 7'(p); b = '0;
        end
        if (k % 7 == 0) begin
          // clause: gated by the newest earlier compare
          for (int q = k - 1; q >= 1; q--) if (is_cmp[q] && cad == '0) cad = 7'(q);
          if (cad != '0) begin cr = 1'b1; can = 1'b0; end
        end
      end
      opfl = {i2 != '0, i1 != '0};
      fa = (i1 != '0) ? res[i1] : a;
      fb = (i2 != '0) ? res[i2] : b;
      runs = !cr || res[cad][0];
      if (cr && !runs) n_clause_off++;
      live[k]   = runs;
      is_cmp[k] = runs && op[1:0] == 2'b11 && op[5:2] >= 4'b0110 && op[5:2] <= 4'b1011;
      res[k]    = (lp == 2'b11) ? fb : ref_alu(op, fa, fb);
      put(k, w0(2'b00, lp), w1(1'b1, cr, can, cad, op, opfl, i2, i1), {b, a});
      if (runs)
        expect_blk(k, w0(2'b00, lp), w1(1'b0, cr, 1'b0, cad, op, 2'b00, i2, i1), {fb, fa});
      else
        // skipped, but it still catches the operands that are produced
        expect_blk(k, w0(2'b00, lp),
                   w1(1'b1, cr, 1'b0, cad, op, {opfl[1] && !live[i2], opfl[0] && !live[i1]}, i2, i1),
                   {(i2 != '0 && live[i2]) ? fb : b, (i1 != '0 && live[i1]) ? fa : a});
    end
    run_program("P2", 50000, rc);
    $display("P2 (%0d random instructions): %0d cycles", n, rc);
  endtask

  task automatic prog_loop();
    longint rc;
    clear_img();
    // 1 MERGE: OPD1 = 1 initially, OPD2 from the ADD (3); clause from the SWITCH (2)
    put(1, w0(2'b00, 2'b01), w1(1, 1, 1, 7'd2, 6'b000000, 2'b10, 7'd3, 7'd0), {16'd0, 16'd1});
    // 2 SWITCH: LET i, 3; clause from itself; keeps OPD2
    put(2, w0(2'b10, 2'b10), w1(1, 1, 1, 7'd2, 6'b101111, 2'b01, 7'd0, 7'd1), {16'd3, 16'd0});
    // 3 ADD i, 1; clause from the SWITCH; keeps OPD2
    put(3, w0(2'b10, 2'b00), w1(1, 1, 0, 7'd2, 6'b000001, 2'b01, 7'd0, 7'd1), {16'd1, 16'd0});
    expect_blk(1, w0(2'b00, 2'b01), w1(1, 1, 0, 7'd2, 6'b000000, 2'b11, 7'd3, 7'd0), {16'd4, 16'd1});
    expect_blk(2, w0(2'b10, 2'b10), w1(1, 1, 0, 7'd2, 6'b101111, 2'b01, 7'd0, 7'd1), {16'd3, 16'd4});
    expect_blk(3, w0(2'b10, 2'b00), w1(1, 1, 0, 7'd2, 6'b000001, 2'b00, 7'd0, 7'd1), {16'd1, 16'd4});
    run_program("P3", 5000, rc);
    $display("P3 (counting loop): %0d cycles", rc);
  endtask

  // Two interleaved chains, each instruction using the previous result of
  // its own chain: the dependents pile up in the SRAM*s waiting for tokens.
  task automatic prog_chain(int n);
    logic [15:0] res [NBLK+1];
    longint rc;
    clear_img();
    for (int k = 1; k <= n; k++) begin
      logic [5:0]  op;
      logic [15:0] a, b, fa;
      logic [6:0]  i1;
      op = (k % 2) ? OP_MUL : OP_ADD;
      a  = 16'($urandom); b = 16'($urandom % 8);
      i1 = (k > 2) ? 7'(k - 2) : 7'd0;
      if (i1 != '0) a = '0;
      fa = (i1 != '0) ? res[i1] : a;
      res[k] = ref_alu(op, fa, b);
      put(k, w0(2'b00, 2'b00), w1(1'b1, 1'b0, 1'b1, 7'd0, op, {1'b0, i1 != '0}, 7'd0, i1), {b, a});
      expect_blk(k, w0(2'b00, 2'b00), w1(1'b0, 1'b0, 1'b0, 7'd0, op, 2'b00, 7'd0, i1), {b, fa});
    end
    run_program("P5", 20000, rc);
    $display("P5 (two dependent chains of %0d): %0d cycles", n, rc);
  endtask

  int stops_before;
  task automatic prog_stop();
    longint rc;
    clear_img();
    put(1, w0(0, 0), w1(1, 0, 1, 7'd0, 6'b000001, 2'b00, 7'd0, 7'd0), {16'd6, 16'd5});
    put(2, w0(0, 2'b11), w1(1, 0, 1, 7'd0, 6'b100000, 2'b01, 7'd0, 7'd1), {16'd0, 16'd0});
    put(70, w0(0, 0), w1(1, 0, 1, 7'd0, 6'b000010, 2'b01, 7'd0, 7'd1), {16'd3, 16'd0});
    expect_blk(1, w0(0, 0), w1(0, 0, 0, 7'd0, 6'b000001, 2'b00, 7'd0, 7'd0), {16'd6, 16'd5});
    expect_blk(2, w0(0, 2'b11), w1(0, 0, 0, 7'd0, 6'b100000, 2'b00, 7'd0, 7'd1), {16'd0, 16'd11});
    stops_before = n_stop;
    run_program("P4", 5000, rc);
    checks++;
    if (n_stop == stops_before) begin
      failures++;
      $display("FAIL P4: STOP never reported");
    end
    $display("P4 (STOP): %0d cycles", rc);
  endtask

  task automatic report(string what, int n);
    $display("  %-40s %0d", what, n);
  endtask

  task automatic need(string what, int n);
    checks++;
    if (n == 0) begin
      failures++;
      $display("FAIL mechanism never seen: %s", what);
    end else $display("  %-40s %0d", what, n);
  endtask

  initial begin
    prog_table();
    prog_random(127);
    prog_loop();
    prog_stop();
    prog_chain(60);
    $display("Mechanisms:");
    need("two instructions in one bus cycle", n_pair);
    need("dependent instruction into SRAM*", n_dep);
    need("token read cycles", n_read);
    report("BUFFERHALF cycles", n_half);
    report("BUFFERFULL stall cycles", n_full);
    report("SRAM* full (OVF) cycles", n_ovf);
    need("LOCK/MERGE tokens from main memory", n_local);
    need("virtual IDs reused (allocations > 64)", n_alloc > 64 ? n_alloc : 0);
    need("clause answered 0 (instruction skipped)", n_clause_off);
    need("STOP", n_stop);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
