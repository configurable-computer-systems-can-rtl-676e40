// tb_main_controller: self-checking test of the main-controller's load, run
// and unload sequence.
//
// The testbench models the block RAM (port B: synchronous read, one clock)
// and the two DRAM host ports as plain arrays. With DEPTH = 4 there are
// 2 * 4 - 1 = 7 program blocks of three words each. Checked:
//   - after global reset the controller holds the processor in reset and
//     copies block n (words 3(n-1) .. 3(n-1)+2) into DRAM1 block n for
//     n < DEPTH and DRAM2 block n - DEPTH otherwise, unpacking the fields
//     at the right bit positions, in 4 clocks per block;
//   - it then runs until the processor has been idle for QUIET clocks, or
//     until a STOP is reported, whichever comes first;
//   - it then packs every DRAM block back into its three words, in 3 clocks
//     per block, and raises done.
module tb_main_controller;
  import d2_pkg::*;

  localparam int unsigned DEPTH = 4;
  localparam int unsigned QUIET = 3;
  localparam int unsigned NBLK  = 2 * DEPTH - 1;

  logic        clk = 1'b0, global_reset = 1'b1;
  logic        enb, web;
  logic [8:0]  addrb;
  logic [31:0] dib, dob;
  logic [1:0]  dram_we;
  logic [1:0]  dram_addr;
  dram_block_t dram_wdata;
  dram_block_t dram_rdata [2];
  logic        cpu_rst, run, done, busy, idle;
  logic [1:0]  stop;

  main_controller #(.DEPTH(DEPTH), .QUIET(QUIET)) dut (
    .clk, .global_reset, .enb, .web, .addrb, .dib, .dob, .dram_we, .dram_addr,
    .dram_wdata, .dram_rdata, .cpu_rst, .run, .stop, .idle, .done, .busy
  );

  always #5 clk = ~clk;

  logic [31:0] ram [512];
  dram_block_t dram [2][DEPTH];

  always_ff @(posedge clk) begin
    if (enb) begin
      if (web) ram[addrb] <= dib;
      dob <= web ? dib : ram[addrb];
    end
    for (int m = 0; m < 2; m++) if (dram_we[m]) dram[m][dram_addr] <= dram_wdata;
  end
  always_comb for (int m = 0; m < 2; m++) dram_rdata[m] = dram[m][dram_addr];

  int checks = 0, failures = 0;
  logic [31:0] img [3 * NBLK];

  task automatic check(logic c, string what);
    checks++;
    if (!c) begin
      failures++;
      $display("FAIL %s", what);
    end
  endtask

  function automatic dram_block_t where(int n);
    return (n < DEPTH) ? dram[0][n] : dram[1][n - DEPTH];
  endfunction

  task automatic run_case(logic use_stop, int idle_after);
    int t, t_load, t_run, t_unload;
    for (int i = 0; i < 3 * NBLK; i++) begin
      img[i] = $urandom;
      if (i % 3 == 0) img[i] = {28'd0, 4'($urandom)};
      ram[i] = img[i];
    end
    for (int m = 0; m < 2; m++) for (int i = 0; i < DEPTH; i++) dram[m][i] = '0;
    idle = 1'b0; stop = 2'b00;
    global_reset = 1'b1;
    @(negedge clk);
    global_reset = 1'b0;
    t = 0;
    while (!run && t < 1000) begin
      check(cpu_rst && busy && !done, "processor held in reset while loading");
      @(negedge clk); t++;
    end
    t_load = t;
    check(t_load == 4 * NBLK, $sformatf("load takes 4 clocks per block (%0d)", t_load));
    for (int n = 1; n <= NBLK; n++) begin
      dram_block_t b;
      logic [31:0] a0, a1, a2;
      b = where(n);
      a0 = img[3*(n-1)]; a1 = img[3*(n-1)+1]; a2 = img[3*(n-1)+2];
      check(b.ore == a0[3:2] && b.lp == a0[1:0], "word 0: ORE, LP");
      check(b.v == a1[31] && b.cr == a1[30] && b.can == a1[29] && b.cad == a1[28:22] &&
            b.opcode == a1[21:16] && b.opfl == a1[15:14] && b.iid2 == a1[13:7] && b.iid1 == a1[6:0],
            "word 1: V, CR, CAN, CAD, OPCODE, OPFL, IID2, IID1");
      check(b.opd2 == a2[31:16] && b.opd1 == a2[15:0], "word 2: OPD2, OPD1");
    end
    // the processor works: change every block
    for (int m = 0; m < 2; m++) for (int i = 0; i < DEPTH; i++)
      dram[m][i] = dram_block_t'({$urandom, $urandom, $urandom, $urandom});
    t = 0;
    while (run && t < 1000) begin
      check(!cpu_rst && busy, "running");
      if (use_stop) begin
        idle = 1'b0;
        stop = (t == idle_after) ? 2'b10 : 2'b00;
      end else idle = (t >= idle_after);
      @(negedge clk); t++;
    end
    stop = 2'b00;
    t_run = t;
    if (use_stop) check(t_run == idle_after + 1, $sformatf("STOP ends the run (%0d)", t_run));
    else          check(t_run == idle_after + QUIET + 1, $sformatf("run ends after QUIET idle clocks (%0d)", t_run));
    t = 0;
    while (!done && t < 1000) begin @(negedge clk); t++; end
    t_unload = t;
    check(t_unload == 3 * NBLK, $sformatf("unload takes 3 clocks per block (%0d)", t_unload));
    check(done && !busy && !run, "done");
    for (int n = 1; n <= NBLK; n++) begin
      dram_block_t b;
      b = where(n);
      check(ram[3*(n-1)] == {28'd0, b.ore, b.lp}, "unloaded word 0");
      check(ram[3*(n-1)+1] == {b.v, b.cr, b.can, b.cad, b.opcode, b.opfl, b.iid2, b.iid1}, "unloaded word 1");
      check(ram[3*(n-1)+2] == {b.opd2, b.opd1}, "unloaded word 2");
    end
    repeat (3) @(negedge clk);
    check(done, "done holds until the next reset");
  endtask

  initial begin
    idle = 1'b0; stop = 2'b00;
    for (int i = 0; i < 512; i++) ram[i] = '0;
    repeat (2) @(negedge clk);
    run_case(1'b0, 5);
    run_case(1'b1, 9);
    run_case(1'b0, 0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
