// tb_block_ram: self-checking test of the dual-port 512 x 36 block RAM.
//
// Both ports issue random reads and writes (never writing the same address
// from both ports in one clock). A plain array in the testbench models the
// memory. Checked: read data one clock after the address (write-first: a
// write returns the data written), the four even-parity bits, one per byte,
// and that an idle port (enable low) holds its output.
module tb_block_ram;
  localparam int unsigned DEPTH = 512;

  logic        clk = 1'b0;
  logic        ena, wea, enb, web;
  logic [8:0]  addra, addrb;
  logic [31:0] dia, dib, doa, dob;
  logic [3:0]  dopa, dopb;

  block_ram dut (.clk, .ena, .wea, .addra, .dia, .doa, .dopa,
                 .enb, .web, .addrb, .dib, .dob, .dopb);

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  logic [31:0] model [DEPTH];
  logic [31:0] exp_a, exp_b;
  logic        known_a, known_b;

  function automatic logic [3:0] par(logic [31:0] d);
    return {^d[31:24], ^d[23:16], ^d[15:8], ^d[7:0]};
  endfunction

  task automatic check(logic c, string what);
    checks++;
    if (!c) begin
      failures++;
      if (failures < 10) $display("FAIL %s", what);
    end
  endtask

  initial begin
    ena = 1'b1; wea = 1'b1; enb = 1'b0; web = 1'b0; addrb = '0; dib = '0;
    // initialise every word through port A
    for (int i = 0; i < DEPTH; i++) begin
      addra = 9'(i); dia = $urandom; model[i] = dia;
      @(negedge clk);
    end
    known_a = 1'b0; known_b = 1'b0;
    for (int c = 0; c < 5000; c++) begin
      ena = ($urandom % 4) != 0; wea = ($urandom % 3) == 0; addra = 9'($urandom % 64); dia = $urandom;
      enb = ($urandom % 4) != 0; web = ($urandom % 3) == 0; addrb = 9'($urandom % 64); dib = $urandom;
      if (ena && wea && enb && web && addra == addrb) web = 1'b0;
      // expected outputs after this clock
      if (ena) begin exp_a = wea ? dia : ((enb && web && addrb == addra) ? model[addra] : model[addra]); known_a = 1'b1; end
      if (enb) begin exp_b = web ? dib : model[addrb]; known_b = 1'b1; end
      // a read on one port of an address the other port writes in the same
      // clock is not checked (the old/new choice is not defined)
      if (ena && !wea && enb && web && addra == addrb) known_a = 1'b0;
      if (enb && !web && ena && wea && addra == addrb) known_b = 1'b0;
      @(posedge clk);
      if (ena && wea) model[addra] = dia;
      if (enb && web) model[addrb] = dib;
      @(negedge clk);
      if (known_a) begin
        check(doa == exp_a, "port A data");
        check(dopa == par(doa), "port A parity");
      end
      if (known_b) begin
        check(dob == exp_b, "port B data");
        check(dopb == par(dob), "port B parity");
      end
    end
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
