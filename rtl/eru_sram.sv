// eru_sram: ERU-SRAM, the store of ready-to-execute instructions in front of
// one functional unit.
//
// Holds DEPTH instructions whose operands are all present but whose unit is
// busy. It is a first-in first-out queue: the oldest instruction is offered on
// out_instr (ERUOUT) and leaves when out_ready is high; a new one from the
// SRAM* is written when in_instr.v and in_ready are high. Both may happen in
// the same clock. Each entry has the document's format: valid bit, OPCODE,
// OPD1, OPD2 and the 6-bit virtual IAD.
// The document gives the size (two blocks) and the format; it leaves the
// selection order open, and first-in first-out is this design's choice (the
// recipient count that would rank entries is not part of this version).
module eru_sram
  import d2_pkg::*;
#(
  parameter int unsigned DEPTH = 2
) (
  input  logic      clk,
  input  logic      rst,
  input  fu_instr_t in_instr,
  output logic      in_ready,
  output fu_instr_t out_instr,
  input  logic      out_ready,
  output logic      busy
);
  localparam int unsigned PW = (DEPTH > 1) ? $clog2(DEPTH) : 1;

  fu_instr_t           mem [DEPTH];
  logic [PW-1:0]       rd_ptr, wr_ptr;
  logic [$clog2(DEPTH+1)-1:0] count;
  logic                push, pop;

  assign in_ready  = (32'(count) < DEPTH) || out_ready;
  assign push      = in_instr.v && in_ready;
  assign pop       = (count != 0) && out_ready;
  assign busy      = (count != 0);

  always_comb begin
    out_instr   = mem[rd_ptr];
    out_instr.v = (count != 0);
  end

  function automatic logic [PW-1:0] inc(logic [PW-1:0] p);
    return (p == PW'(DEPTH - 1)) ? '0 : p + 1'b1;
  endfunction

  always_ff @(posedge clk) begin
    if (rst) begin
      rd_ptr <= '0;
      wr_ptr <= '0;
      count  <= '0;
      for (int i = 0; i < DEPTH; i++) mem[i] <= '0;
    end else begin
      if (push) begin
        mem[wr_ptr] <= in_instr;
        wr_ptr      <= inc(wr_ptr);
      end
      if (pop) rd_ptr <= inc(rd_ptr);
      count <= count + $bits(count)'(push) - $bits(count)'(pop);
    end
  end
endmodule
