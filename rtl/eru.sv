// eru: the Execution Ready Unit, the processor core.
//
// Three pipelines, one per functional-unit class (adder, multiplier,
// shift/logic/compare), each built as SRAM* -> ERU-SRAM -> unit, and one
// token FIFO they all write into. There is no central controller: each stage
// moves an instruction on as soon as the next stage has room.
//   in_instr: up to two instructions per clock from the hardware manager,
//             needing different units; each SRAM* takes the one of its class.
//             The sender must keep an instruction off the bus while ovf of its
//             class is set.
//   read / out_tok: the memory side reads two tokens per clock (DATAOUT).
//   resultout: the FIFO holds a token. bufferhalf: it is half full.
// Internally BUFFERFULL from the FIFO stalls the units, the ERU-SRAMs and the
// SRAM* outputs; the SRAM*s keep accepting instructions and keep scanning the
// FIFO for their missing operands.
// Latency of an independent instruction: one clock in the SRAM*, one in the
// ERU-SRAM, one in the unit's result register, then it is in the FIFO; its
// token can leave the ERU in the fourth clock after it entered.
// The structure, sizes and signals follow the document; the FIFO depth is
// this design's choice.
module eru
  import d2_pkg::*;
#(
  parameter int unsigned SRAMS_DEPTH   = 12,
  parameter int unsigned ERUSRAM_DEPTH = 2,
  parameter int unsigned FIFO_DEPTH    = 16
) (
  input  logic       clk,
  input  logic       rst,
  input  eru_instr_t in_instr [2],
  output logic [2:0] ovf,         // [0] adder, [1] multiplier, [2] S/L/C
  input  logic       read,
  output vtoken_t    out_tok [2],
  output logic       resultout,
  output logic       bufferhalf,
  output logic       busy
);
  localparam fu_class_e CLS [3] = '{FU_ADD, FU_MUL, FU_SLC};

  vtoken_t   scan [FIFO_DEPTH];
  vtoken_t   fu_tok [3];
  fu_instr_t s2e [3];
  fu_instr_t e2f [3];
  logic      e_in_ready [3];
  logic [2:0] s_busy, e_busy;
  logic      bufferfull;

  for (genvar u = 0; u < 3; u++) begin : g_pipe
    sram_star #(.DEPTH(SRAMS_DEPTH), .FU(CLS[u]), .SCAN(FIFO_DEPTH)) u_srams (
      .clk, .rst,
      .in_instr  (in_instr),
      .scan_tok  (scan),
      .ovf       (ovf[u]),
      .out_instr (s2e[u]),
      .out_ready (e_in_ready[u] && !bufferfull),
      .busy      (s_busy[u])
    );

    fu_instr_t e_in;
    always_comb begin
      e_in   = s2e[u];
      e_in.v = s2e[u].v && !bufferfull;
    end

    eru_sram #(.DEPTH(ERUSRAM_DEPTH)) u_erusram (
      .clk, .rst,
      .in_instr  (e_in),
      .in_ready  (e_in_ready[u]),
      .out_instr (e2f[u]),
      .out_ready (!bufferfull),
      .busy      (e_busy[u])
    );
  end

  fu_add u_add (.clk, .rst, .in_instr(e2f[0]), .stall(bufferfull), .tok(fu_tok[0]));
  fu_mul u_mul (.clk, .rst, .in_instr(e2f[1]), .stall(bufferfull), .tok(fu_tok[1]));
  fu_slc u_slc (.clk, .rst, .in_instr(e2f[2]), .stall(bufferfull), .tok(fu_tok[2]));

  token_fifo #(.DEPTH(FIFO_DEPTH)) u_fifo (
    .clk, .rst,
    .in_tok     (fu_tok),
    .read       (read),
    .out_tok    (out_tok),
    .bufferhalf (bufferhalf),
    .bufferfull (bufferfull),
    .not_empty  (resultout),
    .scan       (scan)
  );

  assign busy = (|s_busy) || (|e_busy) || fu_tok[0].v || fu_tok[1].v || fu_tok[2].v || resultout;

  // Two instructions on the bus never need the same unit.
  a_distinct_units: assert property (@(posedge clk) disable iff (rst)
    !(in_instr[0].v && in_instr[1].v && in_instr[0].opcode[1:0] == in_instr[1].opcode[1:0]));
endmodule
