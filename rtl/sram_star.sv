// sram_star: SRAM*, the reservation store of one ERU pipeline.
//
// DEPTH blocks, each holding one instruction in the SRAM* format: valid bit V,
// dependency bit D, virtual IAD, virtual IID, one-bit OPFL (0: OPD1 missing,
// 1: OPD2 missing), OPD2, OPD1, OPCODE. A block with D = 0 is independent
// and ready; a block with D = 1 waits for the token of instruction IID.
//   Input:  the ERU input bus carries up to two instructions per clock; this
//           unit takes the one whose opcode class (bits [1:0]) equals FU and
//           writes it into the lowest free block. The sender guarantees that
//           the two never need the same unit and that ovf is low.
//   Scan:   every clock each waiting block compares its IID with every token
//           held in the token FIFO (scan_tok); on a match the operand named by
//           OPFL is written and D cleared.
//   Output: the lowest-numbered ready block is offered on out_instr
//           (OUTSRAM) and is freed when out_ready is high.
//   ovf:    all blocks occupied (the document's OVF bit for this unit).
// An instruction written in one clock is scanned from the next; it can be
// offered the clock after it becomes ready. The size, format, class steering
// and FIFO scan follow the document; the lowest-index choices are this
// design's own.
module sram_star
  import d2_pkg::*;
#(
  parameter int unsigned DEPTH = 12,
  parameter fu_class_e   FU    = FU_ADD,
  parameter int unsigned SCAN  = 16
) (
  input  logic       clk,
  input  logic       rst,
  input  eru_instr_t in_instr [2],
  input  vtoken_t    scan_tok [SCAN],
  output logic       ovf,
  output fu_instr_t  out_instr,
  input  logic       out_ready,
  output logic       busy
);
  eru_instr_t blk [DEPTH];
  eru_instr_t nxt [DEPTH];

  logic                     have_in, sel_found, free_found;
  eru_instr_t               in_sel;
  logic [$clog2(DEPTH)-1:0] sel_idx, free_idx;
  logic [DEPTH-1:0]         occ;

  always_comb begin
    have_in = 1'b0;
    in_sel  = '0;
    for (int k = 1; k >= 0; k--)
      if (in_instr[k].v && fu_class(in_instr[k].opcode) == FU) begin
        have_in = 1'b1;
        in_sel  = in_instr[k];
      end

    sel_found = 1'b0;
    sel_idx   = '0;
    free_found = 1'b0;
    free_idx   = '0;
    for (int i = DEPTH - 1; i >= 0; i--) begin
      occ[i] = blk[i].v;
      if (blk[i].v && !blk[i].d) begin
        sel_found = 1'b1;
        sel_idx   = i[$clog2(DEPTH)-1:0];
      end
      if (!blk[i].v) begin
        free_found = 1'b1;
        free_idx   = i[$clog2(DEPTH)-1:0];
      end
    end
    ovf  = &occ;
    busy = |occ;

    out_instr.v      = sel_found;
    out_instr.opcode = blk[sel_idx].opcode;
    out_instr.opd1   = blk[sel_idx].opd1;
    out_instr.opd2   = blk[sel_idx].opd2;
    out_instr.iad    = blk[sel_idx].iad;

    for (int i = 0; i < DEPTH; i++) begin
      nxt[i] = blk[i];
      if (blk[i].v && blk[i].d)
        for (int t = 0; t < SCAN; t++)
          if (scan_tok[t].v && scan_tok[t].iad == blk[i].iid) begin
            if (blk[i].opfl) nxt[i].opd2 = scan_tok[t].res;
            else             nxt[i].opd1 = scan_tok[t].res;
            nxt[i].d = 1'b0;
          end
    end
    if (sel_found && out_ready) nxt[sel_idx].v = 1'b0;
    if (have_in && free_found) begin
      nxt[free_idx]   = in_sel;
      nxt[free_idx].v = 1'b1;
    end
  end

  always_ff @(posedge clk) begin
    if (rst) for (int i = 0; i < DEPTH; i++) blk[i] <= '0;
    else     for (int i = 0; i < DEPTH; i++) blk[i] <= nxt[i];
  end

  // The sender must not write into a full SRAM*.
  a_no_overflow: assert property (@(posedge clk) disable iff (rst) !(have_in && !free_found));
endmodule
