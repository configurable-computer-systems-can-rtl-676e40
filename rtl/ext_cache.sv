// ext_cache: one EXT-CACHE module DSRAM_i with its cache controller.
//
// DEPTH blocks, one instruction each: V, OPCODE, physical IAD, OPFL (bit 0:
// OPD1 missing, bit 1: OPD2 missing), IID2, IID1, OPD2, OPD1. All blocks work
// in parallel:
//   Fill:  one instruction per clock from DRAM_i (wr_instr, WRITE) into the
//          lowest free block, taken when wr_ready is high. ovf (OVF) says all
//          blocks are occupied. Nothing is taken in a clock with a token on
//          the token bus. An instruction still missing operands is only taken
//          while more than RESERVE blocks are free, so that complete
//          instructions always find room and the hierarchy cannot clog with
//          waiting ones (this reserve is this design's addition).
//   Snoop: every block compares each token on the token bus with its IIDs and
//          fills the operands named by OPFL.
//   Drain: a block missing at most one operand is ready; the controller
//          offers the lowest-numbered complete block, or failing that the
//          lowest-numbered one-missing block, to the out-buffer on out
//          (already in the out-buffer format), which takes it with
//          out_accept (DSRAMSEL / BUFFERSEL handshake).
// The block count, format, token compare and drain-when-ready behaviour follow
// the document. It serves ready blocks first-come-first-served; this design
// approximates that by block number and lets complete blocks pass first.
module ext_cache
  import d2_pkg::*;
#(
  parameter int unsigned DEPTH = 16,
  parameter int unsigned NTOK  = 4,
  parameter int unsigned RESERVE = 2
) (
  input  logic       clk,
  input  logic       rst,
  input  mem_instr_t wr_instr,
  output logic       wr_ready,
  output logic       ovf,
  input  token_t     tok [NTOK],
  output ob_instr_t  out,
  input  logic       out_accept,
  output logic       busy
);
  localparam int unsigned IW = $clog2(DEPTH);

  mem_instr_t blk [DEPTH];
  mem_instr_t nxt [DEPTH];
  logic [DEPTH-1:0] occ;
  logic          rf, ff, tok_any;
  logic [IW-1:0] ri, fi;
  int unsigned   nfree;

  always_comb begin
    tok_any = 1'b0;
    for (int t = 0; t < NTOK; t++) tok_any |= tok[t].v;
  end

  always_comb begin
    rf = 1'b0; ri = '0; ff = 1'b0; fi = '0; nfree = 0;
    for (int i = DEPTH - 1; i >= 0; i--) begin
      occ[i] = blk[i].v;
      if (!blk[i].v) nfree++;
      if (blk[i].v && blk[i].opfl != 2'b11) begin rf = 1'b1; ri = IW'(i); end
      if (!blk[i].v) begin ff = 1'b1; fi = IW'(i); end
    end
    // Complete blocks go first.
    for (int i = DEPTH - 1; i >= 0; i--)
      if (blk[i].v && blk[i].opfl == 2'b00) ri = IW'(i);
    ovf      = !ff;
    busy     = |occ;

    out   = mem_to_ob(blk[ri]);
    out.v = rf;
  end

  // A block that still misses operands may not take the last RESERVE free
  // blocks: they are kept for complete instructions, which always progress.
  assign wr_ready = ff && !tok_any && (wr_instr.opfl == 2'b00 || nfree > RESERVE);

  always_comb begin
    for (int i = 0; i < DEPTH; i++) begin
      nxt[i] = blk[i];
      for (int t = 0; t < NTOK; t++) nxt[i] = mem_snoop(nxt[i], tok[t]);
    end
    if (rf && out_accept) nxt[ri].v = 1'b0;
    if (wr_instr.v && wr_ready) nxt[fi] = wr_instr;
  end

  always_ff @(posedge clk) begin
    if (rst) for (int i = 0; i < DEPTH; i++) blk[i] <= '0;
    else     for (int i = 0; i < DEPTH; i++) blk[i] <= nxt[i];
  end

  // The out-buffer never takes a block in a clock in which tokens arrive.
  a_no_take_on_token: assert property (@(posedge clk) disable iff (rst)
    !(out_accept && rf && tok_any));
endmodule
