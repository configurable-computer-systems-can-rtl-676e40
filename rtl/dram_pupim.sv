// dram_pupim: one main-memory module DRAM_i with its controller PU-PIM_i.
//
// DEPTH program blocks. A block's physical address is BASE + its index; the
// block itself has no IAD field. Block format (also the host's view):
//   V, CR (clause required), CAN (clause answer), CAD (7-bit clause address),
//   OPCODE, ORE (operand reuse), LP (loop node type), OPFL, IID2, IID1,
//   OPD2, OPD1.
// A block may act when V = 1 and CAN = 1 (CR = 0 with CAN = 1 means "no
// clause"; CR = 1 waits for CAN to be set).
//   Snoop:  every clock every block compares each token on the token bus with
//           IID1 / IID2 (operands named by OPFL) and with CAD (when CR = 1);
//           a CAD match copies result bit 0 into CAN.
//   Send:   one ready block per clock that needs a functional unit (opcode
//           class not 00) goes to the EXT-CACHE on out, complete blocks
//           first, then those missing one operand, then those missing two;
//           lowest index within a group. Not in a clock with a token on the bus.
//           A loop block (one that stays, see below) is sent only when
//           complete, so that the copy left behind cannot fire a second time.
//   Local:  MERGE (class 00, LP 01), LOCK (opcode 000000, LP 11) and STOP
//           (opcode 100000, LP 11) run here. MERGE fires with at least one
//           operand present and passes on the operand delivered by a token
//           (OPD2 if IID2 named a producer and it has arrived, else OPD1).
//           LOCK fires with both operands present and passes on OPD2. STOP
//           fires with its operands present and raises stop. A LOCK or MERGE
//           result leaves on ltok, the token slot of this module, in a clock
//           in which the ERU sends no tokens (eru_tokenout low).
//   After a block is sent or fires, CAN is cleared (a loop block with CR = 0
//   keeps CAN = 1, having no clause to wait for). A block with ORE = 00
//   that is not a MERGE or SWITCH node also has V cleared: it is dissolved,
//   its fields remain readable, and an operand it left without is still
//   recorded when its token passes (OPFL names it), so that after the run
//   the memory holds every operand each instruction used. Other blocks stay for the next loop
//   iteration: a MERGE sets OPFL to 11 and so waits for a new token on either
//   input; any other block sets OPFL bit k again when IIDk names a producer
//   and ORE bit k is 0 (ORE bit 0 keeps OPD1, bit 1 keeps OPD2).
//   quiet:  no block can be sent or fire now.
//   Host port: host_we writes a block, host_rdata reads one (combinational).
// Blocks are cleared only by rst (global reset); lrst (the local reset)
// clears the stop flag. Nothing moves while run is low.
// The formats, clause rule, local nodes, ORE rule and DEPTH follow the
// document; the send priority, the MERGE output choice and the local token
// slot are this design's own.
module dram_pupim
  import d2_pkg::*;
#(
  parameter int unsigned DEPTH = 64,
  parameter int unsigned BASE  = 0,
  parameter int unsigned NTOK  = 4
) (
  input  logic        clk,
  input  logic        rst,
  input  logic        lrst,
  input  logic        run,
  input  logic        host_we,
  input  logic [$clog2(DEPTH)-1:0] host_addr,
  input  dram_block_t host_wdata,
  output dram_block_t host_rdata,
  input  token_t      tok [NTOK],
  input  logic        eru_tokenout,
  output mem_instr_t  out,
  input  logic        out_accept,
  output token_t      ltok,
  output logic        stop,
  output logic        quiet
);
  localparam int unsigned IW = $clog2(DEPTH);

  dram_block_t blk [DEPTH];
  dram_block_t nxt [DEPTH];

  logic [DEPTH-1:0] rdy0, rdy1, rdy2, lrdy;
  logic          sf, lf, tok_any;
  logic [IW-1:0] si, li;

  function automatic logic is_local(dram_block_t b);
    return b.opcode[1:0] == 2'b00;
  endfunction

  function automatic logic local_ready(dram_block_t b);
    if (!(b.v && b.can && is_local(b))) return 1'b0;
    if (b.lp == LP_MERGE) return b.opfl != 2'b11;
    if (b.lp == LP_LOCK)  return b.opfl == 2'b00;
    return 1'b0;
  endfunction

  // Loop blocks stay in main memory after firing.
  function automatic logic is_kept(dram_block_t b);
    return b.ore != 2'b00 || b.lp == LP_MERGE || b.lp == LP_SWITCH;
  endfunction

  function automatic dram_block_t retire(dram_block_t b);
    dram_block_t r = b;
    if (b.cr || !is_kept(b)) r.can = 1'b0;   // a kept block without clause stays enabled
    if (!is_kept(b)) r.v = 1'b0;
    else if (b.lp == LP_MERGE) r.opfl = 2'b11;   // wait for a new input token
    else begin
      r.opfl[0] = (b.iid1 != '0) && !b.ore[0];
      r.opfl[1] = (b.iid2 != '0) && !b.ore[1];
    end
    return r;
  endfunction

  always_comb begin
    tok_any = 1'b0;
    for (int t = 0; t < NTOK; t++) tok_any |= tok[t].v;
  end

  // Selection and outputs: depend on the stored blocks only.
  always_comb begin
    for (int i = 0; i < DEPTH; i++) begin
      logic ok;
      ok = blk[i].v && blk[i].can && !is_local(blk[i]);
      rdy0[i] = ok && blk[i].opfl == 2'b00;
      rdy1[i] = ok && !is_kept(blk[i]) && (blk[i].opfl == 2'b01 || blk[i].opfl == 2'b10);
      rdy2[i] = ok && !is_kept(blk[i]) && blk[i].opfl == 2'b11;
      lrdy[i] = local_ready(blk[i]);
    end

    sf = 1'b0; si = '0;
    for (int i = DEPTH - 1; i >= 0; i--) if (rdy2[i]) begin sf = 1'b1; si = IW'(i); end
    for (int i = DEPTH - 1; i >= 0; i--) if (rdy1[i]) begin sf = 1'b1; si = IW'(i); end
    for (int i = DEPTH - 1; i >= 0; i--) if (rdy0[i]) begin sf = 1'b1; si = IW'(i); end
    lf = 1'b0; li = '0;
    for (int i = DEPTH - 1; i >= 0; i--) if (lrdy[i]) begin lf = 1'b1; li = IW'(i); end

    quiet = !sf && !lf;

    out.v      = sf && run;
    out.opcode = blk[si].opcode;
    out.iad    = pid_t'(BASE + 32'(si));
    out.opfl   = blk[si].opfl;
    out.iid2   = blk[si].iid2;
    out.iid1   = blk[si].iid1;
    out.opd2   = blk[si].opd2;
    out.opd1   = blk[si].opd1;

    ltok.v   = run && lf && !eru_tokenout && (blk[li].lp != LP_LOCK || blk[li].opcode == OP_LOCK);
    ltok.iad = pid_t'(BASE + 32'(li));
    if (blk[li].lp == LP_LOCK)                                ltok.res = blk[li].opd2;
    else if (blk[li].iid2 != '0 && !blk[li].opfl[1])          ltok.res = blk[li].opd2;
    else                                                      ltok.res = blk[li].opd1;
    host_rdata = blk[host_addr];
  end

  // Next state: token snoop, send, local firing, host write.
  always_comb begin

    for (int i = 0; i < DEPTH; i++) begin
      nxt[i] = blk[i];
      if (run)
        for (int t = 0; t < NTOK; t++)
          if (tok[t].v) begin
            if (nxt[i].opfl[0] && blk[i].iid1 == tok[t].iad) begin
              nxt[i].opd1 = tok[t].res; nxt[i].opfl[0] = 1'b0;
            end
            if (nxt[i].opfl[1] && blk[i].iid2 == tok[t].iad) begin
              nxt[i].opd2 = tok[t].res; nxt[i].opfl[1] = 1'b0;
            end
            if (blk[i].v && blk[i].cr && blk[i].cad == tok[t].iad) nxt[i].can = tok[t].res[0];
          end
    end
    if (out.v && out_accept && !tok_any) nxt[si] = retire(blk[si]);
    if (run && lf && !eru_tokenout) nxt[li] = retire(blk[li]);
    if (host_we) nxt[host_addr] = host_wdata;
  end

  always_ff @(posedge clk) begin
    if (rst) for (int i = 0; i < DEPTH; i++) blk[i] <= '0;
    else     for (int i = 0; i < DEPTH; i++) blk[i] <= nxt[i];
  end

  always_ff @(posedge clk) begin
    if (rst || lrst) stop <= 1'b0;
    else if (run && lf && !eru_tokenout && blk[li].lp == LP_LOCK && blk[li].opcode == OP_STOP)
      stop <= 1'b1;
  end
endmodule
