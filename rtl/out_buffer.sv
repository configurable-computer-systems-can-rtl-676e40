// out_buffer: the out-buffer, last stage of the memory system before the ERU.
//
// An extension of the SRAM*s kept in memory: DEPTH blocks in the SRAM*
// format but with physical IDs (V, D, IAD, IID, OPFL, OPD2, OPD1, OPCODE).
//   Fill:  each clock it may take one instruction from each EXT-CACHE
//          (in_instr[i] with in_accept[i], the BUFFERSEL handshake) when it has
//          two free blocks and no token is on the token bus. An instruction
//          still waiting for an operand needs RESERVE more free blocks: the
//          last ones are kept for complete instructions so that the buffer
//          cannot fill with instructions whose producers are stuck below it
//          (this reserve is this design's addition).
//   Snoop: every block waiting for an operand compares its IID with every token
//          on the token bus and takes the result on a match.
//   Send:  a block is eligible when its SRAM* is not full (ovf) and it is
//          either complete or waits for a producer that is now in the ERU
//          (lookup_hit from the hardware manager). Up to two eligible blocks
//          are put on the bus per clock, the lowest-numbered one and the
//          lowest-numbered one of a different unit class; never two for the
//          same unit. Nothing is sent unless two virtual IDs are free.
//   Bus turn: the bus to the ERU carries either instructions or tokens. read
//          (the READ signal) is raised, and nothing sent, when the ERU holds
//          tokens and either its FIFO is half full (bufferhalf) or there is
//          nothing to send. local_tok stops sending in a clock where main
//          memory broadcasts a token of its own.
// The size, format and the "different units" rule follow the document; the
// selection order and exact turn-around rule are this design's own.
module out_buffer
  import d2_pkg::*;
#(
  parameter int unsigned DEPTH = 12,
  parameter int unsigned NTOK  = 4,
  parameter int unsigned RESERVE = 2
) (
  input  logic       clk,
  input  logic       rst,
  input  ob_instr_t  in_instr [2],
  output logic [1:0] in_accept,
  input  token_t     tok [NTOK],
  input  logic [2:0] ovf,
  output pid_t       lookup_pid [DEPTH],
  input  logic [DEPTH-1:0] lookup_hit,
  input  logic       vid_avail,
  input  logic       resultout,
  input  logic       bufferhalf,
  input  logic       local_tok,
  output logic       read,
  output ob_instr_t  send [2],
  output logic       busy
);
  ob_instr_t blk [DEPTH];
  ob_instr_t nxt [DEPTH];

  localparam int unsigned IW = $clog2(DEPTH);

  logic [DEPTH-1:0] elig, occ;
  logic             f0, f1;
  logic [IW-1:0]    s0, s1;
  logic             tok_any, do_send;
  logic [1:0]       send_v;
  int unsigned      nfree;
  logic [IW-1:0]    free0, free1;
  logic             ff0, ff1;

  function automatic logic unit_full(logic [2:0] o, opcode_t op);
    case (op[1:0])
      2'b01:   return o[0];
      2'b10:   return o[1];
      2'b11:   return o[2];
      default: return 1'b1;
    endcase
  endfunction

  always_comb begin
    tok_any = 1'b0;
    for (int t = 0; t < NTOK; t++) tok_any |= tok[t].v;
  end

  // Selection, bus turn-around and sends: depend on stored state only.
  always_comb
    for (int i = 0; i < DEPTH; i++) lookup_pid[i] = blk[i].iid;

  always_comb begin
    for (int i = 0; i < DEPTH; i++) begin
      occ[i]  = blk[i].v;
      elig[i] = blk[i].v && !unit_full(ovf, blk[i].opcode) && (!blk[i].d || lookup_hit[i]);
    end

    f0 = 1'b0; s0 = '0;
    for (int i = DEPTH - 1; i >= 0; i--)
      if (elig[i]) begin f0 = 1'b1; s0 = IW'(i); end
    f1 = 1'b0; s1 = '0;
    for (int i = DEPTH - 1; i >= 0; i--)
      if (elig[i] && IW'(i) != s0 && blk[i].opcode[1:0] != blk[s0].opcode[1:0]) begin
        f1 = 1'b1; s1 = IW'(i);
      end

    busy = |occ;

    nfree = 0;
    ff0 = 1'b0; ff1 = 1'b0; free0 = '0; free1 = '0;
    for (int i = DEPTH - 1; i >= 0; i--)
      if (!blk[i].v) begin
        nfree++;
        free1 = free0; ff1 = ff0;
        free0 = IW'(i); ff0 = 1'b1;
      end
  end

  assign read    = resultout && (bufferhalf || !f0 || !vid_avail);
  assign do_send = f0 && vid_avail && !read && !local_tok;

  always_comb begin
    send_v[0] = do_send;
    send_v[1] = do_send && f1;
    send[0]   = blk[s0];
    send[0].v = send_v[0];
    send[1]   = blk[s1];
    send[1].v = send_v[1];
  end

  // Fill and next state.
  always_comb begin

    for (int i = 0; i < DEPTH; i++) begin
      nxt[i] = blk[i];
      for (int t = 0; t < NTOK; t++) nxt[i] = ob_snoop(nxt[i], tok[t]);
    end
    if (send_v[0]) nxt[s0].v = 1'b0;
    if (send_v[1]) nxt[s1].v = 1'b0;
    if (in_instr[0].v && in_accept[0]) nxt[free0] = in_instr[0];
    if (in_instr[1].v && in_accept[1]) begin
      if (in_instr[0].v && in_accept[0]) nxt[free1] = in_instr[1];
      else               nxt[free0] = in_instr[1];
    end
  end

  always_comb begin
    for (int k = 0; k < 2; k++)
      in_accept[k] = (nfree >= 2) && !tok_any && !read && (!in_instr[k].d || nfree >= 2 + RESERVE);
  end

  always_ff @(posedge clk) begin
    if (rst) for (int i = 0; i < DEPTH; i++) blk[i] <= '0;
    else     for (int i = 0; i < DEPTH; i++) blk[i] <= nxt[i];
  end

  a_two_free: assert property (@(posedge clk) disable iff (rst)
    !(in_accept[0] && !(ff0 && ff1)));
endmodule
