// hw_manager: the hardware manager (HM) between the ERU and the memory system.
//
// Inside the ERU an instruction is known by a short virtual ID; outside it by
// its 7-bit physical address. The HM keeps a table of NVID entries
// {V, VIR, PHY}: entry k is valid while the instruction with virtual ID k is
// in the ERU, and holds its physical address.
//   Into the ERU: each valid instruction on ob_instr gets the lowest free
//   virtual ID (the second one the next free ID) as its IAD; a waiting
//   operand's IID is translated through the table. The out-buffer only sends
//   an instruction whose missing operand's producer is in the table.
//   lookup_pid / lookup_hit let the out-buffer ask that question for each of
//   its blocks; vid_avail says two virtual IDs are free.
//   Out of the ERU: with tok_read high, each valid token on eru_tok has its
//   virtual IAD turned back into the physical one on mem_tok and its table
//   entry freed. The same token goes to every memory module; the document
//   makes two copies for its two memory pairs, here one copy is fanned out.
// Translation is combinational; the table changes at the clock edge.
// Operands, opcode and token results pass through unchanged, so most output
// bits are wired straight from inputs; only the ID fields are translated.
// The table, its purpose and the recycling of IDs follow the document; the
// allocation order and the lookup port are this design's own.
module hw_manager
  import d2_pkg::*;
#(
  parameter int unsigned NVID = 64,
  parameter int unsigned NLOOK = 12
) (
  input  logic       clk,
  input  logic       rst,
  input  ob_instr_t  ob_instr [2],
  output eru_instr_t eru_instr [2],
  input  vtoken_t    eru_tok [2],
  input  logic       tok_read,
  output token_t     mem_tok [2],
  input  pid_t       lookup_pid [NLOOK],
  output logic [NLOOK-1:0] lookup_hit,
  output logic       vid_avail,
  output logic       busy
);
  logic [NVID-1:0] tv;
  pid_t            tp [NVID];

  vid_t new_vid [2];
  logic [1:0] found;

  always_comb begin
    // two lowest free entries
    found = '0;
    new_vid[0] = '0;
    new_vid[1] = '0;
    for (int i = NVID - 1; i >= 0; i--)
      if (!tv[i]) begin
        new_vid[1] = new_vid[0];
        found[1]   = found[0];
        new_vid[0] = vid_t'(i);
        found[0]   = 1'b1;
      end
    vid_avail = &found;
    busy      = |tv;
  end

  always_comb begin

    for (int k = 0; k < 2; k++) begin
      eru_instr[k].v      = ob_instr[k].v;
      eru_instr[k].d      = ob_instr[k].d;
      eru_instr[k].iad    = new_vid[k];
      eru_instr[k].opfl   = ob_instr[k].opfl;
      eru_instr[k].opd2   = ob_instr[k].opd2;
      eru_instr[k].opd1   = ob_instr[k].opd1;
      eru_instr[k].opcode = ob_instr[k].opcode;
      eru_instr[k].iid    = '0;
      for (int i = NVID - 1; i >= 0; i--)
        if (tv[i] && tp[i] == ob_instr[k].iid) eru_instr[k].iid = vid_t'(i);
    end

  end

  always_comb begin
    for (int k = 0; k < 2; k++) begin
      mem_tok[k].v   = eru_tok[k].v && tok_read;
      mem_tok[k].iad = tp[eru_tok[k].iad];
      mem_tok[k].res = eru_tok[k].res;
    end

  end

  always_comb begin
    for (int j = 0; j < NLOOK; j++) begin
      lookup_hit[j] = 1'b0;
      for (int i = 0; i < NVID; i++)
        if (tv[i] && tp[i] == lookup_pid[j]) lookup_hit[j] = 1'b1;
    end
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      tv <= '0;
      for (int i = 0; i < NVID; i++) tp[i] <= '0;
    end else begin
      for (int k = 0; k < 2; k++)
        if (eru_tok[k].v && tok_read) tv[eru_tok[k].iad] <= 1'b0;
      for (int k = 0; k < 2; k++)
        if (ob_instr[k].v) begin
          tv[new_vid[k]] <= 1'b1;
          tp[new_vid[k]] <= ob_instr[k].iad;
        end
    end
  end

  // Instructions are only sent when two IDs are free.
  a_vid_free: assert property (@(posedge clk) disable iff (rst)
    !((ob_instr[0].v || ob_instr[1].v) && !vid_avail));
endmodule
