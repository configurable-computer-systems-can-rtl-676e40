// token_fifo: the ERU's output FIFO for result tokens.
//
// The three functional units finish 0 to 3 instructions per clock; the FIFO
// absorbs that uneven flow and hands tokens to the memory side two at a time.
//   in_tok:     one token per unit; every valid one is written, in unit order,
//               in a clock where bufferfull is low. While bufferfull is high
//               nothing is written and the units hold their results.
//   read:       the memory side takes the two oldest tokens (out_tok[0] the
//               oldest; out_tok[1].v low if only one is stored).
//   bufferfull: fewer than three free entries, so a full clock of results
//               might not fit; the units, ERU-SRAMs and SRAM*s stall.
//   bufferhalf: at least DEPTH/2 tokens stored; the memory side stops sending
//               instructions and reads tokens.
//   scan:       every entry, with v set on the stored ones, so that each SRAM*
//               can compare its waiting IIDs with all tokens in the FIFO.
//               Tokens being read in a clock are still visible in that clock.
// Tokens written in one clock can be read from the next. The two flags, the
// two-token output and the scan follow the document; the depth is this
// design's choice.
module token_fifo
  import d2_pkg::*;
#(
  parameter int unsigned DEPTH = 16
) (
  input  logic    clk,
  input  logic    rst,
  input  vtoken_t in_tok [3],
  input  logic    read,
  output vtoken_t out_tok [2],
  output logic    bufferhalf,
  output logic    bufferfull,
  output logic    not_empty,
  output vtoken_t scan [DEPTH]
);
  localparam int unsigned PW = $clog2(DEPTH);
  localparam int unsigned CW = $clog2(DEPTH + 1);

  vtoken_t       mem [DEPTH];
  logic [PW-1:0] rd_ptr;
  logic [CW-1:0] count;
  logic [1:0]    n_pop;
  logic [1:0]    n_push;

  assign bufferfull = (count > CW'(DEPTH - 3));
  assign bufferhalf = (count >= CW'(DEPTH / 2));
  assign not_empty  = (count != 0);

  always_comb begin
    out_tok[0]   = mem[rd_ptr];
    out_tok[0].v = (count >= 1);
    out_tok[1]   = mem[PW'(rd_ptr + 1'b1)];
    out_tok[1].v = (count >= 2);
    n_pop  = !read ? 2'd0 : (count >= 2) ? 2'd2 : (count == 1) ? 2'd1 : 2'd0;
    n_push = '0;
    if (!bufferfull)
      for (int k = 0; k < 3; k++) n_push += {1'b0, in_tok[k].v};
    for (int i = 0; i < DEPTH; i++) begin
      scan[i]   = mem[i];
      scan[i].v = (CW'(PW'(i[PW-1:0] - rd_ptr)) < count) || (count == CW'(DEPTH));
    end
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      rd_ptr <= '0;
      count  <= '0;
      for (int i = 0; i < DEPTH; i++) mem[i] <= '0;
    end else begin
      if (!bufferfull) begin
        logic [PW-1:0] wp;
        wp = PW'(rd_ptr + count);
        for (int k = 0; k < 3; k++)
          if (in_tok[k].v) begin
            mem[wp] <= in_tok[k];
            wp = wp + 1'b1;
          end
      end
      rd_ptr <= rd_ptr + PW'(n_pop);
      count  <= count + CW'(n_push) - CW'(n_pop);
    end
  end

  a_depth_pow2: assert property (@(posedge clk) (DEPTH & (DEPTH - 1)) == 0);
endmodule
