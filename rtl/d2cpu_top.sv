// d2cpu_top: the data-driven processor system as built on one FPGA.
//
// A program is a set of instructions that carry their operands and the
// addresses of the instructions producing missing ones; there is no program
// counter. Instructions climb a memory hierarchy as their operands and
// clause answers arrive, and results (tokens) are broadcast back down to
// every level:
//
//   host <-> block_ram <-> main_controller <-> DRAM1/PU-PIM1  DRAM2/PU-PIM2
//                                                   |               |
//                                                 DSRAM1          DSRAM2   (EXT-CACHE)
//                                                    \             /
//                                                     out_buffer
//                                                         |
//                                                    hw_manager  (physical <-> virtual IDs)
//                                                         |
//                                                        eru     (3 pipelines + token FIFO)
//
// Token bus: four slots seen by every memory-side module in the same clock:
// slots 0 and 1 carry the ERU's two tokens (translated by the hardware
// manager), slots 2 and 3 the tokens of LOCK / MERGE nodes executed inside
// DRAM1 and DRAM2. In a clock with any token on the bus no instruction moves
// between memory levels or to the ERU, so no instruction can miss a token
// while in transit. The bus to the ERU carries either instructions or tokens
// in any one clock.
//
// Host interface: port A of the block RAM (ena, wea, addra, dia, doa), clocked
// by clk. global_reset starts: load the program from the RAM, run it, write
// every block back; done then stays high. Program layout: see
// main_controller.
// The partition and the signals follow the document; the single clock, the
// one-way buses standing for its bidirectional bus and the local token slots
// are this design's own.
module d2cpu_top
  import d2_pkg::*;
#(
  parameter int unsigned N_PAIRS    = 2,
  parameter int unsigned FIFO_DEPTH = 16,
  parameter int unsigned SRAMS_DEPTH = 12
) (
  input  logic        clk,
  input  logic        global_reset,
  input  logic        ena,
  input  logic        wea,
  input  logic [8:0]  addra,
  input  logic [31:0] dia,
  output logic [31:0] doa,
  output logic        done,
  output logic        busy
);
  localparam int unsigned NTOK        = 2 + N_PAIRS;
  localparam int unsigned DRAM_DEPTH  = 64;
  localparam int unsigned DSRAM_DEPTH = 16;
  localparam int unsigned OB_DEPTH    = 12;

  // block RAM port B
  logic        enb, web;
  logic [8:0]  addrb;
  logic [31:0] dib, dob;
  logic [3:0]  dopa, dopb;

  logic [N_PAIRS-1:0] dram_we;
  logic [5:0]         dram_addr;
  dram_block_t        dram_wdata;
  dram_block_t        dram_rdata [N_PAIRS];
  logic               cpu_rst, run, lrst_all, idle;
  logic [N_PAIRS-1:0] stop, quiet, dsram_busy, dsram_ovf, ob_accept;

  token_t     tok [NTOK];
  token_t     ltok [N_PAIRS];
  token_t     hm_tok [2];
  mem_instr_t d2c [N_PAIRS];
  logic [N_PAIRS-1:0] c_ready;
  ob_instr_t  c2o [N_PAIRS];
  ob_instr_t  o2h [2];
  eru_instr_t h2e [2];
  vtoken_t    e_tok [2];
  logic [2:0] ovf;
  logic       read, resultout, bufferhalf, eru_busy, hm_busy, ob_busy, vid_avail;
  logic       local_tok;
  pid_t       lookup_pid [OB_DEPTH];
  logic [OB_DEPTH-1:0] lookup_hit;

  assign lrst_all = global_reset || cpu_rst;

  block_ram u_bram (
    .clk, .ena, .wea, .addra, .dia, .doa, .dopa,
    .enb, .web, .addrb, .dib, .dob, .dopb
  );

  main_controller #(.DEPTH(DRAM_DEPTH)) u_mc (
    .clk, .global_reset,
    .enb, .web, .addrb, .dib, .dob,
    .dram_we, .dram_addr, .dram_wdata, .dram_rdata,
    .cpu_rst, .run, .stop, .idle, .done, .busy
  );

  always_comb begin
    tok[0] = hm_tok[0];
    tok[1] = hm_tok[1];
    local_tok = 1'b0;
    for (int i = 0; i < N_PAIRS; i++) begin
      tok[2 + i] = ltok[i];
      local_tok |= ltok[i].v;
    end
  end

  for (genvar i = 0; i < N_PAIRS; i++) begin : g_pair
    dram_pupim #(.DEPTH(DRAM_DEPTH), .BASE(i * DRAM_DEPTH), .NTOK(NTOK)) u_dram (
      .clk, .rst(global_reset), .lrst(cpu_rst), .run,
      .host_we    (dram_we[i]),
      .host_addr  (dram_addr),
      .host_wdata (dram_wdata),
      .host_rdata (dram_rdata[i]),
      .tok,
      .eru_tokenout (hm_tok[0].v),
      .out        (d2c[i]),
      .out_accept (c_ready[i]),
      .ltok       (ltok[i]),
      .stop       (stop[i]),
      .quiet      (quiet[i])
    );

    ext_cache #(.DEPTH(DSRAM_DEPTH), .NTOK(NTOK)) u_dsram (
      .clk, .rst(lrst_all),
      .wr_instr   (d2c[i]),
      .wr_ready   (c_ready[i]),
      .ovf        (dsram_ovf[i]),
      .tok,
      .out        (c2o[i]),
      .out_accept (ob_accept[i]),
      .busy       (dsram_busy[i])
    );
  end

  out_buffer #(.DEPTH(OB_DEPTH), .NTOK(NTOK)) u_ob (
    .clk, .rst(lrst_all),
    .in_instr  (c2o),
    .in_accept (ob_accept),
    .tok,
    .ovf,
    .lookup_pid, .lookup_hit, .vid_avail,
    .resultout, .bufferhalf, .local_tok,
    .read,
    .send      (o2h),
    .busy      (ob_busy)
  );

  hw_manager #(.NVID(64), .NLOOK(OB_DEPTH)) u_hm (
    .clk, .rst(lrst_all),
    .ob_instr  (o2h),
    .eru_instr (h2e),
    .eru_tok   (e_tok),
    .tok_read  (read),
    .mem_tok   (hm_tok),
    .lookup_pid, .lookup_hit, .vid_avail,
    .busy      (hm_busy)
  );

  eru #(.FIFO_DEPTH(FIFO_DEPTH), .SRAMS_DEPTH(SRAMS_DEPTH)) u_eru (
    .clk, .rst(lrst_all),
    .in_instr (h2e),
    .ovf,
    .read,
    .out_tok  (e_tok),
    .resultout, .bufferhalf,
    .busy     (eru_busy)
  );

  assign idle = (&quiet) && !(|dsram_busy) && !ob_busy && !eru_busy && !hm_busy && !local_tok;
endmodule
