// main_controller: loads the program, starts the processor, and unloads the
// results.
//
// The host writes a program into the block RAM, three 32-bit words per
// instruction block, block n (physical address n = 1 .. NBLK) at word
// addresses 3(n-1) .. 3(n-1)+2:
//   word 0: bits [3:2] ORE, [1:0] LP, the rest zero
//   word 1: [31] V, [30] CR, [29] CAN, [28:22] CAD, [21:16] OPCODE,
//           [15:14] OPFL, [13:7] IID2, [6:0] IID1
//   word 2: [31:16] OPD2, [15:0] OPD1
// Address 0 is not a block: an IID or CAD of 0 means "none".
// Sequence after global_reset:
//   LOAD    reads every block from port B (four clocks per block, the RAM
//           having one clock of read latency) and writes it into DRAM1
//           (addresses 1 .. DEPTH-1) or DRAM2 (DEPTH .. 2*DEPTH-1); cpu_rst
//           (the local reset) is held high meanwhile.
//   RUN     releases cpu_rst and raises run (START) until a DRAM reports a
//           STOP instruction or the whole machine has been quiet (nothing
//           ready, nothing in flight) for QUIET clocks.
//   UNLOAD  reads every block back from the DRAMs and writes the three words
//           to the same RAM addresses (three clocks per block).
//   DONE    done stays high until the next global_reset.
// The sequence and the DRAM/RAM roles follow the document; the word layout is
// the one of its result table; the quiet-time end of run is this design's own
// addition for programs without a STOP instruction.
module main_controller
  import d2_pkg::*;
#(
  parameter int unsigned DEPTH = 64,   // blocks per DRAM
  parameter int unsigned QUIET = 8
) (
  input  logic        clk,
  input  logic        global_reset,
  // block RAM port B
  output logic        enb,
  output logic        web,
  output logic [8:0]  addrb,
  output logic [31:0] dib,
  input  logic [31:0] dob,
  // DRAM host ports (SEL / CS)
  output logic [1:0]  dram_we,
  output logic [$clog2(DEPTH)-1:0] dram_addr,
  output dram_block_t dram_wdata,
  input  dram_block_t dram_rdata [2],
  // processor control
  output logic        cpu_rst,
  output logic        run,
  input  logic [1:0]  stop,
  input  logic        idle,
  output logic        done,
  output logic        busy
);
  localparam int unsigned NBLK = 2 * DEPTH - 1;
  localparam int unsigned AW   = $clog2(DEPTH);

  typedef enum logic [2:0] {S_LOAD, S_RUN, S_UNLOAD, S_DONE} state_e;

  state_e       state;
  logic [7:0]   blk_n;     // physical address being moved
  logic [1:0]   phase;
  logic [31:0]  w0, w1;
  logic [7:0]   quiet_cnt;
  logic [8:0]   base_addr;
  dram_block_t  rd_blk;

  function automatic dram_block_t unpack_words(logic [31:0] a, logic [31:0] b, logic [31:0] c);
    dram_block_t r;
    r.ore    = a[3:2];
    r.lp     = a[1:0];
    r.v      = b[31];
    r.cr     = b[30];
    r.can    = b[29];
    r.cad    = b[28:22];
    r.opcode = b[21:16];
    r.opfl   = b[15:14];
    r.iid2   = b[13:7];
    r.iid1   = b[6:0];
    r.opd2   = c[31:16];
    r.opd1   = c[15:0];
    return r;
  endfunction

  assign base_addr = 9'(3 * (32'(blk_n) - 1));
  assign rd_blk    = dram_rdata[(32'(blk_n) >= DEPTH) ? 1 : 0];
  assign dram_addr = AW'(blk_n);

  always_comb begin
    enb        = 1'b0;
    web        = 1'b0;
    addrb      = base_addr + 9'(phase);
    dib        = '0;
    dram_we    = '0;
    dram_wdata = unpack_words(w0, w1, dob);
    cpu_rst    = (state == S_LOAD);
    run        = (state == S_RUN);
    done       = (state == S_DONE);
    busy       = (state != S_DONE);
    unique case (state)
      S_LOAD: begin
        enb   = (phase != 2'd3);
        addrb = base_addr + 9'(phase);
        if (phase == 2'd3) begin
          addrb = base_addr;
          dram_we[(32'(blk_n) >= DEPTH) ? 1 : 0] = 1'b1;
        end
      end
      S_UNLOAD: begin
        enb   = 1'b1;
        web   = 1'b1;
        addrb = base_addr + 9'(phase);
        unique case (phase)
          2'd0:    dib = {28'd0, rd_blk.ore, rd_blk.lp};
          2'd1:    dib = {rd_blk.v, rd_blk.cr, rd_blk.can, rd_blk.cad, rd_blk.opcode,
                          rd_blk.opfl, rd_blk.iid2, rd_blk.iid1};
          default: dib = {rd_blk.opd2, rd_blk.opd1};
        endcase
      end
      default: ;
    endcase
  end

  always_ff @(posedge clk) begin
    if (global_reset) begin
      state     <= S_LOAD;
      blk_n     <= 8'd1;
      phase     <= '0;
      w0        <= '0;
      w1        <= '0;
      quiet_cnt <= '0;
    end else begin
      unique case (state)
        S_LOAD: begin
          if (phase == 2'd1) w0 <= dob;
          if (phase == 2'd2) w1 <= dob;
          phase <= phase + 1'b1;
          if (phase == 2'd3) begin
            phase <= '0;
            if (32'(blk_n) == NBLK) begin
              state <= S_RUN;
              blk_n <= 8'd1;
            end else blk_n <= blk_n + 1'b1;
          end
        end
        S_RUN: begin
          quiet_cnt <= idle ? quiet_cnt + 1'b1 : '0;
          if ((|stop) || 32'(quiet_cnt) >= QUIET) begin
            state <= S_UNLOAD;
            phase <= '0;
          end
        end
        S_UNLOAD: begin
          phase <= phase + 1'b1;
          if (phase == 2'd2) begin
            phase <= '0;
            if (32'(blk_n) == NBLK) state <= S_DONE;
            else blk_n <= blk_n + 1'b1;
          end
        end
        default: ;
      endcase
    end
  end
endmodule
