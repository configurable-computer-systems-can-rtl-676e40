// d2_pkg: shared field widths, instruction and token formats, and opcodes of
// the data-driven processor.
//
// Every instruction carries its own operands and the IDs of the instructions
// that will produce the missing ones. The format changes with the level the
// instruction sits in:
//   dram_block_t  main-memory block: clause fields (CR, CAN, CAD), loop fields
//                 (ORE, LP), OPFL, two producer IDs, two operands, opcode.
//                 Its address is its location, so it has no IAD field.
//   mem_instr_t   EXT-CACHE block: opcode, operands, own IAD, IID1, IID2, OPFL.
//   ob_instr_t    out-buffer / SRAM* block: at most one missing operand, named
//                 by a single IID, with D (dependent) and a one-bit OPFL
//                 (0: OPD1 needed, 1: OPD2 needed).
//   fu_instr_t    what a functional unit takes: opcode, operands, virtual IAD.
//   token_t       IAD of the producing instruction and its 16-bit result.
// IDs are 7-bit physical addresses outside the execution unit and 6-bit
// virtual IDs inside it. Physical address 0 is the "no producer" value.
// Field widths follow the document; the grouping into structs is this
// design's own.
package d2_pkg;

  localparam int unsigned DATA_W = 16;  // operand and result width
  localparam int unsigned OPC_W  = 6;   // opcode width
  localparam int unsigned PID_W  = 7;   // physical instruction ID
  localparam int unsigned VID_W  = 6;   // virtual instruction ID (inside the ERU)

  typedef logic [DATA_W-1:0] data_t;
  typedef logic [OPC_W-1:0]  opcode_t;
  typedef logic [PID_W-1:0]  pid_t;
  typedef logic [VID_W-1:0]  vid_t;

  // Functional-unit class: the two low opcode bits.
  typedef enum logic [1:0] {
    FU_NONE = 2'b00,   // executed inside main memory (MERGE, LOCK, STOP)
    FU_ADD  = 2'b01,
    FU_MUL  = 2'b10,
    FU_SLC  = 2'b11    // shift / logic / compare
  } fu_class_e;

  // Opcodes (upper four bits select the operation inside a class).
  localparam opcode_t OP_ADD  = 6'b000001;
  localparam opcode_t OP_SUB  = 6'b000101;
  localparam opcode_t OP_MUL  = 6'b000010;
  localparam opcode_t OP_AND  = 6'b000011;
  localparam opcode_t OP_OR   = 6'b000111;
  localparam opcode_t OP_NAND = 6'b001011;
  localparam opcode_t OP_NOR  = 6'b001111;
  localparam opcode_t OP_XOR  = 6'b010011;
  localparam opcode_t OP_NOT  = 6'b010111;
  localparam opcode_t OP_EQT  = 6'b011011;
  localparam opcode_t OP_NEQT = 6'b011111;
  localparam opcode_t OP_GT   = 6'b100011;
  localparam opcode_t OP_LT   = 6'b100111;
  localparam opcode_t OP_GET  = 6'b101011;
  localparam opcode_t OP_LET  = 6'b101111;
  localparam opcode_t OP_SHL  = 6'b110011;
  localparam opcode_t OP_SHR  = 6'b110111;
  localparam opcode_t OP_RAL  = 6'b111011;
  localparam opcode_t OP_RAR  = 6'b111111;
  localparam opcode_t OP_MERGE = 6'b000000;  // with LP = 01
  localparam opcode_t OP_LOCK  = 6'b000000;  // with LP = 11
  localparam opcode_t OP_STOP  = 6'b100000;  // with LP = 11

  // Loop field values.
  localparam logic [1:0] LP_NONE   = 2'b00;
  localparam logic [1:0] LP_MERGE  = 2'b01;
  localparam logic [1:0] LP_SWITCH = 2'b10;
  localparam logic [1:0] LP_LOCK   = 2'b11;

  typedef struct packed {
    logic              v;
    pid_t              iad;
    data_t             res;
  } token_t;             // physical token (memory side)

  typedef struct packed {
    logic              v;
    vid_t              iad;
    data_t             res;
  } vtoken_t;            // virtual token (inside the ERU)

  typedef struct packed {
    logic              v;
    logic              cr;
    logic              can;
    pid_t              cad;
    opcode_t           opcode;
    logic [1:0]        ore;
    logic [1:0]        lp;
    logic [1:0]        opfl;
    pid_t              iid2;
    pid_t              iid1;
    data_t             opd2;
    data_t             opd1;
  } dram_block_t;

  typedef struct packed {
    logic              v;
    opcode_t           opcode;
    pid_t              iad;
    logic [1:0]        opfl;   // bit0: OPD1 needed, bit1: OPD2 needed
    pid_t              iid2;
    pid_t              iid1;
    data_t             opd2;
    data_t             opd1;
  } mem_instr_t;

  typedef struct packed {
    logic              v;
    logic              d;      // 1: one operand still to come
    pid_t              iad;
    pid_t              iid;
    logic              opfl;   // 0: OPD1 needed, 1: OPD2 needed
    data_t             opd2;
    data_t             opd1;
    opcode_t           opcode;
  } ob_instr_t;          // out-buffer format, physical IDs

  typedef struct packed {
    logic              v;
    logic              d;
    vid_t              iad;
    vid_t              iid;
    logic              opfl;
    data_t             opd2;
    data_t             opd1;
    opcode_t           opcode;
  } eru_instr_t;         // SRAM* format, virtual IDs

  typedef struct packed {
    logic              v;
    opcode_t           opcode;
    data_t             opd1;
    data_t             opd2;
    vid_t              iad;
  } fu_instr_t;

  function automatic fu_class_e fu_class(opcode_t op);
    return fu_class_e'(op[1:0]);
  endfunction

  // Write a token into the operand fields of an EXT-CACHE block.
  function automatic mem_instr_t mem_snoop(mem_instr_t b, token_t t);
    mem_instr_t r = b;
    if (t.v && b.v) begin
      if (b.opfl[0] && b.iid1 == t.iad) begin r.opd1 = t.res; r.opfl[0] = 1'b0; end
      if (b.opfl[1] && b.iid2 == t.iad) begin r.opd2 = t.res; r.opfl[1] = 1'b0; end
    end
    return r;
  endfunction

  // Write a token into a one-missing-operand block (out-buffer format).
  function automatic ob_instr_t ob_snoop(ob_instr_t b, token_t t);
    ob_instr_t r = b;
    if (t.v && b.v && b.d && b.iid == t.iad) begin
      if (b.opfl) r.opd2 = t.res; else r.opd1 = t.res;
      r.d = 1'b0;
    end
    return r;
  endfunction

  // EXT-CACHE format to out-buffer format; only for blocks missing at most
  // one operand.
  function automatic ob_instr_t mem_to_ob(mem_instr_t m);
    ob_instr_t o;
    o.v      = m.v;
    o.d      = |m.opfl;
    o.iad    = m.iad;
    o.opfl   = m.opfl[1];
    o.iid    = m.opfl[1] ? m.iid2 : m.iid1;
    o.opd2   = m.opd2;
    o.opd1   = m.opd1;
    o.opcode = m.opcode;
    return o;
  endfunction

endpackage
