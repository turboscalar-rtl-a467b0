// ts_pkg: types, sizes and helper functions shared by every Turboscalar block.
//
// The machine runs a small internal instruction format (the "predecoded" form
// a real front end would produce from the architectural ISA). Every
// instruction belongs to one of five dispatch classes: simple integer,
// load/store, complex integer, floating point and branch unit; the class
// decides which reservation-station cluster and which dispatch slots it may
// use. Register renaming follows the silo scheme: a physical register is
// named by {architected register, version number}.
//
// Sizes that come from the Turboscalar design: 24-wide hot pipeline made of
// four 6-instruction blocks, 128-entry reservation stations per cluster,
// per-cycle dispatch limits 4/2/1/10/12 (branch/complex/FP/load-store/simple),
// cold pipeline 1 wide and 4 deep. Sizes chosen here: 32 architected 32-bit
// registers, 32 versions per silo, a 256-entry reorder buffer, 16-bit
// instruction addresses (word index), 256-entry trace table and block caches.
package ts_pkg;

  // ---------------------------------------------------------------- sizes
  localparam int XLEN      = 32;          // register width
  localparam int NREG      = 32;          // architected registers = silos
  localparam int REGW      = $clog2(NREG);
  localparam int SILO_D    = 32;          // versions held per silo (> 24 + 1)
  localparam int VW        = 6;           // version-number bits (> log2 SILO_D)
  localparam int TAGW      = REGW + VW;   // physical tag {reg, version}
  localparam int PCW       = 16;          // instruction word address
  localparam int ROB_N     = 256;
  localparam int ROBW      = $clog2(ROB_N);
  localparam int BLK_W     = 6;           // instructions per block
  localparam int NBLK      = 4;           // blocks fetched per hot cycle
  localparam int HOT_W     = BLK_W * NBLK; // 24
  localparam int NLANE     = HOT_W + 1;   // hot lanes + the cold lane
  localparam int COLD_LANE = HOT_W;
  localparam int PRW       = 3;           // "prior writes" counter bits per block
  localparam int GPRW      = 5;           // prior writes across a 24-wide group
  localparam int NCLS      = 5;
  localparam int TT_N      = 256;         // trace table entries
  localparam int TTW       = $clog2(TT_N);
  localparam int BC_N      = 256;         // block cache entries (each copy)
  localparam int BCW       = $clog2(BC_N);

  // per-class dispatch ports (= per-cycle dispatch limits) and issue widths
  localparam int DISP_SI = 12, DISP_LS = 10, DISP_CX = 2, DISP_FP = 1, DISP_BR = 4;
  localparam int ISS_SI  = 12, ISS_LS  = 1,  ISS_CX  = 2, ISS_FP  = 1, ISS_BR  = 4;
  localparam int DTOT    = DISP_SI + DISP_LS + DISP_CX + DISP_FP + DISP_BR; // 29
  localparam int WB_N    = ISS_SI + ISS_LS + ISS_CX + ISS_FP + ISS_BR; // 20
  localparam int RS_N    = 128;

  // ---------------------------------------------------------------- ISA
  typedef enum logic [2:0] {
    C_SI = 3'd0,   // simple integer
    C_LS = 3'd1,   // load / store
    C_CX = 3'd2,   // complex integer (multiply, compare)
    C_FP = 3'd3,   // floating-point unit
    C_BR = 3'd4    // branch unit
  } iclass_e;

  // operation codes, meaning depends on the class
  localparam logic [2:0] SI_ADD = 3'd0, SI_SUB = 3'd1, SI_AND = 3'd2, SI_OR = 3'd3,
                         SI_XOR = 3'd4, SI_ADDI = 3'd5, SI_SLLI = 3'd6, SI_LI = 3'd7;
  localparam logic [2:0] CX_MUL = 3'd0, CX_SLT = 3'd1;
  localparam logic [2:0] FP_ADD = 3'd0;
  localparam logic [2:0] LS_LD = 3'd0, LS_ST = 3'd1;
  localparam logic [2:0] BR_BEQ = 3'd0, BR_BNE = 3'd1, BR_BLT = 3'd2, BR_JMP = 3'd3,
                         BR_HALT = 3'd4;

  typedef struct packed {
    iclass_e            cls;
    logic [2:0]         op;
    logic [REGW-1:0]    rd;
    logic [REGW-1:0]    rs1;
    logic [REGW-1:0]    rs2;
    logic signed [15:0] imm;
  } instr_t;

  typedef logic [TAGW-1:0] tag_t;

  // a source operand as it travels to the reservation stations
  typedef struct packed {
    logic             rdy;
    tag_t             tag;
    logic [XLEN-1:0]  data;
  } opnd_t;

  // one writeback / result-forwarding lane
  typedef struct packed {
    logic             valid;
    logic             has_dest;
    tag_t             tag;
    logic [XLEN-1:0]  data;
    logic [ROBW-1:0]  rob;
    logic             is_br;
    logic             mispred;
    logic             taken;
    logic [PCW-1:0]   next_pc;  // resolved successor address
  } wb_t;

  // an instruction ready for a reservation station
  typedef struct packed {
    logic             valid;
    instr_t           ins;
    logic [PCW-1:0]   pc;
    logic [PCW-1:0]   pred_pc;  // predicted successor (branches)
    logic [ROBW-1:0]  rob;
    logic             has_dest;
    tag_t             dtag;
    opnd_t            s1;
    opnd_t            s2;
  } uop_t;

  // an instruction inside a dynamic-instruction-cache block (after the
  // optimizing back-end): decode, dependency and virtual-tag information
  typedef struct packed {
    logic             valid;
    instr_t           ins;
    logic [2:0]       prog;      // program-order position inside the block
    logic [PRW-1:0]   p1;        // earlier writes to rs1 inside the block
    logic [PRW-1:0]   p2;        // earlier writes to rs2 inside the block
    logic [PRW-1:0]   pd;        // earlier writes to rd inside the block
  } bslot_t;

  typedef struct packed {
    logic             valid;
    logic [PCW-1:0]   pc;        // address of the first instruction
    logic [2:0]       len;       // instructions in the block (1..6)
    bslot_t [BLK_W-1:0] slot;    // aligned to the dispatch positions
  } block_t;

  typedef struct packed {
    logic             valid;
    logic [PCW-1:0]   pc;        // trace start address (tag)
    logic [2:0]       nblk;      // blocks in the trace (1..4)
    logic [NBLK-1:0][PCW-1:0] bpc; // start address of each block
    logic [PCW-1:0]   next_pc;   // address following the trace
  } trace_t;

  // one lane of the rename / operand-read port of the register file
  typedef struct packed {
    logic             valid;
    logic             wr;        // allocates a new version of rd
    logic [REGW-1:0]  rd;
    logic [GPRW-1:0]  pd;        // earlier writes to rd in the same group
    logic             u1, u2;    // source used
    logic [REGW-1:0]  rs1, rs2;
    logic [GPRW-1:0]  p1, p2;    // earlier writes to rs1 / rs2 in the group
  } ren_t;

  // one lane entering the dispatch crossbar, with its reorder-buffer offset
  // inside the fetch group (program order)
  typedef struct packed {
    uop_t             u;
    logic [4:0]       ofs;
  } dlane_t;

  // ---------------------------------------------------------------- dispatch positions
  // Class mask of each of the 6 positions of a block (bit = iclass value).
  // Nine class slots over six positions, at most two classes per position:
  // 3 simple, 3 load/store, 1 complex, 1 FP, 1 branch.
  function automatic logic [NCLS-1:0] pos_mask(input int p);
    case (p)
      0: pos_mask = 5'b00001;            // SI
      1: pos_mask = 5'b00001;            // SI
      2: pos_mask = 5'b00011;            // SI, LS
      3: pos_mask = 5'b00110;            // LS, CX
      4: pos_mask = 5'b01010;            // LS, FP
      default: pos_mask = 5'b10000;      // BR
    endcase
  endfunction

  function automatic int disp_of(input int c);
    case (c)
      0: disp_of = DISP_SI;
      1: disp_of = DISP_LS;
      2: disp_of = DISP_CX;
      3: disp_of = DISP_FP;
      default: disp_of = DISP_BR;
    endcase
  endfunction

  // ---------------------------------------------------------------- decode helpers
  function automatic logic has_dest(input instr_t i);
    case (i.cls)
      C_SI, C_CX, C_FP: has_dest = 1'b1;
      C_LS:             has_dest = (i.op == LS_LD);
      default:          has_dest = 1'b0;
    endcase
  endfunction

  function automatic logic uses_rs1(input instr_t i);
    uses_rs1 = !((i.cls == C_SI && i.op == SI_LI) ||
                 (i.cls == C_BR && (i.op == BR_JMP || i.op == BR_HALT)));
  endfunction

  function automatic logic uses_rs2(input instr_t i);
    case (i.cls)
      C_SI:    uses_rs2 = (i.op <= SI_XOR);
      C_CX:    uses_rs2 = 1'b1;
      C_FP:    uses_rs2 = 1'b1;
      C_LS:    uses_rs2 = (i.op == LS_ST);
      default: uses_rs2 = (i.op == BR_BEQ || i.op == BR_BNE || i.op == BR_BLT);
    endcase
  endfunction

  function automatic logic is_cond_br(input instr_t i);
    is_cond_br = (i.cls == C_BR) && (i.op == BR_BEQ || i.op == BR_BNE || i.op == BR_BLT);
  endfunction

  // ALU result for the SI, CX and FP classes
  function automatic logic [XLEN-1:0] alu(input instr_t i, input logic [XLEN-1:0] a,
                                          input logic [XLEN-1:0] b);
    logic [XLEN-1:0] imm;
    imm = XLEN'(signed'(i.imm));
    alu = '0;
    case (i.cls)
      C_SI: case (i.op)
        SI_ADD:  alu = a + b;
        SI_SUB:  alu = a - b;
        SI_AND:  alu = a & b;
        SI_OR:   alu = a | b;
        SI_XOR:  alu = a ^ b;
        SI_ADDI: alu = a + imm;
        SI_SLLI: alu = a << imm[4:0];
        default: alu = imm;
      endcase
      C_CX: alu = (i.op == CX_SLT) ? XLEN'($signed(a) < $signed(b)) : a * b;
      C_FP: alu = a + b;
      default: alu = '0;
    endcase
  endfunction

  // branch outcome: taken flag
  function automatic logic br_taken(input instr_t i, input logic [XLEN-1:0] a,
                                    input logic [XLEN-1:0] b);
    case (i.op)
      BR_BEQ:  br_taken = (a == b);
      BR_BNE:  br_taken = (a != b);
      BR_BLT:  br_taken = ($signed(a) < $signed(b));
      default: br_taken = 1'b1;          // JMP, HALT
    endcase
  endfunction

  function automatic logic [PCW-1:0] br_target(input instr_t i, input logic [PCW-1:0] pc);
    br_target = (i.op == BR_HALT) ? pc : pc + PCW'(signed'(i.imm));
  endfunction

  // an operand picks up a result broadcast on any writeback lane
  function automatic opnd_t snoop(input opnd_t o, input wb_t [WB_N-1:0] wb);
    snoop = o;
    for (int k = 0; k < WB_N; k++)
      if (!o.rdy && wb[k].valid && wb[k].has_dest && wb[k].tag == o.tag) begin
        snoop.rdy  = 1'b1;
        snoop.data = wb[k].data;
      end
  endfunction

endpackage
