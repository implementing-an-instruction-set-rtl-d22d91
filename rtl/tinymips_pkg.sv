// tinymips_pkg: types and constants shared by the TinyMIPS multi-cycle processor.
//
// TinyMIPS is an eight-instruction subset of the 32-bit MIPS ISA (addu, subu, lw, sw,
// j, jr, beq, bltz) executed on a bus-based datapath: one address bus (A) and one
// data bus (D) connect the PC, the instruction register, the register file, an adder
// and a single unified RAM. A small FSM asserts the datapath's named control points.
//
// The control-point names (ld_pc, pc2A, ld_ir, i2D, wrt, m2D, rt_sel, ld_reg, b2D,
// sx_sel, comp, s2A, s2D, npc_sel) are the design's own. The numeric opcode and function
// codes are the standard MIPS encodings; the next-PC select encoding and the FSM state
// encoding are this implementation's choices.
package tinymips_pkg;

  localparam int XLEN    = 32;   // machine word width
  localparam int NREGS   = 32;   // general-purpose registers, R0 reads as zero
  localparam int REG_AW  = 5;    // register index width

  typedef logic [XLEN-1:0]   word_t;
  typedef logic [REG_AW-1:0] reg_idx_t;

  // Instruction fields (R: op rs rt rd shamt funct, I: op rs rt im16, J: op addr).
  localparam logic [5:0] OP_RTYPE  = 6'h00;
  localparam logic [5:0] OP_REGIMM = 6'h01;  // bltz when rt == 0
  localparam logic [5:0] OP_J      = 6'h02;
  localparam logic [5:0] OP_BEQ    = 6'h04;
  localparam logic [5:0] OP_LW     = 6'h23;
  localparam logic [5:0] OP_SW     = 6'h2b;

  localparam logic [5:0] FN_JR     = 6'h08;
  localparam logic [5:0] FN_ADDU   = 6'h21;
  localparam logic [5:0] FN_SUBU   = 6'h23;

  localparam logic [4:0] RT_BLTZ   = 5'd0;

  // Sources of the next-PC multiplexer, in the order they are drawn:
  // PC+4, jump concatenation PC[31:28]||addr||00, the D bus (jr), PC + signEx(im16).
  typedef enum logic [1:0] {
    NPC_INC    = 2'd0,
    NPC_JUMP   = 2'd1,
    NPC_DBUS   = 2'd2,
    NPC_BRANCH = 2'd3
  } npc_sel_t;

  // Every control point of the datapath, driven by the controller each cycle.
  typedef struct packed {
    logic     ld_pc;    // load PC from the next-PC multiplexer
    npc_sel_t npc_sel;  // next-PC source
    logic     pc2A;     // PC drives the A bus
    logic     ld_ir;    // load IR from the D bus
    logic     i2D;      // IR drives the D bus
    logic     wrt;      // RAM writes D at address A
    logic     m2D;      // RAM drives the D bus with the word at address A
    logic     rt_sel;   // register write index: 1 = rt, 0 = rd
    logic     ld_reg;   // register file writes D
    logic     b2D;      // register port B (R[rt]) drives the D bus
    logic     sx_sel;   // adder operand B: 1 = sign-extended im16, 0 = R[rt]
    logic     comp;     // complement operand B and set carry-in (subtract)
    logic     s2A;      // adder sum drives the A bus
    logic     s2D;      // adder sum drives the D bus
  } ctrl_t;

  localparam ctrl_t CTRL_IDLE = '{npc_sel: NPC_INC, default: 1'b0};

  typedef enum logic [1:0] {
    S_FETCH = 2'd0,   // IR := Mem[PC]
    S_EXEC  = 2'd1,   // the instruction's own register transfer
    S_INCPC = 2'd2    // PC := PC + 4
  } state_t;

endpackage
