// mips_pkg: types and constants shared by the single-cycle datapath.
//
// Holds the four primary opcodes the datapath decodes (R-format, lw, sw,
// beq), the 3-bit ALU operation
// codes produced by the ALU control unit, and the bundle of control signals
// the main control unit drives. The opcode and ALU-operation values follow
// the specification's control tables; the meaning given to each ALU-operation
// code (AND, OR, add, subtract, set-on-less-than) is the standard MIPS one.
package mips_pkg;

  // Primary opcodes, instruction[31:26].
  localparam logic [5:0] OP_RTYPE = 6'b000000;
  localparam logic [5:0] OP_LW    = 6'b100011;
  localparam logic [5:0] OP_SW    = 6'b101011;
  localparam logic [5:0] OP_BEQ   = 6'b000100;

  // ALU operation codes, ALU control -> ALU.
  typedef enum logic [2:0] {
    ALU_AND = 3'b000,
    ALU_OR  = 3'b001,
    ALU_ADD = 3'b010,
    ALU_SUB = 3'b110,
    ALU_SLT = 3'b111
  } alu_op_e;

  // ALUOp from the main control to the ALU control.
  typedef enum logic [1:0] {
    ALUOP_MEM   = 2'b00,   // lw / sw: add
    ALUOP_BEQ   = 2'b01,   // beq: subtract
    ALUOP_RTYPE = 2'b10    // R-format: decode funct
  } aluop_e;

  // Control signals of the main control unit.
  typedef struct packed {
    logic   reg_dst;
    logic   alu_src;
    logic   mem_to_reg;
    logic   reg_write;
    logic   mem_read;
    logic   mem_write;
    logic   branch;
    aluop_e alu_op;
  } ctrl_t;

endpackage
