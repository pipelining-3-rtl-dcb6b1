// y86_pkg: types and constants shared by the Y86-64 five-stage pipeline.
//
// Holds the instruction codes, function codes, register numbers, status codes
// and the contents of the five pipeline registers (F, D, E, M, W) as packed
// structs, together with the "bubble" value of each register. A bubble is a
// no-operation whose register fields are 0xF ("no register"), as the pipeline
// control described with this design requires. The Y86-64 encodings
// themselves (icode values, register numbers 0..14, 0xF as "none") are the
// standard ones of that instruction set; the struct layouts and status
// encoding are this design's own choice.
package y86_pkg;

  localparam int unsigned WORD = 64;
  typedef logic [WORD-1:0] word_t;
  typedef logic [3:0]      regid_t;

  // Instruction codes (high nibble of the first instruction byte).
  typedef enum logic [3:0] {
    I_HALT   = 4'h0,
    I_NOP    = 4'h1,
    I_RRMOVQ = 4'h2,
    I_IRMOVQ = 4'h3,
    I_RMMOVQ = 4'h4,
    I_MRMOVQ = 4'h5,
    I_OPQ    = 4'h6,
    I_JXX    = 4'h7,
    I_CALL   = 4'h8,
    I_RET    = 4'h9
  } icode_t;

  // ALU functions (ifun of OPq).
  localparam logic [3:0] A_ADD = 4'h0;
  localparam logic [3:0] A_SUB = 4'h1;
  localparam logic [3:0] A_AND = 4'h2;
  localparam logic [3:0] A_XOR = 4'h3;

  // Jump conditions (ifun of jXX).
  localparam logic [3:0] C_YES = 4'h0;
  localparam logic [3:0] C_LE  = 4'h1;
  localparam logic [3:0] C_L   = 4'h2;
  localparam logic [3:0] C_E   = 4'h3;
  localparam logic [3:0] C_NE  = 4'h4;
  localparam logic [3:0] C_GE  = 4'h5;
  localparam logic [3:0] C_G   = 4'h6;

  localparam regid_t R_RSP  = 4'h4;
  localparam regid_t R_NONE = 4'hF;

  // Status of an instruction as it travels down the pipe.
  typedef enum logic [1:0] {
    S_AOK = 2'd0,   // normal
    S_HLT = 2'd1,   // halt reached
    S_ADR = 2'd2,   // bad instruction or data address
    S_INS = 2'd3    // invalid instruction
  } stat_t;

  // Condition codes.
  typedef struct packed {
    logic zf;
    logic sf;
    logic of;
  } cc_t;

  // Fetch register: the predicted PC (replaces the plain PC register).
  typedef struct packed {
    word_t pred_pc;
  } f_reg_t;

  // Fetch -> decode.
  typedef struct packed {
    stat_t  stat;
    icode_t icode;
    logic [3:0] ifun;
    regid_t rA;
    regid_t rB;
    word_t  valC;
    word_t  valP;
  } d_reg_t;

  // Decode -> execute.
  typedef struct packed {
    stat_t  stat;
    icode_t icode;
    logic [3:0] ifun;
    word_t  valC;
    word_t  valA;
    word_t  valB;
    regid_t dstE;
    regid_t dstM;
  } e_reg_t;

  // Execute -> memory.
  typedef struct packed {
    stat_t  stat;
    icode_t icode;
    logic   cnd;
    word_t  valE;
    word_t  valA;
    regid_t dstE;
    regid_t dstM;
  } m_reg_t;

  // Memory -> writeback.
  typedef struct packed {
    stat_t  stat;
    icode_t icode;
    word_t  valE;
    word_t  valM;
    regid_t dstE;
    regid_t dstM;
  } w_reg_t;

  localparam f_reg_t F_RESET = '{pred_pc: '0};
  localparam d_reg_t D_BUBBLE = '{stat: S_AOK, icode: I_NOP, ifun: 4'h0,
                                  rA: R_NONE, rB: R_NONE, valC: '0, valP: '0};
  localparam e_reg_t E_BUBBLE = '{stat: S_AOK, icode: I_NOP, ifun: 4'h0,
                                  valC: '0, valA: '0, valB: '0,
                                  dstE: R_NONE, dstM: R_NONE};
  localparam m_reg_t M_BUBBLE = '{stat: S_AOK, icode: I_NOP, cnd: 1'b0,
                                  valE: '0, valA: '0, dstE: R_NONE, dstM: R_NONE};
  localparam w_reg_t W_BUBBLE = '{stat: S_AOK, icode: I_NOP, valE: '0, valM: '0,
                                  dstE: R_NONE, dstM: R_NONE};

  // Per-cycle event flags, brought out of the core for performance counting.
  typedef struct packed {
    logic load_use;     // decode held one cycle for a load result
    logic ret_wait;     // fetch held while a ret is in the pipe
    logic mispredict;   // a predicted-taken jump was not taken
    logic fwd_e;        // an operand was forwarded from execute
    logic fwd_m;        // an operand was forwarded from memory
    logic fwd_w;        // an operand was forwarded from writeback
    logic retire;       // a real instruction left writeback
  } events_t;

endpackage
