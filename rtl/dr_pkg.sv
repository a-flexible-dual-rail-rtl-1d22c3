// dr_pkg: shared types and constants of the dual-rail ALU.
//
// Every data bit travels on two wires, a true rail (t) and a false rail (f):
// (t,f) = (0,0) is the empty spacer, (0,1) a valid 0, (1,0) a valid 1, and
// (1,1) never occurs. A word is carried as two vectors, one per rail. The
// 4-phase protocol alternates a fully valid word with a fully empty one.
//
// The FnCode values follow the operation table of the design; 4'b0000 in the
// second ALU's code means "bypass". Codes 1001-1111 are unused (reserved).
// The helper functions are for testbenches and assertions only.
package dr_pkg;

  localparam int unsigned WORD  = 32;  // datapath width of the ALU
  localparam int unsigned MULW  = 16;  // operand width of the array multiplier
  localparam int unsigned FNW   = 4;   // width of FnCode1 / FnCode2
  localparam int unsigned NFUNC = 8;   // function blocks per ALU

  typedef enum logic [FNW-1:0] {
    FN_BYPASS = 4'b0000,
    FN_ADDSUB = 4'b0001,
    FN_MUL    = 4'b0010,
    FN_AND    = 4'b0011,
    FN_OR     = 4'b0100,
    FN_NOT    = 4'b0101,
    FN_XOR    = 4'b0110,
    FN_SHL    = 4'b0111,
    FN_SHR    = 4'b1000
  } fncode_e;

  // Function of a two-input DIMS gate.
  typedef enum logic [1:0] {
    DIMS_AND = 2'd0,
    DIMS_OR  = 2'd1,
    DIMS_XOR = 2'd2
  } dims_op_e;

  // Dual-rail 32-bit word and 4-bit code.
  typedef struct packed {
    logic [WORD-1:0] t;
    logic [WORD-1:0] f;
  } dr_word_t;

  typedef struct packed {
    logic [FNW-1:0] t;
    logic [FNW-1:0] f;
  } dr_code_t;

  // Per-ALU mode bits (this design's own addition, see the ALU stage):
  // bit 0 = subtract for Add/Sub, arithmetic for shifts; bit 1 = rotate.
  typedef struct packed {
    logic [1:0] t;
    logic [1:0] f;
  } dr_mode_t;

  function automatic dr_word_t enc_word(logic [WORD-1:0] v);
    enc_word.t = v;
    enc_word.f = ~v;
  endfunction

  function automatic dr_code_t enc_code(logic [FNW-1:0] v);
    enc_code.t = v;
    enc_code.f = ~v;
  endfunction

  function automatic dr_mode_t enc_mode(logic [1:0] v);
    enc_mode.t = v;
    enc_mode.f = ~v;
  endfunction

  function automatic logic word_valid(dr_word_t w);
    return &(w.t ^ w.f);
  endfunction

  function automatic logic word_empty(dr_word_t w);
    return ~|(w.t | w.f);
  endfunction

endpackage
