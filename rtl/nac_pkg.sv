// Shared types and constants of the systolic sequence comparator.
//
// The array computes the edit ("evolutionary") distance between a source
// and a target sequence with unit insertion/deletion cost and substitution
// cost 0 (match) or 2 (mismatch). Inside the array every distance is kept
// modulo 4 (dist_t); the full value is rebuilt by an up/down counter at the
// output end. Characters are 4 bits for DNA (one-hot bases plus wildcards)
// or 7 bits for ASCII; the all-zero code is the null filler character.
//
// Input word layout (one source and one target character per 32-bit word)
// and the control bit assignment are choices of this implementation:
//   data[7:0]   source character (low CHAR_W bits used)
//   data[15:8]  target character (low CHAR_W bits used)
//   ctrl[0]     END: last word of a comparison
// Output word: data = final distance, ctrl = RES_CTRL.
package nac_pkg;

  // Character set of the array: DNA (4-bit) or ASCII (7-bit).
  typedef enum logic [0:0] {
    MODE_DNA   = 1'b0,
    MODE_ASCII = 1'b1
  } char_mode_e;

  // Distance modulo 4, the only distance information stored in a PE.
  typedef logic [1:0] dist_t;

  // DNA nucleotide codes, including the wildcards R, Y and N.
  localparam logic [3:0] DNA_NULL = 4'b0000;
  localparam logic [3:0] DNA_A    = 4'b0001;
  localparam logic [3:0] DNA_C    = 4'b0010;
  localparam logic [3:0] DNA_G    = 4'b0100;
  localparam logic [3:0] DNA_T    = 4'b1000;
  localparam logic [3:0] DNA_R    = 4'b0101;  // A or G
  localparam logic [3:0] DNA_Y    = 4'b1010;  // C or T
  localparam logic [3:0] DNA_N    = 4'b1111;  // any

  // FIFO word: 32 data bits and 4 control bits.
  localparam int WORD_W = 32;
  localparam int CTRL_W = 4;

  typedef struct packed {
    logic [CTRL_W-1:0] ctrl;
    logic [WORD_W-1:0] data;
  } fifo_word_t;

  localparam int CTRL_END = 0;                       // END flag position
  localparam int SRC_LSB  = 0;                       // source char field
  localparam int TGT_LSB  = 8;                       // target char field
  localparam logic [CTRL_W-1:0] RES_CTRL = 4'b0001;  // result word marker

  // Width of the full-size counters (sequence lengths, final distance).
  localparam int CNT_W = 16;

  // Character width for a mode.
  function automatic int char_width(char_mode_e mode);
    return (mode == MODE_DNA) ? 4 : 7;
  endfunction

endpackage
