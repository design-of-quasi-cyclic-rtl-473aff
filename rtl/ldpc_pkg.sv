// ldpc_pkg: sizes, word formats and lookup functions shared by the 5G NR
// QC-LDPC layered offset-min-sum decoder.
//
// Sizes follow the architecture: a maximum lifting size of 384 split into
// 16 clock-gated groups of 24 node computation units (NCUs), each group made
// of 3 macro computation cells (MCCs) of 8 NCUs; at most 68 prototype columns
// and 316 non-zero blocks; a 512-word sequence memory; 7-bit Q and T messages
// and 5-bit R messages. The sequence word (47 bits) and command word (38
// bits) have the field widths of the architecture; the order of the fields
// inside each word is this design's choice.
//
// The 51 lifting sizes of 5G NR (Z = a * 2^j, a in {2,3,5,7,9,11,13,15},
// Z <= 384) are addressed by a 6-bit mode index in increasing order.
package ldpc_pkg;

  localparam int Z_MAX         = 384;  // maximum lifting size
  localparam int N_GROUPS      = 16;   // clock-gated NCU groups
  localparam int GROUP_SIZE    = 24;   // NCUs per group
  localparam int MCC_PER_GROUP = 3;
  localparam int NCU_PER_MCC   = 8;
  localparam int NP_MAX        = 68;   // prototype columns (BG1)
  localparam int NB_MAX        = 316;  // non-zero blocks (BG1, rate 1/3)
  localparam int SEQ_DEPTH     = 512;  // sequence memory words
  localparam int BQ            = 7;    // Q-message bits
  localparam int BT            = 7;    // T-message bits
  localparam int BR            = 5;    // R-message bits
  localparam int BM            = BQ - 1;  // magnitude bits of a T message
  localparam int QMAX          = (1 << (BQ - 1)) - 1;  // 63
  localparam int RMAX          = (1 << (BR - 1)) - 1;  // 15
  localparam int COL_W         = 7;    // Q/T memory address
  localparam int RADDR_W       = 9;    // R memory address
  localparam int SHIFT_W       = 9;    // shift amount / lifting size
  localparam int SEQ_AW        = 9;    // sequence memory address
  localparam int N_LIFT        = 51;   // number of 5G lifting sizes
  localparam int PAD_W         = 48;   // chip pad bus width (assumed)
  localparam int PAD_LLRS      = 6;    // LLRs per pad beat (6 x 7 bits)

  typedef logic signed [BQ-1:0] llr_t;
  typedef logic signed [BR-1:0] rmsg_t;
  typedef logic        [BM-1:0] mag_t;
  typedef logic        [COL_W-1:0] col_t;

  // Sequence word, 47 bits. One word drives one MIN operation and one SEL
  // operation in the same cycle.
  typedef struct packed {
    logic [COL_W-1:0]   q_addr;     // MIN: Q-memory column to read
    logic [COL_W-1:0]   t_addr;     // SEL: T-memory column (and Q write column)
    logic [RADDR_W-1:0] r_rd_addr;  // MIN: R message of the block being read
    logic [RADDR_W-1:0] r_wr_addr;  // SEL: R message of the block being written
    logic [SHIFT_W-1:0] shift;      // MIN: prototype shift [Hp]m,n (mod Z)
    logic               min_stall;  // no MIN operation in this word
    logic               sel_stall;  // no SEL operation in this word
    logic               row_end;    // MIN: last block of its layer
    logic               iter_end;   // last word of the per-iteration loop
    logic               seq_end;    // last word of the sequence (loop + tail)
    logic               last_q;     // SEL: last block of its layer
  } seq_word_t;

  // Command word, 38 bits.
  typedef struct packed {
    logic       standard;     // unused
    logic [5:0] mode;         // lifting size index 0..50
    logic [1:0] code_rate;    // unused
    logic [6:0] n_cols;       // columns of the prototype matrix
    logic       code_attr;    // unused
    logic [3:0] max_iters;    // iterations per codeword
    logic [1:0] early_term;   // stored, not used (no early termination)
    logic       out_mode;     // 1: hard bits, 0: LLRs
    logic       operation;    // 1: a sequence follows the command, 0: reuse
    logic [2:0] beta;         // offset of the offset-min-sum
    logic [4:0] et_win;       // stored, not used
    logic [4:0] et_noprog;    // stored, not used
  } cmd_word_t;

  // Lifting size of a mode index.
  function automatic logic [SHIFT_W-1:0] lift_size(input logic [5:0] mode);
    logic [SHIFT_W-1:0] z;
    unique case (mode)
      6'd0:  z = 2;   6'd1:  z = 3;   6'd2:  z = 4;   6'd3:  z = 5;
      6'd4:  z = 6;   6'd5:  z = 7;   6'd6:  z = 8;   6'd7:  z = 9;
      6'd8:  z = 10;  6'd9:  z = 11;  6'd10: z = 12;  6'd11: z = 13;
      6'd12: z = 14;  6'd13: z = 15;  6'd14: z = 16;  6'd15: z = 18;
      6'd16: z = 20;  6'd17: z = 22;  6'd18: z = 24;  6'd19: z = 26;
      6'd20: z = 28;  6'd21: z = 30;  6'd22: z = 32;  6'd23: z = 36;
      6'd24: z = 40;  6'd25: z = 44;  6'd26: z = 48;  6'd27: z = 52;
      6'd28: z = 56;  6'd29: z = 60;  6'd30: z = 64;  6'd31: z = 72;
      6'd32: z = 80;  6'd33: z = 88;  6'd34: z = 96;  6'd35: z = 104;
      6'd36: z = 112; 6'd37: z = 120; 6'd38: z = 128; 6'd39: z = 144;
      6'd40: z = 160; 6'd41: z = 176; 6'd42: z = 192; 6'd43: z = 208;
      6'd44: z = 224; 6'd45: z = 240; 6'd46: z = 256; 6'd47: z = 288;
      6'd48: z = 320; 6'd49: z = 352; 6'd50: z = 384;
      default: z = 384;
    endcase
    return z;
  endfunction

  // Number of NCU groups of GROUP_SIZE lanes that a lifting size needs.
  function automatic int unsigned groups_needed(input int unsigned z,
                                                input int unsigned gsize);
    return (z + gsize - 1) / gsize;
  endfunction

endpackage
