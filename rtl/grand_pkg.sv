// Shared constants and types of the GRAND (Guessing Random Additive Noise
// Decoding) decoder.
//
// The code length is N = 128 bits. The parity-check matrix H has M = 44 rows,
// set by the lowest supported code rate 0.656 (k = 84, n - k = 44). A code of
// higher rate uses fewer rows and leaves the rest of H zero. H is stored by
// column: column i is the syndrome of a single bit error at bit i, so the
// syndrome of any vector is the XOR of the columns its set bits select.
// Bit i of a channel output, code-word or error vector always pairs with
// column i of H. Two H matrices (banks) are held; each channel output carries
// a one-bit tag that selects its bank.
// N, M and the two banks follow the published architecture; the id width and
// the struct layouts are this design's choice.
package grand_pkg;

  localparam int unsigned N      = 128;            // code length
  localparam int unsigned M      = 44;             // rows of H (n - k at rate 0.656)
  localparam int unsigned COL_W  = $clog2(N);      // column / bit index width
  localparam int unsigned ID_W   = 8;              // user label carried with a code-word
  localparam int unsigned NBANKS = 2;              // H sets for code-book re-randomisation
  localparam int unsigned HW_MAX = 3;              // largest error weight searched

  typedef logic [N-1:0]     cw_t;    // channel output, code-word or error vector
  typedef logic [M-1:0]     syn_t;   // syndrome / one column of H
  typedef logic [COL_W-1:0] idx_t;   // bit position in a code-word

  // A sparse error vector: its weight (1..3) and the positions of its ones,
  // lowest first. Positions at or above hw are unused.
  typedef struct packed {
    logic [1:0]             hw;
    idx_t [HW_MAX-1:0]      pos;
  } sparse_err_t;

  // Outcome of decoding one channel output.
  typedef enum logic [2:0] {
    DEC_HW0  = 3'd0,   // syndrome was zero: channel output is a code-word
    DEC_HW1  = 3'd1,   // one-bit error removed
    DEC_HW2  = 3'd2,   // two-bit error removed
    DEC_HW3  = 3'd3,   // three-bit error removed
    DEC_FAIL = 3'd4    // no error of weight <= 3 found: re-transmission needed
  } dec_status_e;

  // A channel output travelling between the decoder stages.
  typedef struct packed {
    logic [ID_W-1:0] id;
    logic            tag;    // H bank
    cw_t             y;      // channel output
    syn_t            syn;    // H * y
  } job_t;

  // A decoded channel output.
  typedef struct packed {
    logic [ID_W-1:0] id;
    logic            tag;
    dec_status_e     status;
    cw_t             codeword;  // y xor error (y itself on DEC_FAIL)
    cw_t             error;     // error vector removed (zero on DEC_HW0 / DEC_FAIL)
  } result_t;

  // Write of up to two columns of H per cycle, one through each port of the
  // dual-port SRAMs.
  typedef struct packed {
    logic                  bank;
    logic [1:0]            en;
    logic [1:0][COL_W-1:0] addr;
    logic [1:0][M-1:0]     data;
  } h_write_t;

endpackage
