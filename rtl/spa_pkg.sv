// spa_pkg: types and constants shared by the sparse-matrix accelerator.
//
// Every object the accelerator reads from or writes to memory is an array of
// 64-bit words, each holding a {value, index} pair: a matrix element is
// {A.val, A.idx}, a sparse x-vector entry is {x.val, x.idx}, a row/column
// pointer keeps its offset in the index half, and a dense vector entry keeps
// its value in the value half. Values are IEEE-754 single precision. The
// memory bus moves one 128-bit beat (two words) per cycle. The pair format
// follows the description of the matrix element stream; the widths, the
// precision and the bus width are this design's own choices.
package spa_pkg;

  typedef logic [31:0] fp32_t;

  localparam int unsigned WORDS_PER_BEAT = 2;
  localparam int unsigned BEAT_W         = 64 * WORDS_PER_BEAT;

  // The four compute patterns. spMdV_csr accumulates dot products in the PE
  // sum register; the other three update the vector held in the PE RAM.
  typedef enum logic [1:0] {
    OP_SPMDV_CSR    = 2'd0,
    OP_SPMSPV_CSC   = 2'd1,
    OP_SCALE_UPDATE = 2'd2,
    OP_SPMDV_CSC    = 2'd3
  } op_e;

  // One 64-bit memory word.
  typedef struct packed {
    fp32_t       val;
    logic [31:0] idx;
  } mem_word_t;

  // Command delivered by the PE scheduler to one PE.
  typedef enum logic [1:0] {
    CMD_LOAD = 2'd0,   // write val into RAM[idx]
    CMD_ELEM = 2'd1,   // process one matrix element
    CMD_EOR  = 2'd2    // end-of-row marker (spMdV_csr)
  } pe_cmd_kind_e;

  typedef struct packed {
    pe_cmd_kind_e kind;
    mem_word_t    word;
    fp32_t        xval;   // x.val for the update patterns
  } pe_cmd_t;

  // One read-buffer entry: a memory beat plus what the DMU knows about it.
  typedef struct packed {
    logic                           eor;    // end-of-row marker follows the words
    logic                           load;   // words are vector values for the PE RAMs
    logic [WORDS_PER_BEAT-1:0]      mask;   // which words of the beat belong to the stream
    fp32_t                          xval;   // x.val applied to these elements
    mem_word_t [WORDS_PER_BEAT-1:0] words;  // word 0 in the low half of the beat
  } rb_entry_t;

  // Operation descriptor held in the control registers. Addresses and lengths
  // count 64-bit words.
  typedef struct packed {
    op_e         op;
    logic [31:0] vec_base;    // vector subset image to load into the PE RAMs
    logic [31:0] vec_len;     // number of vector entries (0: no load/store)
    logic [31:0] ptr_base;    // row (CSR) or column (CSC) pointer array
    logic [31:0] elem_base;   // {A.val, A.idx} element array
    logic [31:0] count;       // rows (spMdV_csr) or x entries (update patterns)
    logic [31:0] xlist_base;  // {x.val, x.idx} list (update patterns)
    logic [31:0] out_base;    // where results are written
  } cfg_t;

  function automatic logic is_dot(op_e op);
    return op == OP_SPMDV_CSR;
  endfunction

endpackage
