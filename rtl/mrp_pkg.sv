// Shared constants and types of the minimum-redundancy prefix coder.
//
// The coder compresses one block of NSAMP samples at a time. Each sample is
// turned into a SYM_W-bit symbol (an alphabet of NSYM symbols), every symbol
// gets a minimum-redundancy (Huffman-optimal) prefix code built in linear
// time, and the block is emitted as a packed bit stream.
//
// The block size (2048 samples), the sample word (16 bits) and the alphabet
// (256 symbols) follow the source design. The code-length and codeword widths
// are this design's choice: with 2048 samples no code is longer than 15 bits
// (Fibonacci bound), so 5 length bits and 16 code bits always suffice.
package mrp_pkg;

  localparam int unsigned NSAMP_DEF  = 2048;  // samples per block
  localparam int unsigned SAMPLE_W   = 16;    // input sample word
  localparam int unsigned NSYM_DEF   = 256;   // symbol alphabet
  localparam int unsigned LEN_W      = 5;     // code-length field
  localparam int unsigned CODE_W     = 16;    // codeword field
  localparam int unsigned OUT_W      = 32;    // packed output word

  // Stage sequence of the coder (Fig. 1 order). ST_C1DE is C1d alone when
  // the separate C1e pass is used, and C1d with C1e merged otherwise.
  typedef enum logic [3:0] {
    ST_IDLE,
    ST_C0,     // DPCM and positive mapping
    ST_C1A,    // symbol frequency count
    ST_C1B,    // frequency-of-frequency table
    ST_C1C,    // bucket start positions
    ST_C1DE,   // counting-sort placement (Idx, and Fs when merged)
    ST_C1E,    // sorted frequency table Fs (separate pass only)
    ST_C2A,    // tree build: parent pointers
    ST_C2B,    // internal node depths
    ST_C2C,    // leaf code lengths
    ST_C3,     // canonical codewords
    ST_C4      // symbol to codeword mapping and bit packing
  } stage_e;

endpackage
