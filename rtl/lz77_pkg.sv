// lz77_pkg: constants and types shared by the LZ77 compressor blocks.
//
// The default sizes are the prototype configuration: 8-bit symbols, a
// 512-symbol searching buffer (N) and a 15-symbol coding buffer (M). A
// codeword carries a log2(N)-bit pointer and a log2(M+1)-bit length, and is
// only worth emitting when the match is longer than the codeword itself,
// which with a two-byte codeword means more than two symbols.
package lz77_pkg;

  localparam int unsigned W_DEFAULT         = 8;    // symbol width w
  localparam int unsigned N_DEFAULT         = 512;  // searching buffer size N
  localparam int unsigned M_DEFAULT         = 15;   // coding buffer size M
  localparam int unsigned CW_SYMS_DEFAULT   = 2;    // codeword size in symbols

  // States of the compression controller.
  typedef enum logic [2:0] {
    ST_FILL  = 3'd0,   // initial fill of the coding buffer
    ST_LOAD  = 3'd1,   // copy up-buffer into shifter-buffer
    ST_MATCH = 3'd2,   // stream searching buffer through the PE array (step 1)
    ST_EMIT  = 3'd3,   // hand codeword or literal to the output
    ST_SHIFT = 3'd4,   // shift L new symbols into the buffers (step 2)
    ST_DONE  = 3'd5    // end of stream
  } ctrl_state_e;

endpackage
