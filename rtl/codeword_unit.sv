// codeword_unit: expansion check and codeword formation.
//
// Given the longest match (best_ptr, best_len) and the first coding-buffer
// symbol, it decides what the step emits. If the match is longer than a
// codeword (best_len > CW_SYMS symbols) it emits a compressed codeword,
// flag 1 followed by the pointer and the length, and the buffers advance by
// best_len symbols. Otherwise it emits the first coding symbol uncompressed,
// flag 0 followed by the symbol, and the buffers advance by one. With the
// default sizes a codeword is 1+9+4 = 14 bits and a literal 1+8 = 9 bits,
// both inside the two bytes allowed for a codeword.
// code layout (CODE_W = 1+PW+LW bits): match {1, ptr, len};
// literal {0, zeros, sym}. Purely combinational.
module codeword_unit #(
  parameter int unsigned W       = lz77_pkg::W_DEFAULT,
  parameter int unsigned PW      = $clog2(lz77_pkg::N_DEFAULT),
  parameter int unsigned LW      = $clog2(lz77_pkg::M_DEFAULT + 1),
  parameter int unsigned CW_SYMS = lz77_pkg::CW_SYMS_DEFAULT,
  parameter int unsigned CODE_W  = 1 + PW + LW
) (
  input  logic [PW-1:0]     best_ptr,
  input  logic [LW-1:0]     best_len,
  input  logic [W-1:0]      first_sym,
  output logic              is_match,
  output logic [LW-1:0]     advance,
  output logic [CODE_W-1:0] code
);

  always_comb begin
    is_match = (best_len > LW'(CW_SYMS));
    if (is_match) begin
      advance = best_len;
      code    = {1'b1, best_ptr, best_len};
    end else begin
      advance = LW'(1);
      code    = '0;
      code[W-1:0] = first_sym;
    end
  end

endmodule
