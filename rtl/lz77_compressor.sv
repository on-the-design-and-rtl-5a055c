// lz77_compressor: LZ77 lossless data compressor built around a systolic
// match array.
//
// Symbols enter on in_data (in_valid/in_ready, in_last on the final symbol
// of a stream) and are shifted into the up-buffer, an (N+M)-symbol register
// cascade holding the searching buffer (cells 0..N-1, oldest first) and
// the coding buffer (cells N..N+M-1). Each codification step copies the
// up-buffer into the shifter-buffer, which then broadcasts its N+M symbols,
// one per cycle, to M Type I PEs holding the coding symbols; the pointer
// counter tags each searching position with a match token, and the Type II
// PE at the end keeps the longest match. The codeword unit emits a
// {1, pointer, length} codeword when the match is longer than CW_SYMS
// symbols, otherwise the first coding symbol as {0, symbol}; the controller
// then shifts the buffers by the coded length. The Type I PEs copy the
// coding symbols into their own registers when the shifter-buffer is
// loaded.
// Output: out_valid/out_ready with out_is_match, out_ptr, out_len,
// out_literal and the packed out_code. A codeword with pointer p and
// length L means: copy L symbols starting (N - p) symbols back from the
// current output position (copies may overlap the symbols being produced).
// done pulses for one cycle after the last codeword of a stream.
// Timing: a step takes N+M+2+L cycles with a ready input and output.
module lz77_compressor
  import lz77_pkg::*;
#(
  parameter int unsigned W       = W_DEFAULT,
  parameter int unsigned N       = N_DEFAULT,
  parameter int unsigned M       = M_DEFAULT,
  parameter int unsigned CW_SYMS = CW_SYMS_DEFAULT,
  parameter int unsigned PW      = $clog2(N),
  parameter int unsigned LW      = $clog2(M + 1),
  parameter int unsigned CODE_W  = 1 + PW + LW
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              in_valid,
  input  logic [W-1:0]      in_data,
  input  logic              in_last,
  output logic              in_ready,
  output logic              out_valid,
  input  logic              out_ready,
  output logic              out_is_match,
  output logic [PW-1:0]     out_ptr,
  output logic [LW-1:0]     out_len,
  output logic [W-1:0]      out_literal,
  output logic [CODE_W-1:0] out_code,
  output logic              done
);

  localparam int unsigned CW = $clog2(N + M + 1);

  logic                   take_in, up_shift, sh_load, sh_shift;
  logic                   cnt_clear, cnt_en, cnt_last, in_search, best_clear, inj_valid;
  logic [W-1:0]           up_sym, x;
  logic [N+M-1:0][W-1:0]  cells;
  logic [M-1:0][W-1:0]    y;
  logic [CW-1:0]          count;
  logic [PW-1:0]          ptr;
  logic [LW-1:0]          code_len, advance, best_len;
  logic [PW-1:0]          best_ptr;

  assign up_sym = take_in ? in_data : '0;
  assign y      = cells[N+M-1:N];

  up_buffer #(.W(W), .N(N), .M(M)) u_up (
    .clk(clk), .rst_n(rst_n), .shift_en(up_shift), .sym_in(up_sym), .cells(cells)
  );

  shifter_buffer #(.W(W), .L(N + M)) u_shifter (
    .clk(clk), .rst_n(rst_n), .load(sh_load), .shift_en(sh_shift),
    .par_in(cells), .x_out(x)
  );

  pointer_counter #(.N(N), .M(M), .PW(PW), .CW(CW)) u_cnt (
    .clk(clk), .rst_n(rst_n), .clear(cnt_clear), .en(cnt_en),
    .count(count), .ptr(ptr), .in_search(in_search), .last(cnt_last)
  );

  pe_array #(.W(W), .N(N), .M(M), .PW(PW), .LW(LW)) u_array (
    .clk(clk), .rst_n(rst_n), .clear(best_clear), .load(sh_load), .x(x), .y(y),
    .code_len(code_len), .inj_valid(inj_valid), .inj_ptr(ptr),
    .best_ptr(best_ptr), .best_len(best_len)
  );

  codeword_unit #(.W(W), .PW(PW), .LW(LW), .CW_SYMS(CW_SYMS), .CODE_W(CODE_W)) u_cw (
    .best_ptr(best_ptr), .best_len(best_len), .first_sym(cells[N]),
    .is_match(out_is_match), .advance(advance), .code(out_code)
  );

  lz_control #(.N(N), .M(M), .LW(LW), .CW(CW)) u_ctrl (
    .clk(clk), .rst_n(rst_n),
    .in_valid(in_valid), .in_last(in_last), .in_ready(in_ready), .take_in(take_in),
    .out_ready(out_ready), .out_valid(out_valid), .done(done),
    .advance(advance), .count(count), .cnt_last(cnt_last),
    .up_shift(up_shift), .sh_load(sh_load), .sh_shift(sh_shift),
    .cnt_clear(cnt_clear), .cnt_en(cnt_en), .best_clear(best_clear),
    .inj_valid(inj_valid), .code_len(code_len)
  );

  assign out_ptr     = best_ptr;
  assign out_len     = best_len;
  assign out_literal = cells[N];

  // The controller only injects tokens for searching-buffer positions.
  a_inj_in_search: assert property (@(posedge clk) disable iff (!rst_n)
      inj_valid |-> in_search)
    else $error("token injected outside the searching buffer");

endmodule
