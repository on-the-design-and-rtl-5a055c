// pe_array: the (M+1)-PE systolic array that finds the longest prefix of the
// coding buffer inside the searching buffer.
//
// M Type I PEs form a chain, PE j capturing coding symbol y[j] when load is
// high (the cycle before streaming starts); one Type II PE closes the chain. Searching-buffer symbols X0, X1, ... are broadcast on x,
// one per cycle. In the cycle that X(p) is on x the caller injects a token
// for start pointer p (inj_valid, inj_ptr); the token walks one PE per
// cycle, so in PE j it meets X(p+j), and reaches the Type II PE M cycles
// after injection carrying the length of the match starting at p. Driving
// x for N+M cycles with the N searching symbols followed by the coding
// symbols, and injecting tokens during the first N of them, therefore
// leaves the longest match in best_ptr/best_len one cycle after the last
// of those cycles. code_len masks PEs beyond the valid part of the coding
// buffer. clear resets the Type II PE before a step; it is given together
// with load.
module pe_array #(
  parameter int unsigned W  = lz77_pkg::W_DEFAULT,
  parameter int unsigned N  = lz77_pkg::N_DEFAULT,
  parameter int unsigned M  = lz77_pkg::M_DEFAULT,
  parameter int unsigned PW = $clog2(N),
  parameter int unsigned LW = $clog2(M + 1)
) (
  input  logic                clk,
  input  logic                rst_n,
  input  logic                clear,
  input  logic                load,
  input  logic [W-1:0]        x,
  input  logic [M-1:0][W-1:0] y,
  input  logic [LW-1:0]       code_len,
  input  logic                inj_valid,
  input  logic [PW-1:0]       inj_ptr,
  output logic [PW-1:0]       best_ptr,
  output logic [LW-1:0]       best_len
);

  // Token links: link k feeds PE k; link M feeds the Type II PE.
  logic [M:0]         t_valid;
  logic [M:0]         t_match;
  logic [M:0][PW-1:0] t_ptr;
  logic [M:0][LW-1:0] t_len;

  assign t_valid[0] = inj_valid;
  assign t_match[0] = 1'b1;
  assign t_ptr[0]   = inj_ptr;
  assign t_len[0]   = '0;

  for (genvar j = 0; j < int'(M); j++) begin : g_pe
    logic en;
    assign en = (LW'(j) < code_len);
    pe_type1 #(.W(W), .PW(PW), .LW(LW), .INDEX(j)) u_pe (
      .clk        (clk),
      .rst_n      (rst_n),
      .x          (x),
      .y_load     (load),
      .y_in       (y[j]),
      .en         (en),
      .tok_valid_i(t_valid[j]),
      .tok_match_i(t_match[j]),
      .tok_ptr_i  (t_ptr[j]),
      .tok_len_i  (t_len[j]),
      .tok_valid_o(t_valid[j+1]),
      .tok_match_o(t_match[j+1]),
      .tok_ptr_o  (t_ptr[j+1]),
      .tok_len_o  (t_len[j+1])
    );
  end

  pe_type2 #(.PW(PW), .LW(LW)) u_pe2 (
    .clk        (clk),
    .rst_n      (rst_n),
    .clear      (clear),
    .tok_valid_i(t_valid[M]),
    .tok_ptr_i  (t_ptr[M]),
    .tok_len_i  (t_len[M]),
    .best_ptr   (best_ptr),
    .best_len   (best_len)
  );

endmodule
