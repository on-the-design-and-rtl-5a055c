// pointer_counter: step counter that gives the searching-buffer pointer of
// the substring whose match token enters the PE array.
//
// clear sets the count to 0 (at the start of a codification step); en
// advances it by one per cycle while the buffer is streamed. count runs
// from 0 to N+M-1 over a step; ptr is its low log2(N) bits, i.e. the
// searching-buffer position of the symbol now on the broadcast bus, and
// in_search is high while that symbol still belongs to the searching buffer
// (count < N). last marks the final streaming cycle (count == N+M-1).
// clear has priority over en. Outputs follow the register directly.
module pointer_counter #(
  parameter int unsigned N  = lz77_pkg::N_DEFAULT,
  parameter int unsigned M  = lz77_pkg::M_DEFAULT,
  parameter int unsigned PW = $clog2(N),
  parameter int unsigned CW = $clog2(N + M + 1)
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          clear,
  input  logic          en,
  output logic [CW-1:0] count,
  output logic [PW-1:0] ptr,
  output logic          in_search,
  output logic          last
);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)     count <= '0;
    else if (clear) count <= '0;
    else if (en)    count <= count + 1'b1;
  end

  always_comb begin
    ptr       = count[PW-1:0];
    in_search = (count < CW'(N));
    last      = (count == CW'(N + M - 1));
  end

endmodule
