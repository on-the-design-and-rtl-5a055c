// pe_type2: Type II processing element at the end of the systolic array.
//
// It receives one finished match token per cycle from the last Type I PE
// and keeps the pointer and length of the longest one. A greater-than
// comparator on the lengths drives the two multiplexers in front of the
// pointer and length registers; only a strictly longer match replaces the
// kept one, so among equally long matches the one that left the array first
// (the oldest position in the searching buffer) wins. clear, given before a
// new codification step, empties the registers (length 0).
// Timing: best_ptr/best_len are registered, valid the cycle after the last
// token has arrived.
module pe_type2 #(
  parameter int unsigned PW = $clog2(lz77_pkg::N_DEFAULT),
  parameter int unsigned LW = $clog2(lz77_pkg::M_DEFAULT + 1)
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          clear,
  input  logic          tok_valid_i,
  input  logic [PW-1:0] tok_ptr_i,
  input  logic [LW-1:0] tok_len_i,
  output logic [PW-1:0] best_ptr,
  output logic [LW-1:0] best_len
);

  logic longer;

  always_comb longer = tok_valid_i && (tok_len_i > best_len);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      best_ptr <= '0;
      best_len <= '0;
    end else if (clear) begin
      best_ptr <= '0;
      best_len <= '0;
    end else begin
      best_ptr <= longer ? tok_ptr_i : best_ptr;
      best_len <= longer ? tok_len_i : best_len;
    end
  end

endmodule
