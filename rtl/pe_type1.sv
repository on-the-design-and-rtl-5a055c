// pe_type1: Type I processing element of the systolic match array.
//
// Each Type I PE holds one coding-buffer symbol in its w-bit register (loaded
// from y_in when y_load is high, at the start of a codification step) and
// compares it with the searching-buffer symbol broadcast on x this cycle. A match token travels
// through the chain of Type I PEs, one PE per clock: the token started for
// searching-buffer position p meets symbol X(p+j) in PE j exactly when that
// symbol is on the broadcast bus, so PE j checks whether the match starting
// at p extends to length j+1. The token carries a valid flag, an "still
// matching" flag (the two flip-flops), the start pointer (log2 N bits) and
// the length found so far (log2 M bits). A four-input AND of token valid,
// still matching, symbol equal and PE enabled decides whether the match
// grows; a multiplexer then passes either this PE's length INDEX+1 or the
// incoming length. en is low for PEs beyond the valid part of the coding
// buffer (end of stream), which stops a match there.
// Timing: all outputs are registered, one cycle after the inputs; the
// symbol register must be loaded the cycle before the first token arrives.
// The component list follows the published PE; broadcasting x to all PEs
// (rather than passing it from PE to PE) is this design's choice, and it
// is what makes a codification step last N+M cycles.
module pe_type1 #(
  parameter int unsigned W     = lz77_pkg::W_DEFAULT,
  parameter int unsigned PW    = $clog2(lz77_pkg::N_DEFAULT),      // pointer width
  parameter int unsigned LW    = $clog2(lz77_pkg::M_DEFAULT + 1),  // length width
  parameter int unsigned INDEX = 0                                 // position j in the chain
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic [W-1:0]  x,          // broadcast searching-buffer symbol
  input  logic          y_load,     // capture y_in into the symbol register
  input  logic [W-1:0]  y_in,       // coding-buffer symbol of this PE
  input  logic          en,         // this coding symbol is valid
  input  logic          tok_valid_i,
  input  logic          tok_match_i,
  input  logic [PW-1:0] tok_ptr_i,
  input  logic [LW-1:0] tok_len_i,
  output logic          tok_valid_o,
  output logic          tok_match_o,
  output logic [PW-1:0] tok_ptr_o,
  output logic [LW-1:0] tok_len_o
);

  localparam logic [LW-1:0] MY_LEN = LW'(INDEX + 1);

  logic [W-1:0] y;
  logic         eq, grow;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)      y <= '0;
    else if (y_load) y <= y_in;
  end

  always_comb begin
    eq   = (x == y);
    grow = tok_valid_i & tok_match_i & eq & en;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      tok_valid_o <= 1'b0;
      tok_match_o <= 1'b0;
      tok_ptr_o   <= '0;
      tok_len_o   <= '0;
    end else begin
      tok_valid_o <= tok_valid_i;
      tok_match_o <= grow;
      tok_ptr_o   <= tok_ptr_i;
      tok_len_o   <= grow ? MY_LEN : tok_len_i;
    end
  end

endmodule
