// up_buffer: the (N+M)-symbol register cascade that holds the LZ77
// searching buffer followed by the coding buffer.
//
// Cell 0 is the oldest symbol of the searching buffer, cells N..N+M-1 form
// the coding buffer, cell N being the first symbol still to be coded. When
// shift_en is high at a clock edge every cell takes the value of its right
// neighbour and sym_in enters cell N+M-1, so one new symbol is accepted per
// enabled cycle, as in the register-cascade buffer of the compressor. The
// whole content is visible in parallel on cells, for the parallel load of
// the shifter-buffer and for the coding symbols held by the Type I PEs.
// Reset clears every cell to zero (a choice of this design; validity of the
// cells is tracked by the controller, not here).
module up_buffer #(
  parameter int unsigned W = lz77_pkg::W_DEFAULT,
  parameter int unsigned N = lz77_pkg::N_DEFAULT,
  parameter int unsigned M = lz77_pkg::M_DEFAULT
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 shift_en,
  input  logic [W-1:0]         sym_in,
  output logic [N+M-1:0][W-1:0] cells
);

  logic [N+M-1:0][W-1:0] r;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      r <= '0;
    end else if (shift_en) begin
      for (int i = 0; i < int'(N + M) - 1; i++) r[i] <= r[i+1];
      r[N+M-1] <= sym_in;
    end
  end

  assign cells = r;

endmodule
