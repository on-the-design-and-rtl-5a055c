// shifter_buffer: register chain with a load/shift multiplexer in every cell
// that feeds the PE array one symbol per cycle.
//
// When load is high each cell i copies par_in[i] (the up-buffer contents).
// When shift_en is high the chain moves one place towards cell 0 and a zero
// enters the far end. Cell 0 is broadcast as x_out, so after a load the
// symbols X0, X1, ... X(L-1) appear on x_out on consecutive enabled cycles.
// load has priority over shift_en. The chain length L is N+M so that a match
// may run from the searching buffer on into the coding buffer.
module shifter_buffer #(
  parameter int unsigned W = lz77_pkg::W_DEFAULT,
  parameter int unsigned L = lz77_pkg::N_DEFAULT + lz77_pkg::M_DEFAULT
) (
  input  logic               clk,
  input  logic               rst_n,
  input  logic               load,
  input  logic               shift_en,
  input  logic [L-1:0][W-1:0] par_in,
  output logic [W-1:0]       x_out
);

  logic [L-1:0][W-1:0] r;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      r <= '0;
    end else begin
      for (int i = 0; i < int'(L); i++) begin
        if (load)          r[i] <= par_in[i];
        else if (shift_en) r[i] <= (i == int'(L) - 1) ? '0 : r[i+1];
      end
    end
  end

  assign x_out = r[0];

endmodule
