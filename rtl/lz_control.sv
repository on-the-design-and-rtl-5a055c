// lz_control: finite state machine that sequences the two LZ77 steps.
//
// FILL   takes the first M input symbols into the coding buffer (M shifts of
//        the up-buffer; after the end of the stream zeros are shifted in and
//        not counted).
// LOAD   copies the up-buffer into the shifter-buffer, clears the pointer
//        counter and the Type II PE (1 cycle).
// MATCH  step 1: streams N+M symbols to the PE array (N+M cycles),
//        injecting a match token for every searching-buffer position that
//        already holds data.
// EMIT   presents the codeword or literal (out_valid) until out_ready.
// SHIFT  step 2: shifts the buffers by the number of symbols just coded,
//        one symbol per cycle, taking a new input symbol each time while the
//        stream lasts (in_ready/in_valid handshake, in_last ends the stream).
// DONE   one-cycle done pulse once the coding buffer is empty; the
//        controller then starts over with an empty searching buffer.
// It also keeps code_len (valid symbols in the coding buffer) and the fill
// level of the searching buffer. A step thus takes 1 + (N+M) + 1 + L cycles
// with an always-ready output and input, L being the symbols it codes.
// The states follow the two-step description of the algorithm; the
// handshakes, the end-of-stream handling and the fill tracking are this
// design's own.
module lz_control
  import lz77_pkg::*;
#(
  parameter int unsigned N  = N_DEFAULT,
  parameter int unsigned M  = M_DEFAULT,
  parameter int unsigned LW = $clog2(M + 1),
  parameter int unsigned CW = $clog2(N + M + 1)
) (
  input  logic          clk,
  input  logic          rst_n,
  // input stream
  input  logic          in_valid,
  input  logic          in_last,
  output logic          in_ready,
  output logic          take_in,     // symbol on in_data enters the up-buffer
  // output handshake
  input  logic          out_ready,
  output logic          out_valid,
  output logic          done,
  // datapath control
  input  logic [LW-1:0] advance,     // symbols coded by this step
  input  logic [CW-1:0] count,       // pointer counter value
  input  logic          cnt_last,
  output logic          up_shift,
  output logic          sh_load,
  output logic          sh_shift,
  output logic          cnt_clear,
  output logic          cnt_en,
  output logic          best_clear,
  output logic          inj_valid,
  output logic [LW-1:0] code_len
);

  localparam int unsigned SW = $clog2(N + 1);

  ctrl_state_e    state_q, state_d;
  logic           ended_q;
  logic [LW-1:0]  fill_cnt_q, shift_rem_q;
  logic [LW-1:0]  code_len_q, code_len_nx;
  logic [SW-1:0]  sfill_q;
  logic           do_shift, real_sym;

  // A shift may happen in FILL/SHIFT when input is available or the stream
  // has already ended (then a zero pad is shifted in).
  always_comb begin
    in_ready  = ((state_q == ST_FILL) || (state_q == ST_SHIFT)) && !ended_q;
    take_in   = in_ready && in_valid;
    real_sym  = take_in;
    do_shift  = ((state_q == ST_FILL) || (state_q == ST_SHIFT)) && (ended_q || in_valid);
    up_shift  = do_shift;
    sh_load   = (state_q == ST_LOAD);
    cnt_clear = (state_q == ST_LOAD);
    best_clear= (state_q == ST_LOAD);
    sh_shift  = (state_q == ST_MATCH);
    cnt_en    = (state_q == ST_MATCH);
    inj_valid = (state_q == ST_MATCH) && (count < CW'(N)) &&
                ({1'b0, count} >= (CW+1)'(N) - (CW+1)'(sfill_q));
    out_valid = (state_q == ST_EMIT);
    done      = (state_q == ST_DONE);
    code_len  = code_len_q;

    code_len_nx = code_len_q;
    if (state_q == ST_FILL && do_shift && real_sym)
      code_len_nx = code_len_q + 1'b1;
    else if (state_q == ST_SHIFT && do_shift)
      code_len_nx = code_len_q - 1'b1 + LW'(real_sym);

    state_d = state_q;
    unique case (state_q)
      ST_FILL:  if (do_shift && fill_cnt_q == LW'(M - 1)) state_d = ST_LOAD;
      ST_LOAD:  state_d = ST_MATCH;
      ST_MATCH: if (cnt_last) state_d = ST_EMIT;
      ST_EMIT:  if (out_ready) state_d = ST_SHIFT;
      ST_SHIFT: if (do_shift && shift_rem_q == LW'(1))
                  state_d = (code_len_nx == '0) ? ST_DONE : ST_LOAD;
      ST_DONE:  state_d = ST_FILL;
      default:  state_d = ST_FILL;
    endcase
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state_q     <= ST_FILL;
      ended_q     <= 1'b0;
      fill_cnt_q  <= '0;
      shift_rem_q <= '0;
      code_len_q  <= '0;
      sfill_q     <= '0;
    end else begin
      state_q    <= state_d;
      code_len_q <= code_len_nx;
      if (take_in && in_last) ended_q <= 1'b1;
      if (state_q == ST_FILL && do_shift) fill_cnt_q <= fill_cnt_q + 1'b1;
      if (state_q == ST_EMIT && out_ready) shift_rem_q <= advance;
      if (state_q == ST_SHIFT && do_shift) begin
        shift_rem_q <= shift_rem_q - 1'b1;
        if (sfill_q != SW'(N)) sfill_q <= sfill_q + 1'b1;
      end
      if (state_q == ST_DONE) begin
        ended_q    <= 1'b0;
        fill_cnt_q <= '0;
        sfill_q    <= '0;
        code_len_q <= '0;
      end
    end
  end

  // Handshake and datapath rules.
  a_out_hold: assert property (@(posedge clk) disable iff (!rst_n)
      out_valid && !out_ready |=> out_valid)
    else $error("out_valid dropped before out_ready");
  a_adv_ok: assert property (@(posedge clk) disable iff (!rst_n)
      out_valid |-> (advance >= LW'(1)) && (advance <= code_len_q))
    else $error("step advances beyond the coding buffer");

endmodule
