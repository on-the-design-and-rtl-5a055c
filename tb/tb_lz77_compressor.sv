// tb_lz77_compressor: end-to-end test of the compressor at reduced buffer
// sizes (N=32, M=7). Three streams are compressed back to back: one with
// input and output always ready, where the cycle count of every step is
// checked (M fill cycles, then N+M+2+L cycles per step coding L symbols),
// one with random input stalls and output back-pressure, and one shorter
// than the coding buffer. Every codeword is compared with a software LZ77
// search, and the decoded output must equal the input. The mechanisms of
// the design are counted and each must occur: literal with no match,
// literal because the match was not longer than a codeword, codeword,
// longest possible match (M), match running into the coding buffer,
// partly filled and full searching buffer, end-of-stream flush with a
// partly filled coding buffer, input stall, output stall, stream restart.
module tb_lz77_compressor;
  import lz77_ref_pkg::*;
  localparam int W = 8, N = 32, M = 7, CW_SYMS = 2, PW = 5, LW = 3, CODE_W = 9;

  logic clk = 0, rst_n = 0;
  logic in_valid = 0, in_last = 0, in_ready, out_valid, out_ready = 0, done;
  logic [W-1:0] in_data = '0, out_literal;
  logic out_is_match;
  logic [PW-1:0] out_ptr;
  logic [LW-1:0] out_len;
  logic [CODE_W-1:0] out_code;

  lz77_compressor #(.W(W), .N(N), .M(M), .CW_SYMS(CW_SYMS)) dut (.*);

  always #5 clk = ~clk;

  int checks = 0, failures = 0, cyc = 0;
  bq_t data;
  cw_t got[$];
  int pos, last_emit_cyc, last_adv, stream_start_cyc, nstep;
  bit timing_on, stalls_on;
  int n_lit0, n_lit_short, n_match, n_maxlen, n_overlap, n_warm, n_full, n_flush;
  int n_in_stall, n_out_stall, n_done;

  task automatic chk(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("cycle %0d: %s", cyc, what); end
  endtask

  always @(posedge clk) cyc <= cyc + 1;

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Output monitor: compares each accepted codeword with the reference.
  always @(posedge clk) begin
    if (rst_n && out_valid && !out_ready) n_out_stall++;
    if (rst_n && out_valid && out_ready) begin
      cw_t e, g;
      e = ref_step(data, pos, N, M, CW_SYMS);
      g.is_match = out_is_match; g.ptr = int'(out_ptr); g.len = int'(out_len); g.lit = out_literal;
      chk(g.is_match == e.is_match && (e.is_match ? (g.ptr == e.ptr && g.len == e.len) : g.lit == e.lit),
          $sformatf("step %0d at %0d: got m=%0d p=%0d l=%0d c=%h expected m=%0d p=%0d l=%0d c=%h",
                    nstep, pos, g.is_match, g.ptr, g.len, g.lit, e.is_match, e.ptr, e.len, e.lit));
      chk(out_code == (g.is_match ? {1'b1, out_ptr, out_len} : CODE_W'(out_literal)), "packed code");
      if (timing_on) begin
        if (nstep == 0) chk(cyc - stream_start_cyc == M + 1 + N + M,
                            $sformatf("first codeword after %0d cycles", cyc - stream_start_cyc));
        else chk(cyc - last_emit_cyc == N + M + 2 + last_adv,
                 $sformatf("step took %0d cycles, expected %0d", cyc - last_emit_cyc, N + M + 2 + last_adv));
      end
      if (!e.is_match && e.len == 0) n_lit0++;
      if (!e.is_match && e.len > 0) n_lit_short++;
      if (e.is_match) n_match++;
      if (e.is_match && e.len == M) n_maxlen++;
      if (e.is_match && e.ptr + e.len > N) n_overlap++;
      if (pos < N) n_warm++; else n_full++;
      if (data.size() - pos < M) n_flush++;
      got.push_back(g);
      last_emit_cyc = cyc;
      last_adv = e.is_match ? e.len : 1;
      pos += last_adv;
      nstep++;
    end
  end

  always @(negedge clk) out_ready <= stalls_on ? (($urandom % 4) != 0) : 1'b1;

  task automatic run_stream(input int n, input bit stalls);
    bq_t dec;
    int k = 0;
    data = gen_data(n);
    got.delete();
    pos = 0; nstep = 0;
    stalls_on = stalls; timing_on = !stalls;
    @(negedge clk);
    stream_start_cyc = cyc;
    while (!done) begin
      if (k < data.size()) begin
        in_valid = stalls ? (($urandom % 3) != 0) : 1'b1;
        in_data  = data[k];
        in_last  = (k == data.size() - 1);
      end else begin
        in_valid = 0; in_last = 0;
      end
      @(posedge clk);
      if (in_valid && in_ready) k++;
      if (in_ready && !in_valid) n_in_stall++;
      @(negedge clk);
    end
    in_valid = 0;
    n_done++;
    chk(k == data.size(), "all input consumed");
    chk(pos == data.size(), $sformatf("coded %0d of %0d symbols", pos, data.size()));
    dec = decode(got, N);
    chk(dec == data, "decoded stream equals input");
    $display("stream of %0d symbols -> %0d codes", n, got.size());
    @(negedge clk);
  endtask

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1;
    run_stream(600, 0);
    run_stream(500, 1);
    run_stream(5, 0);
    chk(n_lit0 > 0,      "literal without match never happened");
    chk(n_lit_short > 0, "short-match literal never happened");
    chk(n_match > 0,     "codeword never happened");
    chk(n_maxlen > 0,    "maximum-length match never happened");
    chk(n_overlap > 0,   "match into coding buffer never happened");
    chk(n_warm > 0,      "partly filled searching buffer never happened");
    chk(n_full > 0,      "full searching buffer never happened");
    chk(n_flush > 0,     "end-of-stream flush never happened");
    chk(n_in_stall > 0,  "input stall never happened");
    chk(n_out_stall > 0, "output stall never happened");
    chk(n_done == 3,     "stream restart");
    $display("lit0=%0d litshort=%0d match=%0d maxlen=%0d overlap=%0d warm=%0d full=%0d flush=%0d install=%0d outstall=%0d",
             n_lit0, n_lit_short, n_match, n_maxlen, n_overlap, n_warm, n_full, n_flush, n_in_stall, n_out_stall);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
