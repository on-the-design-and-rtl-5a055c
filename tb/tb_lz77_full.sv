// tb_lz77_full: the compressor at its default sizes (8-bit symbols, N=512,
// M=15, two-symbol codeword) compressing one 3000-symbol text-like stream
// with input and output always ready. Every codeword is compared with a
// software LZ77 search, the decoded output must equal the input, and every
// step must take exactly N+M+2+L cycles (L = symbols it codes). It reports
// the compression ratio (14-bit codewords, 9-bit literals) and the average
// symbols coded per step.
module tb_lz77_full;
  import lz77_ref_pkg::*;
  localparam int N = 512, M = 15, CW_SYMS = 2, PW = 9, LW = 4, CODE_W = 14;
  localparam int NSYM = 3000;

  logic clk = 0, rst_n = 0;
  logic in_valid = 0, in_last = 0, in_ready, out_valid, done;
  logic out_ready = 1;
  logic [7:0] in_data = '0, out_literal;
  logic out_is_match;
  logic [PW-1:0] out_ptr;
  logic [LW-1:0] out_len;
  logic [CODE_W-1:0] out_code;

  lz77_compressor dut (.*);

  always #5 clk = ~clk;

  int checks = 0, failures = 0, cyc = 0;
  bq_t data, dec;
  cw_t got[$];
  int pos = 0, nstep = 0, last_emit_cyc = 0, last_adv = 0, start_cyc = 0, k = 0;
  longint out_bits = 0;

  task automatic chk(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("cycle %0d: %s", cyc, what); end
  endtask

  always @(posedge clk) cyc <= cyc + 1;

  initial begin
    repeat (3000000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(posedge clk) begin
    if (rst_n && out_valid && out_ready) begin
      cw_t e, g;
      e = ref_step(data, pos, N, M, CW_SYMS);
      g.is_match = out_is_match; g.ptr = int'(out_ptr); g.len = int'(out_len); g.lit = out_literal;
      chk(g.is_match == e.is_match && (e.is_match ? (g.ptr == e.ptr && g.len == e.len) : g.lit == e.lit),
          $sformatf("step %0d at %0d: got m=%0d p=%0d l=%0d expected m=%0d p=%0d l=%0d",
                    nstep, pos, g.is_match, g.ptr, g.len, e.is_match, e.ptr, e.len));
      if (nstep == 0) chk(cyc - start_cyc == M + 1 + N + M, "first step latency");
      else chk(cyc - last_emit_cyc == N + M + 2 + last_adv,
               $sformatf("step took %0d cycles", cyc - last_emit_cyc));
      out_bits += e.is_match ? 1 + PW + LW : 1 + 8;
      got.push_back(g);
      last_emit_cyc = cyc;
      last_adv = e.is_match ? e.len : 1;
      pos += last_adv;
      nstep++;
    end
  end

  initial begin
    data = gen_data(NSYM);
    repeat (3) @(posedge clk);
    rst_n = 1;
    @(negedge clk);
    start_cyc = cyc;
    while (!done) begin
      in_valid = (k < NSYM);
      in_data  = (k < NSYM) ? data[k] : 8'h00;
      in_last  = (k == NSYM - 1);
      @(posedge clk);
      if (in_valid && in_ready) k++;
      @(negedge clk);
    end
    chk(pos == NSYM, "all symbols coded");
    dec = decode(got, N);
    chk(dec == data, "decoded stream equals input");
    $display("%0d symbols, %0d steps, %0d cycles, ratio %0.3f, %0.2f symbols/step",
             NSYM, nstep, cyc - start_cyc, real'(out_bits) / real'(NSYM * 8),
             real'(NSYM) / real'(nstep));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
