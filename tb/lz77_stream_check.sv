// lz77_stream_check: testbench helper that compresses one generated text
// stream with a compressor of the given sizes, checks every codeword against
// the software LZ77 reference and the decoded result against the input, and
// reports the output size in bits (14-bit-style codewords of 1+log2N+log2(M+1)
// bits, literals of 9 bits), the number of steps and the cycles taken.
// Input and output are always ready.
module lz77_stream_check #(
  parameter int N = 512,
  parameter int M = 15,
  parameter int NSYM = 2000,
  parameter int unsigned SEED = 1
) (
  input  logic   clk,
  input  logic   rst_n,
  output logic   finished,
  output int     checks,
  output int     failures,
  output longint out_bits,
  output int     steps,
  output int     cycles
);
  import lz77_ref_pkg::*;
  localparam int PW = $clog2(N), LW = $clog2(M + 1), CODE_W = 1 + PW + LW;

  logic in_valid = 0, in_last = 0, in_ready, out_valid, done;
  logic out_ready = 1;
  logic [7:0] in_data = '0, out_literal;
  logic out_is_match;
  logic [PW-1:0] out_ptr;
  logic [LW-1:0] out_len;
  logic [CODE_W-1:0] out_code;

  lz77_compressor #(.N(N), .M(M)) dut (.*);

  bq_t data, dec;
  cw_t got[$];
  int pos = 0, cyc = 0, start_cyc = 0, k = 0;

  initial begin
    finished = 0; checks = 0; failures = 0; out_bits = 0; steps = 0; cycles = 0;
  end

  always @(posedge clk) cyc <= cyc + 1;

  always @(posedge clk) begin
    if (rst_n && out_valid && out_ready) begin
      cw_t e;
      e = ref_step(data, pos, N, M, 2);
      checks++;
      if (out_is_match != e.is_match ||
          (e.is_match ? (int'(out_ptr) != e.ptr || int'(out_len) != e.len) : out_literal != e.lit)) begin
        failures++;
        $display("N=%0d M=%0d step %0d: mismatch", N, M, steps);
      end
      got.push_back('{is_match: out_is_match, ptr: int'(out_ptr), len: int'(out_len), lit: out_literal});
      out_bits += e.is_match ? CODE_W : 9;
      pos += e.is_match ? e.len : 1;
      steps++;
    end
  end

  initial begin
    data = gen_text(NSYM, 120, SEED);
    @(posedge rst_n);
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
    cycles = cyc - start_cyc;
    dec = decode(got, N);
    checks++;
    if (dec != data || pos != NSYM) begin
      failures++;
      $display("N=%0d M=%0d: decoded stream differs from input", N, M);
    end
    finished = 1;
  end
endmodule
