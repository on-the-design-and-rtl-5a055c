// tb_pe_array: self-checking test of the systolic match array.
// For many random searching/coding buffer contents (binary alphabet, so long
// matches are common) it streams the N+M symbols, injects tokens for the
// filled searching positions, and checks the longest match against a
// software search, exactly N+M cycles after the first symbol (plus the
// register of the Type II PE).
module tb_pe_array;
  localparam int W = 8, N = 16, M = 4, PW = 4, LW = 3;
  logic clk = 0, rst_n = 0, clear = 0, load = 0, inj_valid = 0;
  logic [W-1:0] x = '0;
  logic [M-1:0][W-1:0] y = '0;
  logic [LW-1:0] code_len = '0, best_len;
  logic [PW-1:0] inj_ptr = '0, best_ptr;
  logic [W-1:0] s [N+M];
  int checks = 0, failures = 0, full_len = 0, zero_len = 0, overlap = 0;

  pe_array #(.W(W), .N(N), .M(M), .PW(PW), .LW(LW)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int s0, cl, ep, el, l;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int rep = 0; rep < 400; rep++) begin
      s0 = (rep % 3 == 0) ? int'($urandom % N) : 0;
      cl = 1 + int'($urandom % M);
      for (int i = 0; i < N + M; i++) s[i] = W'($urandom % 2 + 8'h41);
      // model: longest match, earliest start among equals
      ep = 0; el = 0;
      for (int p = s0; p < N; p++) begin
        l = 0;
        while (l < cl && s[p+l] == s[N+l]) l++;
        if (l > el) begin el = l; ep = p; end
      end
      if (el == cl) full_len++;
      if (el == 0) zero_len++;
      if (ep + el > N) overlap++;
      @(negedge clk);
      for (int j = 0; j < M; j++) y[j] = s[N+j];
      code_len = LW'(cl);
      clear = 1; load = 1;
      @(negedge clk);
      clear = 0; load = 0;
      y = '1;   // the PEs must use the symbols captured at load
      for (int t = 0; t < N + M; t++) begin
        x = s[t];
        inj_valid = (t < N) && (t >= s0);
        inj_ptr = PW'(t);
        @(negedge clk);
      end
      inj_valid = 0;
      checks++;
      if (best_len !== LW'(el) || (el > 0 && best_ptr !== PW'(ep))) begin
        failures++;
        $display("rep %0d: got ptr %0d len %0d expected ptr %0d len %0d", rep, best_ptr, best_len, ep, el);
      end
    end
    checks++;
    if (full_len == 0 || zero_len == 0 || overlap == 0) begin
      failures++;
      $display("coverage: full %0d zero %0d overlap %0d", full_len, zero_len, overlap);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
