// tb_lz_control: self-checking test of the compression controller alone.
// The datapath is replaced by a counter model and a random choice of how
// many symbols each step codes. Input and output stall at random. Checked
// cycle by cycle against a model: the number of fill shifts, the N+M
// cycle MATCH phase, the tokens injected (only filled searching positions),
// the shifts per step, code_len, the consumed symbol count and done.
module tb_lz_control;
  import lz77_pkg::*;
  localparam int N = 8, M = 3, LW = 2, CW = 4;
  logic clk = 0, rst_n = 0;
  logic in_valid = 0, in_last = 0, in_ready, take_in, out_ready = 0, out_valid, done;
  logic [LW-1:0] advance = '0, code_len;
  logic [CW-1:0] count = '0;
  logic cnt_last;
  logic up_shift, sh_load, sh_shift, cnt_clear, cnt_en, best_clear, inj_valid;
  ctrl_state_e state;
  assign state = dut.state_q;
  int checks = 0, failures = 0;
  int m_clen, m_sfill, m_rem, fills, match_cyc, injects, consumed, total, steps, dones;
  int in_stalls, out_stalls;
  bit m_ended;

  lz_control #(.N(N), .M(M), .LW(LW), .CW(CW)) dut (.*);

  assign cnt_last = (count == CW'(N + M - 1));
  always #5 clk = ~clk;

  always_ff @(posedge clk) begin
    if (cnt_clear) count <= '0;
    else if (cnt_en) count <= count + 1'b1;
  end

  task automatic chk(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("%0t: %s", $time, what); end
  endtask

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int stream = 0; stream < 6; stream++) begin
      total = (stream == 0) ? 2 : 5 + int'($urandom % 40);
      m_clen = 0; m_sfill = 0; m_ended = 0; fills = 0; consumed = 0; steps = 0;
      // FILL
      while (state == ST_FILL) begin
        @(negedge clk);
        in_valid = ($urandom % 3) != 0;
        in_last = (consumed == total - 1);
        if (!in_valid) in_stalls++;
        #1;
        chk(in_ready == !m_ended, "in_ready during fill");
        chk(up_shift == (m_ended || in_valid), "fill shift");
        if (up_shift) fills++;
        if (take_in) begin consumed++; m_clen++; if (in_last) m_ended = 1; end
        @(posedge clk); #1;
      end
      chk(fills == M, $sformatf("fill shifts %0d", fills));
      in_valid = 0;
      forever begin
        // LOAD
        chk(state == ST_LOAD && sh_load && best_clear && cnt_clear, "load");
        chk(code_len == LW'(m_clen), $sformatf("code_len %0d model %0d", code_len, m_clen));
        @(posedge clk); #1;
        match_cyc = 0; injects = 0;
        while (state == ST_MATCH) begin
          chk(sh_shift && cnt_en, "match enables");
          if (inj_valid) begin
            injects++;
            chk(int'(count) >= N - m_sfill && int'(count) < N, "inject position");
          end
          match_cyc++;
          @(posedge clk); #1;
        end
        chk(match_cyc == N + M, $sformatf("match cycles %0d", match_cyc));
        chk(injects == ((m_sfill < N) ? m_sfill : N), $sformatf("injects %0d sfill %0d", injects, m_sfill));
        // EMIT
        chk(state == ST_EMIT && out_valid, "emit");
        advance = LW'(1 + int'($urandom % m_clen));
        while (1) begin
          @(negedge clk);
          out_ready = ($urandom % 3) != 0;
          if (!out_ready) out_stalls++;
          @(posedge clk); #1;
          if (out_ready) break;
          chk(out_valid, "out_valid held");
        end
        out_ready = 0;
        m_rem = int'(advance);
        steps++;
        // SHIFT
        while (m_rem > 0) begin
          chk(state == ST_SHIFT, "shift state");
          @(negedge clk);
          in_valid = ($urandom % 3) != 0;
          in_last = (consumed == total - 1);
          #1;
          chk(in_ready == !m_ended, "in_ready during shift");
          if (up_shift) begin
            m_rem--; m_clen--;
            m_sfill = (m_sfill < N) ? m_sfill + 1 : N;
            if (take_in) begin consumed++; m_clen++; if (in_last) m_ended = 1; end
          end
          @(posedge clk); #1;
        end
        in_valid = 0;
        if (m_clen == 0) break;
      end
      chk(state == ST_DONE && done, "done");
      dones++;
      chk(consumed == total, $sformatf("consumed %0d of %0d", consumed, total));
      @(posedge clk); #1;
    end
    chk(in_stalls > 0 && out_stalls > 0 && dones == 6, "coverage");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
