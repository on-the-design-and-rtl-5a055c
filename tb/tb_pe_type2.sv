// tb_pe_type2: self-checking test of the Type II PE. Feeds random tokens,
// clears now and then, and checks that the kept pointer/length are those of
// the first strictly longest valid token since the last clear.
module tb_pe_type2;
  localparam int PW = 9, LW = 4;
  logic clk = 0, rst_n = 0, clear = 0, tok_valid_i = 0;
  logic [PW-1:0] tok_ptr_i = '0, best_ptr, mp = '0;
  logic [LW-1:0] tok_len_i = '0, best_len, ml = '0;
  int checks = 0, failures = 0;

  pe_type2 #(.PW(PW), .LW(LW)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int t = 0; t < 1500; t++) begin
      @(negedge clk);
      clear = ($urandom % 40) == 0;
      tok_valid_i = ($urandom % 3) != 0;
      tok_ptr_i = PW'($urandom);
      tok_len_i = LW'($urandom);
      if (clear) begin mp = '0; ml = '0; end
      else if (tok_valid_i && tok_len_i > ml) begin mp = tok_ptr_i; ml = tok_len_i; end
      @(posedge clk); #1;
      checks++;
      if (best_ptr !== mp || best_len !== ml) begin
        failures++;
        $display("t=%0d got %0d/%0d expected %0d/%0d", t, best_ptr, best_len, mp, ml);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
