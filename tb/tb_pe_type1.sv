// tb_pe_type1: self-checking test of a Type I PE (chain position 3).
// Loads the coding symbol register now and then, drives random tokens and
// symbols (from a small alphabet so that equal symbols are frequent) and
// checks the registered token one cycle later against the stored symbol.
module tb_pe_type1;
  localparam int W = 8, PW = 9, LW = 4, INDEX = 3;
  logic clk = 0, rst_n = 0;
  logic [W-1:0] x = '0, y_in = '0, y = '0;
  logic y_load = 0;
  logic en = 0, tok_valid_i = 0, tok_match_i = 0;
  logic [PW-1:0] tok_ptr_i = '0;
  logic [LW-1:0] tok_len_i = '0;
  logic tok_valid_o, tok_match_o;
  logic [PW-1:0] tok_ptr_o;
  logic [LW-1:0] tok_len_o;
  int checks = 0, failures = 0, grows = 0;

  pe_type1 #(.W(W), .PW(PW), .LW(LW), .INDEX(INDEX)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic ev, em, g; logic [PW-1:0] ep; logic [LW-1:0] el;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int t = 0; t < 1000; t++) begin
      @(negedge clk);
      // load a new symbol now and then; the token logic uses the stored one
      y_load = ($urandom % 5) == 0;
      y_in = W'($urandom % 3);
      @(posedge clk); #1;
      if (y_load) y = y_in;
      y_load = 0;
      y_in = W'($urandom % 3);   // must not matter any more
      @(negedge clk);
      x = W'($urandom % 3);
      en = ($urandom % 4) != 0;
      tok_valid_i = ($urandom % 4) != 0;
      tok_match_i = ($urandom % 3) != 0;
      tok_ptr_i = PW'($urandom);
      tok_len_i = LW'($urandom % 4);
      g  = tok_valid_i && tok_match_i && (x == y) && en;
      ev = tok_valid_i; em = g; ep = tok_ptr_i;
      el = g ? LW'(INDEX + 1) : tok_len_i;
      if (g) grows++;
      @(posedge clk); #1;
      checks++;
      if ({tok_valid_o, tok_match_o, tok_ptr_o, tok_len_o} !== {ev, em, ep, el}) begin
        failures++;
        $display("t=%0d got %b %b %0d %0d expected %b %b %0d %0d", t,
                 tok_valid_o, tok_match_o, tok_ptr_o, tok_len_o, ev, em, ep, el);
      end
    end
    checks++;
    if (grows == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
