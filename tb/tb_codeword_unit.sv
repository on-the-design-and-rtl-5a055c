// tb_codeword_unit: exhaustive check of the expansion test over every match
// length, with random pointers and symbols: codeword and advance for
// lengths above the codeword size, literal and advance 1 otherwise.
module tb_codeword_unit;
  localparam int W = 8, PW = 9, LW = 4, CW_SYMS = 2, CODE_W = 14;
  logic [PW-1:0] best_ptr;
  logic [LW-1:0] best_len;
  logic [W-1:0] first_sym;
  logic is_match;
  logic [LW-1:0] advance;
  logic [CODE_W-1:0] code, ecode;
  int checks = 0, failures = 0;

  codeword_unit #(.W(W), .PW(PW), .LW(LW), .CW_SYMS(CW_SYMS), .CODE_W(CODE_W)) dut (.*);

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int rep = 0; rep < 50; rep++) begin
      for (int l = 0; l < 16; l++) begin
        best_ptr = PW'($urandom); best_len = LW'(l); first_sym = W'($urandom);
        #1;
        ecode = (l > CW_SYMS) ? {1'b1, best_ptr, best_len} : CODE_W'(first_sym);
        checks++;
        if (is_match !== (l > CW_SYMS) || advance !== ((l > CW_SYMS) ? LW'(l) : LW'(1)) ||
            code !== ecode) begin
          failures++;
          $display("len %0d: match %b adv %0d code %h expected code %h", l, is_match, advance, code, ecode);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
