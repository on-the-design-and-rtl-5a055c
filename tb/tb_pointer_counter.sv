// tb_pointer_counter: self-checking test of the step counter: clear, count
// enable, pointer bits, searching-buffer range and last-cycle flag.
module tb_pointer_counter;
  localparam int N = 16, M = 5, PW = 4, CW = 5;
  logic clk = 0, rst_n = 0, clear = 0, en = 0;
  logic [CW-1:0] count;
  logic [PW-1:0] ptr;
  logic in_search, last;
  int model = 0, checks = 0, failures = 0, lasts = 0;

  pointer_counter #(.N(N), .M(M), .PW(PW), .CW(CW)) dut (.*);

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
    for (int t = 0; t < 600; t++) begin
      @(negedge clk);
      clear = (model == N + M - 1) || ($urandom % 50 == 0);
      en    = ($urandom % 5) != 0;
      @(posedge clk); #1;
      if (clear) model = 0; else if (en) model = model + 1;
      checks++;
      if (count !== CW'(model) || ptr !== PW'(model) || in_search !== (model < N) ||
          last !== (model == N + M - 1)) begin
        failures++;
        $display("t=%0d count %0d ptr %0d in %b last %b, model %0d", t, count, ptr, in_search, last, model);
      end
      if (last) lasts++;
    end
    checks++;
    if (lasts == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
