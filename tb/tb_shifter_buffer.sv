// tb_shifter_buffer: self-checking test of the load/shift register chain.
// Loads random vectors in parallel, then checks that the symbols appear on
// x_out in order, one per enabled cycle, that shifting holds when disabled,
// that zeros follow the last symbol, and that load wins over shift.
module tb_shifter_buffer;
  localparam int W = 8, L = 10;
  logic clk = 0, rst_n = 0, load = 0, shift_en = 0;
  logic [L-1:0][W-1:0] par_in = '0;
  logic [W-1:0] x_out;
  logic [L-1:0][W-1:0] v;
  int checks = 0, failures = 0;

  shifter_buffer #(.W(W), .L(L)) dut (.*);

  always #5 clk = ~clk;

  task automatic check(input logic [W-1:0] exp, input string what);
    checks++;
    if (x_out !== exp) begin
      failures++;
      $display("%s: got %h expected %h", what, x_out, exp);
    end
  endtask

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
    for (int rep = 0; rep < 20; rep++) begin
      for (int i = 0; i < L; i++) v[i] = W'($urandom);
      @(negedge clk);
      par_in = v; load = 1; shift_en = (rep % 2 == 1);   // load has priority
      @(negedge clk);
      load = 0;
      par_in = '0;
      for (int i = 0; i < L + 2; i++) begin
        check(i < L ? v[i] : '0, "stream");
        shift_en = ($urandom % 4) != 0;
        if (!shift_en) begin
          @(negedge clk);
          check(i < L ? v[i] : '0, "hold");
          shift_en = 1;
        end
        @(negedge clk);
        shift_en = 0;
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
