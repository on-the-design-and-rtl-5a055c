// tb_up_buffer: self-checking test of the up-buffer register cascade.
// Shifts random symbols in with a random enable and compares every cell with
// a software model of the buffer after each clock.
module tb_up_buffer;
  localparam int W = 8, N = 8, M = 3;
  logic clk = 0, rst_n = 0, shift_en = 0;
  logic [W-1:0] sym_in = '0;
  logic [N+M-1:0][W-1:0] cells;
  logic [W-1:0] model [N+M];
  int checks = 0, failures = 0, cyc = 0;

  up_buffer #(.W(W), .N(N), .M(M)) dut (.*);

  always #5 clk = ~clk;
  always @(posedge clk) cyc <= cyc + 1;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    foreach (model[i]) model[i] = '0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int t = 0; t < 400; t++) begin
      @(negedge clk);
      shift_en = ($urandom % 3) != 0;
      sym_in   = W'($urandom);
      @(posedge clk);
      if (shift_en) begin
        for (int i = 0; i < N + M - 1; i++) model[i] = model[i+1];
        model[N+M-1] = sym_in;
      end
      #1;
      for (int i = 0; i < N + M; i++) begin
        checks++;
        if (cells[i] !== model[i]) begin
          failures++;
          $display("cell %0d: got %h expected %h", i, cells[i], model[i]);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
