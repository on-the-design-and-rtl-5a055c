// tb_lz77_sweep: the buffer-size study run on the hardware. The same
// deterministic 2000-symbol text stream is compressed by five compressors:
// (N,M) = (512,15) the default, (512,16), (512,32), (512,127) and
// (4096,16). Each is checked codeword by codeword against the software
// reference and decoded. The test prints the compression ratio (output
// bits / input bits) and the average symbols coded per step for each size,
// and checks the trend the buffer study reports: with the coding buffer
// fixed, a larger searching buffer does not compress worse.
module tb_lz77_sweep;
  localparam int NC = 5;
  localparam int NSYM = 2000;
  localparam int CN[NC] = '{512, 512, 512, 512, 4096};
  localparam int CM[NC] = '{15, 16, 32, 127, 16};

  logic clk = 0, rst_n = 0;
  logic   fin [NC];
  int     ck [NC], fl [NC], st [NC], cy [NC];
  longint ob [NC];
  int checks = 0, failures = 0;
  real ratio [NC];

  always #5 clk = ~clk;

  for (genvar i = 0; i < NC; i++) begin : g_cfg
    lz77_stream_check #(.N(CN[i]), .M(CM[i]), .NSYM(NSYM), .SEED(7)) u (
      .clk(clk), .rst_n(rst_n), .finished(fin[i]), .checks(ck[i]), .failures(fl[i]),
      .out_bits(ob[i]), .steps(st[i]), .cycles(cy[i])
    );
  end

  initial begin
    repeat (5000000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    bit all;
    repeat (3) @(posedge clk);
    rst_n = 1;
    do begin
      @(posedge clk);
      all = 1;
      for (int i = 0; i < NC; i++) all &= fin[i];
    end while (!all);
    for (int i = 0; i < NC; i++) begin
      checks += ck[i];
      failures += fl[i];
      ratio[i] = real'(ob[i]) / real'(NSYM * 8);
      $display("N=%0d M=%0d: ratio %0.3f, %0.2f symbols/step, %0d cycles",
               CN[i], CM[i], ratio[i], real'(NSYM) / real'(st[i]), cy[i]);
    end
    checks++;
    if (ratio[4] > ratio[1]) begin
      failures++;
      $display("larger searching buffer compressed worse");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
