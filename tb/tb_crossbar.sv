// tb_crossbar: self-checking test of the crossbar output multiplexers.
// Default 5x5 size, 25-bit words. Random words and selects are applied and
// every output is compared with the input its select names.
module tb_crossbar;
  localparam int NI = 5, NO = 5, DATA_W = 25, IW = 3;

  logic              clk = 1'b0;
  logic [DATA_W-1:0] in_data  [NI];
  logic [IW-1:0]     sel      [NO];
  logic [DATA_W-1:0] out_data [NO];
  int checks = 0, failures = 0;

  crossbar dut (.*);

  always #5 clk = ~clk;

  initial begin
    for (int n = 0; n < 500; n++) begin
      for (int i = 0; i < NI; i++) in_data[i] = DATA_W'($urandom);
      for (int o = 0; o < NO; o++) sel[o] = IW'($urandom_range(0, NI - 1));
      if (n == 0) for (int o = 0; o < NO; o++) sel[o] = IW'(NO - 1 - o);  // reversal
      @(posedge clk);
      for (int o = 0; o < NO; o++) begin
        checks++;
        if (out_data[o] !== in_data[sel[o]]) begin
          failures++;
          $display("FAIL: out %0d = %h, sel %0d, expected %h", o, out_data[o], sel[o], in_data[sel[o]]);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
