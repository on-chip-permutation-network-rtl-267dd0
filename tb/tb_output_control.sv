// tb_output_control: self-checking test of the output re-timing stage.
// Random commands and crossbar words are applied; one rising edge later the
// outgoing Req must equal the command and the data must equal the word when
// the output is owned and zero otherwise. Reset must clear both.
module tb_output_control;
  localparam int DATA_W = 25;

  logic              clk = 1'b0, rst_n = 1'b1;
  logic              cmd_valid = 1'b0;
  logic [DATA_W-1:0] xbar_data = '0;
  logic              out_req;
  logic [DATA_W-1:0] out_data;
  int checks = 0, failures = 0;

  output_control dut (.*);

  always #5 clk = ~clk;

  initial begin
    logic              exp_req;
    logic [DATA_W-1:0] exp_data;
    #1 rst_n = 1'b0;
    #1;
    checks++;
    if (out_req !== 1'b0 || out_data !== '0) begin failures++; $display("FAIL: reset"); end
    @(posedge clk); #1 rst_n = 1'b1;
    for (int n = 0; n < 400; n++) begin
      cmd_valid = ($urandom_range(0, 2) != 0);
      xbar_data = DATA_W'($urandom);
      exp_req   = cmd_valid;
      exp_data  = cmd_valid ? xbar_data : '0;
      @(posedge clk); #1;
      checks++;
      if (out_req !== exp_req || out_data !== exp_data) begin
        failures++;
        $display("FAIL: req %b data %h, expected %b %h", out_req, out_data, exp_req, exp_data);
      end
    end
    rst_n = 1'b0; #1;
    checks++;
    if (out_req !== 1'b0 || out_data !== '0) begin failures++; $display("FAIL: async reset"); end
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
