// tb_clos_runtime_c444: the same unsynchronised run-time permutation test
// on C(4,4,4): 16 ports, four middle switches and 4-bit probe addresses,
// the 16-way configuration the published design also mentions.
module tb_clos_runtime_c444;
  bit done;
  int checks, failures;

  clos_runtime_bench #(.N(4), .M(4), .R(4)) bench (.done, .checks, .failures);

  initial begin
    wait (done);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (250000) @(posedge bench.clk);
    $display("FAIL: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end
endmodule
