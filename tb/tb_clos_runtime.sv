// tb_clos_runtime: unsynchronised run-time permutation changes on the
// network at its default size C(5,5,5); see clos_runtime_bench for what is
// driven and checked.
module tb_clos_runtime;
  bit done;
  int checks, failures;

  clos_runtime_bench #(.N(5), .M(5), .R(5)) bench (.done, .checks, .failures);

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
