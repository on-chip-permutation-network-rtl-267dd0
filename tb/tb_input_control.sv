// tb_input_control: directed, self-checking test of the input control for
// all three switch kinds (one instance each, 5 outputs, 5-bit addresses).
// The testbench plays the arbiter: it drives the status bus, and after each
// falling edge answers a request with a grant or a refusal (lost). Stimulus
// is applied just after a rising edge; combinational outputs are checked
// right away and state changes after the next rising edge.
//   first stage : lost arbitration -> next output; busy outputs skipped;
//                 Ack/nAck passed up; Back -> release and next output;
//                 nothing left -> Back to the source; Req low -> release.
//   middle stage: output = addr / 5; busy -> Back; Back from below passed up.
//   last stage  : output = addr % 5; lost arbitration -> Back.
module tb_input_control;
  import perm_pkg::*;
  localparam int NO = 5, OW = 3, ADDR_W = 5;

  logic          clk = 1'b0, rst_n = 1'b1;
  logic          in_req     [3];
  logic [ADDR_W-1:0] in_addr [3];
  ans_e          in_ans     [3];
  logic [NO-1:0] status     [3];
  logic          req_valid  [3];
  logic [OW-1:0] req_port   [3];
  logic          rel        [3];
  logic          granted    [3];
  logic [OW-1:0] grant_port [3];
  ans_e          grant_ans  [3];
  logic          lost       [3];
  logic [OW-1:0] lost_port  [3];
  int checks = 0, failures = 0;

  for (genvar g = 0; g < 3; g++) begin : g_dut
    input_control #(.STAGE(stage_e'(g)), .NO(NO), .N(5), .ADDR_W(ADDR_W)) dut (
      .clk(clk), .rst_n(rst_n),
      .in_req(in_req[g]), .in_addr(in_addr[g]), .in_ans(in_ans[g]),
      .status(status[g]), .req_valid(req_valid[g]), .req_port(req_port[g]),
      .rel(rel[g]), .granted(granted[g]), .grant_port(grant_port[g]),
      .grant_ans(grant_ans[g]), .lost(lost[g]), .lost_port(lost_port[g]));
  end

  always #5 clk = ~clk;

  task automatic check(bit cond, string msg);
    checks++;
    if (!cond) begin failures++; $display("FAIL @%0t: %s", $time, msg); end
  endtask

  // one clock: falling edge with the arbiter's answer, then rising edge
  typedef enum {ARB_NONE, ARB_GRANT, ARB_LOSE, ARB_FREE} arb_e;
  task automatic cyc(int g, arb_e a);
    @(negedge clk);
    unique case (a)
      ARB_GRANT: begin granted[g] = 1; grant_port[g] = req_port[g]; lost[g] = 0; end
      ARB_LOSE:  begin lost[g] = 1; lost_port[g] = req_port[g]; end
      ARB_FREE:  begin granted[g] = 0; grant_ans[g] = ANS_NONE; lost[g] = 0; end
      default:   lost[g] = 0;
    endcase
    @(posedge clk); #1;
  endtask

  task automatic expect_req(int g, bit v, int port, string what);
    check(req_valid[g] == v && (!v || int'(req_port[g]) == port),
          $sformatf("stage %0d %s: req_valid=%b port=%0d, expected %b %0d",
                    g, what, req_valid[g], req_port[g], v, port));
  endtask

  initial begin
    for (int g = 0; g < 3; g++) begin
      in_req[g] = 0; in_addr[g] = '0; status[g] = '0; granted[g] = 0;
      grant_port[g] = '0; grant_ans[g] = ANS_NONE; lost[g] = 0; lost_port[g] = '0;
    end
    #1 rst_n = 1'b0;
    @(posedge clk); #1 rst_n = 1'b1;

    // ------------------------------------------------ first stage (g = 0)
    in_req[0] = 1; in_addr[0] = 5'd17; #1
    expect_req(0, 1, 0, "probe arrives");
    check(in_ans[0] == ANS_NONE, "first: no answer while searching");
    cyc(0, ARB_LOSE);                       // lost output 0
    status[0] = 5'b00010;                   // output 1 taken meanwhile
    #1 expect_req(0, 1, 2, "after lost arbitration, skip busy");
    cyc(0, ARB_GRANT);                      // owns output 2
    expect_req(0, 0, 0, "holding");
    check(rel[0] == 0, "first: no release while holding");
    grant_ans[0] = ANS_NACK; #1 check(in_ans[0] == ANS_NACK, "first: nAck passed up");
    grant_ans[0] = ANS_ACK;  #1 check(in_ans[0] == ANS_ACK,  "first: Ack passed up");
    grant_ans[0] = ANS_BACK; #1
    check(in_ans[0] == ANS_NONE && rel[0] == 1, "first: Back absorbed and link released");
    cyc(0, ARB_FREE);
    expect_req(0, 1, 3, "backtrack to next middle switch");
    cyc(0, ARB_LOSE);
    expect_req(0, 1, 4, "after second loss");
    status[0] = 5'b10010; #1
    expect_req(0, 0, 0, "no untried free output");
    cyc(0, ARB_NONE);
    check(in_ans[0] == ANS_BACK, "first: exhausted search answers Back");
    cyc(0, ARB_NONE);
    check(in_ans[0] == ANS_BACK && req_valid[0] == 0, "first: Back held until release");
    in_req[0] = 0;
    cyc(0, ARB_NONE);
    check(in_ans[0] == ANS_NONE, "first: idle after Req low");
    status[0] = '0; in_req[0] = 1; in_addr[0] = 5'd3; #1
    expect_req(0, 1, 0, "new circuit starts from output 0 again");
    cyc(0, ARB_GRANT);
    in_req[0] = 0; #1
    check(rel[0] == 1, "first: release on Req low");
    cyc(0, ARB_FREE);
    check(req_valid[0] == 0 && rel[0] == 0 && in_ans[0] == ANS_NONE, "first: back to idle");

    // ------------------------------------------------ middle stage (g = 1)
    in_req[1] = 1; in_addr[1] = 5'd17; status[1] = 5'b01000; #1
    expect_req(1, 0, 0, "middle: route 17/5=3 busy");
    check(in_ans[1] == ANS_BACK, "middle: busy link turned back at once");
    cyc(1, ARB_NONE);
    check(in_ans[1] == ANS_BACK, "middle: busy link answers Back");
    in_req[1] = 0; cyc(1, ARB_NONE);
    check(in_ans[1] == ANS_NONE, "middle: idle after release");
    status[1] = '0; in_req[1] = 1; in_addr[1] = 5'd9; #1
    expect_req(1, 1, 1, "middle: route 9/5=1");
    cyc(1, ARB_LOSE);
    check(in_ans[1] == ANS_BACK, "middle: lost arbitration answers Back");
    in_req[1] = 0; cyc(1, ARB_NONE);
    in_req[1] = 1; in_addr[1] = 5'd22; #1
    expect_req(1, 1, 4, "middle: route 22/5=4");
    cyc(1, ARB_GRANT);
    grant_ans[1] = ANS_BACK; #1
    check(in_ans[1] == ANS_BACK && rel[1] == 0, "middle: Back from below passed up, link kept");
    grant_ans[1] = ANS_ACK; #1
    check(in_ans[1] == ANS_ACK, "middle: Ack passed up");
    in_req[1] = 0; #1 check(rel[1] == 1, "middle: release");
    cyc(1, ARB_FREE);

    // ------------------------------------------------ last stage (g = 2)
    in_req[2] = 1; in_addr[2] = 5'd17; #1
    expect_req(2, 1, 2, "last: route 17%5=2");
    cyc(2, ARB_GRANT);
    grant_ans[2] = ANS_ACK; #1 check(in_ans[2] == ANS_ACK, "last: Ack passed up");
    in_req[2] = 0; cyc(2, ARB_FREE);
    in_req[2] = 1; in_addr[2] = 5'd24; #1
    expect_req(2, 1, 4, "last: route 24%5=4");
    cyc(2, ARB_LOSE);
    check(in_ans[2] == ANS_BACK, "last: lost arbitration answers Back");
    in_req[2] = 0; cyc(2, ARB_NONE);

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
