// tb_clos_switch: self-checking test of one switching node of each routing
// kind: a first-stage, a middle and a last-stage switch, all 5x5 with 25-bit
// data.
// Downstream of the first-stage switch each output is a model that answers
// Back when "blocked" and Ack otherwise; downstream of the last-stage switch
// each output is a receiver that answers Ack. Checked:
//   * a probe leaves one cycle after it arrives, on the right output, with
//     the probe word on the data lines;
//   * backtracking: with outputs 0 and 1 blocked the probe tries 0, 1, 2 in
//     that order, each once, and Ack reaches the input 5 cycles after Req;
//   * payload crosses the switch with one cycle of latency;
//   * two probes for the same free output: the lower input wins, the other
//     (first stage) moves to the next output or (last stage) gets Back;
//   * release: Req low frees the output one cycle later;
//   * all outputs blocked: every output is tried once, then Back;
//   * middle stage: probe to address a goes to output a / 5; a probe for a
//     busy output is turned back in the cycle it arrives; a Back from the
//     last stage is passed up unchanged.
module tb_clos_switch;
  import perm_pkg::*;
  localparam int NP = 5, DATA_W = 25;

  logic clk = 1'b0, rst_n = 1'b1;
  // first-stage switch
  logic              f_in_req  [NP];
  logic [DATA_W-1:0] f_in_data [NP];
  ans_e              f_in_ans  [NP];
  logic              f_out_req [NP];
  logic [DATA_W-1:0] f_out_data[NP];
  ans_e              f_out_ans [NP];
  // last-stage switch
  logic              l_in_req  [NP];
  logic [DATA_W-1:0] l_in_data [NP];
  ans_e              l_in_ans  [NP];
  logic              l_out_req [NP];
  logic [DATA_W-1:0] l_out_data[NP];
  ans_e              l_out_ans [NP];

  // middle-stage switch
  logic              m_in_req  [NP];
  logic [DATA_W-1:0] m_in_data [NP];
  ans_e              m_in_ans  [NP];
  logic              m_out_req [NP];
  logic [DATA_W-1:0] m_out_data[NP];
  ans_e              m_out_ans [NP];
  logic              m_blocked [NP];

  logic blocked [NP];
  int   tries   [NP];
  int checks = 0, failures = 0;

  clos_switch #(.STAGE(STAGE_FIRST)) u_first (
    .clk, .rst_n, .in_req(f_in_req), .in_data(f_in_data), .in_ans(f_in_ans),
    .out_req(f_out_req), .out_data(f_out_data), .out_ans(f_out_ans));
  clos_switch #(.STAGE(STAGE_MIDDLE)) u_middle (
    .clk, .rst_n, .in_req(m_in_req), .in_data(m_in_data), .in_ans(m_in_ans),
    .out_req(m_out_req), .out_data(m_out_data), .out_ans(m_out_ans));
  clos_switch #(.STAGE(STAGE_LAST)) u_last (
    .clk, .rst_n, .in_req(l_in_req), .in_data(l_in_data), .in_ans(l_in_ans),
    .out_req(l_out_req), .out_data(l_out_data), .out_ans(l_out_ans));

  always #5 clk = ~clk;

  for (genvar o = 0; o < NP; o++) begin : g_down
    assign f_out_ans[o] = !f_out_req[o] ? ANS_NONE : (blocked[o] ? ANS_BACK : ANS_ACK);
    assign l_out_ans[o] = l_out_req[o] ? ANS_ACK : ANS_NONE;
    assign m_out_ans[o] = !m_out_req[o] ? ANS_NONE : (m_blocked[o] ? ANS_BACK : ANS_ACK);
    logic prev = 1'b0;
    always @(posedge clk) begin
      prev <= f_out_req[o];
      if (f_out_req[o] && !prev) tries[o]++;
    end
  end

  task automatic check(bit cond, string msg);
    checks++;
    if (!cond) begin failures++; $display("FAIL @%0t: %s", $time, msg); end
  endtask

  task automatic step(int n = 1);
    repeat (n) @(posedge clk);
    #1;
  endtask

  task automatic clear_tries();
    for (int o = 0; o < NP; o++) tries[o] = 0;
  endtask

  initial begin
    int t;
    for (int i = 0; i < NP; i++) begin
      f_in_req[i] = 0; f_in_data[i] = '0; l_in_req[i] = 0; l_in_data[i] = '0;
      blocked[i] = 0; tries[i] = 0;
      m_in_req[i] = 0; m_in_data[i] = '0; m_blocked[i] = 0;
    end
    #1 rst_n = 1'b0;
    step(); rst_n = 1'b1; step();

    // ---- backtracking at the first stage
    blocked[0] = 1; blocked[1] = 1; clear_tries();
    f_in_req[0] = 1; f_in_data[0] = DATA_W'(12);
    step();
    check(f_out_req[0] && f_out_data[0] == DATA_W'(12), "probe leaves on output 0 one cycle later");
    t = 1;
    while (f_in_ans[0] != ANS_ACK && t < 30) begin step(); t++; end
    check(t == 5, $sformatf("Ack after %0d cycles, expected 5 (two backtracks)", t));
    check(tries[0] == 1 && tries[1] == 1 && f_out_req[2] && !f_out_req[0] && !f_out_req[1],
          "outputs 0 and 1 tried once each, path on output 2");
    // ---- payload, one cycle per switch
    begin
      logic [DATA_W-1:0] w;
      for (int n = 0; n < 8; n++) begin
        w = DATA_W'($urandom);
        f_in_data[0] = w;
        step();
        check(f_out_data[2] == w, $sformatf("payload word %0d", n));
      end
    end
    // ---- contention for one free output
    blocked[0] = 0; blocked[1] = 0;
    f_in_req[1] = 1; f_in_data[1] = DATA_W'(5);
    f_in_req[3] = 1; f_in_data[3] = DATA_W'(6);
    step();
    check(f_out_req[0] && f_out_data[0] == DATA_W'(5), "input 1 wins output 0");
    check(!f_out_req[1], "input 3 lost the first round");
    step();
    check(f_out_req[1] && f_out_data[1] == DATA_W'(6), "input 3 moves on to output 1");
    check(f_in_ans[1] == ANS_ACK && f_in_ans[3] == ANS_ACK, "both acknowledged");
    // ---- release
    f_in_req[0] = 0; f_in_data[0] = '0;
    step();
    check(!f_out_req[2], "output 2 freed one cycle after Req low");
    f_in_req[1] = 0; f_in_req[3] = 0;
    step(2);
    // ---- exhausted search
    for (int o = 0; o < NP; o++) blocked[o] = 1;
    clear_tries();
    f_in_req[4] = 1; f_in_data[4] = DATA_W'(20);
    t = 0;
    while (f_in_ans[4] != ANS_BACK && t < 40) begin step(); t++; end
    check(f_in_ans[4] == ANS_BACK, "exhausted search answers Back");
    check(tries[0] == 1 && tries[1] == 1 && tries[2] == 1 && tries[3] == 1 && tries[4] == 1,
          "every middle switch tried exactly once");
    f_in_req[4] = 0; step(2);

    // ---- last stage: routing and contention
    l_in_req[0] = 1; l_in_data[0] = DATA_W'(7);   // port 2
    l_in_req[4] = 1; l_in_data[4] = DATA_W'(12);  // also port 2
    l_in_req[2] = 1; l_in_data[2] = DATA_W'(24);  // port 4
    step();
    check(l_out_req[2] && l_out_data[2] == DATA_W'(7), "last: input 0 gets port 2");
    check(l_out_req[4] && l_out_data[4] == DATA_W'(24), "last: input 2 gets port 4");
    check(l_in_ans[0] == ANS_ACK && l_in_ans[2] == ANS_ACK, "last: Acks passed up");
    check(l_in_ans[4] == ANS_BACK, "last: loser answered Back");
    l_in_req[4] = 0; l_in_req[0] = 0;
    step();
    check(!l_out_req[2] && l_out_req[4], "last: port 2 released, port 4 kept");

    // ---- middle stage
    m_in_req[1] = 1; m_in_data[1] = DATA_W'(17);   // last-stage switch 3
    m_in_req[2] = 1; m_in_data[2] = DATA_W'(9);    // last-stage switch 1
    step();
    check(m_out_req[3] && m_out_data[3] == DATA_W'(17), "middle: 17 routed to output 3");
    check(m_out_req[1] && m_out_data[1] == DATA_W'(9), "middle: 9 routed to output 1");
    check(m_in_ans[1] == ANS_ACK && m_in_ans[2] == ANS_ACK, "middle: Acks passed up");
    m_in_req[4] = 1; m_in_data[4] = DATA_W'(15);   // output 3 is busy
    #1 check(m_in_ans[4] == ANS_BACK, "middle: busy output turned back at once");
    step();
    check(m_in_ans[4] == ANS_BACK, "middle: Back held while Req stays high");
    m_in_req[4] = 0;
    m_blocked[1] = 1; #1
    check(m_in_ans[2] == ANS_BACK, "middle: Back from the last stage passed up");
    m_in_req[2] = 0; m_in_req[1] = 0;
    step();
    check(!m_out_req[1] && !m_out_req[3], "middle: both released");

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
