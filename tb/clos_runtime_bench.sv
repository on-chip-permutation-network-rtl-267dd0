// clos_runtime_bench: run-time permutation changes without any global
// synchronisation, on a Clos network C(N,M,R). Instantiated by
// tb_clos_runtime (default C(5,5,5)) and tb_clos_runtime_c444 (C(4,4,4),
// 16 ports with 4-bit addresses), which print the result and end the run
// when done rises.
//
// Each of the N*R sources works through ROUNDS circuits on its own. In round
// r it sends a burst of random length (1..16 words) to dest[r][s], where
// dest[r] is a fresh random permutation, then releases and starts round r+1
// at once. Sources run at different speeds, so circuits of old and new
// permutations overlap and two sources often want the same output for a
// while. The loser is answered Back (from the last stage, or from the first
// stage once every middle switch is exhausted) and retries after a random
// pause. Receivers answer nAck about one cycle in five.
// A payload word is {valid, source, round, index}. Each receiver checks that
// a word belongs to a circuit that really targets it, that the indices of
// each circuit arrive in order, and that each word takes exactly 3 cycles.
// At the end every circuit must have delivered all its words. The test
// fails if Back never reached a source or no first-stage backtrack
// happened.
module clos_runtime_bench
  import perm_pkg::*;
#(
  parameter int N = 5,
  parameter int M = 5,
  parameter int R = 5
) (
  output bit done,       // set when the test is over
  output int checks,
  output int failures
);
  localparam int P      = N * R;
  localparam int ADDR_W = $clog2(P);
  localparam int DATA_W = 25;          // {valid, 5-bit source, 7-bit round, 12-bit index}
  localparam int ROUNDS = 24;
  localparam int MAXW   = 16;
  localparam int LAT    = 3;

  logic              clk = 1'b0;
  logic              rst_n = 1'b1;
  logic              src_req  [P];
  logic [DATA_W-1:0] src_data [P];
  logic [1:0]        src_ans  [P];
  logic              dst_req  [P];
  logic [DATA_W-1:0] dst_data [P];
  logic [1:0]        dst_ans  [P];

  clos_network #(.N(N), .M(M), .R(R), .DATA_W(DATA_W)) dut (.*);

  always #5 clk = ~clk;

  initial begin done = 1'b0; checks = 0; failures = 0; end
  longint cycle = 0;
  always @(posedge clk) cycle <= cycle + 1;

  task automatic fail(string msg);
    failures++;
    $display("FAIL @%0d: %s", cycle, msg);
  endtask

  int dest  [ROUNDS][P];
  int nword [ROUNDS][P];
  int rx    [ROUNDS][P];     // words received, per round and source
  longint send_cycle [P][MAXW];
  bit go = 1'b0;

  // ------------------------------------------------------------ sources
  typedef enum logic [1:0] {S_IDLE, S_SETUP, S_XFER} src_state_e;
  src_state_e s_state [P];
  int s_round [P], s_sent [P], s_wait [P];
  int n_src_back = 0, n_nack = 0;

  for (genvar s = 0; s < P; s++) begin : g_src
    always @(posedge clk or negedge rst_n) begin
      if (!rst_n) begin
        s_state[s] <= S_IDLE; src_req[s] <= 1'b0; src_data[s] <= '0;
        s_round[s] <= 0; s_sent[s] <= 0; s_wait[s] <= int'($urandom_range(0, 20));
      end else begin
        unique case (s_state[s])
          S_IDLE: begin
            if (s_wait[s] > 0) s_wait[s] <= s_wait[s] - 1;
            else if (go && s_round[s] < ROUNDS) begin
              src_req[s]  <= 1'b1;
              src_data[s] <= DATA_W'(dest[s_round[s]][s]);
              s_sent[s]   <= 0;
              s_state[s]  <= S_SETUP;
            end
          end
          S_SETUP: begin
            unique case (ans_e'(src_ans[s]))
              ANS_BACK: begin
                n_src_back++;
                src_req[s] <= 1'b0; src_data[s] <= '0;
                s_wait[s]  <= 1 + int'($urandom_range(0, 6));
                s_state[s] <= S_IDLE;
              end
              ANS_ACK, ANS_NACK: begin
                s_state[s]  <= S_XFER;
                src_data[s] <= '0;
                if (ans_e'(src_ans[s]) == ANS_ACK) begin
                  src_data[s] <= {1'b1, 5'(s), 7'(s_round[s]), 12'(0)};
                  send_cycle[s][0] <= cycle + 1;
                  s_sent[s] <= 1;
                end
              end
              default: ;
            endcase
          end
          default: begin  // S_XFER
            if (ans_e'(src_ans[s]) == ANS_BACK) fail($sformatf("Back during transfer at source %0d", s));
            if (s_sent[s] == nword[s_round[s]][s]) begin
              src_req[s]  <= 1'b0; src_data[s] <= '0;
              s_round[s]  <= s_round[s] + 1;
              s_wait[s]   <= 1;                      // Req low for one cycle
              s_state[s]  <= S_IDLE;
            end else if (ans_e'(src_ans[s]) == ANS_ACK) begin
              src_data[s] <= {1'b1, 5'(s), 7'(s_round[s]), 12'(s_sent[s])};
              send_cycle[s][s_sent[s]] <= cycle + 1;
              s_sent[s] <= s_sent[s] + 1;
            end else begin
              if (ans_e'(src_ans[s]) == ANS_NACK) n_nack++;
              src_data[s] <= '0;
            end
          end
        endcase
      end
    end
  end

  // ------------------------------------------------------------ sinks
  logic d_busy [P];
  logic d_prev [P];
  for (genvar d = 0; d < P; d++) begin : g_dst
    assign dst_ans[d] = !dst_req[d] ? 2'(ANS_NONE) : (d_busy[d] ? 2'(ANS_NACK) : 2'(ANS_ACK));
    always @(posedge clk or negedge rst_n) begin
      if (!rst_n) begin
        d_busy[d] <= 1'b0; d_prev[d] <= 1'b0;
      end else begin
        d_busy[d] <= ($urandom_range(0, 4) == 0);
        d_prev[d] <= dst_req[d];
        if (dst_req[d] && !d_prev[d]) begin
          checks++;
          if (int'(dst_data[d][ADDR_W-1:0]) != d || dst_data[d][DATA_W-1])
            fail($sformatf("sink %0d got probe %h", d, dst_data[d]));
        end else if (dst_req[d] && dst_data[d][DATA_W-1]) begin
          automatic int src = int'(dst_data[d][23:19]);
          automatic int rnd = int'(dst_data[d][18:12]);
          automatic int idx = int'(dst_data[d][11:0]);
          checks++;
          if (src >= P || rnd >= ROUNDS || dest[rnd][src] != d)
            fail($sformatf("sink %0d got a word of source %0d round %0d", d, src, rnd));
          else if (idx != rx[rnd][src])
            fail($sformatf("sink %0d: source %0d round %0d word %0d, expected %0d", d, src, rnd, idx, rx[rnd][src]));
          else if (cycle - send_cycle[src][idx] != longint'(LAT))
            fail($sformatf("sink %0d: latency %0d", d, cycle - send_cycle[src][idx]));
          if (src < P && rnd < ROUNDS) rx[rnd][src]++;
        end
      end
    end
  end

  // ------------------------------------------------------------ monitors
  int n_backtrack = 0, n_last_back = 0;
  for (genvar f = 0; f < R; f++) begin : g_mon
    for (genvar k = 0; k < N; k++) begin : g_first_ic
      always @(negedge clk) if (rst_n) begin
        if (dut.g_first[f].u_sw.g_ic[k].u_ic.rel &&
            dut.g_first[f].u_sw.g_ic[k].u_ic.grant_ans == ANS_BACK)
          n_backtrack++;
      end
    end
    for (genvar k = 0; k < M; k++) begin : g_last_ic
      always @(negedge clk) if (rst_n) begin
        if (dut.g_last[f].u_sw.g_ic[k].u_ic.in_req &&
            dut.g_last[f].u_sw.g_ic[k].u_ic.in_ans == ANS_BACK)
          n_last_back++;
      end
    end
  end

  function automatic bit finished();
    for (int s = 0; s < P; s++) if (s_round[s] < ROUNDS) return 1'b0;
    return 1'b1;
  endfunction

  initial begin
    for (int r = 0; r < ROUNDS; r++) begin
      int tmp [P];
      for (int i = 0; i < P; i++) tmp[i] = i;
      for (int i = P - 1; i > 0; i--) begin
        automatic int j = int'($urandom_range(0, i));
        automatic int t = tmp[i];
        tmp[i] = tmp[j]; tmp[j] = t;
      end
      for (int s = 0; s < P; s++) begin
        dest[r][s]  = tmp[s];
        nword[r][s] = 1 + int'($urandom_range(0, MAXW - 1));
        rx[r][s]    = 0;
      end
    end
    #1 rst_n = 1'b0;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    go = 1'b1;
    while (!finished() && cycle < 100000) @(negedge clk);
    repeat (8) @(negedge clk);
    checks++;
    if (!finished()) fail("sources did not finish");
    for (int r = 0; r < ROUNDS; r++)
      for (int s = 0; s < P; s++) begin
        checks++;
        if (rx[r][s] != nword[r][s])
          fail($sformatf("round %0d source %0d: %0d of %0d words", r, s, rx[r][s], nword[r][s]));
      end
    for (int d = 0; d < P; d++) begin
      checks++;
      if (dst_req[d]) fail($sformatf("output %0d still held at the end", d));
    end
    $display("C(%0d,%0d,%0d) cycles=%0d backtracks=%0d last_stage_back=%0d src_back=%0d nack=%0d",
             N, M, R, cycle, n_backtrack, n_last_back, n_src_back, n_nack);
    checks++; if (n_backtrack == 0) fail("no first-stage backtracking");
    checks++; if (n_last_back == 0) fail("no Back from a last-stage switch");
    checks++; if (n_src_back == 0)  fail("no Back reached a source");
    checks++; if (n_nack == 0)      fail("no nAck");
    done = 1'b1;
  end

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog expired");
    done = 1'b1;
  end
endmodule
