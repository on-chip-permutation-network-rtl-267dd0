// tb_clos_network: end-to-end test of the Clos permutation network at its
// default size, C(5,5,5) with 25-bit data.
//
// Every network input has a behavioural source and every output a
// behavioural sink (the traffic tiles). The test runs a sequence of traffic
// permutations; between two of them all circuits are released and set up
// again, which is the run-time permutation change the network is built for.
//   phase 0  one lone circuit: Ack must come back 3 cycles after Req
//   phase 1  a circuit 0 -> 23 set up while 5 -> 22 holds link M0-L4: one
//            backtrack, Ack 5 cycles after Req
//   phase 2  identity permutation
//   phase 3  shuffle: s -> 2s mod 25
//   phase 4  transpose of the 5x5 tile array
//   phase 5..8 random full permutations
//   phase 9  random partial permutation (about half the inputs)
//   phase 10 random full permutation with receivers that are often busy
//            (nAck flow control)
// A source raises Req with the probe, waits for the answer, sends WORDS
// payload words while it sees Ack, then drops Req. On Back it drops Req and
// retries after a random pause. A payload word is {valid, source id, index}.
// Each sink checks the probe address, that every word comes from the source
// the permutation assigns to it, in order, with no loss, and three cycles
// after it was sent (the pipelined data path). The test also counts how often
// each mechanism of the network happened: first-stage backtracking, lost
// arbitration, Back reaching a source, nAck and release.
module tb_clos_network;
  import perm_pkg::*;

  localparam int P      = 25;
  localparam int NSW    = 5;
  localparam int DATA_W = 25;
  localparam int WORDS  = 12;
  localparam int PHASES = 11;
  localparam int LAT    = 3;

  logic              clk = 1'b0;
  logic              rst_n = 1'b1;
  logic              src_req  [P];
  logic [DATA_W-1:0] src_data [P];
  logic [1:0]        src_ans  [P];
  logic              dst_req  [P];
  logic [DATA_W-1:0] dst_data [P];
  logic [1:0]        dst_ans  [P];

  clos_network dut (.*);

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  longint cycle = 0;
  always @(posedge clk) cycle <= cycle + 1;

  task automatic fail(string msg);
    failures++;
    $display("FAIL @%0d: %s", cycle, msg);
  endtask

  // ---------------------------------------------------------------- traffic
  int  perm     [P];      // perm[s] = destination of source s, -1 = silent
  int  inv      [P];      // inv[d]  = source expected at d, -1 = none
  bit  active   = 1'b0;   // sources may start
  bit  busy_mode = 1'b0;  // sinks answer nAck part of the time
  int  done_src [P];      // circuits finished by each source in this phase
  int  start_at [P];      // cycle before which a source stays quiet

  // ---------------------------------------------------------------- sources
  typedef enum logic [1:0] {S_IDLE, S_SETUP, S_XFER, S_DONE} src_state_e;
  src_state_e s_state [P];
  int         s_sent  [P];
  int         s_wait  [P];
  longint     s_t0    [P];
  longint     send_cycle [P][WORDS];
  int         setup_cycles [P];
  int         n_src_back = 0, n_nack_src = 0, n_setups = 0;

  for (genvar s = 0; s < P; s++) begin : g_src
    always @(posedge clk or negedge rst_n) begin
      if (!rst_n) begin
        s_state[s]  <= S_IDLE;
        src_req[s]  <= 1'b0;
        src_data[s] <= '0;
        s_sent[s]   <= 0;
        s_wait[s]   <= 0;
      end else begin
        unique case (s_state[s])
          S_IDLE: begin
            if (s_wait[s] > 0) s_wait[s] <= s_wait[s] - 1;
            else if (active && perm[s] >= 0 && done_src[s] == 0 && cycle >= longint'(start_at[s])) begin
              src_req[s]  <= 1'b1;
              src_data[s] <= DATA_W'(perm[s]);
              s_state[s]  <= S_SETUP;
              s_t0[s]     <= cycle;
              s_sent[s]   <= 0;
            end
          end
          S_SETUP: begin
            if (ans_e'(src_ans[s]) == ANS_BACK) begin
              n_src_back++;
              src_req[s]  <= 1'b0;
              src_data[s] <= '0;
              s_wait[s]   <= 1 + int'($urandom_range(0, 8));
              s_state[s]  <= S_IDLE;
            end else if (ans_e'(src_ans[s]) == ANS_ACK || ans_e'(src_ans[s]) == ANS_NACK) begin
              setup_cycles[s] <= int'(cycle - s_t0[s]);
              n_setups++;
              s_state[s] <= S_XFER;
              src_data[s] <= '0;
              if (ans_e'(src_ans[s]) == ANS_ACK) begin
                src_data[s] <= {1'b1, 5'(s), 19'(0)};
                send_cycle[s][0] <= cycle + 1;
                s_sent[s] <= 1;
              end
            end
          end
          S_XFER: begin
            if (ans_e'(src_ans[s]) == ANS_BACK) fail($sformatf("Back during transfer at source %0d", s));
            if (s_sent[s] == WORDS) begin
              src_req[s]  <= 1'b0;          // release
              src_data[s] <= '0;
              s_state[s]  <= S_DONE;
            end else if (ans_e'(src_ans[s]) == ANS_ACK) begin
              src_data[s] <= {1'b1, 5'(s), 19'(s_sent[s])};
              send_cycle[s][s_sent[s]] <= cycle + 1;
              s_sent[s] <= s_sent[s] + 1;
            end else begin
              if (ans_e'(src_ans[s]) == ANS_NACK) n_nack_src++;
              src_data[s] <= '0;            // pause: no valid word
            end
          end
          default: begin                    // S_DONE
            done_src[s] <= 1;
            s_state[s]  <= S_IDLE;
            s_wait[s]   <= 1;
          end
        endcase
      end
    end
  end

  // ---------------------------------------------------------------- sinks
  logic   d_prev_req [P];
  int     d_next     [P];
  logic   d_busy     [P];
  int     words_rx = 0, n_release = 0;

  for (genvar d = 0; d < P; d++) begin : g_dst
    assign dst_ans[d] = !dst_req[d] ? 2'(ANS_NONE) : (d_busy[d] ? 2'(ANS_NACK) : 2'(ANS_ACK));
    always @(posedge clk or negedge rst_n) begin
      if (!rst_n) begin
        d_prev_req[d] <= 1'b0;
        d_next[d]     <= 0;
        d_busy[d]     <= 1'b0;
      end else begin
        d_prev_req[d] <= dst_req[d];
        d_busy[d]     <= busy_mode && ($urandom_range(0, 2) == 0);
        if (dst_req[d] && !d_prev_req[d]) begin
          checks++;
          if (int'(dst_data[d][4:0]) != d || dst_data[d][DATA_W-1])
            fail($sformatf("sink %0d got probe %h", d, dst_data[d]));
          if (inv[d] < 0) fail($sformatf("sink %0d reached in a phase where nobody sends to it", d));
          d_next[d] <= 0;
        end else if (dst_req[d] && dst_data[d][DATA_W-1]) begin
          automatic int src = int'(dst_data[d][23:19]);
          automatic int idx = int'(dst_data[d][18:0]);
          checks++;
          words_rx++;
          if (src != inv[d] || idx != d_next[d])
            fail($sformatf("sink %0d got word src=%0d idx=%0d, expected src=%0d idx=%0d",
                           d, src, idx, inv[d], d_next[d]));
          else if (cycle - send_cycle[src][idx] != longint'(LAT))
            fail($sformatf("sink %0d word %0d latency %0d", d, idx, cycle - send_cycle[src][idx]));
          d_next[d] <= d_next[d] + 1;
        end
        if (!dst_req[d] && d_prev_req[d]) begin
          n_release++;
          if (inv[d] >= 0) begin
            checks++;
            if (d_next[d] != WORDS)
              fail($sformatf("sink %0d released after %0d of %0d words", d, d_next[d], WORDS));
          end
        end
      end
    end
  end

  // ---------------------------------------------------------------- monitors
  int n_backtrack [P];
  int n_lost      [P];
  for (genvar f = 0; f < NSW; f++) begin : g_mon
    for (genvar k = 0; k < NSW; k++) begin : g_ic
      initial begin n_backtrack[f*NSW+k] = 0; n_lost[f*NSW+k] = 0; end
      always @(negedge clk) if (rst_n) begin
        if (dut.g_first[f].u_sw.g_ic[k].u_ic.rel &&
            dut.g_first[f].u_sw.g_ic[k].u_ic.grant_ans == ANS_BACK)
          n_backtrack[f*NSW+k]++;
      end
      always @(posedge clk) if (rst_n) begin
        // lost arbitration, as seen by the IC on the rising edge
        if (dut.g_first[f].u_sw.g_ic[k].u_ic.lost) n_lost[f*NSW+k]++;
      end
    end
  end

  // ---------------------------------------------------------------- phases
  function automatic void set_perm(int phase);
    int tmp [P];
    for (int i = 0; i < P; i++) tmp[i] = i;
    unique case (phase)
      0: for (int s = 0; s < P; s++) perm[s] = (s == 7) ? 19 : -1;
      1: begin
        // source 5 holds F1-M0-L4; source 0 must back off M0 and use M1
        for (int s = 0; s < P; s++) perm[s] = -1;
        perm[5] = 22;
        perm[0] = 23;
      end
      2: for (int s = 0; s < P; s++) perm[s] = s;
      3: for (int s = 0; s < P; s++) perm[s] = (2 * s) % P;                  // stride-2 shuffle
      4: for (int s = 0; s < P; s++) perm[s] = (s % NSW) * NSW + (s / NSW);
      default: begin
        for (int i = P - 1; i > 0; i--) begin
          int j = int'($urandom_range(0, i));
          int t = tmp[i]; tmp[i] = tmp[j]; tmp[j] = t;
        end
        for (int s = 0; s < P; s++) perm[s] = tmp[s];
        if (phase == 9)
          for (int s = 0; s < P; s++) if ($urandom_range(0, 1) == 0) perm[s] = -1;
      end
    endcase
    for (int d = 0; d < P; d++) inv[d] = -1;
    for (int s = 0; s < P; s++) if (perm[s] >= 0) inv[perm[s]] = s;
  endfunction

  function automatic bit all_done();
    for (int s = 0; s < P; s++) if (perm[s] >= 0 && done_src[s] == 0) return 1'b0;
    return 1'b1;
  endfunction

  function automatic bit all_idle();
    for (int d = 0; d < P; d++) if (dst_req[d]) return 1'b0;
    return 1'b1;
  endfunction

  function automatic int sum(int a [P]);
    int t = 0;
    for (int i = 0; i < P; i++) t += a[i];
    return t;
  endfunction

  initial begin
    for (int s = 0; s < P; s++) begin perm[s] = -1; inv[s] = -1; done_src[s] = 0; start_at[s] = 0; end
    #1 rst_n = 1'b0;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    for (int ph = 0; ph < PHASES; ph++) begin
      longint t_start;
      @(negedge clk);
      set_perm(ph);
      for (int s = 0; s < P; s++) done_src[s] = 0;
      busy_mode = (ph == PHASES - 1);
      for (int s = 0; s < P; s++) start_at[s] = 0;
      if (ph == 1) start_at[0] = int'(cycle) + 10;
      active = 1'b1;
      t_start = cycle;
      while (!all_done()) begin
        @(negedge clk);
        if (cycle - t_start > 20000) begin
          fail($sformatf("phase %0d did not finish", ph));
          break;
        end
      end
      active = 1'b0;
      repeat (6) @(negedge clk);
      checks++;
      if (!all_idle()) fail($sformatf("phase %0d: links still held after release", ph));
      if (ph == 1) begin
        // Ack is on src_ans after edge 5 (see the README example)
        checks++;
        if (setup_cycles[0] != 6) fail($sformatf("setup around a held link: Ack sampled %0d edges after Req, expected 6", setup_cycles[0]));
        checks++;
        if (n_backtrack[0] != 1) fail($sformatf("source 0 backtracked %0d times, expected 1", n_backtrack[0]));
      end
      if (ph == 0) begin
        checks++;
        // Req raised on edge 0; Ack is on src_ans after edge 3 (one switch
        // per cycle) and the source samples it on edge 4.
        if (setup_cycles[7] != 4) fail($sformatf("lone setup: Ack sampled %0d edges after Req, expected 4", setup_cycles[7]));
      end
      $display("phase %0d done in %0d cycles", ph, cycle - t_start);
    end
    // every mechanism must have happened at least once
    $display("setups=%0d words=%0d releases=%0d backtracks=%0d lost_arb=%0d src_back=%0d nack=%0d",
             n_setups, words_rx, n_release, sum(n_backtrack), sum(n_lost), n_src_back, n_nack_src);
    checks++; if (n_setups == 0)          fail("no setup");
    checks++; if (words_rx == 0)          fail("no transfer");
    checks++; if (n_release == 0)         fail("no release");
    checks++; if (sum(n_backtrack) == 0)  fail("no first-stage backtracking");
    checks++; if (sum(n_lost) == 0)       fail("no lost arbitration");
    checks++; if (n_src_back == 0)        fail("no Back reached a source");
    checks++; if (n_nack_src == 0)        fail("no nAck flow control");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (300000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
