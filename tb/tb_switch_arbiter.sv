// tb_switch_arbiter: self-checking test of the switch arbiter (5 ICs, 5
// outputs). Random traffic that keeps the handshake rules (an IC asks only
// for a free output and only while it holds none; a holder may release) is
// applied after each rising edge. After each falling edge the ownership
// table, the lost flags and the grant bus are compared with a reference
// model of fixed lowest-index-first priority, in which an output released on
// a falling edge is not given away on the same edge.
module tb_switch_arbiter;
  import perm_pkg::*;
  localparam int NI = 5, NO = 5, IW = 3, OW = 3;

  logic          clk = 1'b0, rst_n = 1'b1;
  logic          req_valid [NI];
  logic [OW-1:0] req_port  [NI];
  logic          rel       [NI];
  logic [NO-1:0] own_valid;
  logic [IW-1:0] own_sel   [NO];
  logic          granted   [NI];
  logic [OW-1:0] grant_port[NI];
  ans_e          grant_ans [NI];
  logic          lost      [NI];
  logic [OW-1:0] lost_port [NI];
  ans_e          down_ans  [NO];
  int checks = 0, failures = 0;
  int n_contend = 0, n_release = 0;

  switch_arbiter dut (.*);

  always #5 clk = ~clk;

  // reference model
  bit     m_valid [NO];
  int     m_sel   [NO];
  bit     m_lost  [NI];

  function automatic int holder_of(int i);
    for (int o = 0; o < NO; o++) if (m_valid[o] && m_sel[o] == i) return o;
    return -1;
  endfunction

  task automatic check(bit cond, string msg);
    checks++;
    if (!cond) begin failures++; $display("FAIL @%0t: %s", $time, msg); end
  endtask

  initial begin
    for (int i = 0; i < NI; i++) begin req_valid[i] = 0; req_port[i] = '0; rel[i] = 0; end
    for (int o = 0; o < NO; o++) begin down_ans[o] = ANS_NONE; m_valid[o] = 0; m_sel[o] = 0; end
    #1 rst_n = 1'b0;
    repeat (2) @(posedge clk);
    #1 rst_n = 1'b1;
    for (int n = 0; n < 2000; n++) begin
      int nreq [NO];
      @(posedge clk); #1;
      // stimulus that obeys the handshake rules
      for (int o = 0; o < NO; o++) begin
        nreq[o] = 0;
        down_ans[o] = ans_e'($urandom_range(0, 3));
      end
      for (int i = 0; i < NI; i++) begin
        automatic int h = holder_of(i);
        req_valid[i] = 0; rel[i] = 0; req_port[i] = OW'($urandom_range(0, NO - 1));
        if (h >= 0) rel[i] = ($urandom_range(0, 3) == 0);
        else if ($urandom_range(0, 1) == 0 && !m_valid[req_port[i]]) begin
          req_valid[i] = 1;
          nreq[req_port[i]]++;
        end
      end
      for (int o = 0; o < NO; o++) if (nreq[o] > 1) n_contend++;
      // grant bus is combinational from the table
      #1;
      for (int i = 0; i < NI; i++) begin
        automatic int h = holder_of(i);
        check(granted[i] == (h >= 0), $sformatf("granted[%0d]", i));
        if (h >= 0) begin
          check(grant_port[i] == OW'(h), $sformatf("grant_port[%0d]", i));
          check(grant_ans[i] == down_ans[h], $sformatf("grant_ans[%0d]", i));
        end else
          check(grant_ans[i] == ANS_NONE, $sformatf("grant_ans[%0d] idle", i));
      end
      // model of the falling edge
      for (int i = 0; i < NI; i++) m_lost[i] = req_valid[i];
      for (int o = 0; o < NO; o++) begin
        if (m_valid[o]) begin
          if (rel[m_sel[o]]) begin m_valid[o] = 0; n_release++; end
        end else begin
          for (int i = 0; i < NI; i++) begin
            if (req_valid[i] && int'(req_port[i]) == o) begin
              m_valid[o] = 1; m_sel[o] = i; m_lost[i] = 0;
              break;
            end
          end
        end
      end
      @(negedge clk); #1;
      for (int o = 0; o < NO; o++) begin
        check(own_valid[o] == m_valid[o], $sformatf("own_valid[%0d]", o));
        if (m_valid[o]) check(int'(own_sel[o]) == m_sel[o], $sformatf("own_sel[%0d]", o));
      end
      for (int i = 0; i < NI; i++) begin
        check(lost[i] == m_lost[i], $sformatf("lost[%0d]", i));
        if (m_lost[i]) check(lost_port[i] == req_port[i], $sformatf("lost_port[%0d]", i));
      end
    end
    check(n_contend > 0 && n_release > 0, "contention and release both exercised");
    $display("contentions=%0d releases=%0d", n_contend, n_release);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
