// switch_arbiter: ARBITER of one switch.
//
// It has the two functions the published design gives it:
//  * referee: on the falling edge it looks at the request bus and gives each
//    free output to one requesting input control (IC). The priority rule is
//    fixed: the lowest-numbered IC wins (the published design says only
//    that the rule is pre-defined). Each refused IC gets the registered
//    lost/lost_port flags and treats them as a blocked link.
//  * grant bus: it cross-connects the Ans of every owned output back to the
//    IC that owns it, combinationally, so an Ack, nAck or Back crosses the
//    switch in the same cycle.
// The ownership table (own_valid/own_sel) is both the status bus read by the
// ICs and the control bus read by the output controls and the crossbar.
//
// Timing: all state changes on the falling edge, half a cycle after the ICs
// (rising edge). A released output is freed on the falling edge where the IC
// asks for it, and is not handed out again on that same edge, so the
// downstream Req is low for at least one cycle between two circuits.
// Asynchronous active-low reset frees every output.
module switch_arbiter
  import perm_pkg::*;
#(
  parameter int unsigned NI = DEF_N,   // input controls
  parameter int unsigned NO = DEF_M,   // outputs
  localparam int unsigned IW = (NI > 1) ? $clog2(NI) : 1,
  localparam int unsigned OW = (NO > 1) ? $clog2(NO) : 1
) (
  input  logic          clk,
  input  logic          rst_n,
  // request bus
  input  logic          req_valid [NI],
  input  logic [OW-1:0] req_port  [NI],
  input  logic          rel       [NI],
  // status / control bus
  output logic [NO-1:0] own_valid,
  output logic [IW-1:0] own_sel   [NO],
  // grant bus
  output logic          granted   [NI],
  output logic [OW-1:0] grant_port[NI],
  output ans_e          grant_ans [NI],
  output logic          lost      [NI],   // request refused on the last falling edge
  output logic [OW-1:0] lost_port [NI],
  // answers coming from downstream, one per output
  input  ans_e          down_ans  [NO]
);

  // Fixed priority: for each free output the lowest-numbered requester wins.
  logic          win_valid [NO];
  logic [IW-1:0] win_sel   [NO];

  always_comb begin
    for (int o = 0; o < NO; o++) begin
      win_valid[o] = 1'b0;
      win_sel[o]   = '0;
      for (int i = NI - 1; i >= 0; i--) begin
        if (req_valid[i] && req_port[i] == OW'(o)) begin
          win_valid[o] = !own_valid[o];
          win_sel[o]   = IW'(i);
        end
      end
    end
  end

  always_ff @(negedge clk or negedge rst_n) begin
    if (!rst_n) begin
      own_valid <= '0;
      for (int o = 0; o < NO; o++) own_sel[o] <= '0;
      for (int i = 0; i < NI; i++) begin
        lost[i]      <= 1'b0;
        lost_port[i] <= '0;
      end
    end else begin
      for (int o = 0; o < NO; o++) begin
        if (own_valid[o]) begin
          if (rel[own_sel[o]]) own_valid[o] <= 1'b0;
        end else if (win_valid[o]) begin
          own_valid[o] <= 1'b1;
          own_sel[o]   <= win_sel[o];
        end
      end
      for (int i = 0; i < NI; i++) begin
        lost[i]      <= req_valid[i] &&
                        !(win_valid[req_port[i]] && win_sel[req_port[i]] == IW'(i));
        lost_port[i] <= req_port[i];
      end
    end
  end

  always_comb begin
    for (int i = 0; i < NI; i++) begin
      granted[i]    = 1'b0;
      grant_port[i] = '0;
      grant_ans[i]  = ANS_NONE;
    end
    for (int o = 0; o < NO; o++) begin
      if (own_valid[o]) begin
        granted[own_sel[o]]    = 1'b1;
        grant_port[own_sel[o]] = OW'(o);
        grant_ans[own_sel[o]]  = down_ans[o];
      end
    end
  end

  // Handshake rules: an IC only asks for an output the status bus shows free,
  // and owns at most one output at a time.
  always_ff @(negedge clk) begin
    if (rst_n) begin
      for (int i = 0; i < NI; i++) begin
        if (req_valid[i])
          assert (!own_valid[req_port[i]] && !granted[i])
            else $error("switch_arbiter: IC %0d requests a busy output or holds one", i);
      end
    end
  end

endmodule
