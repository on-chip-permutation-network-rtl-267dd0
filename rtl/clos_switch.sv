// clos_switch: one circuit-switched switching node of the Clos network.
//
// Common switch architecture of the published design: NI input controls (ICs), an
// arbiter, NO output controls (OCs) and an NI x NO crossbar. The same module
// builds all three kinds of switch; STAGE selects the probe routing of the
// ICs (see input_control), which is the only difference between them.
//
// Control part (dynamic path setup): an IC sees Req rise with a probe on its
// data lines, picks an output, and asks the arbiter (request bus). The
// arbiter grants on the falling edge (control/status bus) and connects the
// output's Ans back to the IC (grant bus). Data part: the crossbar steers the
// input word to the owned output and the OC registers Req and data on the
// next rising edge. The probe itself travels on the data lines, so no
// separate probe wires are needed.
//
// Timing: a probe that arrives after rising edge k leaves on rising edge k+1
// if its output is free. Payload has one cycle of latency per switch. Ans is
// combinational through the switch. Data bits above ADDR_W are not looked at
// by the switch.
//
// Ports: in_* face the upstream links (one per input), out_* face the
// downstream links (one per output). Each link is Req (down), data (down)
// and Ans (up).
module clos_switch
  import perm_pkg::*;
#(
  parameter stage_e      STAGE  = STAGE_FIRST,
  parameter int unsigned NI     = DEF_N,
  parameter int unsigned NO     = DEF_M,
  parameter int unsigned N      = DEF_N,              // ports per last-stage switch
  parameter int unsigned ADDR_W = $clog2(DEF_N * DEF_R),
  parameter int unsigned DATA_W = DEF_DATA_W,
  localparam int unsigned IW    = (NI > 1) ? $clog2(NI) : 1,
  localparam int unsigned OW    = (NO > 1) ? $clog2(NO) : 1
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              in_req   [NI],
  input  logic [DATA_W-1:0] in_data  [NI],
  output ans_e              in_ans   [NI],
  output logic              out_req  [NO],
  output logic [DATA_W-1:0] out_data [NO],
  input  ans_e              out_ans  [NO]
);

  // request bus
  logic          req_valid [NI];
  logic [OW-1:0] req_port  [NI];
  logic          rel       [NI];
  // status / control bus
  logic [NO-1:0] own_valid;
  logic [IW-1:0] own_sel   [NO];
  // grant bus
  logic          granted   [NI];
  logic [OW-1:0] grant_port[NI];
  ans_e          grant_ans [NI];
  logic          lost      [NI];
  logic [OW-1:0] lost_port [NI];
  // crossbar outputs
  logic [DATA_W-1:0] xbar_data [NO];

  for (genvar i = 0; i < NI; i++) begin : g_ic
    input_control #(
      .STAGE (STAGE),
      .NO    (NO),
      .N     (N),
      .ADDR_W(ADDR_W)
    ) u_ic (
      .clk      (clk),
      .rst_n    (rst_n),
      .in_req   (in_req[i]),
      .in_addr  (in_data[i][ADDR_W-1:0]),
      .in_ans   (in_ans[i]),
      .status   (own_valid),
      .req_valid(req_valid[i]),
      .req_port (req_port[i]),
      .rel      (rel[i]),
      .granted  (granted[i]),
      .grant_port(grant_port[i]),
      .grant_ans(grant_ans[i]),
      .lost     (lost[i]),
      .lost_port(lost_port[i])
    );
  end

  switch_arbiter #(
    .NI(NI),
    .NO(NO)
  ) u_arb (
    .clk      (clk),
    .rst_n    (rst_n),
    .req_valid(req_valid),
    .req_port (req_port),
    .rel      (rel),
    .own_valid(own_valid),
    .own_sel  (own_sel),
    .granted  (granted),
    .grant_port(grant_port),
    .grant_ans(grant_ans),
    .lost     (lost),
    .lost_port(lost_port),
    .down_ans (out_ans)
  );

  crossbar #(
    .NI    (NI),
    .NO    (NO),
    .DATA_W(DATA_W)
  ) u_xbar (
    .in_data (in_data),
    .sel     (own_sel),
    .out_data(xbar_data)
  );

  for (genvar o = 0; o < NO; o++) begin : g_oc
    output_control #(
      .DATA_W(DATA_W)
    ) u_oc (
      .clk      (clk),
      .rst_n    (rst_n),
      .cmd_valid(own_valid[o]),
      .xbar_data(xbar_data[o]),
      .out_req  (out_req[o]),
      .out_data (out_data[o])
    );
  end

endmodule
