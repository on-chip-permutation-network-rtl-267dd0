// clos_network: circuit-switched three-stage Clos permutation network with
// dynamic path setup.
//
// Topology C(N, M, R): R first-stage switches of N inputs and M outputs, M
// middle switches of R x R, and R last-stage switches of M inputs and N
// outputs, giving N*R network inputs and outputs. The default is the
// published C(5,5,5): 25 ports, fifteen 5x5 switches, 25-bit data. Network
// port p sits on switch p / N, port p % N, on both sides. Wiring: output m
// of first-stage switch f goes to input f of middle switch m; output l of
// middle switch m goes to input m of last-stage switch l.
//
// Use by a source (setup, transfer, release):
//   1. Raise src_req[s] with the destination address in the low ADDR_W bits
//      of src_data[s] (the probe) and hold it there.
//   2. The probe moves one switch per cycle. At the first stage it tries the
//      middle switches in order, backtracking when a middle or last-stage
//      link is blocked. src_ans[s] answers:
//        Ack  (01) path set up, destination ready: send data;
//        nAck (11) path set up, destination busy: wait (also usable any time
//                  during transfer for end-to-end flow control);
//        Back (10) no path found now: drop src_req and try again later.
//   3. Once Ack is seen, each word put on src_data[s] appears on
//      dst_data[d] three cycles later, in order and without loss.
//   4. Drop src_req[s] for at least one cycle to release the path; the links
//      are freed one switch per cycle.
// A receiver sees dst_req[d] rise with the probe on dst_data[d] and answers
// on dst_ans[d] with Ack or nAck. Setup with no contention takes three
// cycles from src_req to Ack.
//
// Clocking: input and output controls use the rising edge, the arbiters the
// falling edge, as in the published design. rst_n is asynchronous, active low.
module clos_network
  import perm_pkg::*;
#(
  parameter int unsigned N      = DEF_N,
  parameter int unsigned M      = DEF_M,
  parameter int unsigned R      = DEF_R,
  parameter int unsigned DATA_W = DEF_DATA_W,
  localparam int unsigned P      = N * R,
  localparam int unsigned ADDR_W = (P > 1) ? $clog2(P) : 1
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              src_req  [P],
  input  logic [DATA_W-1:0] src_data [P],
  output logic [1:0]        src_ans  [P],
  output logic              dst_req  [P],
  output logic [DATA_W-1:0] dst_data [P],
  input  logic [1:0]        dst_ans  [P]
);

  // first stage -> middle stage links, indexed [first switch][middle switch]
  logic              fm_req  [R][M];
  logic [DATA_W-1:0] fm_data [R][M];
  ans_e              fm_ans  [R][M];
  // middle stage -> last stage links, indexed [middle switch][last switch]
  logic              ml_req  [M][R];
  logic [DATA_W-1:0] ml_data [M][R];
  ans_e              ml_ans  [M][R];

  for (genvar f = 0; f < R; f++) begin : g_first
    logic              s_req  [N];
    logic [DATA_W-1:0] s_data [N];
    ans_e              s_ans  [N];
    for (genvar k = 0; k < N; k++) begin : g_port
      assign s_req[k]            = src_req[f*N + k];
      assign s_data[k]           = src_data[f*N + k];
      assign src_ans[f*N + k]    = s_ans[k];
    end
    clos_switch #(
      .STAGE (STAGE_FIRST),
      .NI    (N),
      .NO    (M),
      .N     (N),
      .ADDR_W(ADDR_W),
      .DATA_W(DATA_W)
    ) u_sw (
      .clk     (clk),
      .rst_n   (rst_n),
      .in_req  (s_req),
      .in_data (s_data),
      .in_ans  (s_ans),
      .out_req (fm_req[f]),
      .out_data(fm_data[f]),
      .out_ans (fm_ans[f])
    );
  end

  for (genvar m = 0; m < M; m++) begin : g_middle
    logic              s_req  [R];
    logic [DATA_W-1:0] s_data [R];
    ans_e              s_ans  [R];
    for (genvar f = 0; f < R; f++) begin : g_port
      assign s_req[f]     = fm_req[f][m];
      assign s_data[f]    = fm_data[f][m];
      assign fm_ans[f][m] = s_ans[f];
    end
    clos_switch #(
      .STAGE (STAGE_MIDDLE),
      .NI    (R),
      .NO    (R),
      .N     (N),
      .ADDR_W(ADDR_W),
      .DATA_W(DATA_W)
    ) u_sw (
      .clk     (clk),
      .rst_n   (rst_n),
      .in_req  (s_req),
      .in_data (s_data),
      .in_ans  (s_ans),
      .out_req (ml_req[m]),
      .out_data(ml_data[m]),
      .out_ans (ml_ans[m])
    );
  end

  for (genvar l = 0; l < R; l++) begin : g_last
    logic              s_req   [M];
    logic [DATA_W-1:0] s_data  [M];
    ans_e              s_ans   [M];
    logic              d_req   [N];
    logic [DATA_W-1:0] d_data  [N];
    ans_e              d_ans   [N];
    for (genvar m = 0; m < M; m++) begin : g_port
      assign s_req[m]     = ml_req[m][l];
      assign s_data[m]    = ml_data[m][l];
      assign ml_ans[m][l] = s_ans[m];
    end
    for (genvar k = 0; k < N; k++) begin : g_dst
      assign dst_req[l*N + k]  = d_req[k];
      assign dst_data[l*N + k] = d_data[k];
      assign d_ans[k]          = ans_e'(dst_ans[l*N + k]);
    end
    clos_switch #(
      .STAGE (STAGE_LAST),
      .NI    (M),
      .NO    (N),
      .N     (N),
      .ADDR_W(ADDR_W),
      .DATA_W(DATA_W)
    ) u_sw (
      .clk     (clk),
      .rst_n   (rst_n),
      .in_req  (s_req),
      .in_data (s_data),
      .in_ans  (s_ans),
      .out_req (d_req),
      .out_data(d_data),
      .out_ans (d_ans)
    );
  end

endmodule
