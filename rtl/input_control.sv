// input_control: INPUT CONTROL (IC) of one switch input.
//
// The IC runs the setup, transfer and release phases of one circuit for its
// input port. When Req rises, the data lines carry the probe, whose low
// ADDR_W bits are the network output the source wants. The IC picks an output
// of its switch from the probe and the status bus, asks the arbiter for it on
// the request bus, and then either holds the granted output until Req falls,
// or answers Back.
//
// Probe routing (the only thing that differs between the three kinds of
// switch, as in the published design):
//   STAGE_FIRST  - exhausted profitable backtracking: try the free, not yet
//                  tried outputs (links to the middle switches) in index
//                  order. A Back from downstream, or a lost arbitration,
//                  marks that output as tried and the next one is tried. Only
//                  when no untried free output is left is Back sent to the
//                  source.
//   STAGE_MIDDLE - the only profitable output is the last-stage switch of the
//                  destination, addr / N. Busy or lost: answer Back.
//   STAGE_LAST   - the only profitable output is the destination port on this
//                  switch, addr % N. Busy or lost: answer Back.
//
// Timing: state is kept on the rising edge. The request is combinational from
// the state and the input, and is judged by the arbiter on the falling edge
// of the same cycle, so a probe is handled in one clock cycle per switch.
// A probe whose only profitable output is already busy gets Back in the
// cycle it arrives; one that loses arbitration gets Back one cycle later. A
// first-stage backtrack (release, then a new request) costs two cycles.
//
// Interface rules this design adds (the published design does not give them): the
// source holds the probe on the data lines until it sees Ack, nAck or Back,
// and keeps Req low for at least one cycle between two circuits. An
// asynchronous active-low reset returns the IC to idle.
module input_control
  import perm_pkg::*;
#(
  parameter stage_e      STAGE  = STAGE_FIRST,
  parameter int unsigned NO     = DEF_M,            // outputs of this switch
  parameter int unsigned N      = DEF_N,            // ports per last-stage switch
  parameter int unsigned ADDR_W = $clog2(DEF_N * DEF_R),
  localparam int unsigned OW    = (NO > 1) ? $clog2(NO) : 1
) (
  input  logic              clk,
  input  logic              rst_n,
  // upstream link
  input  logic              in_req,
  input  logic [ADDR_W-1:0] in_addr,     // low bits of the incoming data word
  output ans_e              in_ans,      // answer sent back upstream
  // status bus: which outputs of the switch are owned
  input  logic [NO-1:0]     status,
  // request bus
  output logic              req_valid,
  output logic [OW-1:0]     req_port,
  output logic              rel,         // give the held output back
  // grant bus
  input  logic              granted,     // this IC owns an output ...
  input  logic [OW-1:0]     grant_port,  // ... this one
  input  ans_e              grant_ans,   // Ans of the owned output
  input  logic              lost,        // last request refused ...
  input  logic [OW-1:0]     lost_port    // ... for this output
);

  typedef enum logic [1:0] {
    IC_IDLE,    // no circuit
    IC_SETUP,   // first stage only: looking for another middle switch
    IC_HOLD,    // owns an output; forward path set towards downstream
    IC_REJECT   // probe blocked here; answering Back until Req falls
  } ic_state_e;

  ic_state_e         state_q, state_d;
  logic [ADDR_W-1:0] dest_q, dest;
  logic [NO-1:0]     tried_q, tried_d;
  logic [OW-1:0]     held_q, held_d;

  logic          target_ok;
  logic [OW-1:0] target;

  assign dest = (state_q == IC_IDLE) ? in_addr : dest_q;

  // Probe routing: choose the output this IC asks for.
  always_comb begin
    target_ok = 1'b0;
    target    = '0;
    unique case (STAGE)
      STAGE_FIRST: begin
        for (int o = NO - 1; o >= 0; o--) begin
          if (!status[o] && !tried_q[o]) begin
            target_ok = 1'b1;
            target    = OW'(o);
          end
        end
      end
      STAGE_MIDDLE: begin
        if ((int'(dest) / N) < NO) begin
          target    = OW'(int'(dest) / N);
          target_ok = !status[target];
        end
      end
      default: begin  // STAGE_LAST
        if ((int'(dest) % N) < NO) begin
          target    = OW'(int'(dest) % N);
          target_ok = !status[target];
        end
      end
    endcase
  end

  assign req_valid = in_req && (state_q == IC_IDLE || state_q == IC_SETUP) && target_ok;
  assign req_port  = target;
  assign rel       = (state_q == IC_HOLD) &&
                     (!in_req || (STAGE == STAGE_FIRST && grant_ans == ANS_BACK));

  always_comb begin
    unique case (state_q)
      IC_HOLD:   in_ans = (STAGE == STAGE_FIRST && grant_ans == ANS_BACK) ? ANS_NONE : grant_ans;
      IC_REJECT: in_ans = ANS_BACK;
      // a probe that finds nothing free here is turned back at once
      default:   in_ans = (in_req && !target_ok && !granted) ? ANS_BACK : ANS_NONE;
    endcase
  end

  // Next state. Everything the arbiter decided on the falling edge is read
  // here from its outputs (granted/grant_port for a win, lost/lost_port for a
  // lost arbitration), never from the request, which has already moved on.
  always_comb begin
    state_d = state_q;
    tried_d = tried_q;
    held_d  = held_q;
    if (!in_req) begin
      state_d = IC_IDLE;
      tried_d = '0;
    end else begin
      unique case (state_q)
        IC_IDLE, IC_SETUP: begin
          if (granted) begin
            state_d = IC_HOLD;
            held_d  = grant_port;
          end else if (lost) begin
            if (STAGE == STAGE_FIRST) begin
              state_d            = IC_SETUP;    // try the next middle switch
              tried_d[lost_port] = 1'b1;
            end else begin
              state_d = IC_REJECT;
            end
          end else if (target_ok) begin
            state_d = IC_SETUP;                 // an output just became free
          end else begin
            state_d = IC_REJECT;                // nothing left to try
          end
        end
        IC_HOLD: begin
          // The arbiter frees a held output only when this IC releases it,
          // which with Req still high means a Back was received: backtrack.
          if (!granted) begin
            state_d         = IC_SETUP;
            tried_d[held_q] = 1'b1;
          end
        end
        default: ;                              // IC_REJECT: wait for release
      endcase
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state_q <= IC_IDLE;
      tried_q <= '0;
      held_q  <= '0;
      dest_q  <= '0;
    end else begin
      state_q <= state_d;
      tried_q <= tried_d;
      held_q  <= held_d;
      if (state_q == IC_IDLE && in_req) dest_q <= in_addr;
    end
  end

  // Handshake rule: only a first-stage IC gives up an output while Req is
  // still high, and only after a Back.
  always_ff @(negedge clk) begin
    if (rst_n && rel && in_req)
      assert (STAGE == STAGE_FIRST && grant_ans == ANS_BACK)
        else $error("input_control: output released without Back");
  end

endmodule
