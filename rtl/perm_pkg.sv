// perm_pkg: types and constants shared by the circuit-switched Clos
// permutation network.
//
// Each link between two switches carries, downstream, a 1-bit Req and a
// DATA_W-bit data word (the probe during setup, payload during transfer) and,
// upstream, a 2-bit Ans. The Ans codes Ack = 01 and nAck = 11 follow the
// published design. The code for Back (link blocked) is taken here as 10, the one
// two-bit value the published design leaves unused, and 00 means "no answer yet".
package perm_pkg;

  // Answer code travelling from a downstream port towards the source.
  typedef enum logic [1:0] {
    ANS_NONE = 2'b00,  // nothing to say (setup still in progress, or idle)
    ANS_ACK  = 2'b01,  // path complete and destination ready to receive
    ANS_BACK = 2'b10,  // link blocked: probe must move back
    ANS_NACK = 2'b11   // path complete but destination not ready (flow control)
  } ans_e;

  // The three kinds of switch differ only in how a probe picks its output.
  typedef enum logic [1:0] {
    STAGE_FIRST  = 2'd0,  // any untried free output, lowest index first (EPB)
    STAGE_MIDDLE = 2'd1,  // output = last-stage switch of the destination
    STAGE_LAST   = 2'd2   // output = port of the destination on its switch
  } stage_e;

  // Default sizes: Clos C(n, m, r) with n = m = r = 5 and a 25-bit data path.
  localparam int unsigned DEF_N      = 5;
  localparam int unsigned DEF_M      = 5;
  localparam int unsigned DEF_R      = 5;
  localparam int unsigned DEF_DATA_W = 25;

endpackage
