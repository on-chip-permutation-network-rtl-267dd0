// output_control: OUTPUT CONTROL (OC) of one switch output.
//
// The OC is the re-timing stage between the arbiter's control bus and the
// outgoing link. On every rising edge it registers the command of its output
// (owned or not) as the outgoing Req, and the word the crossbar selects for
// that output as the outgoing data. This register is the pipeline stage of
// the circuit: a probe and, later, the payload advance one switch per clock.
// When the output is not owned the data register is cleared, so an idle link
// carries zeros. Registering the data here is this design's choice; the
// published design says only that the OCs re-time the arbiter commands.
// Asynchronous active-low reset clears Req and data.
module output_control #(
  parameter int unsigned DATA_W = perm_pkg::DEF_DATA_W
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              cmd_valid,   // control bus: output owned
  input  logic [DATA_W-1:0] xbar_data,   // crossbar output for this port
  output logic              out_req,
  output logic [DATA_W-1:0] out_data
);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      out_req  <= 1'b0;
      out_data <= '0;
    end else begin
      out_req  <= cmd_valid;
      out_data <= cmd_valid ? xbar_data : '0;
    end
  end

endmodule
