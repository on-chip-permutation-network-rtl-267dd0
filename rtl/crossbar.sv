// crossbar: NI x NO full-connecting matrix built from output multiplexers.
//
// Each output carries the data word of the input named by its select. The
// selects come from the arbiter's control bus; the multiplexers are purely
// combinational and the output controls register their result. Default size
// 5x5, as in the published design.
module crossbar #(
  parameter int unsigned NI     = perm_pkg::DEF_N,
  parameter int unsigned NO     = perm_pkg::DEF_M,
  parameter int unsigned DATA_W = perm_pkg::DEF_DATA_W,
  localparam int unsigned IW    = (NI > 1) ? $clog2(NI) : 1
) (
  input  logic [DATA_W-1:0] in_data  [NI],
  input  logic [IW-1:0]     sel      [NO],
  output logic [DATA_W-1:0] out_data [NO]
);

  always_comb begin
    for (int o = 0; o < NO; o++) begin
      out_data[o] = '0;
      for (int i = 0; i < NI; i++) begin
        if (sel[o] == IW'(i)) out_data[o] = in_data[i];
      end
    end
  end

endmodule
