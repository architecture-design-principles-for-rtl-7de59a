// crossbar: the switch fabric, a set of one-hot multiplexers.
//
// Output o carries the flit of the input whose bit is set in sel_i[o]; with no
// bit set it carries zero. sel_i[o] comes from the arbiter of output o, so at
// most one bit is set per output. Purely combinational (its delay, together
// with the arbiter's, sits between the synchronizer mux and the output
// buffer flops).
//
// The reference names the crossbar; the AND-OR multiplexer form is this
// design's choice.
module crossbar #(
  parameter int unsigned N_IN  = 4,
  parameter int unsigned N_OUT = 4,
  parameter int unsigned W     = noc_pkg::FLIT_W
) (
  input  logic [N_IN-1:0][W-1:0]  in_i,
  input  logic [N_OUT-1:0][N_IN-1:0] sel_i,
  output logic [N_OUT-1:0][W-1:0] out_o
);

  always_comb begin
    for (int o = 0; o < N_OUT; o++) begin
      out_o[o] = '0;
      for (int i = 0; i < N_IN; i++) begin
        out_o[o] |= in_i[i] & {W{sel_i[o][i]}};
      end
    end
  end

endmodule
