// cm_row_decoder: selects one bit line for the shared driver or a pad.
//
// Each row has a pass transistor in the decoder that connects its bit line to
// the shared ALU driver (ASEL) or to the BOUT pad (BSEL).  This block turns a
// binary row address into the one-hot gate signals for those pass
// transistors.  That a decoder selects one line per cycle is the chip's; the
// plain binary decode is this design's choice.  An address of N or more
// selects no line.  Combinational.
module cm_row_decoder #(
  parameter int unsigned N  = 16,
  parameter int unsigned AW = (N > 1) ? $clog2(N) : 1
) (
  input  logic [AW-1:0] addr,
  output logic [N-1:0]  sel
);

  always_comb begin
    for (int unsigned r = 0; r < N; r++)
      sel[r] = (addr == AW'(r));
  end

endmodule
