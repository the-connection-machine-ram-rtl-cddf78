// cm_row_driver: precharge stage, refresh driver and bit line of one row.
//
// The bit line is a wired, dynamic node.  This module resolves it: a driven
// pull-down (a cell being read, the refresh driver, or the shared driver
// writing a zero) wins; otherwise the precharge (PC = phi1 | phi3) or the
// shared driver writing a one makes it high; with nothing active the line
// keeps its last level.
//
// Refresh: in phi2 the column READ leaves the inverse of the stored bit on
// the line.  The driver's latch follows the line while shared READ is high
// (phi1 and phi2, so it is also open during precharge) and keeps the level
// it had at the end of phi2.  While REFRESH is high the
// driver pulls the freshly precharged line low if the latched level was
// high, so the line carries the inverse of the inverse, the stored bit, when
// WRITE closes in phi4.  A row picked by the decoder has its refresh driver
// disabled and takes its level from the shared driver instead (ext_en,
// ext_val).  The precharge and refresh sequence is the chip's; how the
// selected row's two drivers share the line is this design's choice.
//
// Timing: bl is combinational from the phase strobes and the stored state;
// the latch and the held level update at each clock edge.
module cm_row_driver
  import cm_ram_pkg::*;
(
  input  logic    clk,
  input  ph_sig_t ph,
  input  logic    cell_pd,
  input  logic    selected,
  input  logic    ext_en,
  input  logic    ext_val,
  output logic    bl
);

  logic bl_q;      // charge held on the bit line
  logic rd_latch;  // bit-line level captured while shared READ is high
  logic pd, pu;

  always_comb begin
    pd = cell_pd
       | (ph.refresh && !selected && rd_latch)
       | (ext_en && !ext_val);
    pu = ph.pc | (ext_en && ext_val);
    if (pd)      bl = 1'b0;
    else if (pu) bl = 1'b1;
    else         bl = bl_q;
  end

  always_ff @(posedge clk) begin
    bl_q <= bl;
    if (ph.shared_read) rd_latch <= bl;
  end

endmodule
