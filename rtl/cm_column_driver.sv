// cm_column_driver: READ and WRITE line drivers of the 24 columns.
//
// Each column of three-transistor cells has a READ line, pulsed in phi2, and
// a WRITE line, pulsed in phi4.  This block decodes a binary column address
// and gates the addressed column's lines with the column-READ and WRITE
// strobes, so one column (one bit of every register) is read, refreshed and
// rewritten per memory cycle.  The per-column READ/WRITE lines and their
// phases are the chip's; the binary address and its decoding are this
// design's choice.  An address of COLS or more drives no line.
//
// Interface: col_addr must be held for the whole memory cycle.  Outputs are
// combinational.
module cm_column_driver
  import cm_ram_pkg::*;
#(
  parameter int unsigned N_COLS = COLS,
  parameter int unsigned AW     = (N_COLS > 1) ? $clog2(N_COLS) : 1
) (
  input  logic [AW-1:0]     col_addr,
  input  ph_sig_t           ph,
  output logic [N_COLS-1:0] read_line,
  output logic [N_COLS-1:0] write_line
);

  always_comb begin
    for (int unsigned c = 0; c < N_COLS; c++) begin
      read_line[c]  = ph.col_read && (col_addr == AW'(c));
      write_line[c] = ph.write    && (col_addr == AW'(c));
    end
  end

endmodule
