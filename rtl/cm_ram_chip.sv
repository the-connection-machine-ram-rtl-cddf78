// cm_ram_chip: the Connection Machine three-transistor dynamic RAM chip.
//
// 16 registers of 24 bits sit in a 16-row by 24-column array of dynamic
// cells.  Every memory cycle (four phases, four clocks) works on one column,
// that is, on one bit position of all 16 registers at once:
//   phi1  all bit lines precharge high;
//   phi2  the column's READ line pulls each row's line low where the cell
//         holds a one; every row driver latches its line; the row chosen by
//         a_addr is inverted by the shared driver and appears on AOUT;
//   phi3  lines precharge again; every unselected row driver pulls its line
//         low where it latched a high, restoring the stored bit (REFRESH);
//         the shared driver puts back on the selected line either the bit it
//         read (NOP-bar low) or the ALU's input bit (NOP-bar high);
//   phi4  the column's WRITE line stores every line's level into its cell.
// The row chosen by b_addr is brought out raw on BOUT, which reads the
// inverse of the stored bit during phi2 and is high while precharged.
//
// Interface: col_addr, a_addr, b_addr, nop_n and alu_in must be steady from
// phi1 to phi4 of a cycle; cycle_start is high in phi1.  AOUT is valid from
// phi2 and holds until the next phi2.  The array, the cycle and the
// NOP-bar behaviour are the chip's.  The single master clock with its phase
// counter, the binary addresses, the two row selects (A and B) and the
// logic-level pads are this design's choices.
module cm_ram_chip
  import cm_ram_pkg::*;
#(
  parameter int unsigned N_ROWS          = ROWS,
  parameter int unsigned N_COLS          = COLS,
  parameter bit          REFRESH_ON_PHI4 = 1'b0,
  localparam int unsigned RAW            = (N_ROWS > 1) ? $clog2(N_ROWS) : 1,
  localparam int unsigned CAW            = (N_COLS > 1) ? $clog2(N_COLS) : 1
) (
  input  logic           clk,
  input  logic           rst_n,
  input  logic [CAW-1:0] col_addr,
  input  logic [RAW-1:0] a_addr,
  input  logic [RAW-1:0] b_addr,
  input  logic           nop_n,
  input  logic           alu_in,
  output logic           aout,
  output logic           bout,
  output phase_e         phase,
  output logic           cycle_start
);

  ph_sig_t           ph;
  logic [N_COLS-1:0] read_line, write_line;
  logic [N_ROWS-1:0] bl, rd_pd, asel, bsel;
  logic              sel_line, drive_en, drive_val;

  cm_phase_gen #(.REFRESH_ON_PHI4(REFRESH_ON_PHI4)) u_phase (
    .clk, .rst_n, .phase, .ph, .cycle_start
  );

  cm_column_driver #(.N_COLS(N_COLS), .AW(CAW)) u_cols (
    .col_addr, .ph, .read_line, .write_line
  );

  cm_cell_array #(.N_ROWS(N_ROWS), .N_COLS(N_COLS)) u_array (
    .clk, .read_line, .write_line, .bl, .rd_pd
  );

  cm_row_decoder #(.N(N_ROWS), .AW(RAW)) u_adec (.addr(a_addr), .sel(asel));
  cm_row_decoder #(.N(N_ROWS), .AW(RAW)) u_bdec (.addr(b_addr), .sel(bsel));

  for (genvar r = 0; r < N_ROWS; r++) begin : g_row
    cm_row_driver u_drv (
      .clk,
      .ph,
      .cell_pd  (rd_pd[r]),
      .selected (asel[r]),
      .ext_en   (asel[r] && drive_en),
      .ext_val  (drive_val),
      .bl       (bl[r])
    );
  end

  // The shared driver's input node is precharged high (PC1) and stays high
  // when no line is selected.
  always_comb begin
    sel_line = (asel == '0) ? 1'b1 : |(bl & asel);
    bout     = |(bl & bsel);
  end

  cm_shared_driver u_shared (
    .clk, .ph, .sel_line, .nop_n, .alu_in, .aout, .drive_en, .drive_val
  );

endmodule
