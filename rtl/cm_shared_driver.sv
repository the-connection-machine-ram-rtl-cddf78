// cm_shared_driver: the one ALU driver shared by all rows.
//
// In phi2 (READ) the bit line picked by the decoder is inverted, so AOUT has
// the sense of the stored bit, and the driver latches it.  In phi3 (PC2) the
// driver pushes a level back onto the selected line for the WRITE of phi4:
// with NOP-bar low it is the latched bit (the cell is simply refreshed), with
// NOP-bar high it is the input bit from the ALU (the cell is overwritten).
// NOP-bar therefore chooses between the two pass transistors feeding the
// driver's write-back loop, as on the chip.
//
// Polarity follows the chip's timing diagrams: after a write of b the cell
// holds b, AOUT reads b and the raw bit line reads not-b during READ.
//
// Timing: aout follows the selected line during phi2 and holds the latched
// value for the rest of the memory cycle.  nop_n and alu_in are used in phi3
// and must stay steady through phi4.  drive_en is high in phi3; the bit line
// keeps the driven level through phi4 as stored charge.
module cm_shared_driver
  import cm_ram_pkg::*;
(
  input  logic    clk,
  input  ph_sig_t ph,
  input  logic    sel_line,
  input  logic    nop_n,
  input  logic    alu_in,
  output logic    aout,
  output logic    drive_en,
  output logic    drive_val
);

  logic rd_bit;  // inverted selected line, latched at the end of READ

  always_ff @(posedge clk) begin
    if (ph.col_read) rd_bit <= !sel_line;
  end

  always_comb begin
    aout      = ph.col_read ? !sel_line : rd_bit;
    drive_en  = ph.pc2;
    drive_val = nop_n ? alu_in : rd_bit;
  end

endmodule
