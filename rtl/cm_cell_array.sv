// cm_cell_array: the 16 x 24 array of three-transistor dynamic RAM cells.
//
// Rows share a bit line; columns share a READ and a WRITE line.  A cell
// stores the level of its bit line while its WRITE line is high, as charge
// on the gate of its storage transistor.  While its READ line is high, a cell
// holding a one opens a path to ground and pulls its bit line low; a cell
// holding a zero leaves the precharged line high.  A read therefore gives
// the inverse of the stored bit on the bit line.
//
// Model: each cell is one flip-flop.  WRITE is sampled at the clock edge
// that ends phi4 and stores bl[r] into every cell of the written column.
// rd_pd[r] is combinational: high while some READ line is high and the
// cell of that column in row r holds a one; the row driver turns it into the
// bit-line level.  The cell's read and write behaviour is the chip's; charge
// leakage is not modelled, so a cell keeps its value until it is rewritten,
// and there is no reset, since a dynamic RAM powers up with arbitrary data.
module cm_cell_array
  import cm_ram_pkg::*;
#(
  parameter int unsigned N_ROWS = ROWS,
  parameter int unsigned N_COLS = COLS
) (
  input  logic              clk,
  input  logic [N_COLS-1:0] read_line,
  input  logic [N_COLS-1:0] write_line,
  input  logic [N_ROWS-1:0] bl,
  output logic [N_ROWS-1:0] rd_pd
);

  // store[r][c]: charge on the storage gate of the cell in row r, column c.
  logic [N_COLS-1:0] store [N_ROWS];

  always_ff @(posedge clk) begin
    for (int unsigned r = 0; r < N_ROWS; r++)
      for (int unsigned c = 0; c < N_COLS; c++)
        if (write_line[c]) store[r][c] <= bl[r];
  end

  always_comb begin
    for (int unsigned r = 0; r < N_ROWS; r++)
      rd_pd[r] = |(store[r] & read_line);
  end

endmodule
