// cm_ram_pkg: types and constants shared by the RAM chip modules.
//
// The RAM holds 16 registers of 24 bits, laid out as 16 rows (one bit line
// per row) by 24 columns (one READ and one WRITE line per column).  A memory
// cycle has four non-overlapping phases phi1..phi4.  The package defines the
// phase enum and a struct bundling the control strobes that the phase
// generator derives from it.  The array size is the chip's own.
package cm_ram_pkg;

  localparam int unsigned ROWS     = 16;
  localparam int unsigned COLS     = 24;

  // One master-clock period per phase.
  typedef enum logic [1:0] {
    PHI1 = 2'd0,   // precharge (PC1)
    PHI2 = 2'd1,   // column READ, shared READ
    PHI3 = 2'd2,   // precharge (PC2), shared driver evaluates
    PHI4 = 2'd3    // column WRITE
  } phase_e;

  // Control strobes, each high for whole phases.
  typedef struct packed {
    logic pc;           // bit-line precharge, phi1 | phi3
    logic pc1;          // phi1
    logic pc2;          // phi3
    logic col_read;     // column READ, phi2
    logic write;        // column WRITE, phi4
    logic refresh;      // REFRESH-and-WRITE of the row drivers
    logic shared_read;  // shared READ, phi1 | phi2
  } ph_sig_t;

endpackage
