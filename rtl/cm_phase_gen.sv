// cm_phase_gen: four-phase clock generator for the RAM chip.
//
// A 2-bit counter steps phi1 -> phi2 -> phi3 -> phi4 -> phi1, one master-clock
// period per phase, so one memory cycle takes four clocks.  From the phase it
// decodes the strobes of the chip's timing diagram: PC1 in phi1, column READ
// in phi2, PC2 in phi3, WRITE in phi4, PC = PC1 | PC2, and shared READ in phi1
// and phi2.  The row drivers' REFRESH-and-WRITE strobe comes in phi3, as on
// the chip as built; REFRESH_ON_PHI4 = 1 moves it to phi4, the timing the
// chip's designers noted it should have had.  The strobe set and phases
// follow the chip; building them from one clock with a counter is this
// design's choice (the chip takes its phases from a clock it does not
// describe).
//
// Interface: clk, active-low synchronous reset rst_n (restarts in phi1).
// Outputs are decoded from the registered phase, so they change right after
// a clock edge and are steady for the whole phase.
module cm_phase_gen
  import cm_ram_pkg::*;
#(
  parameter bit REFRESH_ON_PHI4 = 1'b0
) (
  input  logic    clk,
  input  logic    rst_n,
  output phase_e  phase,
  output ph_sig_t ph,
  output logic    cycle_start
);

  always_ff @(posedge clk) begin
    if (!rst_n) phase <= PHI1;
    else        phase <= phase_e'(phase + 2'd1);
  end

  always_comb begin
    ph.pc1         = (phase == PHI1);
    ph.col_read    = (phase == PHI2);
    ph.pc2         = (phase == PHI3);
    ph.write       = (phase == PHI4);
    ph.pc          = ph.pc1 | ph.pc2;
    ph.shared_read = (phase == PHI1) || (phase == PHI2);
    ph.refresh     = REFRESH_ON_PHI4 ? (phase == PHI4) : (phase == PHI3);
    cycle_start    = ph.pc1;
  end

endmodule
