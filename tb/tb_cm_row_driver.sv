// tb_cm_row_driver: self-checking test of one row's precharge stage,
// refresh driver and bit line.
//
// The test plays the cell itself: it stores a bit, pulls the line down in
// phi2 when that bit is one, and at the end of phi4 takes the line level as
// the newly written bit.  Over many memory cycles it checks the line level
// in every phase: high in phi1 (precharge), the inverse of the stored bit in
// phi2, the stored bit in phi4 (refresh restores it), or, when the row is
// selected, the level driven by the shared driver.  Both refresh timings
// (REFRESH in phi3 and in phi4) are exercised.
module tb_cm_row_driver;
  import cm_ram_pkg::*;

  logic    clk = 1'b0;
  ph_sig_t ph;
  logic    cell_pd, selected, ext_en, ext_val, bl;
  logic    stored;
  int checks = 0, failures = 0;
  int n_ref1 = 0, n_ref0 = 0, n_ext = 0;

  always #5 clk = ~clk;

  cm_row_driver dut (.clk, .ph, .cell_pd, .selected, .ext_en, .ext_val, .bl);

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  task automatic set_phase(input int k, input bit ref4);
    ph = '0;
    ph.pc1 = (k == 0); ph.col_read = (k == 1); ph.pc2 = (k == 2); ph.write = (k == 3);
    ph.pc = ph.pc1 | ph.pc2; ph.shared_read = (k < 2);
    ph.refresh = ref4 ? (k == 3) : (k == 2);
  endtask

  // One memory cycle; sel/val: row selected and the shared driver's level.
  task automatic mem_cycle(input bit ref4, input bit sel, input bit val);
    logic expect4;
    expect4 = sel ? val : stored;
    for (int k = 0; k < 4; k++) begin
      set_phase(k, ref4);
      selected = sel;
      ext_en   = sel && (k == 2);
      ext_val  = val;
      cell_pd  = (k == 1) && stored;
      #1;
      case (k)
        0: check(bl == 1'b1, "phi1: line precharged high");
        1: check(bl == !stored, $sformatf("phi2: line %b for stored %b", bl, stored));
        3: check(bl == expect4, $sformatf("phi4: line %b expected %b (sel %b ref4 %b)", bl, expect4, sel, ref4));
        default: ;
      endcase
      @(posedge clk);
      #1;
    end
    if (sel) n_ext++; else if (stored) n_ref1++; else n_ref0++;
    stored = expect4;   // the cell takes the line level at the end of WRITE
  endtask

  initial begin
    selected = 0; ext_en = 0; ext_val = 0; cell_pd = 0; ph = '0;
    stored = 1'b1;
    @(posedge clk); #1;
    for (int ref4 = 0; ref4 < 2; ref4++)
      for (int i = 0; i < 200; i++) begin
        mem_cycle(ref4[0], ($urandom_range(3) == 0), 1'($urandom));
      end
    check(n_ref1 > 0 && n_ref0 > 0 && n_ext > 0, "ones and zeros refreshed, selected row driven");
    $display("refreshed ones %0d, zeros %0d, driven %0d", n_ref1, n_ref0, n_ext);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
