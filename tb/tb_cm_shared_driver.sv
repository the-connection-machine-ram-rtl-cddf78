// tb_cm_shared_driver: self-checking test of the shared ALU driver.
//
// The test plays the selected bit line: precharged high in phi1, the inverse
// of a random stored bit in phi2.  It checks that AOUT gives the stored bit
// from phi2 to the end of the cycle and that in phi3 the driver is enabled
// and drives the stored bit back when NOP-bar is low, or the ALU's bit when
// NOP-bar is high, and is disabled in the other phases.  All four
// combinations of NOP-bar and ALU input are counted and must each occur.
module tb_cm_shared_driver;
  import cm_ram_pkg::*;

  logic    clk = 1'b0;
  ph_sig_t ph;
  logic    sel_line, nop_n, alu_in, aout, drive_en, drive_val;
  int checks = 0, failures = 0;
  int combo [4];

  always #5 clk = ~clk;

  cm_shared_driver dut (.clk, .ph, .sel_line, .nop_n, .alu_in, .aout, .drive_en, .drive_val);

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    ph = '0; sel_line = 1; nop_n = 0; alu_in = 0;
    for (int i = 0; i < 4; i++) combo[i] = 0;
    @(posedge clk); #1;
    for (int i = 0; i < 300; i++) begin
      bit d, n, a;
      d = 1'($urandom); n = 1'($urandom); a = 1'($urandom);
      nop_n = n; alu_in = a;
      for (int k = 0; k < 4; k++) begin
        ph = '0;
        ph.pc1 = (k == 0); ph.col_read = (k == 1); ph.pc2 = (k == 2); ph.write = (k == 3);
        ph.pc = ph.pc1 | ph.pc2; ph.shared_read = (k < 2); ph.refresh = (k == 2);
        sel_line = (k == 1) ? !d : 1'b1;
        #1;
        if (k >= 1) check(aout == d, $sformatf("phase %0d aout %b stored %b", k, aout, d));
        check(drive_en == (k == 2), $sformatf("phase %0d drive_en %b", k, drive_en));
        if (k == 2) check(drive_val == (n ? a : d), $sformatf("write-back %b, nop_n %b alu %b stored %b", drive_val, n, a, d));
        @(posedge clk); #1;
      end
      combo[{n, a}]++;
    end
    for (int i = 0; i < 4; i++) check(combo[i] > 0, $sformatf("NOP-bar/ALU-IN combination %0d never ran", i));
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
