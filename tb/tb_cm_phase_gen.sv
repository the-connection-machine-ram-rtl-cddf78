// tb_cm_phase_gen: self-checking test of the four-phase clock generator.
//
// Two instances run side by side, one with REFRESH in phi3 (the default)
// and one with REFRESH in phi4.  After reset the test follows 40 clocks and
// compares the phase and every strobe with a table written from the chip's
// timing diagram: PC1 phi1, READ phi2, PC2 phi3, WRITE phi4, PC phi1+phi3,
// shared READ phi1+phi2.  It also checks that a memory cycle is four clocks
// (cycle_start once every four) and that reset restarts the sequence.
module tb_cm_phase_gen;
  import cm_ram_pkg::*;

  logic clk = 1'b0, rst_n = 1'b0;
  phase_e  phase_a, phase_b;
  ph_sig_t ph_a, ph_b;
  logic    cs_a, cs_b;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  cm_phase_gen                        dut_a (.clk, .rst_n, .phase(phase_a), .ph(ph_a), .cycle_start(cs_a));
  cm_phase_gen #(.REFRESH_ON_PHI4(1)) dut_b (.clk, .rst_n, .phase(phase_b), .ph(ph_b), .cycle_start(cs_b));

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  // Expected strobes for phase index k (0 = phi1), written from the table.
  function automatic ph_sig_t expect_ph(input int k, input bit ref4);
    ph_sig_t e;
    e.pc1 = (k == 0); e.col_read = (k == 1); e.pc2 = (k == 2); e.write = (k == 3);
    e.pc = (k == 0) || (k == 2);
    e.shared_read = (k == 0) || (k == 1);
    e.refresh = ref4 ? (k == 3) : (k == 2);
    return e;
  endfunction

  int k, last_start, n_start;

  initial begin
    repeat (3) @(posedge clk);
    @(negedge clk) rst_n = 1'b1;
    k = 0; last_start = -1; n_start = 0;
    for (int t = 0; t < 40; t++) begin
      check(phase_a == phase_e'(k) && phase_b == phase_e'(k), $sformatf("t=%0d phase %0d expected %0d", t, phase_a, k));
      check(ph_a == expect_ph(k, 1'b0), $sformatf("t=%0d strobes (phi3 refresh) %b", t, ph_a));
      check(ph_b == expect_ph(k, 1'b1), $sformatf("t=%0d strobes (phi4 refresh) %b", t, ph_b));
      check(cs_a == (k == 0) && cs_b == (k == 0), $sformatf("t=%0d cycle_start", t));
      if (cs_a) begin
        if (last_start >= 0) check(t - last_start == 4, $sformatf("memory cycle of %0d clocks", t - last_start));
        last_start = t; n_start++;
      end
      @(negedge clk);
      k = (k + 1) % 4;
    end
    check(n_start == 10, "ten memory cycles in 40 clocks");
    // Reset in mid-cycle restarts at phi1.
    while (phase_a != PHI3) @(negedge clk);
    rst_n = 1'b0;
    @(negedge clk);
    check(phase_a == PHI1 && phase_b == PHI1, "reset returns to phi1");
    rst_n = 1'b1;
    @(negedge clk);
    check(phase_a == PHI2, "sequence resumes after reset");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (1000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
