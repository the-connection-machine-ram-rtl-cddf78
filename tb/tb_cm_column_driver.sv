// tb_cm_column_driver: exhaustive test of the column READ/WRITE drivers.
//
// For every 5-bit column address and every phase it builds the phase
// strobes by hand and checks that exactly the addressed column's READ line
// is high in phi2 and its WRITE line in phi4, and that an address of 24 or
// more, or any other phase, drives no line.
module tb_cm_column_driver;
  import cm_ram_pkg::*;

  logic [4:0]      col_addr;
  ph_sig_t         ph;
  logic [COLS-1:0] read_line, write_line;
  int checks = 0, failures = 0;

  cm_column_driver dut (.col_addr, .ph, .read_line, .write_line);

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    for (int a = 0; a < 32; a++) begin
      for (int k = 0; k < 4; k++) begin
        logic [COLS-1:0] exp_r, exp_w;
        col_addr = 5'(a);
        ph = '0;
        ph.pc1 = (k == 0); ph.col_read = (k == 1); ph.pc2 = (k == 2); ph.write = (k == 3);
        ph.pc = ph.pc1 | ph.pc2; ph.shared_read = (k < 2); ph.refresh = (k == 2);
        exp_r = '0; exp_w = '0;
        if (a < COLS && k == 1) exp_r[a] = 1'b1;
        if (a < COLS && k == 3) exp_w[a] = 1'b1;
        #1;
        check(read_line == exp_r, $sformatf("addr %0d phase %0d read_line %h", a, k, read_line));
        check(write_line == exp_w, $sformatf("addr %0d phase %0d write_line %h", a, k, write_line));
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #100000;
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
