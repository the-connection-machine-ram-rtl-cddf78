// tb_cm_row_decoder: exhaustive test of the row select decoder.
//
// Checks the 16-row default for every address (one-hot, the addressed bit)
// and a 12-row instance, where addresses 12..15 must select nothing.
module tb_cm_row_decoder;
  logic [3:0]  addr;
  logic [15:0] sel16;
  logic [11:0] sel12;
  int checks = 0, failures = 0;

  cm_row_decoder                dut16 (.addr, .sel(sel16));
  cm_row_decoder #(.N(12))      dut12 (.addr, .sel(sel12));

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    for (int a = 0; a < 16; a++) begin
      addr = 4'(a);
      #1;
      check(sel16 == (16'd1 << a), $sformatf("16 rows: addr %0d sel %h", a, sel16));
      check(sel12 == ((a < 12) ? 12'(1 << a) : 12'd0), $sformatf("12 rows: addr %0d sel %h", a, sel12));
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
