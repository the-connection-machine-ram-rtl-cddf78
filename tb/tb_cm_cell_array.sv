// tb_cm_cell_array: self-checking test of the 16 x 24 dynamic cell array.
//
// The test keeps its own copy of the array.  It writes random bit-line
// patterns into random columns (one WRITE line high for one clock) and,
// in between, raises single READ lines and checks that each row's pull-down
// request equals the stored bit of that column: a stored one pulls the line
// low.  It also checks that no READ line means no pull-down and that a write
// touches only its own column.
module tb_cm_cell_array;
  import cm_ram_pkg::*;

  logic            clk = 1'b0;
  logic [COLS-1:0] read_line = '0, write_line = '0;
  logic [ROWS-1:0] bl = '0, rd_pd;
  logic [COLS-1:0] model [ROWS];
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  cm_cell_array dut (.clk, .read_line, .write_line, .bl, .rd_pd);

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  task automatic write_col(input int c, input logic [ROWS-1:0] v);
    @(negedge clk);
    read_line = '0; write_line = '0; write_line[c] = 1'b1; bl = v;
    @(negedge clk);
    write_line = '0; bl = ~v;   // changing the line after WRITE must not matter
    for (int r = 0; r < ROWS; r++) model[r][c] = v[r];
  endtask

  task automatic read_col(input int c);
    logic [ROWS-1:0] exp;
    @(negedge clk);
    write_line = '0; read_line = '0; read_line[c] = 1'b1;
    #1;
    for (int r = 0; r < ROWS; r++) exp[r] = model[r][c];
    check(rd_pd == exp, $sformatf("read col %0d pd %h expected %h", c, rd_pd, exp));
    read_line = '0;
    #1;
    check(rd_pd == '0, "no READ line, no pull-down");
  endtask

  initial begin
    for (int c = 0; c < COLS; c++) write_col(c, ROWS'($urandom));
    for (int c = 0; c < COLS; c++) read_col(c);
    for (int i = 0; i < 300; i++) begin
      if ($urandom_range(1)) write_col($urandom_range(COLS - 1), ROWS'($urandom));
      read_col($urandom_range(COLS - 1));
    end
    for (int c = 0; c < COLS; c++) read_col(c);
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
