// tb_cm_ram_chip_cases: replays the chip's seven timing-diagram test cases.
//
// Each case drives NOP-bar and the ALU bit for several memory cycles on one
// cell (A and B select the same row) and checks the levels the timing
// diagrams give at each READ: AOUT has the sense of the stored bit and BOUT
// the inverse.  A write made in one cycle is read in the next.
//   case 1  NOP-bar high, ALU 0,0,1,1,0: reads 0,0,1,1 on AOUT (1,1,0,0 on BOUT)
//   case 2  NOP-bar high, ALU 1: BOUT reads 0 every cycle
//   case 3  NOP-bar low,  ALU 0: BOUT unchanged from case 2 (cell keeps 1)
//   case 4  NOP-bar low after a 0 was written: BOUT 1, AOUT 0 every cycle
//   case 5  NOP-bar high, ALU 0: AOUT 0, BOUT 1
//   case 6  NOP-bar low,  ALU 1: AOUT and BOUT unchanged from case 5
//   case 7  NOP-bar high, ALU 1: BOUT 0
// A neighbouring row of the same column holds a fixed pattern throughout
// and is checked at the end, so its refresh is tested too.  Full size,
// default parameters.
module tb_cm_ram_chip_cases;
  import cm_ram_pkg::*;

  localparam int ROW = 5, COL = 7, NEIGH = 6;

  logic       clk = 1'b0, rst_n = 1'b0;
  logic [4:0] col_addr = 5'(COL);
  logic [3:0] a_addr = 4'(ROW), b_addr = 4'(ROW);
  logic       nop_n = 1'b0, alu_in = 1'b0;
  logic       aout, bout, cycle_start;
  phase_e     phase;
  int checks = 0, failures = 0;
  int cases_run = 0;

  always #5 clk = ~clk;

  cm_ram_chip dut (
    .clk, .rst_n, .col_addr, .a_addr, .b_addr, .nop_n, .alu_in,
    .aout, .bout, .phase, .cycle_start
  );

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  // One memory cycle on (a, b); returns AOUT and BOUT sampled in phi2.
  task automatic mem_cycle(input int a, input int b, input bit n, input bit alu,
                           output bit a_rd, output bit b_rd);
    while (!(cycle_start && phase == PHI1)) @(negedge clk);
    a_addr = 4'(a); b_addr = 4'(b); nop_n = n; alu_in = alu;
    @(negedge clk); #1;
    a_rd = aout; b_rd = bout;
    repeat (3) @(negedge clk);
  endtask

  // Runs one case: ncyc cycles with fixed NOP-bar, alu[i] per cycle, and
  // the AOUT value expected at each READ (-1: not checked).
  task automatic run_case(input int id, input bit n, input bit alu [], input int exp_a []);
    bit ar, br;
    for (int i = 0; i < alu.size(); i++) begin
      mem_cycle(ROW, ROW, n, alu[i], ar, br);
      if (exp_a[i] >= 0) begin
        check(ar == exp_a[i][0], $sformatf("case %0d cycle %0d: AOUT %b expected %0d", id, i, ar, exp_a[i]));
        check(br == !exp_a[i][0], $sformatf("case %0d cycle %0d: BOUT %b expected %0d", id, i, br, !exp_a[i][0]));
      end
    end
    cases_run++;
  endtask

  bit ar, br;

  initial begin
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    // Fixed pattern in the neighbouring row: write 1.
    mem_cycle(NEIGH, NEIGH, 1'b1, 1'b1, ar, br);
    // Start the cell from a known 1.
    mem_cycle(ROW, ROW, 1'b1, 1'b1, ar, br);
    run_case(1, 1'b1, '{0, 0, 1, 1, 0},    '{1, 0, 0, 1, 1});
    run_case(2, 1'b1, '{1, 1, 1, 1, 1},    '{0, 1, 1, 1, 1});
    run_case(3, 1'b0, '{0, 0, 0, 0},       '{1, 1, 1, 1});
    mem_cycle(ROW, ROW, 1'b1, 1'b0, ar, br);      // write the 0 of case 4
    run_case(4, 1'b0, '{0, 1, 0, 1},       '{0, 0, 0, 0});
    run_case(5, 1'b1, '{0, 0, 0, 0},       '{0, 0, 0, 0});
    run_case(6, 1'b0, '{1, 1, 1, 1},       '{0, 0, 0, 0});
    run_case(7, 1'b1, '{1, 1, 1, 1},       '{0, 1, 1, 1});
    mem_cycle(ROW, ROW, 1'b0, 1'b0, ar, br);
    check(ar == 1'b1 && br == 1'b0, "after case 7 the cell holds 1");
    // The neighbour kept its 1 through all the refresh-only cycles.
    mem_cycle(NEIGH, ROW, 1'b0, 1'b0, ar, br);
    check(ar == 1'b1, "neighbouring row kept its bit through refresh");
    check(cases_run == 7, "all seven cases ran");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
