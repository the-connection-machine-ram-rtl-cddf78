// tb_cm_ram_chip_phi4: end-to-end test of the RAM chip with the row drivers
// refreshing in phi4 (the corrected timing) on a smaller 10 x 12 array.
//
// The test keeps its own copy of the 384 bits.  Each memory cycle it picks a
// column, an A row, a B row, NOP-bar and an ALU bit, and checks over the
// four phases:
//   phi1  BOUT is high (bit line precharged);
//   phi2  BOUT is the inverse of the B row's stored bit, AOUT the A row's;
//   phi3  AOUT still holds the A row's bit;
//   phi4  BOUT carries the level about to be written into the B row's cell.
// Then it updates its copy: with NOP-bar high the A row's cell takes the ALU
// bit, otherwise nothing changes.  Because every later read of every cell is
// checked, the refresh of the unselected rows is checked too.
//
// The run first writes every cell through the ALU path, reads every cell back
// with NOP-bar low, runs 3000 random cycles and reads every cell again.  It
// counts each mechanism: ALU write, NOP refresh of the selected row, refresh
// of unselected rows holding one and zero, the eight combinations of NOP-bar,
// ALU bit and stored bit, and checks that a memory cycle takes four clocks.
module tb_cm_ram_chip_phi4;
  import cm_ram_pkg::*;

  localparam int R = 10, C = 12;

  logic       clk = 1'b0, rst_n = 1'b0;
  logic [3:0] col_addr = '0;
  logic [3:0] a_addr = '0, b_addr = '0;
  logic       nop_n = 1'b0, alu_in = 1'b0;
  logic       aout, bout, cycle_start;
  phase_e     phase;

  logic [C-1:0] model [R];
  logic [C-1:0] known [R];
  int checks = 0, failures = 0;
  int n_alu_write = 0, n_nop_refresh = 0, n_refresh1 = 0, n_refresh0 = 0;
  int n_combo [8];
  int clocks = 0, last_start = -1, n_cycles = 0;

  always #5 clk = ~clk;

  cm_ram_chip #(.N_ROWS(R), .N_COLS(C), .REFRESH_ON_PHI4(1)) dut (
    .clk, .rst_n, .col_addr, .a_addr, .b_addr, .nop_n, .alu_in,
    .aout, .bout, .phase, .cycle_start
  );

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL: %s", what);
    end
  endtask

  // Memory cycle length: clocks between successive phi1.
  always @(posedge clk) begin
    clocks++;
    if (rst_n && cycle_start) begin
      if (last_start >= 0) begin
        checks++;
        if (clocks - last_start != 4) begin
          failures++;
          $display("FAIL: memory cycle of %0d clocks", clocks - last_start);
        end
      end
      last_start = clocks;
    end
  end

  task automatic mem_cycle(input int c, input int a, input int b, input bit n, input bit alu);
    bit a_known, b_known, old_a, old_b, next_b;
    while (!(cycle_start && phase == PHI1)) @(negedge clk);
    col_addr = 4'(c); a_addr = 4'(a); b_addr = 4'(b); nop_n = n; alu_in = alu;
    a_known = known[a][c]; b_known = known[b][c];
    old_a = model[a][c];   old_b = model[b][c];
    next_b = (b == a && n) ? alu : old_b;
    #1 check(bout == 1'b1, "phi1: BOUT precharged high");
    @(negedge clk); #1;
    check(phase == PHI2, "second phase is phi2");
    if (b_known) check(bout == !old_b, $sformatf("phi2: BOUT %b for row %0d col %0d holding %b", bout, b, c, old_b));
    if (a_known) check(aout == old_a, $sformatf("phi2: AOUT %b for row %0d col %0d holding %b", aout, a, c, old_a));
    @(negedge clk); #1;
    if (a_known) check(aout == old_a, "phi3: AOUT held");
    @(negedge clk); #1;
    if (b_known || (b == a && n)) check(bout == next_b, $sformatf("phi4: BOUT %b, level to write %b", bout, next_b));
    // Update the reference copy.
    if (n) begin
      model[a][c] = alu; known[a][c] = 1'b1; n_alu_write++;
    end else if (a_known) begin
      n_nop_refresh++;
    end
    if (a_known) n_combo[{n, alu, old_a}]++;
    for (int r = 0; r < R; r++)
      if (r != a && known[r][c]) begin
        if (model[r][c]) n_refresh1++; else n_refresh0++;
      end
    n_cycles++;
    @(negedge clk);
  endtask

  task automatic sweep_read();
    for (int c = 0; c < C; c++)
      for (int r = 0; r < R; r++)
        mem_cycle(c, r, $urandom_range(R - 1), 1'b0, 1'($urandom));
  endtask

  initial begin
    for (int r = 0; r < R; r++) begin known[r] = '0; model[r] = '0; end
    for (int i = 0; i < 8; i++) n_combo[i] = 0;
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    // Fill every cell through the ALU path.
    for (int c = 0; c < C; c++)
      for (int r = 0; r < R; r++)
        mem_cycle(c, r, r, 1'b1, 1'($urandom));
    sweep_read();
    for (int i = 0; i < 3000; i++)
      mem_cycle($urandom_range(C - 1), $urandom_range(R - 1), $urandom_range(R - 1),
                1'($urandom), 1'($urandom));
    sweep_read();
    $display("cycles %0d: ALU writes %0d, NOP refreshes %0d, unselected refreshes of 1/0 %0d/%0d",
             n_cycles, n_alu_write, n_nop_refresh, n_refresh1, n_refresh0);
    check(n_alu_write > 0,   "ALU write never happened");
    check(n_nop_refresh > 0, "NOP refresh never happened");
    check(n_refresh1 > 0,    "refresh of a stored one never happened");
    check(n_refresh0 > 0,    "refresh of a stored zero never happened");
    for (int i = 0; i < 8; i++)
      check(n_combo[i] > 0, $sformatf("NOP-bar/ALU/stored combination %0d never happened", i));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
