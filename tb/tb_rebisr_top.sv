// tb_rebisr_top: end-to-end test of the three-RAM self-repair at its full
// size (16x16, 32x32 and 64x64 bits).  Each round injects stuck-at defects
// into the cell arrays, pulses start, waits for done and checks, per RAM:
//   - repaired against the reference allocation (rebisr_ref_pkg), fed with the
//     faulty cells in the order March C- first detects them (stuck-at-1 cells
//     in the first ascending r0 pass, stuck-at-0 cells in the r1 pass, each in
//     address then column order);
//   - the spare row / column / cell usage against the same reference;
//   - for every repaired RAM, that random data written through the normal
//     port to every word reads back intact.
// Rounds: defect free; the worked 8-fault pattern in RAM0 with random faults
// elsewhere; defective spare row, spare column and spare cells; a RAM with more faults
// than the bitmap holds; several random rounds.  Every mechanism (fault
// report, repeated report, spare row, spare column, spare cell, defective
// spare row/column/cell, bitmap overflow, unrepairable RAM, reconfiguration for
// each RAM, normal-mode read through each kind of spare) is counted and must
// occur at least once.
module tb_rebisr_top;
  import rebisr_pkg::*;
  import rebisr_ref_pkg::*;

  logic clk = 0;
  always #5 clk = ~clk;
  logic rst_n = 0, start = 0, done;
  logic [NUM_RAMS-1:0] repaired, mode;
  logic m0_cen = 1, m0_wen = 1, m1_cen = 1, m1_wen = 1, m2_cen = 1, m2_wen = 1;
  logic [3:0] m0_addr = '0;
  logic [4:0] m1_addr = '0;
  logic [5:0] m2_addr = '0;
  logic [15:0] m0_wdata = '0, m0_rdata;
  logic [31:0] m1_wdata = '0, m1_rdata;
  logic [63:0] m2_wdata = '0, m2_rdata;
  logic [17*17-1:0] m0_defect_mask, m0_defect_val;
  logic [33*33-1:0] m1_defect_mask, m1_defect_val;
  logic [65*65-1:0] m2_defect_mask, m2_defect_val;
  logic [15:0] m0_cell_defect_mask, m0_cell_defect_val;
  logic [31:0] m1_cell_defect_mask, m1_cell_defect_val;
  logic [63:0] m2_cell_defect_mask, m2_cell_defect_val;

  rebisr_top dut (.*);

  // defects per RAM: dm = defective, dv = stuck value; indices [ram][row][col]
  bit dm [NUM_RAMS][65][65];
  bit dv [NUM_RAMS][65][65];
  // spare-cell defects [ram][cell]
  bit cm [NUM_RAMS][64];
  bit cv [NUM_RAMS][64];

  always_comb begin
    for (int r = 0; r < 17; r++) for (int c = 0; c < 17; c++) begin
      m0_defect_mask[r*17 + c] = dm[0][r][c];
      m0_defect_val[r*17 + c]  = dv[0][r][c];
    end
    for (int r = 0; r < 33; r++) for (int c = 0; c < 33; c++) begin
      m1_defect_mask[r*33 + c] = dm[1][r][c];
      m1_defect_val[r*33 + c]  = dv[1][r][c];
    end
    for (int r = 0; r < 65; r++) for (int c = 0; c < 65; c++) begin
      m2_defect_mask[r*65 + c] = dm[2][r][c];
      m2_defect_val[r*65 + c]  = dv[2][r][c];
    end
    for (int k = 0; k < 64; k++) begin
      if (k < 16) begin m0_cell_defect_mask[k] = cm[0][k]; m0_cell_defect_val[k] = cv[0][k]; end
      if (k < 32) begin m1_cell_defect_mask[k] = cm[1][k]; m1_cell_defect_val[k] = cv[1][k]; end
      m2_cell_defect_mask[k] = cm[2][k];
      m2_cell_defect_val[k]  = cv[2][k];
    end
  end

  int checks = 0, failures = 0;
  // mechanism counters
  int n_fail_rep, n_dup_rep, n_row, n_col, n_cell, n_row_bad, n_col_bad, n_cell_bad, n_ovf,
      n_unrep, n_bypass_row, n_bypass_col, n_bypass_cell;
  int n_cfg [NUM_RAMS];

  task automatic check(bit cond, string msg);
    checks++;
    if (!cond) begin failures++; $display("FAIL %s", msg); end
  endtask

  // fault reports seen on the MBIST -> BIRA path
  bit seen [65][65];
  always @(posedge clk) begin
    if (dut.run) begin
      foreach (seen[r, c]) seen[r][c] = 0;
      n_cfg[dut.ram_idx]++;
    end
    if (dut.fail) begin
      n_fail_rep++;
      if (seen[dut.fau_row][dut.fau_col]) n_dup_rep++;
      seen[dut.fau_row][dut.fau_col] = 1;
    end
  end

  // allocation summary of the BIRA when each RAM finishes
  bit got_row [NUM_RAMS], got_col [NUM_RAMS];
  int got_cells [NUM_RAMS];
  always @(posedge clk)
    if (dut.u_ctrl.state == 2'd2 && dut.b_done) begin
      got_row[dut.ram_idx]   = dut.b_row_used;
      got_col[dut.ram_idx]   = dut.b_col_used;
      got_cells[dut.ram_idx] = int'(dut.b_cells_used);
      if (dut.b_overflow) n_ovf++;
      if (dut.u_bira.row_bad) n_row_bad++;
      if (dut.u_bira.col_bad) n_col_bad++;
      if (dut.u_bira.cell_bad != '0) n_cell_bad++;
    end

  function automatic int ra_of(int m); return 4 + m; endfunction

  task automatic clear_defects();
    foreach (dm[m, r, c]) begin dm[m][r][c] = 0; dv[m][r][c] = 0; end
    foreach (cm[m, k]) begin cm[m][k] = 0; cv[m][k] = 0; end
  endtask

  task automatic add_defect(int m, int r, int c, bit v);
    dm[m][r][c] = 1;
    dv[m][r][c] = v;
  endtask

  task automatic random_defects(int m, int n);
    int rows = 1 << ra_of(m);
    for (int i = 0; i < n; i++) begin
      int r = $urandom_range(0, rows - 1), c = $urandom_range(0, rows - 1);
      if ($urandom_range(0, 3) == 0) r = 2;          // a crowded row
      else if ($urandom_range(0, 3) == 0) c = 7;     // a crowded column
      add_defect(m, r, c, 1'($urandom));
    end
  endtask

  // expected allocation of RAM m from its defect map
  function automatic alloc_c expected(int m);
    int n = 1 << ra_of(m);
    fault_c f[$];
    bit row_bad = 0, col_bad = 0;
    int good_cells = int'(ram_cfg(m).cells);
    for (int v = 1; v >= 0; v--)
      for (int r = 0; r < n; r++)
        for (int c = 0; c < n; c++)
          if (dm[m][r][c] && dv[m][r][c] == v) f.push_back(mkf(r, c));
    for (int c = 0; c < n; c++) if (dm[m][n][c]) row_bad = 1;
    for (int r = 0; r < n; r++) if (dm[m][r][n]) col_bad = 1;
    for (int k = 0; k < int'(ram_cfg(m).cells); k++) if (cm[m][k]) good_cells--;
    return allocate(f, good_cells, row_bad, col_bad, MAX_ROWS + MAX_COLS + MAX_CELLS);
  endfunction

  task automatic n_access(int m, bit wr, int a, logic [63:0] wd, output logic [63:0] rd);
    @(negedge clk);
    case (m)
      0: begin m0_cen = 0; m0_wen = !wr; m0_addr = 4'(a); m0_wdata = 16'(wd); end
      1: begin m1_cen = 0; m1_wen = !wr; m1_addr = 5'(a); m1_wdata = 32'(wd); end
      default: begin m2_cen = 0; m2_wen = !wr; m2_addr = 6'(a); m2_wdata = wd; end
    endcase
    @(negedge clk);
    m0_cen = 1; m1_cen = 1; m2_cen = 1;
    case (m)
      0: rd = 64'(m0_rdata);
      1: rd = 64'(m1_rdata);
      default: rd = m2_rdata;
    endcase
  endtask

  // normal-mode check of a repaired RAM: every word written and read back
  task automatic normal_check(int m);
    int n = 1 << ra_of(m);
    logic [63:0] model [64];
    logic [63:0] rd, msk;
    int errs = 0;
    msk = (n == 64) ? '1 : ((64'd1 << n) - 1);
    for (int a = 0; a < n; a++) begin
      model[a] = {$urandom, $urandom} & msk;
      n_access(m, 1, a, model[a], rd);
    end
    for (int a = 0; a < n; a++) begin
      n_access(m, 0, a, '0, rd);
      if ((rd & msk) !== model[a]) errs++;
    end
    check(errs == 0, $sformatf("RAM%0d normal mode: %0d words read back wrong", m, errs));
  endtask

  // count normal-mode reads that go through a spare of each kind
  always @(posedge clk) begin
    if (mode[0] && !m0_cen && m0_wen) bypass_count(dut.u_ram0.items[0].valid && dut.u_ram0.row_hit,
      dut.u_ram0.items[1].valid, cell_hit0());
    if (mode[1] && !m1_cen && m1_wen) bypass_count(dut.u_ram1.items[0].valid && dut.u_ram1.row_hit,
      dut.u_ram1.items[1].valid, cell_hit1());
    if (mode[2] && !m2_cen && m2_wen) bypass_count(dut.u_ram2.items[0].valid && dut.u_ram2.row_hit,
      dut.u_ram2.items[1].valid, cell_hit2());
  end
  function automatic bit cell_hit0();
    for (int k = 2; k < 18; k++)
      if (dut.u_ram0.items[k].valid && dut.u_ram0.items[k].row == m0_addr) return 1;
    return 0;
  endfunction
  function automatic bit cell_hit1();
    for (int k = 2; k < 34; k++)
      if (dut.u_ram1.items[k].valid && dut.u_ram1.items[k].row == m1_addr) return 1;
    return 0;
  endfunction
  function automatic bit cell_hit2();
    for (int k = 2; k < 66; k++)
      if (dut.u_ram2.items[k].valid && dut.u_ram2.items[k].row == m2_addr) return 1;
    return 0;
  endfunction
  function automatic void bypass_count(bit r, bit c, bit cl);
    if (r) n_bypass_row++;
    if (c) n_bypass_col++;
    if (cl) n_bypass_cell++;
  endfunction

  task automatic round(string tag);
    alloc_c e [NUM_RAMS];
    int t0, cycles;
    for (int m = 0; m < NUM_RAMS; m++) e[m] = expected(m);
    @(negedge clk); start = 1;
    @(negedge clk); start = 0;
    cycles = 0;
    while (!done) begin
      @(negedge clk);
      cycles++;
    end
    for (int m = 0; m < NUM_RAMS; m++) begin
      check(repaired[m] == e[m].ok && mode[m],
            $sformatf("%s RAM%0d: repaired %0d expected %0d", tag, m, repaired[m], e[m].ok));
      if (e[m].ok) begin
        check(got_row[m] == e[m].row_used && got_col[m] == e[m].col_used &&
              got_cells[m] == e[m].cell_row.size(),
              $sformatf("%s RAM%0d: spares row %0d col %0d cells %0d, expected %0d %0d %0d", tag, m,
                        got_row[m], got_col[m], got_cells[m], e[m].row_used, e[m].col_used,
                        e[m].cell_row.size()));
        if (got_row[m]) n_row++;
        if (got_col[m]) n_col++;
        n_cell += got_cells[m];
        normal_check(m);
      end else n_unrep++;
    end
    $display("%s: done after %0d cycles, repaired=%b", tag, cycles, repaired);
  endtask

  initial begin
    repeat (3) @(negedge clk);
    rst_n = 1;
    clear_defects();
    round("defect free");

    // the worked 8-fault pattern in RAM0, random faults in RAM1 and RAM2
    clear_defects();
    add_defect(0, 1, 1, 1); add_defect(0, 1, 4, 0); add_defect(0, 4, 0, 1); add_defect(0, 4, 3, 0);
    add_defect(0, 4, 7, 1); add_defect(0, 5, 1, 0); add_defect(0, 6, 5, 1); add_defect(0, 7, 1, 1);
    random_defects(1, 30);
    random_defects(2, 60);
    round("example");

    // defective spare row in RAM0 and spare column in RAM1
    clear_defects();
    random_defects(0, 12);
    add_defect(0, 16, 3, 1);
    random_defects(1, 20);
    add_defect(1, 9, 32, 0);
    random_defects(2, 10);
    add_defect(2, 64, 64, 1);
    // defective spare cells in every RAM
    cm[0][0] = 1; cv[0][0] = 1;
    cm[0][3] = 1; cv[0][3] = 0;
    cm[1][31] = 1; cv[1][31] = 1;
    for (int k = 0; k < 64; k += 5) begin cm[2][k] = 1; cv[2][k] = 1'(k); end
    round("bad spares");

    // more faults than the bitmap holds in RAM2, too many for RAM0's spares
    clear_defects();
    for (int i = 0; i < 60; i++) add_defect(0, i % 16, (i * 5 + i / 16) % 16, 1);
    random_defects(1, 5);
    for (int r = 0; r < 64; r++) for (int c = 0; c < 4; c++) add_defect(2, r, c * 9, 0);
    round("overload");

    for (int t = 0; t < 4; t++) begin
      clear_defects();
      random_defects(0, $urandom_range(0, 30));
      random_defects(1, $urandom_range(0, 60));
      random_defects(2, $urandom_range(0, 120));
      round($sformatf("random %0d", t));
    end

    $display("mechanisms: fault reports %0d, repeated reports %0d, spare rows %0d, spare columns %0d, spare cells %0d",
             n_fail_rep, n_dup_rep, n_row, n_col, n_cell);
    $display("            bad spare rows %0d, bad spare columns %0d, RAMs with bad spare cells %0d, overflows %0d, unrepairable %0d",
             n_row_bad, n_col_bad, n_cell_bad, n_ovf, n_unrep);
    $display("            reads via spare row %0d, spare column %0d, spare cell %0d, runs per RAM %0d %0d %0d",
             n_bypass_row, n_bypass_col, n_bypass_cell, n_cfg[0], n_cfg[1], n_cfg[2]);
    check(n_fail_rep > 0, "fault reports");
    check(n_dup_rep > 0, "repeated fault reports");
    check(n_row > 0 && n_col > 0 && n_cell > 0, "every kind of spare allocated");
    check(n_row_bad > 0 && n_col_bad > 0 && n_cell_bad > 0, "defective spares detected");
    check(n_ovf > 0, "bitmap overflow");
    check(n_unrep > 0, "unrepairable RAM");
    check(n_bypass_row > 0 && n_bypass_col > 0 && n_bypass_cell > 0, "reads through every kind of spare");
    check(n_cfg[0] > 0 && n_cfg[1] > 0 && n_cfg[2] > 0, "MBIST/BIRA reconfigured for every RAM");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (3000000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
