// tb_bira: feeds fault reports to the BIRA as the MBIST would, captures the
// repair signature it shifts out and decodes it into spare row, spare column
// and spare cells.  Cases: the 8 x 8 example with eight faults (expected
// allocation worked out by hand: spare column 1, spare row 4, cells (1,4) and
// (6,5)); the same with a defective spare row; faults that exhaust the spares;
// more distinct faults than the bitmap holds; and random fault lists in the
// three RAM configurations, checked against the reference allocation.
module tb_bira;
  import rebisr_pkg::*;
  import rebisr_ref_pkg::*;

  logic clk = 0;
  always #5 clk = ~clk;
  logic rst_n = 0, start = 0, fail = 0, mar_com = 0;
  ram_cfg_t cfg;
  logic [TAW-1:0] fau_row = '0;
  logic [FCW-1:0] fau_col = '0;
  logic sel, ld, tdi, done, repair_ok, row_used, col_used, overflow;
  logic [6:0] cells_used;

  bira dut (.*);

  int checks = 0, failures = 0;
  bit stream[$];
  always @(posedge clk) if (ld) stream.push_back(tdi);

  task automatic check(bit cond, string msg);
    checks++;
    if (!cond) begin failures++; $display("FAIL %s", msg); end
  endtask

  // run one analysis; faults are reported in the given order
  task automatic analyse(ram_cfg_t c, fault_c f[$], int spare_rows[$], int spare_cols[$],
                         int bad_cells[$]);
    cfg = c;
    stream.delete();
    @(negedge clk); start = 1;
    @(negedge clk); start = 0;
    check(!sel && !done, "test mode after start");
    foreach (f[i]) begin
      fail = 1; fau_row = TAW'(f[i].row); fau_col = FCW'(f[i].col);
      @(negedge clk);
    end
    foreach (spare_rows[i]) begin
      fail = 1; fau_row = TAW'(1 << c.ra); fau_col = FCW'(spare_rows[i]);
      @(negedge clk);
    end
    foreach (spare_cols[i]) begin
      fail = 1; fau_row = TAW'(spare_cols[i]); fau_col = FCW'(1 << c.ca);
      @(negedge clk);
    end
    foreach (bad_cells[i]) begin
      fail = 1; fau_row = TAW'(bad_cells[i]); fau_col = FCW'((1 << c.ca) + 1);
      @(negedge clk);
    end
    fail = 0;
    mar_com = 1;
    while (!done) @(negedge clk);
    mar_com = 0;
  endtask

  // decode the captured signature and compare it with an expected allocation
  task automatic compare(ram_cfg_t c, alloc_c e, string tag);
    int iw = 1 + int'(c.ra) + int'(c.ca);
    int n  = (int'(c.cells) + 2) * iw;
    int ncell = 0;
    bit [2047:0] flat = '0;
    check(stream.size() == n, $sformatf("%s: signature length %0d, expected %0d", tag, stream.size(), n));
    foreach (stream[i]) if (i < n) flat[n - 1 - i] = stream[i];
    check(repair_ok == e.ok && sel, $sformatf("%s: repair_ok %0d expected %0d", tag, repair_ok, e.ok));
    for (int k = 0; k < int'(c.cells) + 2; k++) begin
      bit v = flat[k*iw + iw - 1];
      int r = 0, cl = 0;
      for (int b = 0; b < int'(c.ca); b++) cl |= int'(flat[k*iw + b]) << b;
      for (int b = 0; b < int'(c.ra); b++) r |= int'(flat[k*iw + int'(c.ca) + b]) << b;
      if (k == 0)
        check(v == e.row_used && (!v || r == e.row_a),
              $sformatf("%s: spare row %0d/%0d expected %0d/%0d", tag, v, r, e.row_used, e.row_a));
      else if (k == 1)
        check(v == e.col_used && (!v || cl == e.col_a),
              $sformatf("%s: spare column %0d/%0d expected %0d/%0d", tag, v, cl, e.col_used, e.col_a));
      else if (v) begin
        check(ncell < e.cell_row.size() && r == e.cell_row[ncell] && cl == e.cell_col[ncell],
              $sformatf("%s: spare cell %0d = (%0d,%0d)", tag, ncell, r, cl));
        ncell++;
      end
    end
    if (e.ok || e.cell_row.size() > 0)
      check(ncell == e.cell_row.size(), $sformatf("%s: %0d spare cells, expected %0d", tag, ncell, e.cell_row.size()));
  endtask

  initial begin
    fault_c f[$], fd[$];
    int none[$];
    int srow[$];
    alloc_c e;
    ram_cfg_t c8 = '{ra: 3'd3, ca: 3'd3, cells: 7'd8};
    repeat (2) @(negedge clk);
    rst_n = 1;

    // the 8 x 8 example, every fault reported twice (as by two March reads)
    f.push_back(mkf(1, 1)); f.push_back(mkf(1, 4)); f.push_back(mkf(4, 0));
    f.push_back(mkf(4, 3)); f.push_back(mkf(4, 7)); f.push_back(mkf(5, 1));
    f.push_back(mkf(6, 5)); f.push_back(mkf(7, 1));
    foreach (f[i]) begin fd.push_back(f[i]); fd.push_back(f[i]); end
    analyse(c8, fd, none, none, none);
    e = new;
    e.ok = 1; e.col_used = 1; e.col_a = 1; e.row_used = 1; e.row_a = 4;
    e.cell_row = '{1, 6}; e.cell_col = '{4, 5};
    compare(c8, e, "example");
    check(row_used && col_used && cells_used == 2, "example: allocation summary");
    compare(c8, allocate(f, 8, 0, 0, 192), "example/reference");

    // spare row defective: row 4 must go to spare cells
    srow = '{3};
    analyse(c8, f, srow, none, none);
    e = allocate(f, 8, 1, 0, 192);
    check(!e.row_used && e.cell_row.size() == 5, "reference with bad spare row");
    compare(c8, e, "bad spare row");

    // spare cells 0 and 2 defective: the example uses cells 1 and 3
    begin
      int bad[$] = '{0, 2};
      analyse(c8, fd, none, none, bad);
      compare(c8, allocate(f, 6, 0, 0, 192), "bad spare cells");
      check(stream.size() == 10 * 7 && stream[7 * 7] == 1'b0 && stream[6 * 7] == 1'b1 &&
            stream[5 * 7] == 1'b0 && stream[4 * 7] == 1'b1,
            "defective cells 0 and 2 left unused, cells 1 and 3 used");
    end

    // spares exhausted: one spare cell, four faults on a diagonal
    begin
      automatic fault_c g[$];
      ram_cfg_t c1 = '{ra: 3'd3, ca: 3'd3, cells: 7'd1};
      for (int i = 0; i < 4; i++) g.push_back(mkf(i, i));
      analyse(c1, g, none, none, none);
      check(!repair_ok, "diagonal of four with one cell, one row, one column is unrepairable");
      compare(c1, allocate(g, 1, 0, 0, 192), "exhausted");
    end

    // bitmap overflow in the 64 x 64 configuration
    begin
      automatic fault_c g[$];
      for (int i = 0; i < 193; i++) g.push_back(mkf(i % 64, i / 64));
      analyse(ram_cfg(2), g, none, none, none);
      check(overflow && !repair_ok, "193 distinct faults overflow the bitmap");
    end

    // random fault lists in the three configurations
    for (int t = 0; t < 60; t++) begin
      automatic fault_c g[$];
      automatic int idx = t % 3;
      automatic ram_cfg_t c = ram_cfg(idx);
      automatic int rows = 1 << c.ra, cols = 1 << c.ca;
      automatic int nf = $urandom_range(0, 3 * int'(c.cells) / 2);
      automatic bit used [64][64];
      foreach (used[r, cc]) used[r][cc] = 0;
      // some faults clustered on one row and one column
      for (int i = 0; i < nf; i++) begin
        int r, cc;
        case ($urandom_range(0, 3))
          0: begin r = 3 % rows; cc = $urandom_range(0, cols - 1); end
          1: begin r = $urandom_range(0, rows - 1); cc = 5 % cols; end
          default: begin r = $urandom_range(0, rows - 1); cc = $urandom_range(0, cols - 1); end
        endcase
        if (!used[r][cc]) begin
          used[r][cc] = 1;
          g.push_back(mkf(r, cc));
        end
      end
      analyse(c, g, none, none, none);
      compare(c, allocate(g, int'(c.cells), 0, 0, 192), $sformatf("random %0d", t));
    end

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2000000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
