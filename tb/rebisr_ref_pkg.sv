// rebisr_ref_pkg: reference model of the spare allocation, for testbenches.
//
// allocate() takes the distinct faulty cells in the order they were first
// detected and applies the repair rule independently of the RTL: for each
// fault not yet covered, count the uncovered faults in its row (rc) and column
// (cc); rc > cc takes the spare row, rc < cc the spare column, otherwise a
// spare cell; with no spare cell left the fault takes any free spare line, or
// the repair fails.  More than depth distinct faults also fail the repair.
package rebisr_ref_pkg;

  class fault_c;
    int row;
    int col;
    function new(int r, int c);
      row = r;
      col = c;
    endfunction
  endclass

  function automatic fault_c mkf(int r, int c);
    fault_c x = new(r, c);
    return x;
  endfunction

  class alloc_c;
    bit row_used;
    int row_a;
    bit col_used;
    int col_a;
    int cell_row[$];
    int cell_col[$];
    bit ok;
  endclass

  function automatic alloc_c allocate(fault_c f[$], int cells, bit row_bad,
                                      bit col_bad, int depth);
    alloc_c a = new;
    bit     done_q[$];
    a.ok = 1;
    if (f.size() > depth) begin
      a.ok = 0;
      return a;
    end
    foreach (f[i]) done_q.push_back(1'b0);
    foreach (f[i]) begin
      int rc, cc;
      bit rf, cf;
      if (done_q[i]) continue;
      rc = 0;
      cc = 0;
      foreach (f[j]) if (!done_q[j]) begin
        if (f[j].row == f[i].row) rc++;
        if (f[j].col == f[i].col) cc++;
      end
      rf = !a.row_used && !row_bad;
      cf = !a.col_used && !col_bad;
      if (rc > cc && rf) begin
        a.row_used = 1; a.row_a = f[i].row;
        foreach (f[j]) if (f[j].row == f[i].row) done_q[j] = 1;
      end else if (rc < cc && cf) begin
        a.col_used = 1; a.col_a = f[i].col;
        foreach (f[j]) if (f[j].col == f[i].col) done_q[j] = 1;
      end else if (a.cell_row.size() < cells) begin
        a.cell_row.push_back(f[i].row);
        a.cell_col.push_back(f[i].col);
        done_q[i] = 1;
      end else if (rf) begin
        a.row_used = 1; a.row_a = f[i].row;
        foreach (f[j]) if (f[j].row == f[i].row) done_q[j] = 1;
      end else if (cf) begin
        a.col_used = 1; a.col_a = f[i].col;
        foreach (f[j]) if (f[j].col == f[i].col) done_q[j] = 1;
      end else begin
        a.ok = 0;
        done_q[i] = 1;
      end
    end
    return a;
  endfunction

endpackage
