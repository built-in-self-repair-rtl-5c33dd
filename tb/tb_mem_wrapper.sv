// tb_mem_wrapper: an 8 x 8 RAM with the eight defects of the worked example
// (stuck-at cells in column 1, row 4 and two single cells).  It checks test
// mode access to the spare row, spare column and spare cells (including a
// stuck spare cell), that without a repair the
// defects corrupt normal-mode data, and that after the repair register is
// shifted in (spare row 4, spare column 1, spare cells (1,4) and (6,5)) every
// normal-mode write is read back intact, with one cycle of read latency.
module tb_mem_wrapper;
  localparam int RA = 3, CA = 3, NC = 8;
  localparam int ROWS = 1 << RA, COLS = 1 << CA;
  localparam int IW = 1 + RA + CA, REG_W = (NC + 2) * IW;
  localparam int DW = COLS + 1, WORDS = ROWS + 1;

  logic clk = 0;
  always #5 clk = ~clk;
  logic rst_n = 0, sel = 0, ld = 0, tdi = 0;
  logic t_cen = 1, t_wen = 1, cen = 1, wen = 1;
  logic [RA:0] t_addr = '0;
  logic [COLS+1:0] t_wdata = '0, t_rdata;
  logic [RA-1:0] addr = '0;
  logic [COLS-1:0] wdata = '0, rdata;
  logic [WORDS*DW-1:0] defect_mask = '0, defect_val = '0;
  logic [NC-1:0] cell_defect_mask = '0, cell_defect_val = '0;

  mem_wrapper #(.RA(RA), .CA(CA), .NC(NC)) dut (.*);

  int checks = 0, failures = 0;
  logic [COLS-1:0] model [ROWS];

  task automatic check(bit cond, string msg);
    checks++;
    if (!cond) begin failures++; $display("FAIL %s", msg); end
  endtask

  task automatic t_write(int a, logic [COLS+1:0] d);
    @(negedge clk); t_cen = 0; t_wen = 0; t_addr = (RA+1)'(a); t_wdata = d;
    @(negedge clk); t_cen = 1; t_wen = 1;
  endtask
  task automatic t_read(int a, output logic [COLS+1:0] d);
    @(negedge clk); t_cen = 0; t_wen = 1; t_addr = (RA+1)'(a);
    @(negedge clk); t_cen = 1; d = t_rdata;
  endtask
  task automatic n_write(int a, logic [COLS-1:0] d);
    @(negedge clk); cen = 0; wen = 0; addr = RA'(a); wdata = d;
    @(negedge clk); cen = 1; wen = 1;
  endtask
  task automatic n_read(int a, output logic [COLS-1:0] d);
    @(negedge clk); cen = 0; wen = 1; addr = RA'(a);
    @(negedge clk); cen = 1; d = rdata;
  endtask

  function automatic logic [IW-1:0] item(bit v, int r, int c);
    return {v, RA'(r), CA'(c)};
  endfunction

  task automatic load(logic [REG_W-1:0] sig);
    for (int i = REG_W - 1; i >= 0; i--) begin
      @(negedge clk); ld = 1; tdi = sig[i];
    end
    @(negedge clk); ld = 0;
  endtask

  task automatic fill_and_check(string tag, output int errs);
    logic [COLS-1:0] d;
    errs = 0;
    for (int a = 0; a < ROWS; a++) begin
      model[a] = COLS'($urandom);
      n_write(a, model[a]);
    end
    for (int a = 0; a < ROWS; a++) begin
      n_read(a, d);
      if (d !== model[a]) errs++;
    end
    // back-to-back accesses: write then read of the next word every cycle
    for (int a = 0; a < ROWS; a++) begin
      @(negedge clk); cen = 0; wen = 0; addr = RA'(a); wdata = ~model[a]; model[a] = ~model[a];
      @(negedge clk); wen = 1;
      @(negedge clk); cen = 1;
      if (rdata !== model[a]) errs++;
    end
  endtask

  initial begin
    logic [COLS+1:0] td;
    logic [REG_W-1:0] sig;
    int errs;
    int fr[8] = '{1, 1, 4, 4, 4, 5, 6, 7};
    int fc[8] = '{1, 4, 0, 3, 7, 1, 5, 1};
    repeat (2) @(negedge clk);
    rst_n = 1;
    // test mode reaches the spare row and the spare column
    t_write(ROWS, 10'h155);
    t_write(2, 10'h100);
    t_read(ROWS, td);
    check(td == 10'h155, $sformatf("test read of spare row %h", td));
    t_read(2, td);
    check(td == 10'h100, $sformatf("test read of spare column bit %h", td));
    // spare cell k is test bit COLS+1 of word k
    for (int k = 0; k < NC; k++) t_write(k, {1'(k % 3 == 0), 9'h000});
    for (int k = 0; k < NC; k++) begin
      t_read(k, td);
      check(td == {1'(k % 3 == 0), 9'h000}, $sformatf("test read of spare cell %0d: %h", k, td));
    end
    cell_defect_mask[5] = 1; cell_defect_val[5] = 1;
    t_write(5, '0);
    t_read(5, td);
    check(td[COLS+1] == 1'b1, "stuck spare cell visible in test mode");
    cell_defect_mask = '0;
    // inject the defects: stuck at the inverse of bit 0 of the row number
    foreach (fr[i]) begin
      defect_mask[fr[i]*DW + fc[i]] = 1;
      defect_val[fr[i]*DW + fc[i]]  = fr[i][0];
    end
    sel = 1;
    fill_and_check("unrepaired", errs);
    check(errs > 0, "defects visible without repair");
    sig = '0;
    sig[0*IW +: IW] = item(1, 4, 0);
    sig[1*IW +: IW] = item(1, 0, 1);
    sig[2*IW +: IW] = item(1, 1, 4);
    sig[3*IW +: IW] = item(1, 6, 5);
    sel = 0;
    load(sig);
    sel = 1;
    for (int rep = 0; rep < 4; rep++) begin
      fill_and_check("repaired", errs);
      check(errs == 0, $sformatf("repaired RAM: %0d read errors", errs));
    end
    // one missing cell item leaves one defect visible
    sig[3*IW +: IW] = '0;
    sel = 0;
    load(sig);
    sel = 1;
    fill_and_check("partly repaired", errs);
    check(errs > 0, "defect (6,5) visible without its spare cell");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
