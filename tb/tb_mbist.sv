// tb_mbist: runs the March C- BIST against a 64 x 64 cell array (65 x 65 with
// spares) in two configurations: as an 8 x 8 RAM (ra = ca = 3) and as the full
// 64 x 64 RAM.  Each run checks the operation counts (5 writes and 5 reads per
// address), the run length of a defect-free test (10 operations per address
// plus three cycles from the start pulse), and that the reported faulty cells are exactly the
// injected stuck-at cells, including cells of the spare row and column.
// (Spare cells are configured as absent here; tb_mem_wrapper and
// tb_rebisr_top cover their test.)
module tb_mbist;
  import rebisr_pkg::*;
  localparam int RA = 6, CA = 6;
  localparam int WORDS = (1 << RA) + 1, DW = (1 << CA) + 1;

  logic clk = 0;
  always #5 clk = ~clk;
  logic rst_n = 0, start = 0;
  ram_cfg_t cfg;
  test_req_t req;
  logic [TDW-1:0] rdata;
  logic [64:0] mem_rdata;
  assign rdata = {1'b0, mem_rdata};
  logic fail, mar_com, busy;
  logic [TAW-1:0] fau_row;
  logic [FCW-1:0] fau_col;
  logic [WORDS*DW-1:0] dmask = '0, dval = '0;

  mbist dut (.clk, .rst_n, .start, .cfg, .req, .rdata, .fail, .fau_row,
             .fau_col, .mar_com, .busy);
  sram_array #(.RA(RA), .CA(CA)) u_mem (.clk, .cen(req.cen), .wen(req.wen),
    .addr(req.addr), .wdata(req.wdata[64:0]), .rdata(mem_rdata), .defect_mask(dmask), .defect_val(dval));

  int checks = 0, failures = 0;
  int n_wr, n_rd, n_fail;
  bit reported [WORDS][DW];

  always @(posedge clk) if (rst_n) begin
    if (!req.cen && !req.wen) n_wr++;
    if (!req.cen &&  req.wen) n_rd++;
    if (fail) begin
      n_fail++;
      reported[fau_row][fau_col] = 1'b1;
    end
  end

  task automatic check(bit cond, string msg);
    checks++;
    if (!cond) begin
      failures++;
      $display("FAIL %s", msg);
    end
  endtask

  task automatic run(int ra, int ca, output int cycles);
    cfg = '{ra: 3'(ra), ca: 3'(ca), cells: 7'd0};
    n_wr = 0; n_rd = 0; n_fail = 0;
    foreach (reported[r, c]) reported[r][c] = 0;
    @(negedge clk); start = 1;
    @(negedge clk); start = 0;
    cycles = 1;
    while (!mar_com) begin
      @(negedge clk);
      cycles++;
    end
  endtask

  task automatic inject(int r, int c, bit v);
    dmask[r*DW + c] = 1'b1;
    dval[r*DW + c]  = v;
  endtask

  task automatic check_faults(int ra, int ca);
    int nr = (1 << ra) + 1, nc = (1 << ca) + 1;
    for (int r = 0; r < WORDS; r++)
      for (int c = 0; c < DW; c++) begin
        bit exp = (r < nr && c < nc) ? dmask[r*DW + c] : 1'b0;
        checks++;
        if (reported[r][c] != exp) begin
          failures++;
          $display("FAIL cell (%0d,%0d): reported %0d expected %0d", r, c, reported[r][c], exp);
        end
      end
  endtask

  initial begin
    int cyc;
    repeat (3) @(negedge clk);
    rst_n = 1;
    // 8 x 8 configuration, defect free
    run(3, 3, cyc);
    check(n_wr == 5 * 9 && n_rd == 5 * 9, $sformatf("8x8 op counts w=%0d r=%0d", n_wr, n_rd));
    check(n_fail == 0, "8x8 defect-free run reported faults");
    check(cyc == 10 * 9 + 3, $sformatf("8x8 run length %0d", cyc));
    // 8 x 8 configuration with defects (one outside the configured area)
    inject(1, 1, 1); inject(1, 4, 0); inject(4, 0, 1); inject(4, 3, 1); inject(4, 7, 0);
    inject(8, 2, 1); inject(6, 8, 0); inject(8, 8, 1); inject(20, 20, 1);
    run(3, 3, cyc);
    check_faults(3, 3);
    check(n_wr == 5 * 9 && n_rd == 5 * 9, "8x8 op counts with defects");
    // full 64 x 64 configuration
    dmask = '0; dval = '0;
    run(6, 6, cyc);
    check(n_fail == 0 && cyc == 10 * 65 + 3, $sformatf("64x64 defect-free run length %0d", cyc));
    for (int i = 0; i < 40; i++) inject($urandom_range(0, 64), $urandom_range(0, 64), 1'($urandom));
    inject(0, 0, 1); inject(0, 64, 0); inject(64, 0, 1); inject(64, 64, 0);
    // a whole failing word: all 65 bits reported one after another
    for (int c = 0; c < DW; c++) inject(33, c, 1);
    run(6, 6, cyc);
    check_faults(6, 6);
    check(n_wr == 5 * 65 && n_rd == 5 * 65, "64x64 op counts with defects");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
