// tb_sram_array: checks the cell array of a 8 x 8 RAM with spare row and
// column (9 words of 9 bits): write/read of every word with one cycle of read
// latency, rdata held when idle, and stuck-at defects that override the
// stored bit on read.
module tb_sram_array;
  localparam int RA = 3, CA = 3;
  localparam int WORDS = (1 << RA) + 1, DW = (1 << CA) + 1;

  logic clk = 0;
  always #5 clk = ~clk;

  logic cen = 1, wen = 1;
  logic [RA:0] addr = '0;
  logic [DW-1:0] wdata = '0, rdata;
  logic [WORDS*DW-1:0] dmask = '0, dval = '0;

  int checks = 0, failures = 0;
  logic [DW-1:0] model [WORDS];

  sram_array #(.RA(RA), .CA(CA)) dut (.clk, .cen, .wen, .addr, .wdata, .rdata,
                                      .defect_mask(dmask), .defect_val(dval));

  task automatic write(int a, logic [DW-1:0] d);
    @(negedge clk); cen = 0; wen = 0; addr = (RA+1)'(a); wdata = d;
    @(negedge clk); cen = 1; wen = 1;
  endtask

  task automatic read_check(int a, logic [DW-1:0] exp);
    @(negedge clk); cen = 0; wen = 1; addr = (RA+1)'(a);
    @(negedge clk); cen = 1;
    checks++;
    if (rdata !== exp) begin
      failures++;
      $display("FAIL read word %0d: got %h expected %h", a, rdata, exp);
    end
    // rdata holds while no read is issued
    @(negedge clk);
    checks++;
    if (rdata !== exp) begin
      failures++;
      $display("FAIL rdata not held at word %0d", a);
    end
  endtask

  initial begin
    repeat (2) @(negedge clk);
    for (int a = 0; a < WORDS; a++) begin
      model[a] = DW'($urandom);
      write(a, model[a]);
    end
    for (int a = 0; a < WORDS; a++) read_check(a, model[a]);
    // stuck-at-1 at (2,3), stuck-at-0 at (5,0), stuck-at-1 in spare row/col
    dmask[2*DW+3] = 1; dval[2*DW+3] = 1;
    dmask[5*DW+0] = 1; dval[5*DW+0] = 0;
    dmask[8*DW+4] = 1; dval[8*DW+4] = 1;
    dmask[1*DW+8] = 1; dval[1*DW+8] = 1;
    for (int a = 0; a < WORDS; a++) write(a, '0);
    for (int a = 0; a < WORDS; a++) begin
      logic [DW-1:0] e;
      e = '0;
      if (a == 2) e[3] = 1;
      if (a == 8) e[4] = 1;
      if (a == 1) e[8] = 1;
      read_check(a, e);
    end
    for (int a = 0; a < WORDS; a++) write(a, '1);
    for (int a = 0; a < WORDS; a++) begin
      logic [DW-1:0] e;
      e = '1;
      if (a == 5) e[0] = 0;
      read_check(a, e);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
