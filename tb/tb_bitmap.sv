// tb_bitmap: fills an 8-entry bitmap with faulty addresses, repeats some of
// them (they must not take new entries), overflows it, reads back every entry,
// marks entries repaired and clears it.  Expected contents come from a queue
// kept by the testbench.
module tb_bitmap;
  localparam int DEPTH = 8, RW = 6, CW = 6;
  logic clk = 0;
  always #5 clk = ~clk;
  logic rst_n = 0, clear = 0, ins_en = 0, mark_en = 0;
  logic [RW-1:0] ins_row = '0, rd_row;
  logic [CW-1:0] ins_col = '0, rd_col;
  logic [$clog2(DEPTH+1)-1:0] count;
  logic overflow, rd_rep;
  logic [$clog2(DEPTH)-1:0] rd_idx = '0, mark_idx = '0;

  bitmap #(.DEPTH(DEPTH), .RW(RW), .CW(CW)) dut (.*);

  int checks = 0, failures = 0;
  int q_row[$], q_col[$];

  task automatic check(bit cond, string msg);
    checks++;
    if (!cond) begin failures++; $display("FAIL %s", msg); end
  endtask

  task automatic insert(int r, int c);
    @(negedge clk); ins_en = 1; ins_row = RW'(r); ins_col = CW'(c);
    @(negedge clk); ins_en = 0;
  endtask

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1;
    check(count == 0 && !overflow, "empty after reset");
    // the faulty addresses of an 8 x 8 example, each reported twice
    q_row = '{1, 1, 4, 4, 4, 5, 6, 7};
    q_col = '{1, 4, 0, 3, 7, 1, 5, 1};
    foreach (q_row[i]) begin
      insert(q_row[i], q_col[i]);
      insert(q_row[i], q_col[i]);
      check(count == i + 1, $sformatf("count %0d after entry %0d", count, i));
    end
    check(!overflow, "no overflow at full depth");
    insert(4, 3);
    check(count == DEPTH && !overflow, "repeat of a stored address when full");
    insert(2, 2);
    check(count == DEPTH && overflow, "overflow on a new address when full");
    foreach (q_row[i]) begin
      rd_idx = 3'(i);
      #1;
      check(rd_row == q_row[i] && rd_col == q_col[i] && !rd_rep,
            $sformatf("entry %0d = (%0d,%0d)", i, rd_row, rd_col));
    end
    // mark entries 0, 5, 7
    foreach (q_row[i]) if (i == 0 || i == 5 || i == 7) begin
      @(negedge clk); mark_en = 1; mark_idx = 3'(i);
      @(negedge clk); mark_en = 0;
    end
    foreach (q_row[i]) begin
      rd_idx = 3'(i);
      #1;
      check(rd_rep == (i == 0 || i == 5 || i == 7), $sformatf("repaired flag %0d", i));
    end
    @(negedge clk); clear = 1;
    @(negedge clk); clear = 0;
    check(count == 0 && !overflow, "empty after clear");
    insert(9, 9);
    rd_idx = 0;
    #1;
    check(count == 1 && rd_row == 9 && rd_col == 9 && !rd_rep, "insert after clear");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
