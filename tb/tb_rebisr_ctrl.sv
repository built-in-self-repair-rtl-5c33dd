// tb_rebisr_ctrl: answers the sequencer's run pulses with a BIRA-like done
// after a random delay and checks that the three RAMs are processed in order
// with their own configuration, one run pulse each, that mode and repaired are
// latched per RAM, that all RAMs are back in test mode at a new start, and
// that done rises only after the last RAM.
module tb_rebisr_ctrl;
  import rebisr_pkg::*;
  logic clk = 0;
  always #5 clk = ~clk;
  logic rst_n = 0, start = 0;
  logic [1:0] ram_idx;
  ram_cfg_t cfg;
  logic run, bira_done = 0, bira_sel = 0, bira_ok = 0, done;
  logic [NUM_RAMS-1:0] mode, repaired;

  rebisr_ctrl dut (.*);

  int checks = 0, failures = 0;
  int runs;
  bit ok_pattern [NUM_RAMS];

  task automatic check(bit cond, string msg);
    checks++;
    if (!cond) begin failures++; $display("FAIL %s", msg); end
  endtask

  // BIRA stand-in: done/sel drop on run and rise after a delay
  always @(posedge clk) begin
    if (run) begin
      runs++;
      check(int'(ram_idx) == runs - 1, $sformatf("run %0d for RAM %0d", runs, ram_idx));
      check(cfg == ram_cfg(int'(ram_idx)), "configuration of the RAM under test");
      check(mode[ram_idx] == 1'b0, "RAM under test is in test mode");
      bira_done <= 0;
      bira_sel  <= 0;
      fork
        begin
          automatic int idx = int'(ram_idx);
          repeat ($urandom_range(3, 40)) @(posedge clk);
          bira_ok   <= ok_pattern[idx];
          bira_sel  <= 1;
          bira_done <= 1;
        end
      join_none
    end
  end

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int pass = 0; pass < 4; pass++) begin
      for (int m = 0; m < NUM_RAMS; m++) ok_pattern[m] = 1'($urandom);
      runs = 0;
      @(negedge clk); start = 1;
      @(negedge clk); start = 0;
      check(mode == '0 && !done, "all RAMs in test mode after start");
      while (!done) begin
        @(negedge clk);
        if (!done) check(int'(ram_idx) < NUM_RAMS, "index in range");
      end
      check(runs == NUM_RAMS, $sformatf("%0d runs", runs));
      check(mode == '1, "all RAMs in normal mode at the end");
      for (int m = 0; m < NUM_RAMS; m++)
        check(repaired[m] == ok_pattern[m], $sformatf("repaired[%0d]", m));
      repeat (5) @(negedge clk);
      check(done, "done holds");
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
