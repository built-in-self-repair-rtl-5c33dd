// rebisr_top: three RAMs of different size and redundancy repaired by one
// reconfigurable built-in self-repair circuit.
//
// RAM0 is 16 words x 16 bits with 16 spare cells, RAM1 32 x 32 with 32 spare
// cells, RAM2 64 x 64 with 64 spare cells; each also has one spare row and one
// spare column and sits in a mem_wrapper.  A single MBIST and a single BIRA,
// both sized for the largest RAM, are shared through a common test bus and
// reconfigured by rebisr_ctrl for the RAM being processed.  A start pulse runs,
// for RAM0, RAM1 and RAM2 in turn: March C- test of the RAM and all its spares,
// redundancy analysis, and serial load of the repair register; the RAM then
// switches to normal mode (mode bit high) with its defects bypassed.  done
// rises when all three are processed; repaired tells which RAMs could be fully
// repaired.  Each RAM's normal port (mN_*) has SRAM-style active-low cen/wen
// and one cycle of read latency; it may be used once its mode bit is high.
// The mN_defect_* inputs model manufacturing defects of each cell array
// (see sram_array) and mN_cell_defect_* those of the spare cells (see
// mem_wrapper); tie them to zero for defect-free RAMs.
// The sharing of one MBIST and BIRA among RAMs with different sizes and
// redundancy follows the design description; the sizes of RAM2's spare
// cells, the bus and the sequencing are this design's choices.
// The BIRA's allocation summary outputs and the MBIST's busy flag are left
// unconnected here: the sequencer needs only done and repair_ok, and the
// summary is observed by the testbenches.
module rebisr_top
  import rebisr_pkg::*;
(
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 start,
  output logic                 done,
  output logic [NUM_RAMS-1:0]  repaired,
  output logic [NUM_RAMS-1:0]  mode,
  // RAM0: 16 x 16
  input  logic                 m0_cen,
  input  logic                 m0_wen,
  input  logic [3:0]           m0_addr,
  input  logic [15:0]          m0_wdata,
  output logic [15:0]          m0_rdata,
  input  logic [17*17-1:0]     m0_defect_mask,
  input  logic [17*17-1:0]     m0_defect_val,
  input  logic [15:0]          m0_cell_defect_mask,
  input  logic [15:0]          m0_cell_defect_val,
  // RAM1: 32 x 32
  input  logic                 m1_cen,
  input  logic                 m1_wen,
  input  logic [4:0]           m1_addr,
  input  logic [31:0]          m1_wdata,
  output logic [31:0]          m1_rdata,
  input  logic [33*33-1:0]     m1_defect_mask,
  input  logic [33*33-1:0]     m1_defect_val,
  input  logic [31:0]          m1_cell_defect_mask,
  input  logic [31:0]          m1_cell_defect_val,
  // RAM2: 64 x 64
  input  logic                 m2_cen,
  input  logic                 m2_wen,
  input  logic [5:0]           m2_addr,
  input  logic [63:0]          m2_wdata,
  output logic [63:0]          m2_rdata,
  input  logic [65*65-1:0]     m2_defect_mask,
  input  logic [65*65-1:0]     m2_defect_val,
  input  logic [63:0]          m2_cell_defect_mask,
  input  logic [63:0]          m2_cell_defect_val
);
  logic [1:0]     ram_idx;
  ram_cfg_t       cfg;
  logic           run;
  test_req_t      treq;
  logic [TDW-1:0] t_rdata;
  logic           fail, mar_com, mbist_busy;
  logic [TAW-1:0] fau_row;
  logic [FCW-1:0] fau_col;
  logic           b_sel, b_ld, b_tdi, b_done, b_ok;
  logic           b_row_used, b_col_used, b_overflow;
  logic [6:0]     b_cells_used;

  rebisr_ctrl u_ctrl (
    .clk, .rst_n, .start,
    .ram_idx, .cfg, .run,
    .bira_done(b_done), .bira_sel(b_sel), .bira_ok(b_ok),
    .mode, .repaired, .done
  );

  mbist u_mbist (
    .clk, .rst_n, .start(run), .cfg,
    .req(treq), .rdata(t_rdata),
    .fail, .fau_row, .fau_col, .mar_com, .busy(mbist_busy)
  );

  bira u_bira (
    .clk, .rst_n, .start(run), .cfg,
    .fail, .fau_row, .fau_col, .mar_com,
    .sel(b_sel), .ld(b_ld), .tdi(b_tdi),
    .done(b_done), .repair_ok(b_ok),
    .row_used(b_row_used), .col_used(b_col_used),
    .cells_used(b_cells_used), .overflow(b_overflow)
  );

  // ---- shared test bus ------------------------------------------------------
  logic [17:0] t_rdata0;
  logic [33:0] t_rdata1;
  logic [65:0] t_rdata2;

  always_comb begin
    unique case (ram_idx)
      2'd0:    t_rdata = TDW'(t_rdata0);
      2'd1:    t_rdata = TDW'(t_rdata1);
      default: t_rdata = t_rdata2;
    endcase
  end

  mem_wrapper #(.RA(4), .CA(4), .NC(16)) u_ram0 (
    .clk, .rst_n, .sel(mode[0]),
    .t_cen(treq.cen || ram_idx != 2'd0), .t_wen(treq.wen),
    .t_addr(treq.addr[4:0]), .t_wdata(treq.wdata[17:0]), .t_rdata(t_rdata0),
    .ld(b_ld && ram_idx == 2'd0), .tdi(b_tdi),
    .cen(m0_cen), .wen(m0_wen), .addr(m0_addr), .wdata(m0_wdata), .rdata(m0_rdata),
    .defect_mask(m0_defect_mask), .defect_val(m0_defect_val),
    .cell_defect_mask(m0_cell_defect_mask), .cell_defect_val(m0_cell_defect_val)
  );

  mem_wrapper #(.RA(5), .CA(5), .NC(32)) u_ram1 (
    .clk, .rst_n, .sel(mode[1]),
    .t_cen(treq.cen || ram_idx != 2'd1), .t_wen(treq.wen),
    .t_addr(treq.addr[5:0]), .t_wdata(treq.wdata[33:0]), .t_rdata(t_rdata1),
    .ld(b_ld && ram_idx == 2'd1), .tdi(b_tdi),
    .cen(m1_cen), .wen(m1_wen), .addr(m1_addr), .wdata(m1_wdata), .rdata(m1_rdata),
    .defect_mask(m1_defect_mask), .defect_val(m1_defect_val),
    .cell_defect_mask(m1_cell_defect_mask), .cell_defect_val(m1_cell_defect_val)
  );

  mem_wrapper #(.RA(6), .CA(6), .NC(64)) u_ram2 (
    .clk, .rst_n, .sel(mode[2]),
    .t_cen(treq.cen || ram_idx != 2'd2), .t_wen(treq.wen),
    .t_addr(treq.addr), .t_wdata(treq.wdata), .t_rdata(t_rdata2),
    .ld(b_ld && ram_idx == 2'd2), .tdi(b_tdi),
    .cen(m2_cen), .wen(m2_wen), .addr(m2_addr), .wdata(m2_wdata), .rdata(m2_rdata),
    .defect_mask(m2_defect_mask), .defect_val(m2_defect_val),
    .cell_defect_mask(m2_cell_defect_mask), .cell_defect_val(m2_cell_defect_val)
  );

  // the test bus only reaches a RAM that is in test mode
  assert property (@(posedge clk) disable iff (!rst_n)
                   !treq.cen |-> !mode[ram_idx]);
endmodule
