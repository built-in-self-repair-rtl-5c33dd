// mem_wrapper: one repairable RAM - cell array, test/normal multiplexer,
// repair register and spare cells.
//
// sel = 0 (test mode): the shared MBIST bus drives the cell array directly,
// including the spare row (address 2^RA) and the spare column (data bit 2^CA),
// and t_rdata returns the whole array word.  Test data bit 2^CA+1 of test
// word k (k < NC) is spare cell k, so the spare cells are tested too.
// sel = 1 (normal mode): the user port sees a 2^RA x 2^CA RAM and the repair
// register steers accesses around the defects:
//   - a word whose row is in the row item is stored in the spare row;
//   - the bit at the column of the column item is stored in, and read from,
//     the spare column bit of the same word;
//   - each valid spare-cell item (row, column) keeps that one bit in a
//     flip-flop of the wrapper.
// The repair register is (NC+2) items of {valid, row[RA], col[CA]}: item 0 is
// the spare row (col field unused), item 1 the spare column (row field
// unused), items 2..NC+1 the spare cells.  It is loaded serially: every cycle
// that ld is high it shifts left by one and takes tdi as its new LSB, so the
// BIRA sends the most significant bit of the highest item first.
// User reads have one cycle of latency, as the cell array.
// cell_defect_mask/cell_defect_val model stuck-at defects of the spare cells
// in the same way as the defect inputs of sram_array.
// The wrapper, its mux and repair register follow the block diagram of the
// design; the serial item format, bit priorities (spare row over spare
// column over spare cells) and reset values are this design's choices.
module mem_wrapper #(
  parameter int RA = 4,
  parameter int CA = 4,
  parameter int NC = 16
) (
  input  logic                                clk,
  input  logic                                rst_n,
  input  logic                                sel,
  // test bus (from the MBIST)
  input  logic                                t_cen,
  input  logic                                t_wen,
  input  logic [RA:0]                         t_addr,
  input  logic [(1<<CA)+1:0]                  t_wdata,
  output logic [(1<<CA)+1:0]                  t_rdata,
  // repair register load (from the BIRA)
  input  logic                                ld,
  input  logic                                tdi,
  // normal read/write port
  input  logic                                cen,
  input  logic                                wen,
  input  logic [RA-1:0]                       addr,
  input  logic [(1<<CA)-1:0]                  wdata,
  output logic [(1<<CA)-1:0]                  rdata,
  // manufacturing defects of the cell array
  input  logic [((1<<RA)+1)*((1<<CA)+1)-1:0]  defect_mask,
  input  logic [((1<<RA)+1)*((1<<CA)+1)-1:0]  defect_val,
  input  logic [NC-1:0]                       cell_defect_mask,
  input  logic [NC-1:0]                       cell_defect_val
);
  localparam int COLS  = 1 << CA;
  localparam int ROWS  = 1 << RA;
  localparam int IW    = 1 + RA + CA;
  localparam int REG_W = (NC + 2) * IW;
  localparam int CIW   = (NC > 1) ? $clog2(NC) : 1;

  typedef struct packed {
    logic          valid;
    logic [RA-1:0] row;
    logic [CA-1:0] col;
  } item_t;

  logic [REG_W-1:0] rep_reg;
  item_t            items [NC+2];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)  rep_reg <= '0;
    else if (ld) rep_reg <= {rep_reg[REG_W-2:0], tdi};
  end

  always_comb
    for (int k = 0; k < NC + 2; k++) items[k] = item_t'(rep_reg[k*IW +: IW]);

  // ---- normal-mode remapping -------------------------------------------
  logic          row_hit;
  logic [RA:0]   n_addr;
  logic [COLS:0] n_wdata;
  always_comb begin
    row_hit = items[0].valid && items[0].row == addr;
    n_addr  = row_hit ? (RA+1)'(ROWS) : {1'b0, addr};
    n_wdata = {items[1].valid ? wdata[items[1].col] : 1'b0, wdata};
  end

  logic [NC-1:0] cell_data, cell_q;
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) cell_data <= '0;
    else if (sel && !cen && !wen && !row_hit) begin
      for (int k = 0; k < NC; k++)
        if (items[k+2].valid && items[k+2].row == addr)
          cell_data[k] <= wdata[items[k+2].col];
    end else if (!sel && !t_cen && !t_wen && int'(t_addr) < NC) begin
      cell_data[CIW'(t_addr)] <= t_wdata[COLS+1];
    end
  end
  // spare cells as read, with their defects
  assign cell_q = (cell_data & ~cell_defect_mask) | (cell_defect_val & cell_defect_mask);

  // spare cell of the test read in flight
  logic         t_cell_v;
  logic [CIW-1:0] t_rd_addr_q;
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      t_cell_v    <= 1'b0;
      t_rd_addr_q <= '0;
    end else if (!sel && !t_cen && t_wen) begin
      t_cell_v    <= int'(t_addr) < NC;
      t_rd_addr_q <= CIW'(t_addr);
    end
  end

  // address of the read in flight, for the bit substitution of rdata
  logic          rd_row_hit_q;
  logic [RA-1:0] rd_addr_q;
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      rd_row_hit_q <= 1'b0;
      rd_addr_q    <= '0;
    end else if (sel && !cen && wen) begin
      rd_row_hit_q <= row_hit;
      rd_addr_q    <= addr;
    end
  end

  // ---- cell array ----------------------------------------------------------
  logic          m_cen, m_wen;
  logic [RA:0]   m_addr;
  logic [COLS:0] m_wdata, m_rdata;

  always_comb begin
    if (sel) begin
      m_cen = cen;  m_wen = wen;  m_addr = n_addr;  m_wdata = n_wdata;
    end else begin
      m_cen = t_cen; m_wen = t_wen; m_addr = t_addr; m_wdata = t_wdata[COLS:0];
    end
  end

  sram_array #(.RA(RA), .CA(CA)) u_array (
    .clk, .cen(m_cen), .wen(m_wen), .addr(m_addr), .wdata(m_wdata),
    .rdata(m_rdata), .defect_mask, .defect_val
  );

  assign t_rdata = {t_cell_v && cell_q[t_rd_addr_q], m_rdata};

  always_comb begin
    rdata = m_rdata[COLS-1:0];
    if (!rd_row_hit_q) begin
      if (items[1].valid) rdata[items[1].col] = m_rdata[COLS];
      for (int k = 0; k < NC; k++)
        if (items[k+2].valid && items[k+2].row == rd_addr_q)
          rdata[items[k+2].col] = cell_q[k];
    end
  end
endmodule
