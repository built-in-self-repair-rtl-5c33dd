// bitmap: list of the distinct faulty cells found by the MBIST.
//
// Each entry is a (row, column) address and a repaired flag.  ins_en adds
// (ins_row, ins_col) at the next free entry unless an entry with the same
// address already exists (March C- reads a defective cell several times, so
// the same cell is reported more than once); when all DEPTH entries are in use
// a new address sets overflow instead.  clear empties the list.  count is the
// number of entries; rd_idx selects the entry shown combinationally on
// rd_row/rd_col/rd_rep, and mark_en sets the repaired flag of entry mark_idx.
// All updates take effect at the clock edge.
// A bitmap of faulty addresses with their repair status follows the design
// description (its Table of faulty addresses); the depth, the duplicate
// filter and the overflow flag are this design's choices.
module bitmap #(
  parameter int DEPTH = 192,
  parameter int RW    = 6,
  parameter int CW    = 6
) (
  input  logic                     clk,
  input  logic                     rst_n,
  input  logic                     clear,
  input  logic                     ins_en,
  input  logic [RW-1:0]            ins_row,
  input  logic [CW-1:0]            ins_col,
  output logic [$clog2(DEPTH+1)-1:0] count,
  output logic                     overflow,
  input  logic [$clog2(DEPTH)-1:0] rd_idx,
  output logic [RW-1:0]            rd_row,
  output logic [CW-1:0]            rd_col,
  output logic                     rd_rep,
  input  logic                     mark_en,
  input  logic [$clog2(DEPTH)-1:0] mark_idx
);
  localparam int IW = $clog2(DEPTH);
  localparam int NW = $clog2(DEPTH + 1);

  logic [RW-1:0]    row_q [DEPTH];
  logic [CW-1:0]    col_q [DEPTH];
  logic [DEPTH-1:0] rep_q;

  logic hit;
  always_comb begin
    hit = 1'b0;
    for (int i = 0; i < DEPTH; i++)
      if (NW'(i) < count && row_q[i] == ins_row && col_q[i] == ins_col) hit = 1'b1;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      count    <= '0;
      overflow <= 1'b0;
      rep_q    <= '0;
    end else if (clear) begin
      count    <= '0;
      overflow <= 1'b0;
      rep_q    <= '0;
    end else begin
      if (ins_en && !hit) begin
        if (count == NW'(DEPTH)) overflow <= 1'b1;
        else begin
          count <= count + 1'b1;
          rep_q[count[IW-1:0]] <= 1'b0;
        end
      end
      if (mark_en) rep_q[mark_idx] <= 1'b1;
    end
  end

  // address storage, written only into free entries
  always_ff @(posedge clk) begin
    if (!clear && ins_en && !hit && count != NW'(DEPTH)) begin
      row_q[count[IW-1:0]] <= ins_row;
      col_q[count[IW-1:0]] <= ins_col;
    end
  end

  assign rd_row = row_q[rd_idx];
  assign rd_col = col_q[rd_idx];
  assign rd_rep = rep_q[rd_idx];
endmodule
