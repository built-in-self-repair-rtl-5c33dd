// bira: reconfigurable built-in redundancy analysis.
//
// start latches cfg (size and spare-cell count of the RAM under test), empties
// the bitmap and drops sel, which puts the RAM's wrapper in test mode.  While
// the MBIST runs, every reported fault (fail, fau_row, fau_col) is sorted:
// a fault in the spare row (row 2^ra) or spare column (column 2^ca) makes that
// spare unusable (the corner cell they share is never used and is ignored),
// a fault in column 2^ca+1 of word k marks spare cell k unusable, and any
// other fault goes into the bitmap.  When mar_com rises the
// allocation runs over the bitmap entries in order.  For each entry not yet
// repaired it counts, over the unrepaired entries, how many share its row (rc)
// and how many share its column (cc), then:
//   rc > cc and the spare row is free    -> spare row; all unrepaired entries
//                                           of that row are marked repaired;
//   rc < cc and the spare column is free -> spare column, likewise;
//   otherwise                            -> a spare cell for this entry
//                                           (the lowest usable free one).
// With no spare cell left the entry takes whichever spare line is still free,
// or the repair fails.  Counting and marking scan the bitmap one entry per
// cycle.  The resulting fault signature is then shifted out on tdi, with ld
// high, most significant bit first, as (cfg.cells+2) items of
// {valid, row[ra], col[ca]}: item 0 spare row, item 1 spare column, item k+2
// spare cell k (the item format of mem_wrapper).  After the last bit sel rises
// (normal mode) and done rises with repair_ok; both hold until the next start.
// The counting rule, the order of the decisions and the use of the bitmap
// follow the repair algorithm of the design description; the scan timing, the
// fallback when spare cells run out and the signature format are this
// design's choices.
module bira
  import rebisr_pkg::*;
#(
  parameter int DEPTH = MAX_ROWS + MAX_COLS + MAX_CELLS
) (
  input  logic           clk,
  input  logic           rst_n,
  input  logic           start,
  input  ram_cfg_t       cfg,
  input  logic           fail,
  input  logic [TAW-1:0] fau_row,
  input  logic [FCW-1:0] fau_col,
  input  logic           mar_com,
  output logic           sel,
  output logic           ld,
  output logic           tdi,
  output logic           done,
  output logic           repair_ok,
  // allocation summary
  output logic           row_used,
  output logic           col_used,
  output logic [6:0]     cells_used,
  output logic           overflow
);
  localparam int IW = $clog2(DEPTH);
  localparam int NW = $clog2(DEPTH + 1);

  typedef enum logic [2:0] {S_IDLE, S_COLLECT, S_NEXT, S_COUNT, S_DECIDE, S_MARK,
                            S_SHIFT, S_DONE} state_t;
  state_t state;

  ram_cfg_t cfg_q;
  logic     row_bad, col_bad, unrep, mark_row;

  logic [MAX_RA-1:0] row_a;
  logic [MAX_CA-1:0] col_a;
  logic [MAX_RA-1:0] cell_row [MAX_CELLS];
  logic [MAX_CA-1:0] cell_col [MAX_CELLS];
  logic [MAX_CELLS-1:0] slot_used, cell_bad;

  logic [NW-1:0] i, j, rc, cc;
  logic [MAX_RA-1:0] cur_row;
  logic [MAX_CA-1:0] cur_col;

  // bitmap
  logic [NW-1:0]     bm_count;
  logic              bm_ins, bm_mark;
  logic [IW-1:0]     bm_rd_idx, bm_mark_idx;
  logic [MAX_RA-1:0] bm_row;
  logic [MAX_CA-1:0] bm_col;
  logic              bm_rep;

  logic fail_in_row_spare, fail_in_col_spare, fail_in_cell_spare;
  assign fail_in_row_spare  = int'(fau_row) == (1 << cfg_q.ra);
  assign fail_in_col_spare  = int'(fau_col) == (1 << cfg_q.ca);
  assign fail_in_cell_spare = int'(fau_col) == (1 << cfg_q.ca) + 1;
  assign bm_ins = (state == S_COLLECT) && fail && !fail_in_row_spare && !fail_in_col_spare &&
                  !fail_in_cell_spare;
  assign bm_rd_idx = (state == S_NEXT) ? i[IW-1:0] : j[IW-1:0];

  bitmap #(.DEPTH(DEPTH), .RW(MAX_RA), .CW(MAX_CA)) u_bitmap (
    .clk, .rst_n,
    .clear   (state == S_IDLE && start),
    .ins_en  (bm_ins),
    .ins_row (fau_row[MAX_RA-1:0]),
    .ins_col (fau_col[MAX_CA-1:0]),
    .count   (bm_count),
    .overflow,
    .rd_idx  (bm_rd_idx),
    .rd_row  (bm_row),
    .rd_col  (bm_col),
    .rd_rep  (bm_rep),
    .mark_en (bm_mark),
    .mark_idx(bm_mark_idx)
  );

  // ---- decision for the current entry ---------------------------------------
  logic row_free, col_free, cell_free;
  assign row_free  = !row_used && !row_bad;
  assign col_free  = !col_used && !col_bad;
  // lowest spare cell that exists, passed the test and is not yet used
  logic [5:0] slot;
  always_comb begin
    cell_free = 1'b0;
    slot      = '0;
    for (int s = MAX_CELLS - 1; s >= 0; s--)
      if (s < int'(cfg_q.cells) && !cell_bad[s] && !slot_used[s]) begin
        cell_free = 1'b1;
        slot      = 6'(s);
      end
  end

  typedef enum logic [2:0] {D_ROW, D_COL, D_CELL, D_NONE} dec_t;
  dec_t dec;
  always_comb begin
    if      (rc > cc && row_free) dec = D_ROW;
    else if (rc < cc && col_free) dec = D_COL;
    else if (cell_free)           dec = D_CELL;
    else if (row_free)            dec = D_ROW;
    else if (col_free)            dec = D_COL;
    else                          dec = D_NONE;
  end

  logic mark_hit;
  assign mark_hit = !bm_rep && (mark_row ? bm_row == cur_row : bm_col == cur_col);

  always_comb begin
    bm_mark     = 1'b0;
    bm_mark_idx = j[IW-1:0];
    if (state == S_DECIDE && (dec == D_CELL || dec == D_NONE)) begin
      bm_mark     = 1'b1;
      bm_mark_idx = i[IW-1:0];
    end else if (state == S_MARK && mark_hit) begin
      bm_mark = 1'b1;
    end
  end

  // ---- signature serializer -------------------------------------------------
  logic [6:0] k;       // item, counts down from cells+1 to 0
  logic [3:0] b;       // bit in item, counts down from ra+ca to 0
  logic [3:0] b_top;
  assign b_top = 4'(cfg_q.ra) + 4'(cfg_q.ca);

  logic              it_valid;
  logic [MAX_RA-1:0] it_row;
  logic [MAX_CA-1:0] it_col;
  always_comb begin
    it_valid = 1'b0;
    it_row   = '0;
    it_col   = '0;
    if (k == 7'd0) begin
      it_valid = row_used;
      it_row   = row_a;
    end else if (k == 7'd1) begin
      it_valid = col_used;
      it_col   = col_a;
    end else if (int'(k) - 2 < MAX_CELLS) begin
      it_valid = slot_used[6'(k - 7'd2)];
      if (it_valid) begin
        it_row = cell_row[6'(k - 7'd2)];
        it_col = cell_col[6'(k - 7'd2)];
      end
    end
  end

  always_comb begin
    if (b == b_top)                tdi = it_valid;
    else if (b >= 4'(cfg_q.ca))    tdi = it_row[3'(b - 4'(cfg_q.ca))];
    else                           tdi = it_col[3'(b)];
  end
  assign ld = (state == S_SHIFT);

  // ---- control --------------------------------------------------------------
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state      <= S_IDLE;
      cfg_q      <= '0;
      sel        <= 1'b0;
      done       <= 1'b0;
      repair_ok  <= 1'b0;
      row_bad    <= 1'b0;
      col_bad    <= 1'b0;
      row_used   <= 1'b0;
      col_used   <= 1'b0;
      cells_used <= '0;
      slot_used  <= '0;
      cell_bad   <= '0;
      unrep      <= 1'b0;
      mark_row   <= 1'b0;
      row_a      <= '0;
      col_a      <= '0;
      i          <= '0;
      j          <= '0;
      rc         <= '0;
      cc         <= '0;
      cur_row    <= '0;
      cur_col    <= '0;
      k          <= '0;
      b          <= '0;
    end else begin
      unique case (state)
        S_IDLE: if (start) begin
          cfg_q      <= cfg;
          sel        <= 1'b0;
          done       <= 1'b0;
          repair_ok  <= 1'b0;
          row_bad    <= 1'b0;
          col_bad    <= 1'b0;
          row_used   <= 1'b0;
          col_used   <= 1'b0;
          cells_used <= '0;
          slot_used  <= '0;
          cell_bad   <= '0;
          unrep      <= 1'b0;
          state      <= S_COLLECT;
        end
        S_COLLECT: begin
          // the corner cell of spare row and spare column is never used
          if (fail && fail_in_row_spare && !fail_in_col_spare) row_bad <= 1'b1;
          if (fail && fail_in_col_spare && !fail_in_row_spare) col_bad <= 1'b1;
          if (fail && fail_in_cell_spare && int'(fau_row) < MAX_CELLS)
            cell_bad[6'(fau_row)] <= 1'b1;
          if (mar_com && !fail) begin
            i     <= '0;
            state <= S_NEXT;
          end
        end
        S_NEXT: begin
          if (overflow || i == bm_count) begin
            k     <= cfg_q.cells + 7'd1;
            b     <= b_top;
            state <= S_SHIFT;
          end else if (bm_rep) begin
            i <= i + 1'b1;
          end else begin
            cur_row <= bm_row;
            cur_col <= bm_col;
            rc      <= '0;
            cc      <= '0;
            j       <= '0;
            state   <= S_COUNT;
          end
        end
        S_COUNT: begin
          if (!bm_rep && bm_row == cur_row) rc <= rc + 1'b1;
          if (!bm_rep && bm_col == cur_col) cc <= cc + 1'b1;
          j <= j + 1'b1;
          if (j == bm_count - 1'b1) state <= S_DECIDE;
        end
        S_DECIDE: begin
          j <= '0;
          unique case (dec)
            D_ROW: begin
              row_used <= 1'b1;
              row_a    <= cur_row;
              mark_row <= 1'b1;
              state    <= S_MARK;
            end
            D_COL: begin
              col_used <= 1'b1;
              col_a    <= cur_col;
              mark_row <= 1'b0;
              state    <= S_MARK;
            end
            D_CELL: begin
              cells_used <= cells_used + 7'd1;
              slot_used[slot] <= 1'b1;
              i          <= i + 1'b1;
              state      <= S_NEXT;
            end
            default: begin
              unrep <= 1'b1;
              i     <= i + 1'b1;
              state <= S_NEXT;
            end
          endcase
        end
        S_MARK: begin
          j <= j + 1'b1;
          if (j == bm_count - 1'b1) begin
            i     <= i + 1'b1;
            state <= S_NEXT;
          end
        end
        S_SHIFT: begin
          if (b != 4'd0) b <= b - 4'd1;
          else if (k != 7'd0) begin
            k <= k - 7'd1;
            b <= b_top;
          end else begin
            state <= S_DONE;
          end
        end
        S_DONE: begin
          sel       <= 1'b1;
          done      <= 1'b1;
          repair_ok <= !unrep && !overflow;
          state     <= S_IDLE;
        end
        default: state <= S_IDLE;
      endcase
    end
  end

  // spare-cell items: written once, in allocation order
  always_ff @(posedge clk) begin
    if (state == S_DECIDE && dec == D_CELL) begin
      cell_row[slot] <= cur_row;
      cell_col[slot] <= cur_col;
    end
  end

  // the serializer never addresses a spare cell beyond the configuration
  assert property (@(posedge clk) disable iff (!rst_n)
                   (state == S_SHIFT) |-> (k <= cfg_q.cells + 7'd1));
endmodule
