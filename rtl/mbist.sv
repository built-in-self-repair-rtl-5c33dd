// mbist: reconfigurable March C- memory BIST (test pattern generator and
// comparator).
//
// A start pulse latches cfg and runs March C- over test addresses 0..2^ra
// (the main rows and the spare row) with words of 2^ca + 1 bits (the main
// columns and the spare column) plus, in word k < cfg.cells, bit 2^ca + 1
// (spare cell k):
//   up(w0); up(r0,w1); up(r1,w0); down(r0,w1); down(r1,w0); up(r0)
// One operation is issued per cycle on the test bus (req, SRAM style, active
// low).  Read data comes back one cycle later and is compared with the
// expected background; the mismatching bits of the word are then reported one
// per cycle on fail/fau_row/fau_col, lowest column first, and no new
// operation is issued until all of them are reported.  A defect-free run
// therefore takes 10*(2^ra+1) issue cycles plus one compare cycle, after which
// mar_com rises and stays high until the next start.
// The March C- algorithm, the FSM form and the signal names fail, fau_add
// (split here into row and column) and mar_com follow the design
// description; the serial fault reporting and the timing are this design's.
module mbist
  import rebisr_pkg::*;
(
  input  logic           clk,
  input  logic           rst_n,
  input  logic           start,
  input  ram_cfg_t       cfg,
  output test_req_t      req,
  input  logic [TDW-1:0] rdata,
  output logic           fail,
  output logic [TAW-1:0] fau_row,
  output logic [FCW-1:0] fau_col,
  output logic           mar_com,
  output logic           busy
);
  typedef enum logic [1:0] {S_IDLE, S_RUN, S_DRAIN} state_t;
  state_t state;

  ram_cfg_t       cfg_q;
  logic [2:0]     elem;     // March element 0..5
  logic           op;       // operation within the element
  logic [TAW-1:0] addr;
  logic [TAW-1:0] last_addr;

  // pending compare of a read issued last cycle
  logic           rd_v;
  logic           rd_exp;
  logic [TAW-1:0] rd_addr;
  // mismatching bits still to be reported
  logic [TDW-1:0] pend;
  logic [TAW-1:0] pend_row;

  assign last_addr = TAW'(1) << cfg_q.ra;

  // bits of test word a that exist in the configured RAM
  function automatic logic [TDW-1:0] word_mask(input logic [TAW-1:0] a);
    logic [TDW-1:0] m;
    for (int b = 0; b < TDW; b++)
      m[b] = (b <= (1 << cfg_q.ca)) || (b == (1 << cfg_q.ca) + 1 && int'(a) < int'(cfg_q.cells));
    return m;
  endfunction

  // operation of (elem, op): is_read and its data value
  logic cur_read, cur_val, last_op, descending;
  always_comb begin
    descending = (elem == 3'd3) || (elem == 3'd4);
    unique case (elem)
      3'd0:    begin cur_read = 1'b0; cur_val = 1'b0; last_op = 1'b1; end
      3'd1:    begin cur_read = !op;  cur_val = op;   last_op = op;   end
      3'd2:    begin cur_read = !op;  cur_val = !op;  last_op = op;   end
      3'd3:    begin cur_read = !op;  cur_val = op;   last_op = op;   end
      3'd4:    begin cur_read = !op;  cur_val = !op;  last_op = op;   end
      default: begin cur_read = 1'b1; cur_val = 1'b0; last_op = 1'b1; end
    endcase
  end

  logic [TDW-1:0] mism;
  assign mism = rd_v ? ((rdata ^ {TDW{rd_exp}}) & word_mask(rd_addr)) : '0;

  logic issue;
  assign issue = (state == S_RUN) && (pend == '0) && (mism == '0);

  logic elem_end;
  assign elem_end = last_op && (descending ? (addr == '0) : (addr == last_addr));

  // lowest pending column
  logic [FCW-1:0] low_idx;
  always_comb begin
    low_idx = '0;
    for (int b = TDW - 1; b >= 0; b--) if (pend[b]) low_idx = FCW'(b);
  end

  always_comb begin
    req.cen   = !issue;
    req.wen   = cur_read;
    req.addr  = addr;
    req.wdata = {TDW{cur_val}} & word_mask(addr);
  end

  assign fail    = (pend != '0);
  assign fau_row = pend_row;
  assign fau_col = low_idx;
  assign busy    = (state != S_IDLE);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state    <= S_IDLE;
      cfg_q    <= '0;
      elem     <= '0;
      op       <= 1'b0;
      addr     <= '0;
      rd_v     <= 1'b0;
      rd_exp   <= 1'b0;
      rd_addr  <= '0;
      pend     <= '0;
      pend_row <= '0;
      mar_com  <= 1'b0;
    end else begin
      // comparator and fault reporting
      if (mism != '0) begin
        pend     <= mism;
        pend_row <= rd_addr;
      end else if (pend != '0) begin
        pend[low_idx] <= 1'b0;
      end
      rd_v <= issue && cur_read;
      if (issue) begin
        rd_exp  <= cur_val;
        rd_addr <= addr;
      end

      unique case (state)
        S_IDLE: if (start) begin
          cfg_q   <= cfg;
          state   <= S_RUN;
          elem    <= '0;
          op      <= 1'b0;
          addr    <= '0;
          mar_com <= 1'b0;
        end
        S_RUN: if (issue) begin
          if (!last_op) op <= 1'b1;
          else begin
            op <= 1'b0;
            if (elem_end) begin
              if (elem == 3'd5) state <= S_DRAIN;
              else begin
                elem <= elem + 3'd1;
                // elements 3 and 4 run downwards
                addr <= (elem == 3'd2 || elem == 3'd3) ? last_addr : '0;
              end
            end else begin
              addr <= descending ? addr - 1'b1 : addr + 1'b1;
            end
          end
        end
        S_DRAIN: if (!rd_v && pend == '0 && mism == '0) begin
          state   <= S_IDLE;
          mar_com <= 1'b1;
        end
        default: state <= S_IDLE;
      endcase
    end
  end

  // a failing cell is always inside the configured array
  assert property (@(posedge clk) disable iff (!rst_n)
                   fail |-> (fau_row <= last_addr && int'(fau_col) <= (1 << cfg_q.ca) + 1));
endmodule
