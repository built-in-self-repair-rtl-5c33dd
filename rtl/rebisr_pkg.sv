// rebisr_pkg: constants and types shared by the reconfigurable built-in
// self-repair (ReBISR) blocks.
//
// One MBIST and one BIRA serve several bit-organised RAMs of different size.
// Both are built for the largest RAM (MAX_RA row-address bits, MAX_CA
// column-address bits, MAX_CELLS spare cells) and are told at run time, by a
// ram_cfg_t, how large the RAM under test is.  A RAM of RA/CA bits has
// 2^RA words of 2^CA bits; its spare row is test address 2^RA, its spare
// column is test data bit 2^CA and its spare cell k is test data bit 2^CA+1
// of test word k, so every spare is covered by the March test.
//
// The three RAM sizes (16x16, 32x32, 64x64 bits) and the spare-cell counts of
// the first two (16 and 32) follow the design description; 64 spare cells for
// the 64x64 RAM and every width below are choices of this design.
package rebisr_pkg;

  localparam int MAX_RA    = 6;                // row-address bits of the largest RAM
  localparam int MAX_CA    = 6;                // column-address bits of the largest RAM
  localparam int MAX_ROWS  = 1 << MAX_RA;
  localparam int MAX_COLS  = 1 << MAX_CA;
  localparam int MAX_CELLS = 64;               // spare cells of the largest RAM
  localparam int TAW       = MAX_RA + 1;       // test address: rows plus spare row
  localparam int TDW       = MAX_COLS + 2;     // test data: columns, spare column, spare cell
  localparam int FCW       = MAX_CA + 1;       // failing column index incl. spare column
  localparam int NUM_RAMS  = 3;

  // Run-time configuration of the shared MBIST/BIRA for one RAM.
  typedef struct packed {
    logic [2:0] ra;     // row-address bits (1..MAX_RA)
    logic [2:0] ca;     // column-address bits (1..MAX_CA)
    logic [6:0] cells;  // number of spare cells (0..2^ra, at most MAX_CELLS)
  } ram_cfg_t;

  // Configuration of RAM idx (0: 16x16, 1: 32x32, 2: 64x64).
  function automatic ram_cfg_t ram_cfg(input int unsigned idx);
    ram_cfg_t c;
    case (idx)
      0:       c = '{ra: 3'd4, ca: 3'd4, cells: 7'd16};
      1:       c = '{ra: 3'd5, ca: 3'd5, cells: 7'd32};
      default: c = '{ra: 3'd6, ca: 3'd6, cells: 7'd64};
    endcase
    return c;
  endfunction

  // One access of the MBIST on the shared test bus (SRAM style, active low).
  typedef struct packed {
    logic           cen;    // 0: access this cycle
    logic           wen;    // 0: write, 1: read
    logic [TAW-1:0] addr;
    logic [TDW-1:0] wdata;
  } test_req_t;

endpackage
