// sram_array: the cell array of one repairable RAM, with its spare row and
// spare column.
//
// The array holds 2^RA + 1 words of 2^CA + 1 bits.  Words 0..2^RA-1 and bits
// 0..2^CA-1 are the main memory; word 2^RA is the spare row and bit 2^CA of
// every word is the spare column (the spare cells live in the wrapper).
// It is a single-port synchronous SRAM: when cen is low, wen low writes wdata
// at the clock edge and wen high reads, with rdata valid the cycle after.
// rdata holds its value when there is no read.
//
// defect_mask/defect_val model manufacturing defects: a cell whose mask bit
// is set reads as its defect_val bit whatever was written (stuck-at fault).
// Bit w*(2^CA+1)+b of both vectors is cell (word w, bit b).  Tie them to zero
// for a defect-free array.  Array sizes, the port polarity and the fault
// model are this design's choices; the organisation into main memory, spare
// row and spare column follows the redundancy scheme it implements.
module sram_array #(
  parameter int RA = 4,
  parameter int CA = 4
) (
  input  logic                                clk,
  input  logic                                cen,
  input  logic                                wen,
  input  logic [RA:0]                         addr,
  input  logic [(1<<CA):0]                    wdata,
  output logic [(1<<CA):0]                    rdata,
  input  logic [((1<<RA)+1)*((1<<CA)+1)-1:0]  defect_mask,
  input  logic [((1<<RA)+1)*((1<<CA)+1)-1:0]  defect_val
);
  localparam int WORDS = (1 << RA) + 1;
  localparam int DW    = (1 << CA) + 1;

  logic [DW-1:0] mem [WORDS];

  logic [DW-1:0] mask_w, val_w;
  always_comb begin
    mask_w = defect_mask[addr*DW +: DW];
    val_w  = defect_val[addr*DW +: DW];
  end

  always_ff @(posedge clk) begin
    if (!cen && int'(addr) < WORDS) begin
      if (!wen) mem[addr] <= wdata;
      else      rdata     <= (mem[addr] & ~mask_w) | (val_w & mask_w);
    end
  end
endmodule
