// vrf_slice: one lane's slice of the vector register file.
//
// Five independent single-port (1RW) banks of BANK_ROWS x 64 bits (2 kB each,
// 10 kB per lane, 80 kB over eight lanes), as the document chooses over
// multi-ported latch arrays.  Each bank has its own enable, write enable and
// row address, so one cycle can touch a different row in every bank.  A read
// returns its data on rdata one cycle after the request (registered output,
// like a compiled SRAM).  A bank either reads or writes in a cycle, never
// both.  Where a word lives is decided by the caller (vpu_pkg::bank_of and
// row_of): consecutive lane-local words of a register fall in consecutive
// banks, so any five consecutive words can be read or written in one cycle.
// The array stands in for the foundry SRAM macro; contents are not reset.
module vrf_slice
  import vpu_pkg::*;
#(
  parameter int unsigned BANKS = NUM_BANKS,
  parameter int unsigned ROWS  = BANK_ROWS
) (
  input  logic                      clk,
  input  logic [BANKS-1:0]          en,
  input  logic [BANKS-1:0]          we,
  input  logic [$clog2(ROWS)-1:0]   row   [BANKS],
  input  elem_t                     wdata [BANKS],
  output elem_t                     rdata [BANKS]
);
  for (genvar b = 0; b < BANKS; b++) begin : g_bank
    elem_t mem [ROWS];
    always_ff @(posedge clk) begin
      if (en[b]) begin
        if (we[b]) mem[row[b]] <= wdata[b];
        else       rdata[b]    <= mem[row[b]];
      end
    end
  end
endmodule
