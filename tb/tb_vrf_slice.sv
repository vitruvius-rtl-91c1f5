// tb_vrf_slice: writes random words into random rows of all five banks,
// reads them back and compares with a model; checks the one-cycle read
// latency and that banks are independent (different rows read in the same
// cycle).  Every model entry is written before it is read.
`timescale 1ns/1ps
module tb_vrf_slice;
  import vpu_pkg::*;
  logic clk = 1'b0;
  always #5 clk = ~clk;
  logic [NUM_BANKS-1:0] en, we;
  logic [7:0] row [NUM_BANKS];
  elem_t wdata [NUM_BANKS], rdata [NUM_BANKS];
  vrf_slice dut (.*);
  int checks = 0, failures = 0;
  elem_t model [NUM_BANKS][BANK_ROWS];
  initial begin
    repeat (100000) @(posedge clk);
    $display("FAIL: watchdog"); failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
  initial begin
    en = '0; we = '0;
    for (int b = 0; b < NUM_BANKS; b++) begin row[b] = '0; wdata[b] = '0; end
    // fill everything
    for (int r = 0; r < BANK_ROWS; r++) begin
      @(negedge clk);
      en = '1; we = '1;
      for (int b = 0; b < NUM_BANKS; b++) begin
        row[b] = 8'(r); wdata[b] = {$urandom, $urandom}; model[b][r] = wdata[b];
      end
    end
    // random mix of reads and writes, different row per bank
    for (int t = 0; t < 3000; t++) begin
      logic [NUM_BANKS-1:0] rd;
      int rr [NUM_BANKS];
      @(negedge clk);
      en = '1;
      for (int b = 0; b < NUM_BANKS; b++) begin
        we[b] = $urandom_range(0, 1);
        rr[b] = $urandom_range(0, BANK_ROWS - 1);
        row[b] = 8'(rr[b]);
        wdata[b] = {$urandom, $urandom};
        rd[b] = !we[b];
      end
      @(posedge clk);
      for (int b = 0; b < NUM_BANKS; b++) if (we[b]) model[b][rr[b]] = wdata[b];
      #1;
      for (int b = 0; b < NUM_BANKS; b++) if (rd[b]) begin
        checks++;
        if (rdata[b] !== model[b][rr[b]]) begin
          failures++;
          if (failures < 5) $display("FAIL bank %0d row %0d: %h vs %h", b, rr[b], rdata[b], model[b][rr[b]]);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
