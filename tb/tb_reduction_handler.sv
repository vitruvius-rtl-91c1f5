// tb_reduction_handler: random sum / max / min reductions of 1..60 64-bit
// elements, with and without an initial value, fed back to back or with
// random gaps.  The result must match a model; with back-to-back input and
// N >= LAT the handler must take one element per cycle (in_ready never
// drops), and the result must appear within LAT + 4 cycles of the last
// element.
`timescale 1ns/1ps
module tb_reduction_handler;
  import vpu_pkg::*;
  localparam int N = 4, LAT = 3;
  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;
  logic start, has_init, in_valid, in_last, in_ready, out_valid, out_empty;
  vop_e op;
  elem_t init, in_data, out_data;
  reduction_handler #(.N(N), .LAT(LAT)) dut (.*);
  int checks = 0, failures = 0;
  int cyc = 0, got_t = 0, n_out = 0;
  elem_t got;
  logic got_empty;
  always @(posedge clk) begin
    cyc <= cyc + 1;
    if (out_valid) begin n_out++; got = out_data; got_empty = out_empty; got_t = cyc; end
  end
  initial begin
    repeat (200000) @(posedge clk);
    $display("FAIL: watchdog"); failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
  initial begin
    vop_e ops [3] = '{OP_REDSUM, OP_REDMAX, OP_REDMIN};
    start = 0; has_init = 0; in_valid = 0; in_last = 0; op = OP_REDSUM; init = '0; in_data = '0;
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    for (int t = 0; t < 300; t++) begin
      int n, waited, stalls, gaps, n0, t_last;
      elem_t r, v;
      bit have;
      n = $urandom_range(1, 60);
      gaps = $urandom_range(0, 1);
      @(negedge clk);
      start = 1; op = ops[$urandom_range(0, 2)]; has_init = $urandom_range(0, 1); init = {$urandom, $urandom};
      have = has_init; r = init;
      @(negedge clk);
      start = 0;
      stalls = 0;
      n0 = n_out;
      for (int i = 0; i < n; i++) begin
        v = {$urandom, $urandom};
        if ($urandom_range(0, 3) == 0) v = {32'hffffffff, $urandom};   // negative values
        in_valid = 1; in_data = v; in_last = (i == n - 1);
        #1;
        while (!in_ready) begin stalls++; @(negedge clk); end
        if (!have) r = v;
        else case (op)
          OP_REDSUM: r = r + v;
          OP_REDMAX: r = ($signed(v) > $signed(r)) ? v : r;
          default:   r = ($signed(v) < $signed(r)) ? v : r;
        endcase
        have = 1;
        t_last = cyc;
        @(negedge clk);
        in_valid = 0; in_last = 0;
        if (gaps) repeat ($urandom_range(0, 2)) @(negedge clk);
      end
      waited = 0;
      while (n_out == n0 && waited < 100) begin @(negedge clk); waited++; end
      waited = got_t - t_last;
      checks++;
      if (n_out != n0 + 1 || got !== r || got_empty) begin
        failures++;
        if (failures < 5) $display("FAIL %s n=%0d init=%0b: %h expected %h", op.name(), n, has_init, got, r);
      end
      checks++;
      if (!gaps && stalls != 0) begin
        failures++;
        if (failures < 5) $display("FAIL: %0d input stalls with back-to-back input", stalls);
      end
      checks++;
      if (waited > LAT + 4) begin
        failures++;
        if (failures < 5) $display("FAIL: result %0d cycles after the last element", waited);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
