// tb_fp_buffer: fills the dual-port buffer (at its full default size of
// 16384 words) with a pattern, then reads it back while writing new data to
// other addresses in the same clocks. Checks the one-clock read latency, that
// a simultaneous write does not disturb the read of another address, and that
// all words keep their value.
module tb_fp_buffer;
  localparam int DEPTH = 16384, W = 32, AW = 14;
  logic clk = 0, we = 0;
  logic [AW-1:0] waddr = 0, raddr = 0;
  logic [W-1:0] wdata = 0, rdata;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;
  fp_buffer #(.DEPTH(DEPTH), .W(W)) dut (.*);

  function automatic logic [W-1:0] pat(int a, int gen);
    return W'(a * 2654435761 + gen * 40503);
  endfunction

  initial begin
    for (int a = 0; a < DEPTH; a++) begin
      @(negedge clk) we = 1; waddr = AW'(a); wdata = pat(a, 0);
    end
    // read a, write a + 1 with new data in the same clock
    for (int a = 0; a < DEPTH; a++) begin
      @(negedge clk);
      raddr = AW'(a);
      we = (a + 1 < DEPTH); waddr = AW'(a + 1); wdata = pat(a + 1, 1);
      @(posedge clk); #1;
      checks++;
      if (rdata !== pat(a, a == 0 ? 0 : 1)) begin
        failures++;
        if (failures < 10) $display("FAIL addr %0d: %h exp %h", a, rdata, pat(a, a == 0 ? 0 : 1));
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (40000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
