// histogram_engine_tb: random codes are counted into the 401-bin histogram
// and compared bin by bin with a reference count kept here; clear must
// empty every bin and the total; a 4-bit histogram checks saturation.
`timescale 1ns/1ps
module histogram_engine_tb;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0, clear = 0, inc = 0;
  logic [8:0] code, rd_addr;
  logic [16:0] rd_data, total;
  logic s_clear = 0, s_inc = 0;
  logic [1:0] s_code = 0, s_addr = 0;
  logic [3:0] s_data, s_total;
  int ref_cnt [401];

  histogram_engine dut (.clk, .rst_n, .clear, .inc, .code, .rd_addr, .rd_data, .total);
  histogram_engine #(.BINS(3), .CW(4)) sat (.clk, .rst_n, .clear(s_clear), .inc(s_inc),
    .code(s_code), .rd_addr(s_addr), .rd_data(s_data), .total(s_total));

  always #5 clk = ~clk;

  task automatic check(string what, int got, int exp);
    checks++;
    if (got != exp) begin
      failures++;
      if (failures < 20) $display("FAIL %s: got %0d expected %0d", what, got, exp);
    end
  endtask

  task automatic compare_all(string what);
    for (int i = 0; i < 401; i++) begin
      rd_addr = 9'(i);
      #1 check($sformatf("%s bin %0d", what, i), int'(rd_data), ref_cnt[i]);
    end
  endtask

  initial begin
    foreach (ref_cnt[i]) ref_cnt[i] = 0;
    code = 0; rd_addr = 0;
    #12 rst_n = 1;
    for (int t = 0; t < 3000; t++) begin
      @(negedge clk);
      inc  = 1'($urandom % 4 != 0);
      code = 9'(($urandom % 2) ? $urandom % 401 : 190 + $urandom % 20);
      if (inc) ref_cnt[code]++;
    end
    @(negedge clk) inc = 0;
    compare_all("run");
    begin
      int s;
      s = 0;
      foreach (ref_cnt[i]) s += ref_cnt[i];
      check("total", int'(total), s);
    end
    @(negedge clk) clear = 1;
    @(negedge clk) clear = 0;
    foreach (ref_cnt[i]) ref_cnt[i] = 0;
    compare_all("cleared");
    check("total cleared", int'(total), 0);
    // saturation at 15
    s_code = 2'd1;
    repeat (20) begin @(negedge clk) s_inc = 1; end
    @(negedge clk) s_inc = 0;
    s_addr = 2'd1;
    #1 check("saturated bin", int'(s_data), 15);
    check("saturated total", int'(s_total), 15);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
