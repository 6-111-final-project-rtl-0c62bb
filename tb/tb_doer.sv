// tb_doer: after each row_done the doer must sweep columns 0..359 of row
// vcount/2, one per clock starting the clock after row_done, with write
// enable high exactly for those 360 clocks.
module tb_doer;
  import avs_pkg::*;

  logic clk = 1'b0;
  always #5 clk = ~clk;

  int checks = 0;
  int failures = 0;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures <= 10) $display("FAIL at %0t: %s", $time, what);
    end
  endtask

  // watchdog
  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  logic rst, row_done, we;
  logic [9:0] vcount, row, col;

  doer dut (.clk, .rst, .row_done, .vcount, .we, .row, .col);

  initial begin
    rst = 1; row_done = 0; vcount = 0;
    repeat (3) @(negedge clk);
    rst = 0;
    repeat (5) @(negedge clk);
    check(we == 0, "write enable before the first row_done");
    for (int l = 0; l < 12; l++) begin
      int v;
      v = $urandom % 486;
      vcount = 10'(v);
      row_done = 1;
      @(negedge clk);
      row_done = 0;
      vcount = 10'($urandom);
      for (int c = 0; c < 360; c++) begin
        check(we && col == 10'(c) && row == 10'(v / 2), $sformatf("line %0d col %0d: we %0b row %0d col %0d", v, c, we, row, col));
        @(negedge clk);
      end
      for (int c = 0; c < 20 + l; c++) begin
        check(we == 0, "write enable past column 359");
        @(negedge clk);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
