// tb_bucket_gen: the generator must emit one valid bucket per clock, indices
// cycling 0..7, with magnitudes taken from its pattern table starting at an
// offset that moves on by one per round while advance is high and stays
// put while it is low.
module tb_bucket_gen;
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
    repeat (5000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  logic rst, advance, bkt_valid;
  logic [2:0] bkt_index;
  logic [16:0] bkt_mag;
  localparam logic [7:0] PAT [16] = '{ 12, 250, 96, 40, 170, 210, 24, 130, 0, 230, 150, 80, 255, 60, 190, 110 };
  bucket_gen dut (.clk, .rst, .advance, .bkt_index, .bkt_mag, .bkt_valid);
  initial begin
    int off, idx;
    rst = 1; advance = 0;
    repeat (3) @(negedge clk);
    rst = 0;
    off = 0; idx = 0;
    for (int c = 0; c < 400; c++) begin
      advance = (c / 80) % 2;
      @(negedge clk);
      if (idx == 7 && advance) ;
      idx = (idx + 1) % 8;
      check(bkt_valid && int'(bkt_index) == idx, "index sequence");
      check(int'(bkt_mag) == int'(PAT[(off + idx + 1) % 16]), $sformatf("clock %0d mag %0d expected %0d", c, bkt_mag, PAT[(off + idx + 1) % 16]));
      if (idx == 7 && advance) off = (off + 1) % 16;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
