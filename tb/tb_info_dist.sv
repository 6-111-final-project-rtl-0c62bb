// tb_info_dist: random bucket updates and frame_done pulses; a model kept
// here averages (old + latest) / 2 per bucket on each frame_done, and the
// outputs must match it every clock and never change without frame_done.
module tb_info_dist;
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
  logic rst, bkt_valid, frame_done;
  logic [15:0] bkt_mag;
  logic [2:0] bkt_index;
  logic [7:0][15:0] bucket;
  int latest [8], shown [8];

  info_dist dut (.clk, .rst, .bkt_mag, .bkt_index, .bkt_valid, .frame_done, .bucket);

  initial begin
    rst = 1; bkt_valid = 0; frame_done = 0; bkt_mag = 0; bkt_index = 0;
    foreach (latest[i]) begin latest[i] = 0; shown[i] = 0; end
    repeat (3) @(negedge clk);
    rst = 0;
    for (int c = 0; c < 3000; c++) begin
      bkt_valid = ($urandom % 2) == 0;
      bkt_mag = 16'($urandom);
      bkt_index = 3'($urandom);
      frame_done = ($urandom % 17) == 0;
      @(negedge clk);
      if (frame_done) foreach (shown[i]) shown[i] = (shown[i] + latest[i]) / 2;
      if (bkt_valid) latest[bkt_index] = bkt_mag;
      foreach (shown[i]) check(int'(bucket[i]) == shown[i], $sformatf("bucket %0d = %0d, expected %0d", i, bucket[i], shown[i]));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
