// tb_video_mem: writes random words to random addresses while reading
// others, keeping a copy here; each read must return the copy one clock
// later. Checks the last address, writes beyond the depth being ignored and
// the full frame being writable and readable.
module tb_video_mem;
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
    repeat (400000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  logic we;
  logic [16:0] waddr, raddr;
  logic [15:0] wdata, rdata;
  logic [15:0] shadow [FB_DEPTH];
  video_mem dut (.clk, .we, .waddr, .wdata, .raddr, .rdata);
  initial begin
    we = 0; waddr = 0; raddr = 0; wdata = 0;
    for (int a = 0; a < FB_DEPTH; a++) begin
      @(negedge clk);
      we = 1; waddr = 17'(a); wdata = 16'(a * 7 + 3); shadow[a] = 16'(a * 7 + 3);
    end
    @(negedge clk);
    we = 1; waddr = 17'(FB_DEPTH + 5); wdata = 16'hDEAD;
    for (int i = 0; i < 20000; i++) begin
      int ra;
      ra = (i == 0) ? FB_DEPTH - 1 : $urandom % FB_DEPTH;
      @(negedge clk);
      if (we && waddr < 17'(FB_DEPTH)) shadow[waddr] = wdata;
      raddr = 17'(ra);
      we = $urandom % 2; waddr = (i % 50 == 0) ? 17'(FB_DEPTH + i % 1000) : 17'($urandom % FB_DEPTH);
      if (ra == int'(waddr)) we = 0;
      wdata = 16'($urandom);
      @(posedge clk);
      #1 check(rdata == shadow[ra], $sformatf("read %0d = %h expected %h", ra, rdata, shadow[ra]));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
