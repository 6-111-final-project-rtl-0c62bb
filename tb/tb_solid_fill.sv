// tb_solid_fill: for every switch setting the writer must write the colour
// those switches name (each switch fills one of R, G, B) at the address just
// behind the current read address, wrapping below 0 to the last address.
module tb_solid_fill;
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
    repeat (2000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  logic rst, we;
  logic [2:0] sw;
  logic [16:0] raddr, waddr;
  rgb565_t wdata;
  solid_fill dut (.clk, .rst, .sw, .raddr, .we, .waddr, .wdata);
  initial begin
    rst = 1; sw = 0; raddr = 0;
    repeat (3) @(negedge clk);
    rst = 0;
    for (int i = 0; i < 200; i++) begin
      rgb565_t e;
      sw = 3'(i); raddr = (i % 9 == 0) ? 17'd0 : 17'($urandom % FB_DEPTH);
      @(negedge clk);
      e = (sw[2] ? 16'hF800 : 16'h0) | (sw[1] ? 16'h07E0 : 16'h0) | (sw[0] ? 16'h001F : 16'h0);
      check(we, "write enable low");
      check(wdata == e, $sformatf("sw %b colour %h", sw, wdata));
      check(int'(waddr) == (raddr == 0 ? FB_DEPTH - 1 : int'(raddr) - 1), "write address");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
