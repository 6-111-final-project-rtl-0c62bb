// tb_ps2_ascii: a keyboard model types make codes, break sequences (F0 xx)
// and extended codes (E0 xx) over PS/2. Each make code of the table must
// give one ascii_ready pulse with its character and scan code; break and
// extended sequences must give none; unknown codes give '#'.
module tb_ps2_ascii;
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
    repeat (600000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  logic rst, ps2_clk, ps2_data, ascii_ready;
  logic [7:0] ascii, keycode;
  ps2_ascii dut (.clk, .rst, .ps2_clk, .ps2_data, .ascii, .keycode, .ascii_ready);

  int got [$];
  always @(posedge clk) if (!rst && ascii_ready) got.push_back({keycode, ascii});

  task automatic send(input logic [7:0] b);
    logic [10:0] f;
    f = {1'b1, ~(^b), b, 1'b0};
    for (int i = 0; i < 11; i++) begin
      ps2_data = f[i];
      repeat (15) @(negedge clk);
      ps2_clk = 0;
      repeat (30) @(negedge clk);
      ps2_clk = 1;
      repeat (15) @(negedge clk);
    end
    ps2_data = 1;
    repeat (60) @(negedge clk);
  endtask

  initial begin
    logic [7:0] codes [9] = '{8'h1D, 8'h1C, 8'h1B, 8'h23, 8'h5A, 8'h45, 8'h29, 8'h66, 8'h0E};
    logic [7:0] chars [9] = '{"W", "A", "S", "D", 8'h0D, "0", " ", 8'h08, "#"};
    int want [$];
    rst = 1; ps2_clk = 1; ps2_data = 1;
    repeat (5) @(negedge clk);
    rst = 0;
    foreach (codes[i]) begin
      send(codes[i]);
      want.push_back({codes[i], chars[i]});
      send(8'hF0); send(codes[i]);            // release: no character
    end
    send(8'hE0); send(8'h75);                 // extended key: no character
    send(8'h2C);                              // 'T' after it
    want.push_back({8'h2C, 8'("T")});
    check(got.size() == want.size(), $sformatf("%0d characters, expected %0d", got.size(), want.size()));
    for (int i = 0; i < want.size() && i < got.size(); i++)
      check(got[i] == want[i], $sformatf("character %0d is %h, expected %h", i, got[i], want[i]));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
