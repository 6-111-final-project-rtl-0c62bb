// tb_eq_multiplier: random FFT bins and coefficients; one clock later the
// products must equal (top 8 bits, signed) x (coefficient, unsigned), zero
// when dv was low; ifft_enable must follow dv by one clock and mul_index must
// be the index bits [9:7].
module tb_eq_multiplier;
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
    repeat (10000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  logic rst, dv, ifft_enable;
  logic signed [18:0] xk_re, xk_im;
  logic [9:0] xk_index;
  logic [7:0] coeff;
  logic [2:0] mul_index;
  logic signed [17:0] mul_re, mul_im;

  eq_multiplier dut (.clk, .rst, .dv, .xk_re, .xk_im, .xk_index, .coeff, .mul_index, .mul_re, .mul_im, .ifft_enable);

  initial begin
    int er, ei;
    bit edv;
    rst = 1; dv = 0; xk_re = 0; xk_im = 0; xk_index = 0; coeff = 0;
    repeat (3) @(negedge clk);
    rst = 0;
    for (int i = 0; i < 500; i++) begin
      xk_re = 19'($urandom); xk_im = 19'($urandom); xk_index = 10'($urandom);
      coeff = (i < 4) ? 8'hFF : 8'($urandom);
      dv = ($urandom % 4) != 0;
      #1;
      check(mul_index == xk_index[9:7], "mul_index is not index[9:7]");
      edv = dv;
      er = edv ? $signed(xk_re[18:11]) * int'(coeff) : 0;
      ei = edv ? $signed(xk_im[18:11]) * int'(coeff) : 0;
      @(negedge clk);
      check(int'(mul_re) == er, $sformatf("mul_re %0d expected %0d", mul_re, er));
      check(int'(mul_im) == ei, $sformatf("mul_im %0d expected %0d", mul_im, ei));
      check(ifft_enable == edv, "ifft_enable does not follow dv");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
