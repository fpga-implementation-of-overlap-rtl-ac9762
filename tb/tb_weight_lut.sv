// tb_weight_lut: reads every address of two weight tables (two different
// pattern/layer pairs) and compares each word, one clock after its address,
// with the weight formula of the configuration.
module tb_weight_lut;
  import omtf_pkg::*;
  import omtf_cfg_pkg::*;
  logic clk = 0;
  logic [LUT_AW-1:0] addr = '0;
  logic [WEIGHT_W-1:0] d0, d1;
  int checks = 0, failures = 0;

  weight_lut #(.PATTERN(0),  .LAYER(0))  u0 (.clk, .addr, .data(d0));
  weight_lut #(.PATTERN(37), .LAYER(11)) u1 (.clk, .addr, .data(d1));
  always #5 clk = ~clk;

  initial begin
    for (int a = 0; a < 2**LUT_AW; a++) begin
      @(negedge clk) addr = LUT_AW'(a);
      @(negedge clk);
      checks += 2;
      if (d0 !== gpu_weight(0, 0, LUT_AW'(a)))   failures++;
      if (d1 !== gpu_weight(37, 11, LUT_AW'(a))) failures++;
    end
    // weights peak at phi_dist = 0 and fall off
    checks++;
    if (!(gpu_weight(5, 3, {3'd1, 6'd0, 2'd0}) > gpu_weight(5, 3, {3'd1, 6'd20, 2'd0}))) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
