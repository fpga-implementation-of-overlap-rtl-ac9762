// tb_rpc_angle_convert: random clusters (base strip over all 4 chambers,
// width 1..3) in both slots; the angle must equal
// base + chamber*step + centre*pitch two clocks later, for the default map
// and for a second map with a different pitch and offset.
module tb_rpc_angle_convert;
  import rpc_model_pkg::*;
  localparam int NS = 384, L = 2;
  logic clk = 0, rst = 1, iv = 0;
  logic cvi [L];
  logic [8:0] cb [L];
  logic [1:0] cs [L];
  logic [2:0] tin = '0, ta, tb;
  logic va, vb;
  logic avA [L], avB [L];
  logic signed [9:0] angA [L], angB [L];
  logic [1:0] szA [L], szB [L];
  logic [1:0] chA [L], chB [L];
  int checks = 0, failures = 0;

  rpc_angle_convert ua (.clk, .rst, .in_valid(iv), .cl_valid(cvi), .cl_base(cb), .cl_size(cs), .in_time(tin),
    .out_valid(va), .ang_valid(avA), .angle(angA), .ang_size(szA), .ang_cham(chA), .out_time(ta));
  rpc_angle_convert #(.ANGLE_BASE(-400), .CHAM_STEP(150), .SCALE_NUM(3), .SCALE_SHIFT(2)) ub (
    .clk, .rst, .in_valid(iv), .cl_valid(cvi), .cl_base(cb), .cl_size(cs), .in_time(tin),
    .out_valid(vb), .ang_valid(avB), .angle(angB), .ang_size(szB), .ang_cham(chB), .out_time(tb));
  always #5 clk = ~clk;

  initial begin
    int hb [$], hs [$], hv [$];
    for (int j = 0; j < L; j++) begin cvi[j] = 0; cb[j] = '0; cs[j] = '0; end
    repeat (3) @(negedge clk);
    rst = 0;
    for (int t = 0; t < 1000; t++) begin
      for (int j = 0; j < L; j++) begin
        cvi[j] = $urandom_range(0, 3) != 0;
        cb[j] = 9'($urandom_range(0, NS - 1));
        cs[j] = 2'($urandom_range(1, 3));
        hv.push_back(cvi[j]); hb.push_back(int'(cb[j])); hs.push_back(int'(cs[j]));
      end
      iv = 1; tin = 3'(t);
      @(negedge clk);
      if (t >= 1) begin
        checks += 2;
        if (!va || ta != 3'(t - 1) || !vb) failures++;
        for (int j = 0; j < L; j++) begin
          int e;
          int b, s;
          b = hb[(t-1)*L + j]; s = hs[(t-1)*L + j];
          checks += 2;
          if (avA[j] != hv[(t-1)*L + j]) failures++;
          e = angle_of(b, s, 96, -192, 96, 1, 1);
          if (int'(angA[j]) != e || int'(chA[j]) != b / 96 || int'(szA[j]) != s) begin
            failures++;
            if (failures < 10) $display("A got %0d exp %0d", angA[j], e);
          end
          e = angle_of(b, s, 96, -400, 150, 3, 2);
          if (int'(angB[j]) != e) begin
            failures++;
            if (failures < 10) $display("B got %0d exp %0d", angB[j], e);
          end
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
