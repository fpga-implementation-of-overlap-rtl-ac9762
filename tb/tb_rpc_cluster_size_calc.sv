// tb_rpc_cluster_size_calc: random strip maps (sparse, dense and with long
// runs) for two chambers of 16 strips and for the default 4 x 96; checks the
// width at every strip position one clock later, including runs crossing the
// chamber boundary and runs wider than 3 strips (width 0).
module tb_rpc_cluster_size_calc;
  import rpc_model_pkg::*;
  localparam int NSA = 32, NSB = 384;
  logic clk = 0, rst = 1, iv = 0;
  logic [NSA-1:0] ma;
  logic [NSB-1:0] mb;
  logic [2:0] tin = '0, ta, tb;
  logic [1:0] za [NSA];
  logic [1:0] zb [NSB];
  logic va, vb;
  int checks = 0, failures = 0, n_wide = 0, n_ok = 0;

  rpc_cluster_size_calc #(.N_CH(2), .NS_CH(16)) ua (.clk, .rst, .in_valid(iv), .strips(ma), .in_time(tin),
    .out_valid(va), .size(za), .out_time(ta));
  rpc_cluster_size_calc ub (.clk, .rst, .in_valid(iv), .strips(mb), .in_time(tin),
    .out_valid(vb), .size(zb), .out_time(tb));
  always #5 clk = ~clk;

  initial begin
    ma = '0; mb = '0;
    repeat (3) @(negedge clk);
    rst = 0;
    for (int t = 0; t < 500; t++) begin
      strips_t sa, sb;
      int dens;
      dens = $urandom_range(5, 80);
      for (int i = 0; i < NSA; i++) begin ma[i] = ($urandom_range(0, 99) < dens); sa[i] = ma[i]; end
      for (int i = 0; i < NSB; i++) begin mb[i] = ($urandom_range(0, 99) < dens); sb[i] = mb[i]; end
      iv = 1; tin = 3'($urandom_range(0, 7));
      @(negedge clk);
      checks += 2;
      if (!va || !vb || ta != tin || tb != tin) failures++;
      for (int i = 0; i < NSA; i++) begin
        checks++;
        if (int'(za[i]) != run_size(sa, 16, i, 3)) begin
          failures++;
          if (failures < 10) $display("A strip %0d got %0d exp %0d", i, za[i], run_size(sa, 16, i, 3));
        end
        if (sa[i] && (i % 16 == 0 || !sa[i-1]) && run_size(sa, 16, i, 3) == 0) n_wide++;
        if (run_size(sa, 16, i, 3) != 0) n_ok++;
      end
      for (int i = 0; i < NSB; i++) begin
        checks++;
        if (int'(zb[i]) != run_size(sb, 96, i, 3)) failures++;
      end
      iv = 0;
      @(negedge clk);
      checks++;
      if (va) failures++;
    end
    checks++;
    if (n_wide == 0 || n_ok == 0) failures++;
    $display("clusters kept %0d, too wide %0d", n_ok, n_wide);
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
