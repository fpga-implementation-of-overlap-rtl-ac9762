// tb_rpc_cluster_sorter: random width vectors (0..3 per position, with many
// equal widths) over 384 positions; the two selected clusters must be the
// widest, ties going to the lower strip, and slots with nothing left
// invalid. Checked one clock after the input.
module tb_rpc_cluster_sorter;
  localparam int NS = 384, L = 2;
  logic clk = 0, rst = 1, iv = 0;
  logic [1:0] size [NS];
  logic [2:0] tin = '0, tout;
  logic ov;
  logic cv [L];
  logic [8:0] cb [L];
  logic [1:0] cs [L];
  int checks = 0, failures = 0, n_empty = 0;

  rpc_cluster_sorter #(.NS(NS), .L(L)) dut (.clk, .rst, .in_valid(iv), .size, .in_time(tin),
    .out_valid(ov), .cl_valid(cv), .cl_base(cb), .cl_size(cs), .out_time(tout));
  always #5 clk = ~clk;

  initial begin
    for (int i = 0; i < NS; i++) size[i] = '0;
    repeat (3) @(negedge clk);
    rst = 0;
    for (int t = 0; t < 1000; t++) begin
      int z [NS];
      int n;
      n = $urandom_range(0, 6);
      for (int i = 0; i < NS; i++) z[i] = 0;
      for (int j = 0; j < n; j++) z[$urandom_range(0, NS - 1)] = $urandom_range(1, 3);
      for (int i = 0; i < NS; i++) size[i] = 2'(z[i]);
      iv = 1; tin = 3'(t);
      @(negedge clk);
      checks++;
      if (!ov || tout != 3'(t)) failures++;
      begin
        bit used [NS];
        for (int i = 0; i < NS; i++) used[i] = 0;
        for (int j = 0; j < L; j++) begin
          int bb, bs;
          bb = -1; bs = 0;
          for (int i = 0; i < NS; i++) if (!used[i] && z[i] > bs) begin bb = i; bs = z[i]; end
          checks++;
          if (bb < 0) begin
            n_empty++;
            if (cv[j]) failures++;
          end else begin
            used[bb] = 1;
            if (!cv[j] || int'(cb[j]) != bb || int'(cs[j]) != bs) begin
              failures++;
              if (failures < 10) $display("t=%0d slot %0d got %0d/%0d/%0d exp %0d/%0d", t, j, cv[j], cb[j], cs[j], bb, bs);
            end
          end
        end
      end
    end
    checks++;
    if (n_empty == 0) failures++;
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
