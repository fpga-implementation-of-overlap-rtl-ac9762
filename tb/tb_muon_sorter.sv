// tb_muon_sorter: two sorter trees - the default 50 patterns with 4-input
// elementary sorters (3 levels) and 7 patterns with 2-input sorters
// (3 levels, uneven last nodes). Every clock a new random set of
// (fired layers, sum of weights) is applied, with deliberate ties in the
// fired count and in both values; the winner must appear LEVELS clocks
// later: most fired layers, then largest sum, then lowest pattern number.
module tb_muon_sorter;
  import omtf_pkg::*;
  localparam int NA = 50, NB = 7;
  localparam int LA = 3,  LB = 3;
  logic clk = 0, rst = 1;
  logic [SUM_W-1:0]   sa [NA], sb [NB];
  logic [FIRED_W-1:0] fa [NA], fb [NB];
  logic va, vb;
  gp_cand_t ba, bb;
  int checks = 0, failures = 0, n_tie = 0;

  muon_sorter #(.N(NA), .FAN(4)) ua (.clk, .rst, .sums(sa), .fireds(fa), .best_valid(va), .best(ba));
  muon_sorter #(.N(NB), .FAN(2)) ub (.clk, .rst, .sums(sb), .fireds(fb), .best_valid(vb), .best(bb));
  always #5 clk = ~clk;

  int expa [$], expb [$];

  function automatic int pick(input int n, input int s [], input int f []);
    int b;
    b = 0;
    for (int i = 1; i < n; i++)
      if (f[i] > f[b] || (f[i] == f[b] && s[i] > s[b])) b = i;
    return b;
  endfunction

  initial begin
    for (int i = 0; i < NA; i++) begin sa[i] = '0; fa[i] = '0; end
    for (int i = 0; i < NB; i++) begin sb[i] = '0; fb[i] = '0; end
    repeat (3) @(negedge clk);
    rst = 0;
    for (int t = 0; t < 2000; t++) begin
      int s [], f [];
      int mode;
      mode = t % 4;
      s = new[NA]; f = new[NA];
      for (int i = 0; i < NA; i++) begin
        f[i] = (mode == 0) ? 7 : $urandom_range(0, 19);
        s[i] = (mode == 1) ? 100 : $urandom_range(0, 2**SUM_W - 1);
        if (mode == 2) begin f[i] = 5; s[i] = 300 + $urandom_range(0, 2); end
        sa[i] = SUM_W'(s[i]); fa[i] = FIRED_W'(f[i]);
      end
      expa.push_back(pick(NA, s, f));
      if (mode == 2) n_tie++;
      s = new[NB]; f = new[NB];
      for (int i = 0; i < NB; i++) begin
        f[i] = $urandom_range(0, 3);
        s[i] = (mode == 1) ? 9 : $urandom_range(0, 50);
        sb[i] = SUM_W'(s[i]); fb[i] = FIRED_W'(f[i]);
      end
      expb.push_back(pick(NB, s, f));
      @(negedge clk);
      if (t >= LA - 1) begin
        int e;
        e = expa[t - LA + 1];
        checks++;
        if (!va || int'(ba.pattern) != e) begin
          failures++;
          if (failures < 10) $display("A t=%0d got %0d exp %0d", t, ba.pattern, e);
        end
      end
      if (t >= LB - 1) begin
        checks++;
        if (!vb || int'(bb.pattern) != expb[t - LB + 1]) begin
          failures++;
          if (failures < 10) $display("B t=%0d got %0d exp %0d", t, bb.pattern, expb[t-LB]);
        end
      end
    end
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
