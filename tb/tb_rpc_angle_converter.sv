// tb_rpc_angle_converter: frames of random partition words (random
// chambers, partitions inside and outside the converter's range, random
// delays and strip patterns, empty frames) go into two converters - the
// default one (partitions 0..11) and one restricted to partitions 4..7. For
// each frame the two widest clusters, their angles, widths and chambers and
// the frame time are checked against the model, as is the latency of five
// clocks from the frame_end edge. A directed frame reproduces the worked
// example of the converter: three partitions of chamber 0 sent with delays
// 0, 1, 2 holding a 4-strip cluster (discarded), a 2-strip and a 1-strip
// cluster; the 2- and 1-strip clusters are kept and the time is 3.
module tb_rpc_angle_converter;
  import rpc_pkg::*;
  import rpc_model_pkg::*;
  logic clk = 0, rst = 1;
  logic wv = 0, fe = 0;
  lb_word_t w;
  logic ova, ovb;
  logic ava [L], avb [L];
  logic signed [A-1:0] aa [L], ab [L];
  logic [N-1:0] sa [L], sb [L];
  logic [C-1:0] ca [L], cb [L];
  logic [T-1:0] ta, tb;
  int checks = 0, failures = 0, n_frames = 0, n_two = 0;

  rpc_angle_converter ua (.clk, .rst, .word_valid(wv), .word(w), .frame_end(fe),
    .out_valid(ova), .ang_valid(ava), .angle(aa), .ang_size(sa), .ang_cham(ca), .out_time(ta));
  rpc_angle_converter #(.PART_FIRST(4), .NPART(4), .ANGLE_BASE(-100), .CHAM_STEP(40)) ub (
    .clk, .rst, .word_valid(wv), .word(w), .frame_end(fe),
    .out_valid(ovb), .ang_valid(avb), .angle(ab), .ang_size(sb), .ang_cham(cb), .out_time(tb));
  always #5 clk = ~clk;

  strips_t mapa, mapb;
  int tmaxa, tmaxb;
  bit seena, seenb;

  task automatic clear_model();
    for (int i = 0; i < MAXS; i++) begin mapa[i] = 0; mapb[i] = 0; end
    tmaxa = 0; tmaxb = 0; seena = 0; seenb = 0;
  endtask

  task automatic send(input int ch, input int pt, input int tm, input logic [D-1:0] d);
    @(negedge clk);
    wv = 1; w = '{cham: C'(ch), part: P'(pt), ptime: T'(tm), data: d};
    if (pt < 12) begin
      for (int b = 0; b < D; b++) if (d[b]) mapa[ch * 96 + pt * D + b] = 1;
      if (!seena || tm > tmaxa) tmaxa = tm;
      seena = 1;
    end
    if (pt >= 4 && pt < 8) begin
      for (int b = 0; b < D; b++) if (d[b]) mapb[ch * 32 + (pt - 4) * D + b] = 1;
      if (!seenb || tm > tmaxb) tmaxb = tm;
      seenb = 1;
    end
  endtask

  task automatic check_one(input string tag, input strips_t m, input int ns, input int nsch,
                           input bit seen, input int tmax, input int abase, input int step,
                           input logic av [L], input logic signed [A-1:0] an [L],
                           input logic [N-1:0] sz [L], input logic [C-1:0] cm [L],
                           input logic [T-1:0] tt);
    cl_t o [4];
    int et;
    widest(m, ns, nsch, M, L, o);
    et = !seen ? 0 : (tmax >= 7 ? 7 : tmax + 1);
    checks++;
    if (int'(tt) != et) begin failures++; $display("%s time got %0d exp %0d", tag, tt, et); end
    for (int j = 0; j < L; j++) begin
      checks++;
      if (av[j] != o[j].valid) begin failures++; $display("%s slot %0d valid", tag, j); end
      else if (o[j].valid) begin
        int e;
        e = angle_of(o[j].base, o[j].size, nsch, abase, step, 1, 1);
        if (int'(an[j]) != e || int'(sz[j]) != o[j].size || int'(cm[j]) != o[j].base / nsch) begin
          failures++;
          if (failures < 10) $display("%s slot %0d got %0d/%0d exp %0d/%0d", tag, j, an[j], sz[j], e, o[j].size);
        end
      end
    end
    if (o[1].valid) n_two++;
  endtask

  task automatic end_frame();
    int lat;
    @(negedge clk);
    wv = 0; fe = 1;
    @(negedge clk);
    fe = 0;
    lat = 1;
    while (!ova && lat < 20) begin @(negedge clk); lat++; end
    checks++;
    if (lat != 5) begin failures++; $display("latency %0d", lat); end
    check_one("A", mapa, 384, 96, seena, tmaxa, -192, 96, ava, aa, sa, ca, ta);
    check_one("B", mapb, 128, 32, seenb, tmaxb, -100, 40, avb, ab, sb, cb, tb);
    n_frames++;
    clear_model();
  endtask

  initial begin
    w = '0;
    clear_model();
    repeat (3) @(negedge clk);
    rst = 0;
    // worked example: strips of chamber 0, partitions 2, 1, 0, delays 0, 1, 2
    send(0, 2, 0, 8'b0000_0110);   // 2-strip cluster
    send(0, 1, 1, 8'b1111_0000);   // 4-strip cluster: too wide
    send(0, 0, 2, 8'b0000_1000);   // 1-strip cluster
    end_frame();
    checks += 3;
    if (ta != 3'd3) failures++;
    if (!(ava[0] && sa[0] == 2 && ava[1] && sa[1] == 1)) failures++;
    if (int'(aa[0]) != -192 + ((2 * 17 + 1) >>> 1)) failures++;
    for (int f = 0; f < 300; f++) begin
      int nw;
      nw = $urandom_range(0, 8);
      for (int k = 0; k < nw; k++) begin
        logic [D-1:0] d;
        for (int b = 0; b < D; b++) d[b] = ($urandom_range(0, 3) == 0);
        send($urandom_range(0, 3), $urandom_range(0, 15), $urandom_range(0, 7), d);
      end
      end_frame();
    end
    checks++;
    if (n_two < 50) failures++;
    $display("frames %0d, frames with two clusters %0d", n_frames, n_two);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
