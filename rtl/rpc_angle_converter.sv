// rpc_angle_converter: turns the compressed RPC strip data of one link into
// the angles of the widest strip clusters, for one pseudorapidity range.
//
// The recovered link stream delivers one partition word per clock
// (word_valid): chamber number, partition number, delay and the D strip bits
// of the partition. The converter keeps only the partitions
// PART_FIRST .. PART_FIRST+NPART-1 (its pseudorapidity range) and ORs them
// into a strip map of N_CH chambers x NPART*D strips. frame_end closes a
// bunch-crossing frame (a word in the same clock still belongs to it): the
// map is handed to the pipeline and cleared. The frame's time is one more
// than the largest partition delay seen in it (0 for an empty frame),
// saturated to T bits. Pipeline:
//   cluster size calc (1 clk) -> clusters sorter (1 clk) -> angle convert
//   (2 clk); out_valid follows frame_end by 5 clocks.
// Outputs: for each of the L kept clusters a valid flag, angle, width and
// chamber, and the frame's time.
// Following the converter description: the three blocks, their order and
// the parameters C, P, T, D, L, M, N, A with their default values. Own
// choices: the frame strobe, the accumulation into a map, the time rule and
// the angle constants.
module rpc_angle_converter
  import rpc_pkg::*;
#(
  parameter int N_CH        = 2**C,
  parameter int PART_FIRST  = 0,
  parameter int NPART       = 12,
  parameter int ANGLE_BASE  = -192,
  parameter int CHAM_STEP   = 96,
  parameter int SCALE_NUM   = 1,
  parameter int SCALE_SHIFT = 1
) (
  input  logic                clk,
  input  logic                rst,
  input  logic                word_valid,
  input  lb_word_t            word,
  input  logic                frame_end,
  output logic                out_valid,
  output logic                ang_valid [L],
  output logic signed [A-1:0] angle     [L],
  output logic [N-1:0]        ang_size  [L],
  output logic [C-1:0]        ang_cham  [L],
  output logic [T-1:0]        out_time
);

  localparam int NS_CH = NPART * D;
  localparam int NS    = N_CH * NS_CH;
  localparam int BW    = $clog2(NS);

  // ---- frame accumulation ----
  logic [NS-1:0] acc, acc_next;
  logic          seen, seen_next;
  logic [T-1:0]  tmax, tmax_next;

  always_comb begin
    acc_next  = acc;
    seen_next = seen;
    tmax_next = tmax;
    if (word_valid && int'(word.part) >= PART_FIRST && int'(word.part) < PART_FIRST + NPART
        && int'(word.cham) < N_CH) begin
      for (int b = 0; b < D; b++)
        if (word.data[b])
          acc_next[int'(word.cham) * NS_CH + (int'(word.part) - PART_FIRST) * D + b] = 1'b1;
      if (!seen || word.ptime > tmax) tmax_next = word.ptime;
      seen_next = 1'b1;
    end
  end

  logic          f_valid;
  logic [NS-1:0] f_map;
  logic [T-1:0]  f_time;

  always_ff @(posedge clk) begin
    if (rst) begin
      acc     <= '0;
      seen    <= 1'b0;
      tmax    <= '0;
      f_valid <= 1'b0;
      f_map   <= '0;
      f_time  <= '0;
    end else begin
      f_valid <= frame_end;
      if (frame_end) begin
        f_map  <= acc_next;
        f_time <= !seen_next ? '0 : (tmax_next == '1) ? tmax_next : tmax_next + 1'b1;
        acc    <= '0;
        seen   <= 1'b0;
        tmax   <= '0;
      end else begin
        acc  <= acc_next;
        seen <= seen_next;
        tmax <= tmax_next;
      end
    end
  end

  // ---- PARTITION CLUSTERS SIZE CALC ----
  logic          c_valid;
  logic [N-1:0]  c_size [NS];
  logic [T-1:0]  c_time;

  rpc_cluster_size_calc #(.N_CH(N_CH), .NS_CH(NS_CH), .MAX_W(M), .SW(N), .TW(T)) u_calc (
    .clk       (clk),
    .rst       (rst),
    .in_valid  (f_valid),
    .strips    (f_map),
    .in_time   (f_time),
    .out_valid (c_valid),
    .size      (c_size),
    .out_time  (c_time)
  );

  // ---- CLUSTERS SORTER ----
  logic          s_valid;
  logic          s_cv   [L];
  logic [BW-1:0] s_base [L];
  logic [N-1:0]  s_size [L];
  logic [T-1:0]  s_time;

  rpc_cluster_sorter #(.NS(NS), .L(L), .SW(N), .TW(T), .BW(BW)) u_sort (
    .clk       (clk),
    .rst       (rst),
    .in_valid  (c_valid),
    .size      (c_size),
    .in_time   (c_time),
    .out_valid (s_valid),
    .cl_valid  (s_cv),
    .cl_base   (s_base),
    .cl_size   (s_size),
    .out_time  (s_time)
  );

  // ---- ANGLE CONVERT ----
  rpc_angle_convert #(.NS(NS), .NS_CH(NS_CH), .L(L), .SW(N), .TW(T), .AW(A), .CW(C),
                      .ANGLE_BASE(ANGLE_BASE), .CHAM_STEP(CHAM_STEP),
                      .SCALE_NUM(SCALE_NUM), .SCALE_SHIFT(SCALE_SHIFT), .BW(BW)) u_conv (
    .clk       (clk),
    .rst       (rst),
    .in_valid  (s_valid),
    .cl_valid  (s_cv),
    .cl_base   (s_base),
    .cl_size   (s_size),
    .in_time   (s_time),
    .out_valid (out_valid),
    .ang_valid (ang_valid),
    .angle     (angle),
    .ang_size  (ang_size),
    .ang_cham  (ang_cham),
    .out_time  (out_time)
  );

endmodule
