// rpc_angle_convert: converts the centre of each selected cluster into an
// azimuthal angle.
//
// A cluster is given by its base strip in the converter's flat strip
// numbering (chamber * NS_CH + strip) and its width. Stage 1 splits off the
// chamber and forms the centre in half strips, 2*strip + width - 1. Stage 2
// gives angle = ANGLE_BASE + chamber * CHAM_STEP
//             + ((centre * SCALE_NUM) >>> SCALE_SHIFT),
// i.e. a per-chamber offset plus a linear strip pitch. The latency is a
// constant two clocks, so the frame's time travels alongside unchanged.
// Following the converter description: pipelined conversion of the cluster
// centre, taking the chamber number into account. Own choice: the linear
// map and its constants (the real geometry is calibration data).
module rpc_angle_convert #(
  parameter int NS          = 384,
  parameter int NS_CH       = 96,
  parameter int L           = 2,
  parameter int SW          = 2,
  parameter int TW          = 3,
  parameter int AW          = 10,
  parameter int CW          = 2,
  parameter int ANGLE_BASE  = -192,
  parameter int CHAM_STEP   = 96,
  parameter int SCALE_NUM   = 1,
  parameter int SCALE_SHIFT = 1,
  parameter int BW          = $clog2(NS)
) (
  input  logic                 clk,
  input  logic                 rst,
  input  logic                 in_valid,
  input  logic                 cl_valid [L],
  input  logic [BW-1:0]        cl_base  [L],
  input  logic [SW-1:0]        cl_size  [L],
  input  logic [TW-1:0]        in_time,
  output logic                 out_valid,
  output logic                 ang_valid [L],
  output logic signed [AW-1:0] angle     [L],
  output logic [SW-1:0]        ang_size  [L],
  output logic [CW-1:0]        ang_cham  [L],
  output logic [TW-1:0]        out_time
);

  localparam int HW = $clog2(2 * NS_CH + 1) + 1;

  logic          s1_valid, s1_cv [L];
  logic [CW-1:0] s1_cham [L];
  logic [HW-1:0] s1_ctr  [L];
  logic [SW-1:0] s1_size [L];
  logic [TW-1:0] s1_time;

  always_ff @(posedge clk) begin
    if (rst) s1_valid <= 1'b0;
    else     s1_valid <= in_valid;
    s1_time <= in_time;
    for (int j = 0; j < L; j++) begin
      int b;
      b = int'(cl_base[j]);
      s1_cv[j]   <= cl_valid[j];
      s1_cham[j] <= CW'(b / NS_CH);
      s1_ctr[j]  <= HW'(2 * (b % NS_CH) + int'(cl_size[j]) - 1);
      s1_size[j] <= cl_size[j];
    end
  end

  always_ff @(posedge clk) begin
    if (rst) out_valid <= 1'b0;
    else     out_valid <= s1_valid;
    out_time <= s1_time;
    for (int j = 0; j < L; j++) begin
      ang_valid[j] <= s1_cv[j];
      angle[j]     <= AW'(ANGLE_BASE + int'(s1_cham[j]) * CHAM_STEP
                          + ((int'(s1_ctr[j]) * SCALE_NUM) >>> SCALE_SHIFT));
      ang_size[j]  <= s1_size[j];
      ang_cham[j]  <= s1_cham[j];
    end
  end

endmodule
