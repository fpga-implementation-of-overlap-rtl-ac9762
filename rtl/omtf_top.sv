// omtf_top: one OMTF processor with its RPC strip-to-angle converters.
//
// N_RPC_CONV converters, one per RPC link and pseudorapidity range, turn
// compressed strip data into cluster angles. Converter c feeds detector
// layer RPC_LAYER0 + c: a cluster found in chamber h, kept in slot j
// (j < L), drives input channel 2*h + j of that layer. The angles of the
// most recent frame of each converter are held in a register until the next
// frame replaces them. All other input channels (DT and CSC layers, and
// channels 2*N_CH .. 13 of the RPC layers) come from hits_in, already
// converted to angles. The merged inputs go to the OMTF processor, which
// produces one muon candidate per processed reference hit.
// Timing: a converter frame ending at edge E is visible to the processor
// from edge E+6; a processor crossing starts at each bx_load.
// N_PATS can be lowered to shorten simulation. Own choices: the layer and channel assignment of the RPC converters, the
// holding register and the number of converters (real cabling comes from
// the detector layout).
module omtf_top
  import omtf_pkg::*;
  import rpc_pkg::*;
#(
  parameter int N_PATS     = N_PATTERNS,
  parameter int N_RPC_CONV = 6,
  parameter int RPC_LAYER0 = 13,
  parameter int N_CH       = 2**C
) (
  input  logic                clk,
  input  logic                rst,
  input  logic                bx_load,
  input  hit_t                hits_in      [MAX_LAYERS][MAX_INS_IN_LAYER],
  input  logic                lb_valid     [N_RPC_CONV],
  input  lb_word_t            lb_word      [N_RPC_CONV],
  input  logic                lb_frame_end [N_RPC_CONV],
  output logic [T-1:0]        rpc_time     [N_RPC_CONV],
  output logic                cand_valid,
  output logic [REFHIT_W-1:0] cand_refhit,
  output logic [REFL_W-1:0]   cand_ref_layer,
  output logic [PAT_W-1:0]    cand_pattern,
  output logic [FIRED_W-1:0]  cand_fired,
  output logic [SUM_W-1:0]    cand_sum
);

  localparam int RPC_INS = N_CH * L;

  hit_t rpc_hits [N_RPC_CONV][RPC_INS];
  hit_t merged   [MAX_LAYERS][MAX_INS_IN_LAYER];

  for (genvar c = 0; c < N_RPC_CONV; c++) begin : g_rpc
    logic                cv;
    logic                av [L];
    logic signed [A-1:0] ang [L];
    logic [N-1:0]        asz [L];
    logic [C-1:0]        ach [L];

    rpc_angle_converter #(.N_CH(N_CH)) u_conv (
      .clk        (clk),
      .rst        (rst),
      .word_valid (lb_valid[c]),
      .word       (lb_word[c]),
      .frame_end  (lb_frame_end[c]),
      .out_valid  (cv),
      .ang_valid  (av),
      .angle      (ang),
      .ang_size   (asz),
      .ang_cham   (ach),
      .out_time   (rpc_time[c])
    );

    always_ff @(posedge clk) begin
      if (rst) begin
        for (int k = 0; k < RPC_INS; k++) rpc_hits[c][k] <= '0;
      end else if (cv) begin
        for (int k = 0; k < RPC_INS; k++) rpc_hits[c][k] <= '0;
        for (int j = 0; j < L; j++)
          if (av[j])
            rpc_hits[c][2 * int'(ach[j]) + j] <= '{active: 1'b1, phi: phi_t'(ang[j])};
      end
    end
  end

  always_comb begin
    merged = hits_in;
    for (int c = 0; c < N_RPC_CONV; c++)
      for (int k = 0; k < RPC_INS; k++)
        merged[RPC_LAYER0 + c][k] = rpc_hits[c][k];
  end

  omtfp #(.N_PATS(N_PATS)) u_omtfp (
    .clk            (clk),
    .rst            (rst),
    .bx_load        (bx_load),
    .hits_in        (merged),
    .cand_valid     (cand_valid),
    .cand_refhit    (cand_refhit),
    .cand_ref_layer (cand_ref_layer),
    .cand_pattern   (cand_pattern),
    .cand_fired     (cand_fired),
    .cand_sum       (cand_sum)
  );

endmodule
