// refhit_detector: input register of the OMTF processor and reference-hit
// scanner.
//
// On every clock with bx_load high the hits of all input channels are
// registered (hits_q) and, in the same edge, each of the N_REFHITS
// reference-hit definitions is compared with its input channel: the bit is
// set when that channel holds an active hit whose angle lies inside the
// definition's range. The vector goes to the priority encoder; bit 0 has the
// highest priority. load_q pulses for one clock after each load.
// Latency: one clock from bx_load to refhit_vec / hits_q / load_q.
// Following the processor description: one bit per definition, definitions
// given as constants. Own choice: ranges are inclusive and the scan is
// registered together with the hits.
module refhit_detector
  import omtf_pkg::*;
  import omtf_cfg_pkg::*;
#(
  parameter int N_REF = N_REFHITS
) (
  input  logic                   clk,
  input  logic                   rst,
  input  logic                   bx_load,
  input  hit_t                   hits_in [MAX_LAYERS][MAX_INS_IN_LAYER],
  output hit_t                   hits_q  [MAX_LAYERS][MAX_INS_IN_LAYER],
  output logic [N_REF-1:0]       refhit_vec,
  output logic                   load_q
);

  logic [N_REF-1:0] match;

  always_comb begin
    for (int i = 0; i < N_REF; i++) begin
      refhit_def_t d;
      hit_t h;
      d = refhit_def(i);
      h = hits_in[d.layer][d.input_nr];
      match[i] = h.active && (h.phi >= d.phi_lo) && (h.phi <= d.phi_hi);
    end
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      refhit_vec <= '0;
      load_q     <= 1'b0;
      for (int l = 0; l < MAX_LAYERS; l++)
        for (int k = 0; k < MAX_INS_IN_LAYER; k++)
          hits_q[l][k] <= '0;
    end else begin
      load_q <= bx_load;
      if (bx_load) begin
        refhit_vec <= match;
        hits_q     <= hits_in;
      end
    end
  end

endmodule
