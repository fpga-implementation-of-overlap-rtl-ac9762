// refhit_prio_encoder: two-level pipelined priority encoder for the
// reference-hit vector.
//
// The N-bit vector is cut into groups of GROUP bits. Each group keeps its
// pending bits and a registered "head": the position of its highest
// priority pending bit (lowest index). The second level picks the first group
// whose head is valid, registers that position as the output and tells the
// group to advance; the group then replaces its head by its next pending bit.
// One set bit is thus delivered per clock, in priority order, with both
// levels short enough for a high clock rate. A load (at every bunch crossing)
// replaces all pending bits, dropping those not yet delivered.
// Timing: load at edge E -> first position valid after edge E+1, then one
// per clock. Following the processor description: a two-level pipelined
// encoder that outputs the next set bit each clock unless a new vector is
// loaded. Own choice: group size and the head/advance structure.
module refhit_prio_encoder #(
  parameter int N     = 80,
  parameter int GROUP = 10,
  parameter int IDX_W = $clog2(N)
) (
  input  logic             clk,
  input  logic             rst,
  input  logic             load,
  input  logic [N-1:0]     vec,
  output logic             out_valid,
  output logic [IDX_W-1:0] out_idx
);

  localparam int NG    = (N + GROUP - 1) / GROUP;
  localparam int GIDX_W = (GROUP > 1) ? $clog2(GROUP) : 1;

  typedef logic [GROUP-1:0] grp_t;

  grp_t              pend   [NG];   // pending bits, head not included
  logic              head_v [NG];
  logic [GIDX_W-1:0] head_i [NG];
  logic              take   [NG];

  // first set bit of a group
  function automatic logic [GIDX_W:0] first_set(input grp_t v);
    for (int b = 0; b < GROUP; b++)
      if (v[b]) return {1'b1, GIDX_W'(b)};
    return '0;
  endfunction

  function automatic grp_t slice(input logic [N-1:0] v, input int g);
    grp_t s;
    for (int b = 0; b < GROUP; b++)
      s[b] = (g * GROUP + b < N) ? v[g * GROUP + b] : 1'b0;
    return s;
  endfunction

  // level 2: first group with a valid head
  always_comb begin
    logic found;
    found = 1'b0;
    for (int g = 0; g < NG; g++) begin
      take[g] = head_v[g] && !found;
      if (head_v[g]) found = 1'b1;
    end
  end

  // level 1: per-group head registers
  for (genvar g = 0; g < NG; g++) begin : g_grp
    logic [GIDX_W:0] f_load, f_next;
    grp_t            v_load;
    assign v_load = slice(vec, g);
    assign f_load = first_set(v_load);
    assign f_next = first_set(pend[g]);

    always_ff @(posedge clk) begin
      if (rst) begin
        pend[g]   <= '0;
        head_v[g] <= 1'b0;
        head_i[g] <= '0;
      end else if (load) begin
        head_v[g] <= f_load[GIDX_W];
        head_i[g] <= f_load[GIDX_W-1:0];
        pend[g]   <= v_load & ~(grp_t'(f_load[GIDX_W]) << f_load[GIDX_W-1:0]);
      end else if (take[g] || !head_v[g]) begin
        head_v[g] <= f_next[GIDX_W];
        head_i[g] <= f_next[GIDX_W-1:0];
        pend[g]   <= pend[g] & ~(grp_t'(f_next[GIDX_W]) << f_next[GIDX_W-1:0]);
      end
    end
  end

  // output register
  always_ff @(posedge clk) begin
    if (rst) begin
      out_valid <= 1'b0;
      out_idx   <= '0;
    end else begin
      out_valid <= 1'b0;
      out_idx   <= '0;
      for (int g = 0; g < NG; g++)
        if (take[g]) begin
          out_valid <= 1'b1;
          out_idx   <= IDX_W'(g * GROUP + int'(head_i[g]));
        end
    end
  end

endmodule
