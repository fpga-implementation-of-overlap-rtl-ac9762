// rpc_model_pkg: untimed reference model of the RPC strip-to-angle
// converter for the testbenches: cluster search on a strip map, selection
// of the widest clusters and the linear angle map.
package rpc_model_pkg;
  localparam int MAXS = 1024;
  typedef bit strips_t [MAXS];

  typedef struct {
    bit valid;
    int base;
    int size;
  } cl_t;

  // width of the run starting at i (0 if i does not start a run or the run
  // is wider than max_w); runs stop at chamber boundaries
  function automatic int run_size(input strips_t s, input int ns_ch, input int i, input int max_w);
    int n;
    if (!s[i]) return 0;
    if (i % ns_ch != 0 && s[i-1]) return 0;
    n = 0;
    while ((i % ns_ch) + n < ns_ch && s[i+n]) n++;
    return (n > max_w) ? 0 : n;
  endfunction

  // the l widest clusters, ties to the lower strip
  function automatic void widest(input strips_t s, input int ns, input int ns_ch,
                                 input int max_w, input int l, output cl_t o [4]);
    bit used [MAXS];
    for (int j = 0; j < 4; j++) o[j] = '{0, 0, 0};
    for (int j = 0; j < l; j++) begin
      for (int i = 0; i < ns; i++) begin
        int z;
        z = run_size(s, ns_ch, i, max_w);
        if (!used[i] && z > o[j].size) o[j] = '{1, i, z};
      end
      if (o[j].valid) used[o[j].base] = 1;
    end
  endfunction

  function automatic int angle_of(input int base, input int size, input int ns_ch,
                                  input int abase, input int step, input int num, input int sh);
    int ch, st;
    ch = base / ns_ch;
    st = base % ns_ch;
    return abase + ch * step + (((2 * st + size - 1) * num) >>> sh);
  endfunction
endpackage
