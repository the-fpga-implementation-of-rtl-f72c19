// rcdba_ref_pkg: behavioural reference of the RC-DBA weight and allocation
// rules, used by the testbenches to predict the scheduler's results.
//
// It is written as plain sorting over integer arrays (no scans, no FSM), so it
// checks the RTL against the rule rather than against the RTL's own structure:
//   weights : every requester gets +n; the k requesters, ranked by request
//             (ties: higher ONU number ranks higher), get +k, +k-1, ... +1.
//             Weights saturate at wmax.
//   grants  : High may use all `total` slots, Middle half of what High left
//             (rounded down), Low the rest; inside a priority the ONUs are
//             served by decreasing weight (ties: higher ONU number first),
//             each getting min(request, budget left).
package rcdba_ref_pkg;

  localparam int MAXN = 16;
  typedef int mat_t [MAXN][3];

  // Index of the entry with the largest key among those with valid set;
  // ties go to the highest index. Returns -1 when none is valid.
  function automatic int pick_max(int n, int key[MAXN], bit valid[MAXN]);
    int best = -1;
    for (int j = 0; j < n; j++)
      if (valid[j] && (best < 0 || key[j] >= key[best])) best = j;
    return best;
  endfunction

  function automatic void ref_weight(int n, mat_t len, ref mat_t w, input int wmax);
    for (int p = 0; p < 3; p++) begin
      int  key[MAXN];
      bit  valid[MAXN];
      int  k = 0;
      for (int j = 0; j < n; j++) begin
        key[j]   = len[j][p];
        valid[j] = (len[j][p] != 0);
        if (valid[j]) begin
          k++;
          w[j][p] = (w[j][p] + n > wmax) ? wmax : w[j][p] + n;
        end
      end
      for (int r = k; r >= 1; r--) begin
        int b = pick_max(n, key, valid);
        valid[b] = 0;
        w[b][p] = (w[b][p] + r > wmax) ? wmax : w[b][p] + r;
      end
    end
  endfunction

  function automatic void ref_alloc(int n, mat_t len, mat_t w, int total, ref mat_t g);
    int t = total;
    int held = 0;
    for (int j = 0; j < MAXN; j++) for (int p = 0; p < 3; p++) g[j][p] = 0;
    for (int p = 0; p < 3; p++) begin
      int key[MAXN];
      bit valid[MAXN];
      if (p == 1) begin held = t - t / 2; t = t / 2; end
      if (p == 2) t = t + held;
      for (int j = 0; j < n; j++) begin key[j] = w[j][p]; valid[j] = 1; end
      for (int r = 0; r < n && t > 0; r++) begin
        int b = pick_max(n, key, valid);
        valid[b] = 0;
        g[b][p] = (len[b][p] < t) ? len[b][p] : t;
        t -= g[b][p];
      end
    end
  endfunction

endpackage
