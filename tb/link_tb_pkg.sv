// link_tb_pkg: interleaver traffic for the Butterfly and Benes link
// testbenches (N = 5114, 8 SISOs, 16 lanes and 16 memories).
//
// Lane l = 2s + h carries the positions of SISO s, half h: x = s*640 + h*320
// + t for t = 0,1,.. while x < N (lane 15 has only 314). Memory m receives the
// same number of values as lane m sends. The interleaver is drawn so that in
// every step t the active lanes send to distinct memories: perm[t] is a random
// permutation of the active lanes onto the active memories (inactive lanes are
// mapped to the matching inactive memories so perm[t] is a full permutation,
// as the Benes path computation needs), and each memory's addresses are
// consumed in a random order. dst[l][t] is the interleaved position of x
// (what the SISO hands to its transmit interface),
// val[l][t] a random extrinsic value.
//
// The block size and port count follow the published decoder setup; the
// traffic generation and scheduling code is this testbench's own.
package link_tb_pkg;
  localparam int LT_N = 5114, LT_NP = 16, LT_SUB = 640, LT_HALF = 320, LT_T = 320;

  int            lt_cnt  [LT_NP];
  int            lt_pos  [LT_NP][LT_T];
  int            lt_dst  [LT_NP][LT_T];
  int            lt_perm [LT_T][LT_NP];
  logic [7:0]    lt_val  [LT_NP][LT_T];

  function automatic int lane_base(int l);
    return (l / 2) * LT_SUB + (l % 2) * LT_HALF;
  endfunction

  function automatic void make_link_traffic();
    int addr [LT_NP][LT_T];
    for (int l = 0; l < LT_NP; l++) begin
      lt_cnt[l] = LT_N - lane_base(l);
      if (lt_cnt[l] > LT_HALF) lt_cnt[l] = LT_HALF;
      for (int t = 0; t < LT_T; t++) begin
        lt_pos[l][t] = lane_base(l) + t;
        lt_val[l][t] = 8'($urandom);
        addr[l][t]   = t;
      end
      for (int t = lt_cnt[l] - 1; t > 0; t--) begin
        int j, x;
        j = $urandom_range(t, 0);
        x = addr[l][t]; addr[l][t] = addr[l][j]; addr[l][j] = x;
      end
    end
    for (int t = 0; t < LT_T; t++) begin
      int act [$];
      int shuf [$];
      for (int l = 0; l < LT_NP; l++) begin
        lt_perm[t][l] = l;
        if (t < lt_cnt[l]) act.push_back(l);
      end
      shuf = act;
      shuf.shuffle();
      foreach (act[k]) lt_perm[t][act[k]] = shuf[k];
      for (int l = 0; l < LT_NP; l++)
        lt_dst[l][t] = (t < lt_cnt[l]) ? lane_base(lt_perm[t][l]) + addr[lt_perm[t][l]][t] : -1;
    end
  endfunction
endpackage
