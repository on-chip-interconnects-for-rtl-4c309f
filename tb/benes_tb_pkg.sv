// benes_tb_pkg: off-line path computation for the Benes network, used by the
// testbenches to produce street-sign routes (looping algorithm).
//
// The network of 2^d lines has 2d-1 stages; stage s switches line bit
// b(s) = d-1-s for s < d and s-d+1 afterwards. Stage d-n and stage d+n-2
// enclose two half-size networks (bit n-1 of the line = 0 or 1). The looping
// algorithm picks, for each packet, the half it crosses, so that the two
// packets sharing a first-stage router take different halves and so do the
// two packets leaving through one last-stage router; then it recurses into
// each half. The route of a packet is a (2d-1)-bit word whose bit 2d-2-s is
// the output port taken at stage s.
//
// The block size and port count follow the published decoder setup; the
// traffic generation and scheduling code is this testbench's own.
package benes_tb_pkg;

  // perm[x]: destination line of the packet on input line x (a permutation of
  // 0..2^n-1, local to the current sub-network); ids[x]: its packet index in
  // routes[].
  task automatic route_rec(input int n, input int d, input int perm [],
                           input int ids [], ref int routes []);
    int size, t;
    int c [], inv [];
    int sub_perm [2][], sub_ids [2][];
    size = 1 << n;
    if (n == 1) begin
      for (int x = 0; x < 2; x++)
        routes[ids[x]] |= (perm[x] & 1) << (d - 1);
      return;
    end
    t = 1 << (n - 1);
    c = new[size];
    inv = new[size];
    for (int x = 0; x < size; x++) begin c[x] = -1; inv[perm[x]] = x; end
    for (int x0 = 0; x0 < size; x0++) begin
      int x, y, z;
      if (c[x0] != -1) continue;
      x = x0;
      c[x] = 0;
      forever begin
        y = inv[perm[x] ^ t];          // shares the last-stage router
        if (c[y] != -1) break;
        c[y] = 1 - c[x];
        z = y ^ t;                     // shares the first-stage router
        if (c[z] != -1) break;
        c[z] = 1 - c[y];
        x = z;
      end
    end
    for (int h = 0; h < 2; h++) begin
      sub_perm[h] = new[size / 2];
      sub_ids[h]  = new[size / 2];
    end
    for (int x = 0; x < size; x++) begin
      routes[ids[x]] |= c[x] << (2 * d - 2 - (d - n));
      routes[ids[x]] |= ((perm[x] >> (n - 1)) & 1) << (2 * d - 2 - (d + n - 2));
      sub_perm[c[x]][x & (t - 1)] = perm[x] & (t - 1);
      sub_ids[c[x]][x & (t - 1)]  = ids[x];
    end
    for (int h = 0; h < 2; h++) route_rec(n - 1, d, sub_perm[h], sub_ids[h], routes);
  endtask

  // Routes for a full permutation of 2^d lines: routes[x] for input line x.
  task automatic benes_routes(input int d, input int perm [], ref int routes []);
    int ids [];
    ids = new[1 << d];
    routes = new[1 << d];
    for (int x = 0; x < (1 << d); x++) begin ids[x] = x; routes[x] = 0; end
    route_rec(d, d, perm, ids, routes);
  endtask

endpackage
