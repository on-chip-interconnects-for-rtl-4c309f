// noc_pkg: types and elaboration-time functions shared by the turbo-decoder
// interconnects.
//
// The direct network (dn_*) places P nodes on a graph in which every node has
// D outgoing and D incoming links. The graph families follow the definitions
// of the generalized de Bruijn graph, j = (i*D + k) mod P for k = 0..D-1, and
// of the generalized Kautz graph, j = (-i*D - k) mod P for k = 1..D; the ring
// (D = 2) and the toroidal mesh (D = 4, P a square) are the usual ones. The
// honeycomb graph is not provided because its link rule is not defined here.
//
// Link k of node i (k = 0..D-1) leaves from node output port k. At the far end
// it enters the input port whose index is the rank of (i, k) among all links
// ending at that node, ordered by source node and then by k. Port D (= M-1)
// of every node connects to its processing element.
//
// ssp_port() gives the single-shortest-path routing table: the lowest-numbered
// output link that lies on a shortest path to the destination. All functions
// are evaluated at elaboration time only.
//
// Follows the published decoder: the de Bruijn and Kautz link rules and the
// single-shortest-path idea. Own choices: the ring and torus wiring details, the
// input-port numbering and the lowest-link tie break among shortest paths.
//
// Lint note: node numbers are passed as int; only the low bits are used.
package noc_pkg;

  typedef enum logic [1:0] {
    TOPO_RING     = 2'd0,
    TOPO_TORUS    = 2'd1,
    TOPO_DEBRUIJN = 2'd2,
    TOPO_KAUTZ    = 2'd3
  } topo_e;

  // Serving policy of the input FIFOs: round robin or longest FIFO first.
  typedef enum logic {
    POL_RR = 1'b0,
    POL_FL = 1'b1
  } policy_e;

  // Node architecture: fully adaptive (packet carries the location t) or
  // partially precalculated (location t' is read at the destination).
  typedef enum logic {
    ARCH_FA = 1'b0,
    ARCH_PP = 1'b1
  } node_arch_e;

  function automatic int isqrt(input int v);
    int s;
    s = 0;
    while ((s + 1) * (s + 1) <= v) s++;
    return s;
  endfunction

  // Destination node of link k (0..D-1) leaving node i.
  function automatic int nbr(input topo_e topo, input int p, input int d,
                             input int i, input int k);
    int s, x, y, v;
    case (topo)
      TOPO_RING:     v = (k == 0) ? (i + 1) % p : (i + p - 1) % p;
      TOPO_TORUS: begin
        s = isqrt(p);
        x = i % s;
        y = i / s;
        case (k)
          0:       v = y * s + (x + 1) % s;
          1:       v = y * s + (x + s - 1) % s;
          2:       v = ((y + 1) % s) * s + x;
          default: v = ((y + s - 1) % s) * s + x;
        endcase
      end
      TOPO_DEBRUIJN: v = (i * d + k) % p;
      default:       v = ((p * d * (d + 1)) - i * d - (k + 1)) % p;  // Kautz
    endcase
    return v;
  endfunction

  // Input port index, at the far end, of link k leaving node i.
  function automatic int in_port(input topo_e topo, input int p, input int d,
                                 input int i, input int k);
    int dst, cnt;
    dst = nbr(topo, p, d, i, k);
    cnt = 0;
    for (int a = 0; a < p; a++)
      for (int b = 0; b < d; b++)
        if ((a < i || (a == i && b < k)) && nbr(topo, p, d, a, b) == dst)
          cnt++;
    return cnt;
  endfunction

  // Source node feeding input port q of node j (inverse of in_port).
  function automatic int in_src_node(input topo_e topo, input int p, input int d,
                                     input int j, input int q);
    for (int a = 0; a < p; a++)
      for (int b = 0; b < d; b++)
        if (nbr(topo, p, d, a, b) == j && in_port(topo, p, d, a, b) == q)
          return a;
    return 0;
  endfunction

  // Output link of that source node feeding input port q of node j.
  function automatic int in_src_link(input topo_e topo, input int p, input int d,
                                     input int j, input int q);
    for (int a = 0; a < p; a++)
      for (int b = 0; b < d; b++)
        if (nbr(topo, p, d, a, b) == j && in_port(topo, p, d, a, b) == q)
          return b;
    return 0;
  endfunction

  // Hop distance from node src to node dst (breadth-first, by relaxation).
  function automatic int hop_dist(input topo_e topo, input int p, input int d,
                                  input int src, input int dst);
    int hops [256];
    bit changed;
    for (int a = 0; a < p; a++) hops[a] = (a == dst) ? 0 : p + 1;
    changed = 1'b1;
    while (changed) begin
      changed = 1'b0;
      for (int a = 0; a < p; a++)
        for (int b = 0; b < d; b++)
          if (hops[nbr(topo, p, d, a, b)] + 1 < hops[a]) begin
            hops[a] = hops[nbr(topo, p, d, a, b)] + 1;
            changed = 1'b1;
          end
    end
    return hops[src];
  endfunction

  // SSP routing: output link used by node i for a packet addressed to dst.
  // Returns d (the PE port) when dst == i.
  function automatic int ssp_port(input topo_e topo, input int p, input int d,
                                  input int i, input int dst);
    int here;
    if (i == dst) return d;
    here = hop_dist(topo, p, d, i, dst);
    for (int k = 0; k < d; k++)
      if (hop_dist(topo, p, d, nbr(topo, p, d, i, k), dst) == here - 1)
        return k;
    return 0;
  endfunction

endpackage
