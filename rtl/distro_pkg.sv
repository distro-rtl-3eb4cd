// distro_pkg: shared constants and the static pointer initialisation of the
// Distro scheduler for a bufferless three-stage Clos switch.
//
// The switch has k input modules (IM), m central modules (CM) and k output
// modules (OM), each IM/OM with n ports, so N = n*k ports in all. Every
// arbiter in the scheduler starts from a pointer value fixed at reset and
// then advances on a fixed schedule, independent of what it granted
// ("static round-robin"). The functions below give those reset values. For
// every input port (i,g) they follow the published rule
//     j = (g+i) % k;  h = i;  r = (j-i) mod m;
//     Pointer_j[i][g] = j; Pointer_h[i][g] = h; Pointer_g[i][r] = g;
//     Pointer_i[r][j] = i; Pointer_r[j][h] = r;
// Pointers the rule does not reach (possible when m > n or k != n) get
// values chosen here so that the pattern stays conflict free; those
// fill-in values are this design's own choice.
package distro_pkg;

  // Default configuration: n = m = k = 8, i.e. a 64-port switch.
  localparam int unsigned N_DEF      = 8;   // ports per IM / OM (n)
  localparam int unsigned K_DEF      = 8;   // number of IMs and OMs (k)
  localparam int unsigned M_DEF      = 8;   // number of CMs (m)
  localparam int unsigned DATA_W_DEF = 64;  // cell payload bits (own choice)
  localparam int unsigned DEPTH_DEF  = 32;  // cells per VOQ (own choice)

  // Non-negative remainder of a / b.
  function automatic int unsigned pmod(int a, int unsigned b);
    int rem;
    rem = a % int'(b);
    if (rem < 0) rem += int'(b);
    return int'(rem);
  endfunction

  // Link r the rule assigns to input port g of IM i.
  function automatic int unsigned rule_r(int unsigned i, int unsigned g,
                                         int unsigned k, int unsigned m);
    return pmod(int'((g + i) % k) - int'(i), m);
  endfunction

  // Reset value of Pointer_j(i,g): the VOQ group (output module) that
  // Arbiter_j of input port (i,g) favours first.
  function automatic int unsigned init_ptr_j(int unsigned i, int unsigned g,
                                             int unsigned k);
    return (g + i) % k;
  endfunction

  // Reset value of Pointer_h(i,g,j), equal for every group j of port (i,g).
  function automatic int unsigned init_ptr_h(int unsigned i, int unsigned n);
    return i % n;
  endfunction

  // Reset value of Pointer_g(i,r) of link LI(i,r), counted modulo m. A
  // value below n names the input port the link serves; a value of n or
  // more means the link serves no port in that slot. Links the rule does
  // not reach take the spare values n, n+1, ... in order of r, so that the
  // m pointers form a permutation of 0..m-1 and stay one as they advance.
  function automatic int unsigned init_ptr_g(int unsigned i, int unsigned r,
                                             int unsigned n, int unsigned k,
                                             int unsigned m);
    int unsigned val;
    int unsigned spare;
    bit          hit;
    val   = 0;
    spare = 0;
    for (int unsigned rr = 0; rr <= r; rr++) begin
      hit = 1'b0;
      for (int unsigned g = 0; g < n; g++)
        if (rule_r(i, g, k, m) == rr) begin
          hit = 1'b1;
          if (rr == r) val = g;
        end
      if (!hit) begin
        if (rr == r) val = n + spare;
        spare++;
      end
    end
    return val % m;
  endfunction

  // Reset value of Pointer_i(r,j) of link LC(r,j), counted modulo k.
  function automatic int unsigned init_ptr_i(int unsigned r, int unsigned j,
                                             int unsigned n, int unsigned k,
                                             int unsigned m);
    int unsigned val;
    val = pmod(int'(j) - int'(r), k);
    for (int unsigned i = 0; i < k; i++)
      for (int unsigned g = 0; g < n; g++)
        if ((g + i) % k == j && rule_r(i, g, k, m) == r) val = i;
    return val;
  endfunction

  // Reset value of Pointer_r(j,h) of output port OP(j,h), counted modulo m.
  function automatic int unsigned init_ptr_r(int unsigned j, int unsigned h,
                                             int unsigned n, int unsigned k,
                                             int unsigned m);
    int unsigned val;
    val = pmod(int'(j) - int'(h), m);
    for (int unsigned i = 0; i < k; i++)
      for (int unsigned g = 0; g < n; g++)
        if ((g + i) % k == j && i == h) val = rule_r(i, g, k, m);
    return val;
  endfunction

endpackage
