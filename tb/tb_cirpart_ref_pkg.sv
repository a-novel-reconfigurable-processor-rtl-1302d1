// tb_cirpart_ref_pkg: reference models for the CIRPART testbenches.
//
// Written independently of the RTL from the algorithm description:
//  * ref_xorshift: 32-bit xorshift step (x ^= x<<13; x ^= x>>17; x ^= x<<5)
//  * ref_scale:    floor(r16 * n / 65536), a random number in [0, n)
//  * ref_cost:     total cost of one partitioning = number of cut nets
//                  (nets whose pins lie in more than one partition) plus
//                  the imbalance (largest minus smallest partition size)
//  * make_netlist: a random pin list (module index, last-pin-of-net flag)
package tb_cirpart_ref_pkg;

  function automatic int unsigned ref_xorshift(input int unsigned s);
    int unsigned x = s;
    x ^= x << 13;
    x ^= x >> 17;
    x ^= x << 5;
    return x;
  endfunction

  function automatic int unsigned ref_scale(input int unsigned r16, input int unsigned n);
    longint unsigned p = longint'(r16) * longint'(n);
    return int'(p >> 16);
  endfunction

  // pins[i] = {last flag in bit 31, module index in low bits}
  function automatic int unsigned ref_cost(input int unsigned pins[$], input int genes[$],
                                           input int nparts);
    int cnt[64];
    int unsigned cut = 0;
    int unsigned mask = 0;
    int mx, mn;
    foreach (cnt[i]) cnt[i] = 0;
    foreach (genes[g]) cnt[genes[g]]++;
    foreach (pins[i]) begin
      mask |= 32'd1 << genes[pins[i] & 32'h7FFF_FFFF];
      if (pins[i][31]) begin
        if ($countones(mask) > 1) cut++;
        mask = 0;
      end
    end
    mx = 0;
    mn = 1 << 30;
    for (int p = 0; p < nparts; p++) begin
      if (cnt[p] > mx) mx = cnt[p];
      if (cnt[p] < mn) mn = cnt[p];
    end
    return cut + int'(mx - mn);
  endfunction

  // Random netlist: nnets nets of 2..maxdeg pins over nmod modules.
  function automatic void make_netlist(output int unsigned pins[$], input int nmod,
                                       input int nnets, input int maxdeg);
    pins = {};
    for (int n = 0; n < nnets; n++) begin
      int deg = 2 + int'($urandom_range(maxdeg - 2));
      for (int d = 0; d < deg; d++) begin
        int unsigned w = $urandom_range(nmod - 1);
        if (d == deg - 1) w |= 32'h8000_0000;
        pins.push_back(w);
      end
    end
  endfunction

endpackage
