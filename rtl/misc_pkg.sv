// misc_pkg: general-purpose helpers shared by the framework's components.
// apply_be merges a write into a register under a byte-enable mask, as the
// register files of the controllers do for AXI4-Lite writes with WSTRB.
// log2, max and min are elaboration-time helpers for sizes. The vector
// AND/OR helpers of the original package are the reduction operators & and
// | in SystemVerilog, and its to_string is $sformatf, so neither is defined.
package misc_pkg;
  function automatic logic [31:0] apply_be(logic [31:0] old_v, logic [31:0] new_v, logic [3:0] be);
    logic [31:0] r;
    for (int i = 0; i < 4; i++)
      r[i*8 +: 8] = be[i] ? new_v[i*8 +: 8] : old_v[i*8 +: 8];
    return r;
  endfunction

  // Number of set bits of a byte-keep mask (bytes carried by a beat).
  function automatic logic [2:0] count_keep(logic [3:0] keep);
    return 3'(keep[0]) + 3'(keep[1]) + 3'(keep[2]) + 3'(keep[3]);
  endfunction

  // Smallest n with 2**n >= v (0 for v <= 1).
  function automatic int unsigned log2(int unsigned v);
    int unsigned n = 0;
    while ((64'(1) << n) < 64'(v)) n++;
    return n;
  endfunction

  function automatic int max(int a, int b); return (a > b) ? a : b; endfunction
  function automatic int min(int a, int b); return (a < b) ? a : b; endfunction
endpackage
