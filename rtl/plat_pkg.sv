// plat_pkg: platform-dependent types and the address-layout function of the
// RSoC Bridge. For the Zynq the address is 32 bits wide, as the framework
// specifies. compute_next_base places a region of a given size at the first
// address after the previous region that is aligned to that size (and to the
// 4 KiB granularity used by the AXI 1-to-N router); the granularity and the
// alignment rule are this design's choice.
package plat_pkg;
  localparam int unsigned ADDR_W = 32;
  typedef logic [ADDR_W-1:0] addr_t;

  // Smallest region the router decodes.
  localparam addr_t REGION_GRAIN = 32'h0000_1000;

  // Region sizes are powers of two of at least REGION_GRAIN.
  function automatic addr_t region_size(addr_t size);
    addr_t s = REGION_GRAIN;
    while (s < size) s = s << 1;
    return s;
  endfunction

  // Base of the next region: first address at or above prev_base + prev_size
  // aligned to the (rounded) size of the new region.
  function automatic addr_t compute_next_base(addr_t prev_base, addr_t prev_size, addr_t size);
    addr_t s   = region_size(size);
    addr_t nxt = prev_base + region_size(prev_size);
    return (nxt + s - 1) & ~(s - 1);
  endfunction
endpackage
