// icn_pkg: address functions shared by the SIMD interconnection networks.
//
// PEs are numbered 0..N-1 with N = 2**n. The functions below give, for a PE
// address p, the address it is connected to by each interconnection function:
//   Cube_i(p)     = p with bit i complemented
//   Shuffle(p)    = p rotated left by one bit (p[n-2:0], p[n-1])
//   Exchange(p)   = p with bit 0 complemented
//   PM2+-i(p)     = p +- 2**i mod N
// They are used at elaboration time to build the wiring of every network,
// so they work on plain ints. The net_kind_e enum selects the single-stage
// network inside a recirculating network. All definitions follow the
// network definitions of the cited work; box numbering (insert_zero) is this
// design's own convention.
package icn_pkg;

  typedef enum logic [1:0] {
    NET_CUBE = 2'd0,   // recirculating Cube
    NET_PM2I = 2'd1,   // recirculating Plus-Minus 2**i
    NET_SE   = 2'd2    // recirculating Shuffle-Exchange
  } net_kind_e;

  function automatic int cube_fn(input int p, input int i);
    return p ^ (1 << i);
  endfunction

  function automatic int shuffle_fn(input int p, input int n);
    return ((p << 1) | (p >> (n - 1))) & ((1 << n) - 1);
  endfunction

  function automatic int unshuffle_fn(input int p, input int n);
    return ((p >> 1) | ((p & 1) << (n - 1))) & ((1 << n) - 1);
  endfunction

  function automatic int exchange_fn(input int p);
    return p ^ 1;
  endfunction

  function automatic int pm2_plus(input int p, input int i, input int n);
    return (p + (1 << i)) & ((1 << n) - 1);
  endfunction

  function automatic int pm2_minus(input int p, input int i, input int n);
    return (p - (1 << i)) & ((1 << n) - 1);
  endfunction

  // Address of the upper line of box k in a stage that pairs on bit i:
  // k with a zero inserted at bit position i.
  function automatic int insert_zero(input int k, input int i);
    int lo;
    lo = k & ((1 << i) - 1);
    return ((k >> i) << (i + 1)) | lo;
  endfunction

endpackage
