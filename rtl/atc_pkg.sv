// atc_pkg - shared types, constants and set-geometry functions of the
// associative ternary routing cache.
//
// The cache holds CACHE_ENTRIES ternary entries split into 32 sets. Set s
// holds only prefixes of length 32-s: set 0 is the 32-bit prefixes at the top
// of the array (highest priority), set 31 the 1-bit prefixes at the bottom.
// Sets are contiguous index ranges; set s starts at set_base(N, s) and holds
// set_size(N, s) entries.
//
// Following the cache organisation, sets differ in size and are sized in
// proportion to how many routes of each prefix length a routing table holds,
// with most of the room in sets 8 to 16 (prefixes /24 to /16). The actual
// per-length weights below are this design's own choice, modelled on a
// backbone table of the early 2000s (about half of all routes are /24): they
// add up to 8192. For another cache size every set other than set 8 (/24) is
// scaled by N/8192 with a floor of one entry, and set 8 takes what remains,
// so any N of 128 or more gives 32 non-empty sets that fill the array.
//
// The port width (8 bits) and the LRU time-stamp width (32 bits) are also
// this design's choice.
package atc_pkg;

  localparam int unsigned ADDR_W        = 32;    // IPv4 destination address
  localparam int unsigned NUM_SETS      = 32;    // one set per prefix length 32..1
  localparam int unsigned CACHE_ENTRIES = 8192;  // 8K-entry cache
  localparam int unsigned PORT_W        = 8;     // output port designation
  localparam int unsigned PLEN_W        = 6;     // prefix length 0..32
  localparam int unsigned STAMP_W       = 32;    // LRU time stamp
  localparam int unsigned SAMPLE_PERIOD = 3;     // sample every third hit (33%)

  typedef logic [ADDR_W-1:0] addr_t;
  typedef logic [PORT_W-1:0] port_t;
  typedef logic [PLEN_W-1:0] plen_t;

  // Answer of the routing table for one address: its longest matching
  // prefix length (0 = only the default route matched) and the port.
  typedef struct packed {
    plen_t plen;
    port_t port;
  } rt_resp_t;

  // Entry weight of set s in the 8192-entry reference distribution.
  function automatic int unsigned set_weight(int unsigned s);
    case (32 - s)
      32: return 16;   31: return 4;    30: return 16;   29: return 16;
      28: return 16;   27: return 32;   26: return 32;   25: return 64;
      24: return 4304; 23: return 512;  22: return 512;  21: return 384;
      20: return 384;  19: return 512;  18: return 256;  17: return 128;
      16: return 768;  15: return 64;   14: return 32;   13: return 32;
      12: return 16;   11: return 16;   10: return 8;    9:  return 8;
      8:  return 32;   7:  return 4;    6:  return 4;    5:  return 4;
      4:  return 4;    3:  return 4;    2:  return 4;    1:  return 4;
      default: return 0;
    endcase
  endfunction

  // Size of set s in a cache of n entries.
  function automatic int unsigned set_size(int unsigned n, int unsigned s);
    int unsigned sz, rest;
    if (s != 8) begin
      sz = (set_weight(s) * n) / 8192;
      return (sz == 0) ? 1 : sz;
    end
    rest = n;
    for (int unsigned t = 0; t < NUM_SETS; t++) begin
      if (t != 8) begin
        sz = (set_weight(t) * n) / 8192;
        rest -= (sz == 0) ? 1 : sz;
      end
    end
    return rest;
  endfunction

  // First entry index of set s (s = 32 gives n, the end of the array).
  function automatic int unsigned set_base(int unsigned n, int unsigned s);
    int unsigned b;
    b = 0;
    for (int unsigned t = 0; t < NUM_SETS; t++)
      if (t < s) b += set_size(n, t);
    return b;
  endfunction

  // Care mask of a prefix of length plen: plen ones followed by zeros.
  function automatic addr_t prefix_mask(plen_t plen);
    addr_t m;
    for (int i = 0; i < ADDR_W; i++) m[ADDR_W-1-i] = (i < int'(plen));
    return m;
  endfunction

endpackage
