// atc_top - associative ternary cache for IP routing lookups.
//
// A route cache placed in front of a router's full routing table. It holds
// ENTRIES routes as ternary words (prefix bits, then don't-cares) in 32 sets,
// one per prefix length, ordered from /32 at the top to /1 at the bottom and
// sized in proportion to how common each length is. A destination address is
// compared with every entry at once; the top-most match is the longest
// matching prefix and its port is the answer, one cache access after the
// request. Misses go to the routing table and the answer is cached with LRU
// replacement inside its set. Every third hit is checked against the routing
// table and corrected when the ports differ.
//
// Blocks: atc_tcam (pattern array), atc_priority (top-most match),
// atc_port_ram (port column), atc_lru (victim choice), atc_sampler (hit
// sampling) and atc_ctrl (sequencing and routing-table port).
//
// Interface:
//   lk_valid/lk_ready/lk_addr      lookup request (destination address)
//   res_valid/res_hit/res_port/res_addr  answer, in request order; res_hit
//                                  is 0 when the port came from the table
//   flush                          invalidate every cache entry (one cycle)
//   rt_req_valid/rt_req_ready/rt_req_addr   request to the routing table
//   rt_resp_valid/rt_resp_plen/rt_resp_port answer of the routing table:
//                                  longest matching prefix length (0 for the
//                                  default route) and its port
// Timing: a hit is answered one cycle after it is accepted, one lookup per
// cycle. A miss stops new lookups until it is answered and cached.
module atc_top
  import atc_pkg::*;
#(
  parameter int unsigned ENTRIES       = CACHE_ENTRIES,
  parameter int unsigned SAMPLE_EVERY  = SAMPLE_PERIOD,
  localparam int unsigned IDX_W        = $clog2(ENTRIES)
) (
  input  logic  clk,
  input  logic  rst_n,
  input  logic  lk_valid,
  output logic  lk_ready,
  input  addr_t lk_addr,
  output logic  res_valid,
  output logic  res_hit,
  output port_t res_port,
  output addr_t res_addr,
  input  logic  flush,
  output logic  rt_req_valid,
  input  logic  rt_req_ready,
  output addr_t rt_req_addr,
  input  logic  rt_resp_valid,
  input  plen_t rt_resp_plen,
  input  port_t rt_resp_port
);

  logic [ENTRIES-1:0] match, valid;
  logic               c_hit;
  logic [IDX_W-1:0]   c_idx;
  port_t              c_port;

  logic               touch_en, fill_en, wr_en, inv_en;
  logic [IDX_W-1:0]   touch_idx, victim_idx, wr_idx, inv_idx;
  logic [4:0]         set_sel;
  addr_t              wr_addr;
  plen_t              wr_plen;
  port_t              wr_port;

  logic               hit_evt, samp_can_start, samp_start, s_mismatch;
  addr_t              s_addr;
  logic [IDX_W-1:0]   s_idx;
  port_t              s_port;

  rt_resp_t           rt_resp;
  assign rt_resp = '{plen: rt_resp_plen, port: rt_resp_port};

  atc_tcam #(.ENTRIES(ENTRIES)) u_tcam (
    .clk, .rst_n,
    .key(lk_addr), .match,
    .wr_en, .wr_idx, .wr_addr, .wr_plen,
    .inv_en, .inv_idx, .flush,
    .valid_o(valid)
  );

  atc_priority #(.ENTRIES(ENTRIES)) u_prio (
    .req(match), .hit(c_hit), .idx(c_idx)
  );

  atc_port_ram #(.ENTRIES(ENTRIES)) u_ports (
    .clk, .wr_en, .wr_idx, .wr_port,
    .rd_idx(c_idx), .rd_port(c_port)
  );

  atc_lru #(.ENTRIES(ENTRIES)) u_lru (
    .clk, .rst_n, .valid,
    .touch_en, .touch_idx, .fill_en, .fill_idx(wr_idx),
    .set_sel, .victim_idx, .evict()
  );

  atc_sampler #(.ENTRIES(ENTRIES), .PERIOD(SAMPLE_EVERY)) u_samp (
    .clk, .rst_n,
    .hit_evt, .hit_addr(lk_addr), .hit_idx(c_idx), .hit_port(c_port),
    .can_start(samp_can_start), .start(samp_start),
    .s_addr, .s_idx, .s_port,
    .rt_port(rt_resp_port), .mismatch(s_mismatch)
  );

  atc_ctrl #(.ENTRIES(ENTRIES)) u_ctrl (
    .clk, .rst_n,
    .lk_valid, .lk_ready, .lk_addr,
    .res_valid, .res_hit, .res_port, .res_addr,
    .c_hit, .c_idx, .c_port,
    .touch_en, .touch_idx, .fill_en, .set_sel, .victim_idx,
    .wr_en, .wr_idx, .wr_addr, .wr_plen, .wr_port, .inv_en, .inv_idx,
    .hit_evt, .samp_can_start, .samp_start, .s_addr, .s_idx,
    .s_mismatch,
    .rt_req_valid, .rt_req_ready, .rt_req_addr,
    .rt_resp_valid, .rt_resp
  );

endmodule
