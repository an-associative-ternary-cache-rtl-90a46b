// rt_model - behavioural model of the router's full routing table, for
// simulation only (not synthesizable).
//
// It builds a table of NROUTES distinct routes at time 0 with prefix lengths
// spread like atc_pkg::set_weight (scaled by NROUTES/8192, at most 2**len
// routes of length len) and random prefixes and ports (1..255). No route
// covers 223.0.0.0/8, so addresses there match only the default route
// (length 0, port 0). A request is taken when the model is idle; LAT cycles
// later it answers with the longest matching prefix length and its port,
// found by a linear search. set_port() changes a route's port, as a routing
// update would.
module rt_model
  import atc_pkg::*;
#(
  parameter int unsigned NROUTES = 512,
  parameter int unsigned LAT     = 4,
  parameter int unsigned SEED    = 1
) (
  input  logic  clk,
  input  logic  rst_n,
  input  logic  req_valid,
  output logic  req_ready,
  input  addr_t req_addr,
  output logic  resp_valid,
  output plen_t resp_plen,
  output port_t resp_port
);

  localparam port_t DEFAULT_PORT = '0;

  addr_t       prefix [NROUTES];
  int unsigned plen   [NROUTES];
  port_t       port   [NROUTES];
  int unsigned n_routes;

  function automatic bit covers_223(addr_t p, int unsigned l);
    int unsigned k;
    k = (l < 8) ? l : 8;
    return (k == 0) || ((p >> (32 - k)) == (32'hDF00_0000 >> (32 - k)));
  endfunction

  // Build the table.
  initial begin
    bit seen [bit [37:0]];
    int unsigned want, tries;
    addr_t p;
    void'($urandom(SEED));
    n_routes = 0;
    for (int unsigned s = 0; s < NUM_SETS && n_routes < NROUTES; s++) begin
      int unsigned l;
      l    = 32 - s;
      want = (set_weight(s) * NROUTES) / 8192;
      if (want == 0) want = 1;
      if (l < 12 && want > (1 << (l - 1))) want = 1 << (l - 1);
      tries = 0;
      for (int unsigned k = 0; k < want && n_routes < NROUTES && tries < 100 * want; ) begin
        tries++;
        p = $urandom() & prefix_mask(plen_t'(l));
        if (covers_223(p, l) || seen.exists({p, 6'(l)})) continue;
        seen[{p, 6'(l)}] = 1'b1;
        prefix[n_routes] = p;
        plen[n_routes]   = l;
        port[n_routes]   = port_t'(1 + ($urandom() % 255));
        n_routes++;
        k++;
      end
    end
  end

  // Longest prefix match over the whole table.
  function automatic void lpm(input addr_t a, output int unsigned best_len,
                              output port_t best_port, output int best_idx);
    best_len  = 0;
    best_port = DEFAULT_PORT;
    best_idx  = -1;
    for (int unsigned i = 0; i < n_routes; i++) begin
      if (plen[i] > best_len && ((a & prefix_mask(plen_t'(plen[i]))) == prefix[i])) begin
        best_len  = plen[i];
        best_port = port[i];
        best_idx  = int'(i);
      end
    end
  endfunction

  function automatic void set_port(int unsigned i, port_t p);
    port[i] = p;
  endfunction

  // Address inside route i with a random host part.
  function automatic addr_t addr_in(int unsigned i);
    return prefix[i] | ($urandom() & ~prefix_mask(plen_t'(plen[i])));
  endfunction

  int unsigned busy_cnt;
  addr_t       held;

  assign req_ready = (busy_cnt == 0);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      busy_cnt   <= 0;
      resp_valid <= 1'b0;
      resp_plen  <= '0;
      resp_port  <= '0;
      held       <= '0;
    end else begin
      resp_valid <= 1'b0;
      if (busy_cnt == 0) begin
        if (req_valid) begin
          held     <= req_addr;
          busy_cnt <= LAT;
        end
      end else if (busy_cnt == 1) begin
        int unsigned bl;
        port_t       bp;
        int          bi;
        lpm(held, bl, bp, bi);
        resp_valid <= 1'b1;
        resp_plen  <= plen_t'(bl);
        resp_port  <= bp;
        busy_cnt   <= 0;
      end else begin
        busy_cnt <= busy_cnt - 1;
      end
    end
  end

endmodule
