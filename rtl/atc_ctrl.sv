// atc_ctrl - cache controller of the associative ternary routing cache.
//
// Lookups: a destination address accepted on lk_valid/lk_ready is searched
// in the same cycle (pattern array, priority, port column); on a hit the
// port is answered in the next cycle (res_valid, res_hit = 1), one lookup
// per cycle, and the row is marked used for LRU. On a miss the controller
// stops taking lookups, asks the routing table (rt_req_*), answers with the
// routing table's port (res_hit = 0) when it returns (rt_resp_*), and
// writes the route into the cache: the address masked to its prefix, in the
// set of that prefix length, at the row the LRU logic picks. A route of
// length 0 (only the default route matched) has no set and is not cached.
//
// Sampling: the sampler picks every third hit; the controller sends that
// address to the routing table while lookups go on. If the table's port
// differs from the port the cache gave, the row that hit is invalidated
// (one cycle) and the table's route is written in (one cycle). A lookup
// that misses while a sample is outstanding waits until the sample and its
// correction are done. The routing table serves one request at a time.
//
// Timing: hit latency 1 cycle; a miss takes 1 cycle + routing-table latency
// to answer and 1 more cycle to write the cache. rt_req_valid holds with a
// stable address until rt_req_ready; rt_resp_valid may come one or more
// cycles after the accepted request. Flushing is done by the pattern array
// itself and needs nothing from here.
//
// What happens on a hit, a miss and a sample, and the 33% sampling rate,
// follow the published cache proposal; the handshakes, the
// one-request-at-a-time routing-table port and the stalling of misses
// behind a sample are this design's.
module atc_ctrl
  import atc_pkg::*;
#(
  parameter int unsigned ENTRIES = CACHE_ENTRIES,
  localparam int unsigned IDX_W  = $clog2(ENTRIES)
) (
  input  logic             clk,
  input  logic             rst_n,
  // lookup request and answer
  input  logic             lk_valid,
  output logic             lk_ready,
  input  addr_t            lk_addr,
  output logic             res_valid,
  output logic             res_hit,
  output port_t            res_port,
  output addr_t            res_addr,
  // search result of the cache for lk_addr
  input  logic             c_hit,
  input  logic [IDX_W-1:0] c_idx,
  input  port_t            c_port,
  // LRU
  output logic             touch_en,
  output logic [IDX_W-1:0] touch_idx,
  output logic             fill_en,
  output logic [4:0]       set_sel,
  input  logic [IDX_W-1:0] victim_idx,
  // cache writes
  output logic             wr_en,
  output logic [IDX_W-1:0] wr_idx,
  output addr_t            wr_addr,
  output plen_t            wr_plen,
  output port_t            wr_port,
  output logic             inv_en,
  output logic [IDX_W-1:0] inv_idx,
  // sampler
  output logic             hit_evt,
  output logic             samp_can_start,
  input  logic             samp_start,
  input  addr_t            s_addr,
  input  logic [IDX_W-1:0] s_idx,
  input  logic             s_mismatch,
  // routing table
  output logic             rt_req_valid,
  input  logic             rt_req_ready,
  output addr_t            rt_req_addr,
  input  logic             rt_resp_valid,
  input  rt_resp_t         rt_resp
);

  typedef enum logic [2:0] {
    S_IDLE,    // lookups only
    S_SREQ,    // sample request to the routing table, lookups go on
    S_SWAIT,   // sample outstanding, lookups go on
    S_INVAL,   // sample disagreed: invalidate the row that hit
    S_INSERT,  // write a routing-table entry into the cache
    S_MREQ,    // miss request to the routing table
    S_MWAIT    // miss outstanding
  } state_t;

  state_t state;
  logic   miss_pend;   // a lookup missed while a sample was outstanding
  addr_t  miss_addr;
  addr_t  ins_addr;
  plen_t  ins_plen;
  port_t  ins_port;

  logic accept, look_hit, look_miss;

  assign lk_ready  = !miss_pend &&
                     (state == S_IDLE || state == S_SREQ || state == S_SWAIT);
  assign accept    = lk_valid && lk_ready;
  assign look_hit  = accept && c_hit;
  assign look_miss = accept && !c_hit;

  assign touch_en       = look_hit;
  assign touch_idx      = c_idx;
  assign hit_evt        = look_hit;
  assign samp_can_start = (state == S_IDLE);

  assign rt_req_valid = (state == S_SREQ) || (state == S_MREQ);
  assign rt_req_addr  = (state == S_SREQ) ? s_addr : miss_addr;

  assign set_sel = 5'(6'd32 - ins_plen);
  assign wr_en   = (state == S_INSERT);
  assign fill_en = wr_en;
  assign wr_idx  = victim_idx;
  assign wr_addr = ins_addr;
  assign wr_plen = ins_plen;
  assign wr_port = ins_port;
  assign inv_en  = (state == S_INVAL);
  assign inv_idx = s_idx;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state     <= S_IDLE;
      miss_pend <= 1'b0;
      miss_addr <= '0;
      ins_addr  <= '0;
      ins_plen  <= '0;
      ins_port  <= '0;
      res_valid <= 1'b0;
      res_hit   <= 1'b0;
      res_port  <= '0;
      res_addr  <= '0;
    end else begin
      res_valid <= 1'b0;
      if (look_hit) begin
        res_valid <= 1'b1;
        res_hit   <= 1'b1;
        res_port  <= c_port;
        res_addr  <= lk_addr;
      end
      if (look_miss) miss_addr <= lk_addr;
      unique case (state)
        S_IDLE: begin
          if (look_miss)       state <= S_MREQ;
          else if (samp_start) state <= S_SREQ;
        end
        S_SREQ: begin
          if (look_miss)    miss_pend <= 1'b1;
          if (rt_req_ready) state <= S_SWAIT;
        end
        S_SWAIT: begin
          if (look_miss) miss_pend <= 1'b1;
          if (rt_resp_valid) begin
            if (s_mismatch) begin
              ins_addr <= s_addr;
              ins_plen <= rt_resp.plen;
              ins_port <= rt_resp.port;
              state    <= S_INVAL;
            end else if (miss_pend || look_miss) begin
              miss_pend <= 1'b0;
              state     <= S_MREQ;
            end else begin
              state <= S_IDLE;
            end
          end
        end
        S_INVAL: begin
          if (ins_plen != '0) begin
            state <= S_INSERT;
          end else if (miss_pend) begin
            miss_pend <= 1'b0;
            state     <= S_MREQ;
          end else begin
            state <= S_IDLE;
          end
        end
        S_INSERT: begin
          if (miss_pend) begin
            miss_pend <= 1'b0;
            state     <= S_MREQ;
          end else begin
            state <= S_IDLE;
          end
        end
        S_MREQ: begin
          if (rt_req_ready) state <= S_MWAIT;
        end
        S_MWAIT: begin
          if (rt_resp_valid) begin
            res_valid <= 1'b1;
            res_hit   <= 1'b0;
            res_port  <= rt_resp.port;
            res_addr  <= miss_addr;
            ins_addr  <= miss_addr;
            ins_plen  <= rt_resp.plen;
            ins_port  <= rt_resp.port;
            state     <= (rt_resp.plen != '0) ? S_INSERT : S_IDLE;
          end
        end
        default: state <= S_IDLE;
      endcase
    end
  end

  // Routing-table handshake rules.
  a_req_hold: assert property (@(posedge clk) disable iff (!rst_n)
    rt_req_valid && !rt_req_ready |=> rt_req_valid && $stable(rt_req_addr));
  a_resp_expected: assert property (@(posedge clk) disable iff (!rst_n)
    rt_resp_valid |-> (state == S_SWAIT || state == S_MWAIT));
  a_plen_range: assert property (@(posedge clk) disable iff (!rst_n)
    rt_resp_valid |-> rt_resp.plen <= 6'd32);

endmodule
