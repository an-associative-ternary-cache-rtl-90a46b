// atc_sampler - hit sampling that keeps the cache's port choices honest.
//
// A cache hit can return a wrong port: the longest matching route may not be
// cached (a shorter one matched instead), or the routing table may have
// changed since the entry was written. To catch both, every PERIOD-th cache
// hit (every third hit, a 33% rate, by default) is looked up again in the
// routing table and the two ports are compared; on a difference the
// controller removes the cache entry that hit and writes the routing table's
// entry into the cache. The hit itself is answered from the cache at once,
// so sampling adds no delay to lookups.
//
// Interface: hit_evt marks a cycle with a cache hit, with its address, row
// and port. can_start says that the routing-table port is free to take a
// sample. start is combinational: high in the cycle of the hit that is
// sampled, and the hit's address, row and port are then held in s_addr,
// s_idx and s_port. mismatch compares a routing-table port (rt_port) with
// the held port.
//
// Sampling every third hit follows the published cache proposal. When the
// due hit arrives while the routing-table port is busy, this design keeps
// the sample due and takes the next hit instead; that rule is its own.
module atc_sampler
  import atc_pkg::*;
#(
  parameter int unsigned ENTRIES = CACHE_ENTRIES,
  parameter int unsigned PERIOD  = SAMPLE_PERIOD,
  localparam int unsigned IDX_W  = $clog2(ENTRIES),
  localparam int unsigned CNT_W  = (PERIOD > 1) ? $clog2(PERIOD) : 1
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             hit_evt,
  input  addr_t            hit_addr,
  input  logic [IDX_W-1:0] hit_idx,
  input  port_t            hit_port,
  input  logic             can_start,
  output logic             start,
  output addr_t            s_addr,
  output logic [IDX_W-1:0] s_idx,
  output port_t            s_port,
  input  port_t            rt_port,
  output logic             mismatch
);

  logic [CNT_W-1:0] cnt;   // hits since the last sample
  logic             due;

  assign due      = (cnt == CNT_W'(PERIOD - 1));
  assign start    = hit_evt && due && can_start;
  assign mismatch = (rt_port != s_port);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      cnt    <= '0;
      s_addr <= '0;
      s_idx  <= '0;
      s_port <= '0;
    end else if (hit_evt) begin
      if (start) begin
        cnt    <= '0;
        s_addr <= hit_addr;
        s_idx  <= hit_idx;
        s_port <= hit_port;
      end else if (!due) begin
        cnt <= cnt + 1'b1;
      end
    end
  end

endmodule
