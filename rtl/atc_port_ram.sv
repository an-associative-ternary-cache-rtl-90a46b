// atc_port_ram - output interface (port) assignment column of the cache.
//
// One port designation per cache entry, side by side with the associative
// pattern array: the row selected by the priority logic reads its port out.
// The read is combinational from rd_idx, so pattern search, priority
// selection and port read together form the single cache access; the
// caller registers the result. Writes happen at the clock edge through one
// write port. The contents are not reset; a row is only read after the
// controller has written it and set its pattern row valid.
module atc_port_ram
  import atc_pkg::*;
#(
  parameter int unsigned ENTRIES = CACHE_ENTRIES,
  localparam int unsigned IDX_W  = $clog2(ENTRIES)
) (
  input  logic             clk,
  input  logic             wr_en,
  input  logic [IDX_W-1:0] wr_idx,
  input  port_t            wr_port,
  input  logic [IDX_W-1:0] rd_idx,
  output port_t            rd_port
);

  port_t mem [ENTRIES];

  always_ff @(posedge clk) begin
    if (wr_en) mem[wr_idx] <= wr_port;
  end

  assign rd_port = mem[rd_idx];

endmodule
