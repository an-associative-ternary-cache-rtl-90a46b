// atc_tcam - associative pattern array of the routing cache.
//
// Each of the ENTRIES rows is a 32-cell ternary word (every cell holds 0, 1
// or don't-care) plus a valid bit. A row is written from a destination
// address and a prefix length: the address is masked to its first plen bits
// and every cell below the prefix/suffix boundary becomes don't-care, so the
// route 9.20.0.0/17 is stored as 00001001 00010100 0XXXXXXX XXXXXXXX.
// A search compares the key against all rows at once and raises match[i] for
// every valid row whose care cells equal the key; the match vector is purely
// combinational from the key (one array access).
//
// Interface: key/match search port; one write port (wr_en, wr_idx, wr_addr,
// wr_plen) that sets the row valid; one invalidate port (inv_en, inv_idx);
// flush clears every valid bit; valid_o shows the valid bits. Writes take
// effect at the next clock edge. In one cycle flush is applied first, then
// invalidate, then write, so a write always lands. Reset clears the valid bits only.
//
// The don't-care cells are stored per row as a care mask, as in a ternary
// CAM. Which set a row belongs to is decided by whoever writes it (the
// controller writes a prefix of length L only into set 32-L), not checked
// here.
module atc_tcam
  import atc_pkg::*;
#(
  parameter int unsigned ENTRIES = CACHE_ENTRIES,
  localparam int unsigned IDX_W  = $clog2(ENTRIES)
) (
  input  logic               clk,
  input  logic               rst_n,
  // search
  input  addr_t              key,
  output logic [ENTRIES-1:0] match,
  // write one row
  input  logic               wr_en,
  input  logic [IDX_W-1:0]   wr_idx,
  input  addr_t              wr_addr,
  input  plen_t              wr_plen,
  // invalidate one row / all rows
  input  logic               inv_en,
  input  logic [IDX_W-1:0]   inv_idx,
  input  logic               flush,
  // valid bit of every row, for the replacement logic
  output logic [ENTRIES-1:0] valid_o
);

  addr_t              value [ENTRIES];  // care bits of the stored prefix
  addr_t              care  [ENTRIES];  // 1 = cell compares, 0 = don't care
  logic [ENTRIES-1:0] valid;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      valid <= '0;
    end else begin
      if (flush)  valid          <= '0;
      if (inv_en) valid[inv_idx] <= 1'b0;
      if (wr_en)  valid[wr_idx]  <= 1'b1;
    end
  end

  always_ff @(posedge clk) begin
    if (wr_en) begin
      value[wr_idx] <= wr_addr & prefix_mask(wr_plen);
      care[wr_idx]  <= prefix_mask(wr_plen);
    end
  end

  assign valid_o = valid;

  always_comb begin
    for (int i = 0; i < int'(ENTRIES); i++)
      match[i] = valid[i] && (((key ^ value[i]) & care[i]) == '0);
  end

endmodule
