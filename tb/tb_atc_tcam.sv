// tb_atc_tcam - self-checking test of the ternary pattern array.
//
// A 128-row array is filled with random prefixes of random lengths; the test
// keeps its own copy of each row (prefix, length, valid) and, for random
// keys and for keys built inside stored prefixes, compares every bit of the
// match vector with a match worked out by shifting the key and the stored
// prefix right by 32-length. Invalidation and flush are checked the same
// way, as is a write that lands in the same cycle as a flush.
module tb_atc_tcam;
  import atc_pkg::*;

  localparam int unsigned N = 128;
  localparam int unsigned IW = $clog2(N);

  logic clk = 1'b0, rst_n = 1'b0;
  addr_t key = '0;
  logic [N-1:0] match, valid;
  logic wr_en = 1'b0, inv_en = 1'b0, flush = 1'b0;
  logic [IW-1:0] wr_idx = '0, inv_idx = '0;
  addr_t wr_addr = '0;
  plen_t wr_plen = '0;

  int unsigned checks = 0, failures = 0;

  always #5 clk = ~clk;

  atc_tcam #(.ENTRIES(N)) dut (
    .clk, .rst_n, .key, .match, .wr_en, .wr_idx, .wr_addr, .wr_plen,
    .inv_en, .inv_idx, .flush, .valid_o(valid)
  );

  addr_t       m_pfx [N];
  int unsigned m_len [N];
  bit          m_val [N];

  function automatic bit ref_match(int unsigned i, addr_t k);
    if (!m_val[i]) return 1'b0;
    if (m_len[i] == 0) return 1'b1;
    return (k >> (32 - m_len[i])) == (m_pfx[i] >> (32 - m_len[i]));
  endfunction

  task automatic check_all(addr_t k);
    key = k;
    #1;
    for (int unsigned i = 0; i < N; i++) begin
      checks++;
      if (match[i] !== ref_match(i, k) || valid[i] !== m_val[i]) begin
        failures++;
        if (failures < 10)
          $display("FAIL key %h row %0d: match %b want %b", k, i, match[i], ref_match(i, k));
      end
    end
  endtask

  task automatic write_row(int unsigned i, addr_t a, int unsigned l);
    @(negedge clk);
    wr_en = 1'b1; wr_idx = IW'(i); wr_addr = a; wr_plen = plen_t'(l);
    @(negedge clk);
    wr_en = 1'b0;
    m_pfx[i] = a; m_len[i] = l; m_val[i] = 1'b1;
  endtask

  task automatic random_keys(int unsigned n);
    for (int unsigned t = 0; t < n; t++) begin
      int unsigned r;
      addr_t k;
      r = $urandom() % N;
      if (t % 2 == 0)
        k = $urandom();
      else
        k = m_pfx[r] ^ (($urandom() >> m_len[r]) & ((m_len[r] == 32) ? 32'h0 : 32'hFFFF_FFFF));
      check_all(k);
    end
  endtask

  initial begin
    void'($urandom(3));
    for (int unsigned i = 0; i < N; i++) begin m_val[i] = 0; m_len[i] = 0; m_pfx[i] = 0; end
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    check_all(32'h0910_0000);
    // fill every row; some short prefixes so that random keys match too
    for (int unsigned i = 0; i < N; i++)
      write_row(i, $urandom(), (i % 8 == 0) ? 1 + $urandom() % 8 : 1 + $urandom() % 32);
    // the example route 9.20.0.0/17
    write_row(5, 32'h0914_7FFF, 17);
    check_all(32'h0914_0001);
    check_all(32'h0914_8001);
    key = 32'h0914_7000; #1;
    checks++; if (!match[5]) failures++;
    key = 32'h0914_8000; #1;
    checks++; if (match[5]) failures++;
    random_keys(200);
    // invalidate some rows
    for (int unsigned t = 0; t < 20; t++) begin
      int unsigned r;
      r = $urandom() % N;
      @(negedge clk);
      inv_en = 1'b1; inv_idx = IW'(r);
      @(negedge clk);
      inv_en = 1'b0;
      m_val[r] = 1'b0;
    end
    random_keys(100);
    // flush together with a write: only the written row survives
    @(negedge clk);
    flush = 1'b1; wr_en = 1'b1; wr_idx = IW'(9); wr_addr = 32'hC0A8_0100; wr_plen = 6'd24;
    @(negedge clk);
    flush = 1'b0; wr_en = 1'b0;
    for (int unsigned i = 0; i < N; i++) m_val[i] = 1'b0;
    m_val[9] = 1'b1; m_pfx[9] = 32'hC0A8_0100; m_len[9] = 24;
    check_all(32'hC0A8_01FE);
    check_all(32'hC0A8_02FE);
    random_keys(20);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
