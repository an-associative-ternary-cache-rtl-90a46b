// tb_atc_top - end-to-end test of the routing cache at its full default
// size (8192 entries), against the behavioural routing table rt_model.
//
// Phase A streams a lookup trace with temporal locality (three lookups in
// four reuse one of the last 2048 addresses, the rest draw a new address in
// a random route, a few of them in 223/8 where only the default route
// matches) and checks every answer:
//   - answers come back once each, in order, for the right address;
//   - a hit is answered in the cycle after it was accepted;
//   - a miss carries exactly the routing table's longest-match port;
//   - a hit carries the port of some route that matches the address (a
//     shorter match than the longest one is a port error, counted, not a
//     failure: it is how this cache is meant to behave).
// Phase B changes the port of routes whose addresses are cached and checks
// that repeated lookups switch to the new port within 16 lookups, through
// sampling. Phase C flushes the cache and checks that a cached address then
// misses. Every mechanism (hit, miss, fill of a free row, LRU eviction,
// sample, sample correction, miss waiting behind a sample, sample deferred
// while the table is busy, default route, port error, flush) must occur.
module tb_atc_top;
  import atc_pkg::*;

  localparam int unsigned NROUTES = 2 * CACHE_ENTRIES;
  localparam int unsigned N_LOOK  = 40000;
  localparam int unsigned RING    = 2048;
  localparam int unsigned LAT     = 4;

  logic  clk = 1'b0;
  logic  rst_n = 1'b0;
  logic  lk_valid = 1'b0;
  logic  lk_ready;
  addr_t lk_addr = '0;
  logic  res_valid, res_hit;
  port_t res_port;
  addr_t res_addr;
  logic  flush = 1'b0;
  logic  rt_req_valid, rt_req_ready, rt_resp_valid;
  addr_t rt_req_addr;
  plen_t rt_resp_plen;
  port_t rt_resp_port;

  int unsigned checks = 0, failures = 0;

  always #5 clk = ~clk;

  atc_top dut (
    .clk, .rst_n, .lk_valid, .lk_ready, .lk_addr,
    .res_valid, .res_hit, .res_port, .res_addr, .flush,
    .rt_req_valid, .rt_req_ready, .rt_req_addr,
    .rt_resp_valid, .rt_resp_plen, .rt_resp_port
  );

  rt_model #(.NROUTES(NROUTES), .LAT(LAT), .SEED(7)) u_rt (
    .clk, .rst_n,
    .req_valid(rt_req_valid), .req_ready(rt_req_ready), .req_addr(rt_req_addr),
    .resp_valid(rt_resp_valid), .resp_plen(rt_resp_plen), .resp_port(rt_resp_port)
  );

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL %s", what);
    end
  endtask

  // ---- answer bookkeeping ---------------------------------------------
  longint unsigned cyc = 0;
  addr_t           acc_q[$];
  longint unsigned acc_t[$];
  bit              check_ports = 1'b1;   // table static: port checks apply
  bit              last_hit;
  port_t           last_port;
  int unsigned     n_answers = 0;

  // Per address: longest-match port and the set of ports of matching routes.
  typedef struct { port_t lpm; bit [255:0] ok; } addr_info_t;
  addr_info_t info [addr_t];

  function automatic addr_info_t get_info(addr_t a);
    addr_info_t r;
    int unsigned best;
    if (info.exists(a)) return info[a];
    r.ok  = '0;
    r.lpm = '0;
    best  = 0;
    for (int unsigned i = 0; i < u_rt.n_routes; i++) begin
      if ((a & prefix_mask(plen_t'(u_rt.plen[i]))) == u_rt.prefix[i]) begin
        r.ok[u_rt.port[i]] = 1'b1;
        if (u_rt.plen[i] > best) begin
          best  = u_rt.plen[i];
          r.lpm = u_rt.port[i];
        end
      end
    end
    info[a] = r;
    return r;
  endfunction

  // mechanism counters
  int unsigned m_hit, m_miss, m_fill_free, m_evict, m_sample, m_correct,
               m_stall, m_deferred, m_default, m_port_err, m_flush;

  always @(posedge clk) begin
    cyc <= cyc + 1;
    if (rst_n) begin
      if (lk_valid && lk_ready) begin
        acc_q.push_back(lk_addr);
        acc_t.push_back(cyc);
      end
      if (res_valid) begin
        addr_t a;
        longint unsigned t;
        n_answers++;
        if (acc_q.size() == 0) begin
          check(1'b0, "answer without request");
        end else begin
          a = acc_q.pop_front();
          t = acc_t.pop_front();
          check(res_addr == a, $sformatf("answer order: got %h want %h", res_addr, a));
          last_hit  = res_hit;
          last_port = res_port;
          if (res_hit) begin
            m_hit++;
            check(cyc - t == 1, $sformatf("hit latency %0d", cyc - t));
          end else begin
            m_miss++;
            check(cyc - t >= LAT + 1, "miss answered too early");
          end
          if (check_ports) begin
            addr_info_t r;
            r = get_info(a);
            if (!res_hit) begin
              check(res_port == r.lpm, $sformatf("miss port %0d want %0d for %h", res_port, r.lpm, a));
              if (r.ok == '0) m_default++;
            end else begin
              check(r.ok[res_port], $sformatf("hit port %0d matches no route for %h", res_port, a));
              if (res_port != r.lpm) m_port_err++;
            end
          end
        end
      end
      if (dut.u_ctrl.wr_en && !dut.u_lru.evict) m_fill_free++;
      if (dut.u_ctrl.wr_en &&  dut.u_lru.evict) m_evict++;
      if (dut.u_samp.start) m_sample++;
      if (dut.u_ctrl.inv_en) m_correct++;
      if (dut.u_ctrl.look_miss && !dut.u_ctrl.samp_can_start) m_stall++;
      if (dut.u_samp.hit_evt && dut.u_samp.due && !dut.u_samp.can_start) m_deferred++;
      if (flush) m_flush++;
    end
  end

  // ---- stimulus ---------------------------------------------------------
  // Called at a falling edge; returns at the falling edge after acceptance.
  task automatic issue(addr_t a);
    lk_valid = 1'b0;
    while (!lk_ready) @(negedge clk);
    lk_valid = 1'b1;
    lk_addr  = a;
    @(negedge clk);
    lk_valid = 1'b0;
  endtask

  task automatic drain();
    while (acc_q.size() != 0) @(negedge clk);
    repeat (2) @(negedge clk);
  endtask

  addr_t ring [RING];
  int unsigned ring_n = 0, ring_w = 0;

  function automatic addr_t new_addr();
    if ($urandom() % 50 == 0) return 32'hDF00_0000 | ($urandom() & 32'h00FF_FFFF);
    return u_rt.addr_in($urandom() % u_rt.n_routes);
  endfunction

  initial begin
    addr_t a;
    void'($urandom(11));
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    @(negedge clk);
    $display("routing table: %0d routes", u_rt.n_routes);

    // Phase A: trace with locality, back-to-back lookups.
    for (int unsigned n = 0; n < N_LOOK; n++) begin
      if (ring_n > 0 && ($urandom() % 4) != 0) begin
        a = ring[$urandom() % ring_n];
      end else begin
        a = new_addr();
        ring[ring_w] = a;
        ring_w = (ring_w + 1) % RING;
        if (ring_n < RING) ring_n++;
      end
      issue(a);
    end
    drain();
    $display("phase A: %0d lookups, %0d hits (%0d.%02d%%), %0d misses, %0d port errors",
             N_LOOK, m_hit, (m_hit * 100) / N_LOOK, ((m_hit * 10000) / N_LOOK) % 100,
             m_miss, m_port_err);

    // Phase B: routing updates on cached routes, fixed by sampling. Hits
    // may now carry a port the table no longer has, so the per-answer port
    // checks stop here and each update is checked on its own.
    check_ports = 1'b0;
    for (int unsigned k = 0; k < 8; k++) begin
      int unsigned bl;
      port_t bp, np;
      int bi;
      bit fixed;
      a = ring[(ring_w + RING - 1 - k) % RING];
      u_rt.lpm(a, bl, bp, bi);
      if (bi < 0) continue;
      issue(a);                        // make sure the route is cached
      drain();
      np = bp + 8'd1;
      if (np == '0) np = 8'd1;
      u_rt.set_port(bi, np);
      info.delete();
      fixed = 1'b0;
      for (int unsigned r = 0; r < 16 && !fixed; r++) begin
        issue(a);
        drain();
        fixed = (last_port == np);
      end
      check(fixed, $sformatf("route update for %h not picked up", a));
      issue(a);
      drain();
      check(last_hit && last_port == np, "corrected entry does not hit with the new port");
    end

    // Phase C: flush.
    a = ring[(ring_w + RING - 1) % RING];
    issue(a);
    drain();
    check(last_hit, "recent address should hit before flush");
    flush = 1'b1;
    @(negedge clk);
    flush = 1'b0;
    issue(a);
    drain();
    check(!last_hit, "address should miss after flush");
    issue(a);
    drain();
    check(last_hit, "address should hit again after refill");

    check(acc_q.size() == 0, "unanswered lookups");
    $display("mechanisms: hit=%0d miss=%0d fill_free=%0d evict=%0d sample=%0d correct=%0d stall=%0d deferred=%0d default=%0d port_err=%0d flush=%0d",
             m_hit, m_miss, m_fill_free, m_evict, m_sample, m_correct, m_stall,
             m_deferred, m_default, m_port_err, m_flush);
    check(m_hit > 0, "no hit");
    check(m_miss > 0, "no miss");
    check(m_fill_free > 0, "no fill of a free row");
    check(m_evict > 0, "no LRU eviction");
    check(m_sample > 0, "no sample");
    check(m_correct > 0, "no sample correction");
    check(m_stall > 0, "no miss waiting behind a sample");
    check(m_deferred > 0, "no deferred sample");
    check(m_default > 0, "no default-route miss");
    check(m_port_err > 0, "no port error");
    check(m_flush > 0, "no flush");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (3_000_000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
