// tb_atc_trace - trace-shaped workload on a 1K-entry cache.
//
// The cache was evaluated on packet traces with 0.2 to 3.5 million lookups
// and 1K to 8K entries. Those traces are not reproduced here; this test
// builds a synthetic trace of the same shape as the smallest one: 203,352
// lookups over 1,465 distinct destinations (about 139 lookups per
// destination), with new destinations spread evenly over the trace and
// reuse drawn from the recently used ones (geometric stack distance, mean
// 32). It runs on a 1024-entry cache (the 1K configuration) with a routing
// table of 2048 routes and checks every answer as tb_atc_top does: misses
// carry the exact longest-match port, hits carry the port of a matching
// route, hits are answered one cycle after acceptance, and every lookup is
// answered in order. It reports hit rate, port-error rate and cache writes.
module tb_atc_trace;
  import atc_pkg::*;

  localparam int unsigned ENTRIES = 1024;
  localparam int unsigned NROUTES = 2048;
  localparam int unsigned N_LOOK  = 203352;
  localparam int unsigned N_UNIQ  = 1465;
  localparam int unsigned LAT     = 4;

  logic  clk = 1'b0;
  logic  rst_n = 1'b0;
  logic  lk_valid = 1'b0;
  logic  lk_ready;
  addr_t lk_addr = '0;
  logic  res_valid, res_hit;
  port_t res_port;
  addr_t res_addr;
  logic  rt_req_valid, rt_req_ready, rt_resp_valid;
  addr_t rt_req_addr;
  plen_t rt_resp_plen;
  port_t rt_resp_port;

  int unsigned checks = 0, failures = 0;

  always #5 clk = ~clk;

  atc_top #(.ENTRIES(ENTRIES)) dut (
    .clk, .rst_n, .lk_valid, .lk_ready, .lk_addr,
    .res_valid, .res_hit, .res_port, .res_addr, .flush(1'b0),
    .rt_req_valid, .rt_req_ready, .rt_req_addr,
    .rt_resp_valid, .rt_resp_plen, .rt_resp_port
  );

  rt_model #(.NROUTES(NROUTES), .LAT(LAT), .SEED(29)) u_rt (
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

  longint unsigned cyc = 0;
  addr_t           acc_q[$];
  longint unsigned acc_t[$];
  int unsigned     n_hit = 0, n_miss = 0, n_port_err = 0, n_writes = 0;

  always @(posedge clk) begin
    cyc <= cyc + 1;
    if (rst_n) begin
      if (lk_valid && lk_ready) begin
        acc_q.push_back(lk_addr);
        acc_t.push_back(cyc);
      end
      if (dut.u_ctrl.wr_en) n_writes++;
      if (res_valid) begin
        addr_t a;
        longint unsigned t;
        addr_info_t r;
        if (acc_q.size() == 0) begin
          check(1'b0, "answer without request");
        end else begin
          a = acc_q.pop_front();
          t = acc_t.pop_front();
          check(res_addr == a, "answer order");
          r = get_info(a);
          if (res_hit) begin
            n_hit++;
            check(cyc - t == 1, "hit latency");
            check(r.ok[res_port], "hit port matches no route");
            if (res_port != r.lpm) n_port_err++;
          end else begin
            n_miss++;
            check(res_port == r.lpm, "miss port");
          end
        end
      end
    end
  end

  task automatic issue(addr_t a);
    lk_valid = 1'b0;
    while (!lk_ready) @(negedge clk);
    lk_valid = 1'b1;
    lk_addr  = a;
    @(negedge clk);
    lk_valid = 1'b0;
  endtask

  addr_t uniq [N_UNIQ];

  initial begin
    int unsigned n_intro, d;
    addr_t a;
    void'($urandom(17));
    for (int unsigned i = 0; i < N_UNIQ; i++) uniq[i] = u_rt.addr_in($urandom() % u_rt.n_routes);
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    @(negedge clk);
    n_intro = 0;
    for (int unsigned n = 0; n < N_LOOK; n++) begin
      if (n_intro < N_UNIQ && (n_intro == 0 || n >= (n_intro * N_LOOK) / N_UNIQ)) begin
        a = uniq[n_intro];
        n_intro++;
      end else begin
        d = 0;
        while (d + 1 < n_intro && ($urandom() % 32) != 0) d++;
        a = uniq[n_intro - 1 - d];
      end
      issue(a);
    end
    while (acc_q.size() != 0) @(negedge clk);
    repeat (2) @(negedge clk);
    check(n_hit + n_miss == N_LOOK, "every lookup answered");
    check(n_hit > N_LOOK / 2, "hit rate below 50% on a trace with locality");
    $display("trace: %0d lookups, %0d distinct, %0d-entry cache", N_LOOK, N_UNIQ, ENTRIES);
    $display("hit rate %0d.%02d%%, port errors %0d (%0d.%03d%% of lookups), cache writes %0d",
             (n_hit * 100) / N_LOOK, ((n_hit * 10000) / N_LOOK) % 100, n_port_err,
             (n_port_err * 100) / N_LOOK, ((n_port_err * 100000) / N_LOOK) % 1000, n_writes);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (5_000_000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
