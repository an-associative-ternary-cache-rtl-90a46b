// tb_atc_ctrl - directed, self-checking test of the cache controller.
//
// The test stands in for the rest of the cache: it answers the search of
// each lookup address from a small table of its own (hit, row, port), gives
// a fixed LRU victim row, plays the sampler (samp_start, s_addr, s_idx,
// s_mismatch) and the routing table (request ready after a programmable
// delay, answer LAT cycles after acceptance). It checks, cycle by cycle:
//   - a hit is answered in the next cycle and marks its row used;
//   - a miss stops lookups, requests the table with the address (held while
//     not ready), is answered with the table's port and is written into the
//     victim row of set 32-plen; a length-0 answer writes nothing;
//   - a sample runs while lookups go on; a disagreeing sample invalidates
//     the sampled row, then writes the table's route; an agreeing one writes
//     nothing;
//   - a miss during a sample waits until the sample is finished.
module tb_atc_ctrl;
  import atc_pkg::*;

  localparam int unsigned N   = 256;
  localparam int unsigned IW  = $clog2(N);
  localparam int unsigned LAT = 3;

  logic clk = 1'b0, rst_n = 1'b0;
  logic lk_valid = 1'b0, lk_ready;
  addr_t lk_addr = '0;
  logic res_valid, res_hit;
  port_t res_port;
  addr_t res_addr;
  logic c_hit;
  logic [IW-1:0] c_idx;
  port_t c_port;
  logic touch_en, fill_en, wr_en, inv_en;
  logic [IW-1:0] touch_idx, wr_idx, inv_idx;
  logic [IW-1:0] victim_idx = IW'(77);
  logic [4:0] set_sel;
  addr_t wr_addr;
  plen_t wr_plen;
  port_t wr_port;
  logic hit_evt, samp_can_start;
  logic samp_start = 1'b0;
  addr_t s_addr = '0;
  logic [IW-1:0] s_idx = '0;
  logic s_mismatch = 1'b0;
  logic rt_req_valid, rt_req_ready;
  addr_t rt_req_addr;
  logic rt_resp_valid = 1'b0;
  rt_resp_t rt_resp = '0;

  int unsigned checks = 0, failures = 0;

  always #5 clk = ~clk;

  atc_ctrl #(.ENTRIES(N)) dut (.*);

  task automatic chk(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL @%0t %s", $time, what);
    end
  endtask

  // ---- cache contents seen by the controller ---------------------------
  localparam int unsigned ROWS = 2;
  addr_t         row_addr [ROWS] = '{32'h0A00_0001, 32'h0A00_0002};
  logic [IW-1:0] row_idx  [ROWS] = '{IW'(5), IW'(6)};
  port_t         row_port [ROWS] = '{8'd11, 8'd12};
  always_comb begin
    c_hit  = 1'b0;
    c_idx  = '0;
    c_port = '0;
    for (int i = 0; i < int'(ROWS); i++) begin
      if (lk_addr == row_addr[i]) begin
        c_hit  = 1'b1;
        c_idx  = row_idx[i];
        c_port = row_port[i];
      end
    end
  end

  // ---- routing table ----------------------------------------------------
  int unsigned ready_delay = 0;   // cycles of ready low per request
  int unsigned rd_cnt = 0;
  rt_resp_t    next_resp;
  addr_t       rt_seen[$];
  assign rt_req_ready = (rd_cnt >= ready_delay);
  int unsigned lat_cnt = 0;
  always @(posedge clk) begin
    rt_resp_valid <= 1'b0;
    if (lat_cnt == 1) begin
      rt_resp_valid <= 1'b1;
      rt_resp       <= next_resp;
    end
    if (lat_cnt != 0) lat_cnt <= lat_cnt - 1;
    if (rt_req_valid && !rt_req_ready) rd_cnt <= rd_cnt + 1;
    if (rt_req_valid && rt_req_ready) begin
      rd_cnt  <= 0;
      lat_cnt <= LAT;
      rt_seen.push_back(rt_req_addr);
    end
  end

  // request must hold while not ready
  addr_t held_addr;
  bit    holding = 1'b0;
  always @(posedge clk) begin
    if (holding) chk(rt_req_valid && rt_req_addr == held_addr, "request dropped while not ready");
    holding   <= rt_req_valid && !rt_req_ready;
    held_addr <= rt_req_addr;
  end

  // ---- event log --------------------------------------------------------
  int unsigned n_wr = 0, n_inv = 0, n_res = 0;
  addr_t last_wr_addr;
  plen_t last_wr_plen;
  port_t last_wr_port;
  logic [4:0] last_set;
  logic [IW-1:0] last_wr_idx, last_inv_idx;
  bit last_res_hit;
  port_t last_res_port;
  addr_t last_res_addr;
  always @(posedge clk) begin
    if (wr_en) begin
      n_wr++;
      last_wr_addr = wr_addr; last_wr_plen = wr_plen; last_wr_port = wr_port;
      last_set = set_sel; last_wr_idx = wr_idx;
      chk(fill_en, "fill_en missing on write");
    end
    if (inv_en) begin n_inv++; last_inv_idx = inv_idx; end
    if (res_valid) begin
      n_res++;
      last_res_hit = res_hit; last_res_port = res_port; last_res_addr = res_addr;
    end
  end

  // one lookup, called at a falling edge; waits until it is accepted
  task automatic lookup(addr_t a);
    while (!lk_ready) @(negedge clk);
    lk_valid = 1'b1;
    lk_addr  = a;
    @(negedge clk);
    lk_valid = 1'b0;
  endtask

  task automatic wait_idle();
    int unsigned n;
    n = 0;
    while (!(samp_can_start && lk_ready) && n < 100) begin @(negedge clk); n++; end
    chk(n < 100, "controller did not return to idle");
    repeat (2) @(negedge clk);   // let the event log see the last answer
  endtask

  initial begin
    int unsigned wr0, res0, inv0;
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    @(negedge clk);

    // 1. hit: answer next cycle, row marked used
    lk_valid = 1'b1; lk_addr = 32'h0A00_0001;
    #1;
    chk(lk_ready && touch_en && touch_idx == 5 && hit_evt, "hit not marked used");
    @(negedge clk);
    lk_valid = 1'b0;
    chk(res_valid && res_hit && res_port == 11 && res_addr == 32'h0A00_0001, "hit answer");
    @(negedge clk);
    chk(!res_valid, "single answer per hit");

    // 2. miss with a slow table
    ready_delay = 2;
    next_resp = '{plen: 6'd24, port: 8'd42};
    wr0 = n_wr; res0 = n_res;
    lookup(32'hC0A8_0107);
    chk(!lk_ready, "lookups must stop after a miss");
    chk(rt_req_valid && rt_req_addr == 32'hC0A8_0107, "miss request");
    wait_idle();
    chk(n_res == res0 + 1 && !last_res_hit && last_res_port == 42 &&
        last_res_addr == 32'hC0A8_0107, "miss answer");
    chk(n_wr == wr0 + 1 && last_wr_addr == 32'hC0A8_0107 && last_wr_plen == 24 &&
        last_wr_port == 42 && last_set == 5'd8 && last_wr_idx == 77, "miss written to set 8");
    ready_delay = 0;

    // 3. /32 route goes to set 0; default route is not cached
    next_resp = '{plen: 6'd32, port: 8'd3};
    wr0 = n_wr;
    lookup(32'h0102_0304);
    wait_idle();
    chk(n_wr == wr0 + 1 && last_set == 5'd0, "/32 into set 0");
    next_resp = '{plen: 6'd0, port: 8'd0};
    wr0 = n_wr; res0 = n_res;
    lookup(32'hDF01_0203);
    wait_idle();
    chk(n_wr == wr0 && n_res == res0 + 1 && last_res_port == 0, "default route not cached");

    // 4. sample that agrees: lookups continue, nothing written
    wr0 = n_wr; inv0 = n_inv;
    s_addr = 32'h0A00_0002; s_idx = IW'(6); s_mismatch = 1'b0;
    next_resp = '{plen: 6'd16, port: 8'd12};
    lk_valid = 1'b1; lk_addr = 32'h0A00_0002; samp_start = 1'b1;
    #1;
    chk(samp_can_start, "sampling allowed when idle");
    @(negedge clk);
    samp_start = 1'b0;
    lk_addr = 32'h0A00_0001;
    #1;
    chk(rt_req_valid && rt_req_addr == 32'h0A00_0002, "sample request");
    chk(lk_ready, "lookups go on during a sample");
    chk(!samp_can_start, "no second sample while one is outstanding");
    @(negedge clk);
    lk_valid = 1'b0;
    wait_idle();
    chk(n_wr == wr0 && n_inv == inv0, "agreeing sample writes nothing");

    // 5. sample that disagrees: invalidate sampled row, then write route
    s_mismatch = 1'b1;
    next_resp = '{plen: 6'd20, port: 8'd99};
    lk_valid = 1'b1; lk_addr = 32'h0A00_0002; samp_start = 1'b1;
    @(negedge clk);
    samp_start = 1'b0;
    lk_valid = 1'b0;
    wait_idle();
    chk(n_inv == inv0 + 1 && last_inv_idx == 6, "sampled row invalidated");
    chk(n_wr == wr0 + 1 && last_wr_addr == 32'h0A00_0002 && last_wr_plen == 20 &&
        last_wr_port == 99 && last_set == 5'd12, "table route written after sample");

    // 6. miss during a sample waits for it
    s_mismatch = 1'b0;
    next_resp = '{plen: 6'd12, port: 8'd12};
    rt_seen.delete();
    lk_valid = 1'b1; lk_addr = 32'h0A00_0002; samp_start = 1'b1;
    @(negedge clk);
    samp_start = 1'b0;
    lk_addr = 32'h0B0B_0B0B;            // a miss while the sample is out
    @(negedge clk);
    lk_valid = 1'b0;
    #1;
    chk(!lk_ready, "lookups stop after a miss during a sample");
    chk(dut.miss_pend, "miss held behind the sample");
    res0 = n_res;
    wait_idle();
    chk(rt_seen.size() == 2 && rt_seen[0] == 32'h0A00_0002 && rt_seen[1] == 32'h0B0B_0B0B,
        "sample served before the waiting miss");
    chk(n_res == res0 + 1 && last_res_addr == 32'h0B0B_0B0B && !last_res_hit, "waiting miss answered");

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
