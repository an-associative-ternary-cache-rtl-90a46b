// tb_atc_lru - self-checking test of the LRU victim choice.
//
// A 128-row instance is driven with random hits (touch) and writes (fill)
// and a random valid vector. The test keeps the time of the last use of
// every row and, for a random set each cycle, finds the expected victim by
// scanning the set's rows: the first invalid row, else the row used longest
// ago (lowest row on a tie). It also checks that the set geometry covers the
// array exactly, with no empty set and set 8 (/24) the largest, and that a
// row just used is not the victim of a full set of two or more rows.
module tb_atc_lru;
  import atc_pkg::*;

  localparam int unsigned N  = 128;
  localparam int unsigned IW = $clog2(N);

  logic clk = 1'b0, rst_n = 1'b0;
  logic [N-1:0] valid = '0;
  logic touch_en = 1'b0, fill_en = 1'b0;
  logic [IW-1:0] touch_idx = '0, fill_idx = '0, victim_idx;
  logic [4:0] set_sel = '0;
  logic evict;

  int unsigned checks = 0, failures = 0;

  always #5 clk = ~clk;

  atc_lru #(.ENTRIES(N)) dut (
    .clk, .rst_n, .valid, .touch_en, .touch_idx, .fill_en, .fill_idx,
    .set_sel, .victim_idx, .evict
  );

  longint unsigned last_use [N];
  longint unsigned now = 0;

  task automatic check_victim(int unsigned s);
    int unsigned lo, hi, exp;
    bit found;
    set_sel = 5'(s);
    #1;
    lo = set_base(N, s);
    hi = lo + set_size(N, s);
    found = 1'b0;
    exp = lo;
    for (int unsigned i = lo; i < hi; i++)
      if (!found && !valid[i]) begin exp = i; found = 1'b1; end
    if (!found)
      for (int unsigned i = lo; i < hi; i++)
        if (last_use[i] < last_use[exp]) exp = i;
    checks++;
    if (int'(victim_idx) != int'(exp) || evict !== valid[exp]) begin
      failures++;
      if (failures < 10)
        $display("FAIL set %0d [%0d,%0d): victim %0d evict %b want %0d", s, lo, hi,
                 victim_idx, evict, exp);
    end
  endtask

  initial begin
    int unsigned total;
    void'($urandom(21));
    for (int unsigned i = 0; i < N; i++) last_use[i] = 0;
    // geometry
    total = 0;
    for (int unsigned s = 0; s < NUM_SETS; s++) begin
      checks++;
      if (set_size(N, s) == 0 || set_size(N, s) > set_size(N, 8)) failures++;
      checks++;
      if (set_base(N, s) != total) failures++;
      total += set_size(N, s);
    end
    checks++;
    if (total != N || set_base(N, 32) != N) failures++;
    for (int unsigned s = 0; s < NUM_SETS; s++) begin
      checks++;
      if (set_size(8192, s) != set_weight(s)) failures++;
    end

    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    // empty cache: victim is the first row of each set
    for (int unsigned s = 0; s < NUM_SETS; s++) check_victim(s);
    // random traffic
    for (int t = 0; t < 3000; t++) begin
      @(negedge clk);
      touch_en = ($urandom() % 2) == 0;
      touch_idx = IW'($urandom() % N);
      fill_en = ($urandom() % 4) == 0;
      fill_idx = IW'($urandom() % N);
      if (t < 300) valid = valid | (N'(1) << ($urandom() % N));
      else if ($urandom() % 8 == 0) valid[$urandom() % N] = ($urandom() % 4) != 0;
      @(posedge clk);
      #1;
      if (touch_en) last_use[touch_idx] = now;
      if (fill_en) last_use[fill_idx] = now;
      if (touch_en || fill_en) now++;
      touch_en = 1'b0;
      fill_en = 1'b0;
      check_victim($urandom() % NUM_SETS);
      check_victim(8);
    end
    // a full set: the row just used never becomes the victim
    valid = '1;
    for (int t = 0; t < 200; t++) begin
      @(negedge clk);
      touch_en = 1'b1;
      touch_idx = IW'(set_base(N, 8) + $urandom() % set_size(N, 8));
      @(posedge clk);
      #1;
      last_use[touch_idx] = now;
      now++;
      touch_en = 1'b0;
      check_victim(8);
      checks++;
      if (victim_idx == touch_idx) failures++;
    end
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
