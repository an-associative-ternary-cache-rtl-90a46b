// tb_atc_sampler - self-checking test of hit sampling.
//
// Random hit events (about half of all cycles) are applied with can_start
// mostly high. The test counts hits itself and expects start on every third
// hit, or, when the routing-table port was busy on that hit, on the first
// hit after it where it is free. After each start it checks that the hit's
// address, row and port were held, and that mismatch compares the held port
// with the routing-table port.
module tb_atc_sampler;
  import atc_pkg::*;

  localparam int unsigned N  = 256;
  localparam int unsigned IW = $clog2(N);

  logic clk = 1'b0, rst_n = 1'b0;
  logic hit_evt = 1'b0, can_start = 1'b1, start, mismatch;
  addr_t hit_addr = '0, s_addr;
  logic [IW-1:0] hit_idx = '0, s_idx;
  port_t hit_port = '0, s_port, rt_port = '0;

  int unsigned checks = 0, failures = 0;

  always #5 clk = ~clk;

  atc_sampler #(.ENTRIES(N)) dut (
    .clk, .rst_n, .hit_evt, .hit_addr, .hit_idx, .hit_port, .can_start, .start,
    .s_addr, .s_idx, .s_port, .rt_port, .mismatch
  );

  task automatic chk(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("FAIL %s", what);
    end
  endtask

  initial begin
    int unsigned since = 0;   // hits since the last sample
    int unsigned n_start = 0, n_deferred = 0;
    bit st;
    void'($urandom(13));
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    for (int t = 0; t < 5000; t++) begin
      @(negedge clk);
      hit_evt   = ($urandom() % 2) == 0;
      can_start = ($urandom() % 5) != 0;
      hit_addr  = $urandom();
      hit_idx   = IW'($urandom());
      hit_port  = port_t'($urandom());
      #1;
      st = start;
      chk(start == (hit_evt && can_start && since >= 2),
          $sformatf("cycle %0d: start %b, %0d hits since last sample", t, start, since));
      if (hit_evt && since >= 2 && !can_start) n_deferred++;
      @(posedge clk);
      #1;
      if (hit_evt) begin
        if (st) begin
          n_start++;
          since = 0;
          chk(s_addr == hit_addr && s_idx == hit_idx && s_port == hit_port, "held sample");
          rt_port = hit_port;
          #1;
          chk(!mismatch, "equal ports reported as mismatch");
          rt_port = hit_port ^ port_t'(1 + $urandom() % 255);
          #1;
          chk(mismatch, "different ports not reported");
        end else begin
          since++;
        end
      end
    end
    chk(n_start > 500 && n_deferred > 10, "too few samples or deferrals");
    $display("samples %0d, deferred %0d", n_start, n_deferred);
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
