// tb_atc_priority - self-checking test of the priority selection.
//
// For a 300-row request vector (not a power of two, so the padded part of
// the tree is exercised) it applies empty, single-bit, full and random
// vectors of several densities and checks hit and the index against the
// lowest set bit found by a simple scan.
module tb_atc_priority;

  localparam int unsigned N  = 300;
  localparam int unsigned IW = $clog2(N);

  logic [N-1:0]  req = '0;
  logic          hit;
  logic [IW-1:0] idx;

  int unsigned checks = 0, failures = 0;

  atc_priority #(.ENTRIES(N)) dut (.req, .hit, .idx);

  task automatic apply(logic [N-1:0] v);
    int first;
    req = v;
    #1;
    first = -1;
    for (int i = N - 1; i >= 0; i--) if (v[i]) first = i;
    checks++;
    if (hit !== (first >= 0) || (first >= 0 && int'(idx) != first)) begin
      failures++;
      if (failures < 10) $display("FAIL first=%0d hit=%b idx=%0d", first, hit, idx);
    end
  endtask

  initial begin
    logic [N-1:0] v;
    void'($urandom(5));
    apply('0);
    apply('1);
    for (int i = 0; i < int'(N); i++) begin
      v = '0;
      v[i] = 1'b1;
      apply(v);
      v[N-1] = 1'b1;
      apply(v);
    end
    for (int t = 0; t < 2000; t++) begin
      int unsigned dens;
      dens = 1 + t % 64;
      for (int i = 0; i < int'(N); i++) v[i] = ($urandom() % (dens * 4)) == 0;
      apply(v);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #1_000_000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
