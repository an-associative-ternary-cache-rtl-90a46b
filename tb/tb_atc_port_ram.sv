// tb_atc_port_ram - self-checking test of the port column.
//
// Writes random ports to random rows of a 64-row column, keeps a copy, and
// reads rows back combinationally, including the row written in the
// previous cycle.
module tb_atc_port_ram;
  import atc_pkg::*;

  localparam int unsigned N  = 64;
  localparam int unsigned IW = $clog2(N);

  logic clk = 1'b0;
  logic wr_en = 1'b0;
  logic [IW-1:0] wr_idx = '0, rd_idx = '0;
  port_t wr_port = '0, rd_port;

  int unsigned checks = 0, failures = 0;
  port_t model [N];

  always #5 clk = ~clk;

  atc_port_ram #(.ENTRIES(N)) dut (.clk, .wr_en, .wr_idx, .wr_port, .rd_idx, .rd_port);

  task automatic rd_check(int unsigned i);
    rd_idx = IW'(i);
    #1;
    checks++;
    if (rd_port !== model[i]) begin
      failures++;
      if (failures < 10) $display("FAIL row %0d: %0d want %0d", i, rd_port, model[i]);
    end
  endtask

  initial begin
    void'($urandom(9));
    for (int unsigned i = 0; i < N; i++) begin
      @(negedge clk);
      wr_en = 1'b1; wr_idx = IW'(i); wr_port = port_t'($urandom()); model[i] = wr_port;
    end
    @(negedge clk);
    wr_en = 1'b0;
    for (int unsigned i = 0; i < N; i++) rd_check(i);
    for (int t = 0; t < 500; t++) begin
      int unsigned r;
      r = $urandom() % N;
      @(negedge clk);
      wr_en = ($urandom() % 2) == 0; wr_idx = IW'(r); wr_port = port_t'($urandom());
      if (wr_en) model[r] = wr_port;
      @(negedge clk);
      wr_en = 1'b0;
      rd_check(r);
      rd_check($urandom() % N);
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
