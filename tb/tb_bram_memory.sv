// tb_bram_memory: checks the block RAM: written words read back one cycle
// after the read request, read-first behaviour, rdata held while idle, and
// that a write does not disturb other words.
module tb_bram_memory;
  import prbram_pkg::*;

  localparam int DEPTH = 512;

  logic clk = 0;
  mem_req_t req;
  logic [31:0] rdata;
  logic [31:0] model [DEPTH];
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  bram_memory #(.DEPTH(DEPTH)) dut (.clk, .req, .rdata);

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  task automatic wr(input int a, input logic [31:0] d);
    req <= '{en: 1'b1, we: 1'b1, addr: MEM_AW'(a), wdata: d};
    @(posedge clk);
    model[a] = d;
  endtask

  task automatic rd(input int a, output logic [31:0] d);
    req <= '{en: 1'b1, we: 1'b0, addr: MEM_AW'(a), wdata: '0};
    @(posedge clk);
    req <= '0;
    #1 d = rdata;
  endtask

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [31:0] d;
    req = '0;
    @(posedge clk);
    for (int a = 0; a < DEPTH; a++) wr(a, $urandom);
    for (int i = 0; i < 200; i++) begin
      automatic int a = int'($urandom_range(0, DEPTH - 1));
      if ($urandom_range(0, 1) == 1) wr(a, $urandom);
      else begin
        rd(a, d);
        check(d == model[a], $sformatf("word %0d: %h, expected %h", a, d, model[a]));
      end
    end
    rd(5, d);
    repeat (3) @(posedge clk);
    check(rdata == model[5], "rdata held while idle");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
