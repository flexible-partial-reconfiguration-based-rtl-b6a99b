// tb_arm_bram_ctrl: writes words through the ARM-side BRAM controller into a
// small block RAM and reads them back, checks that the AXI byte address maps
// to the word address (bits [AW+1:2]), and that a read issued right after a
// write returns the new word.
module tb_arm_bram_ctrl;
  import prbram_pkg::*;

  localparam int DEPTH = 256;
  localparam int N     = 40;

  logic clk = 0, rst_n = 1;
  axil_req_t req;
  axil_rsp_t rsp;
  mem_req_t mreq;
  logic [31:0] rdata;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  arm_bram_ctrl dut (.clk, .rst_n, .axi_req(req), .axi_rsp(rsp), .mem_req(mreq), .mem_rdata(rdata));
  bram_memory #(.DEPTH(DEPTH)) u_mem (.clk, .req(mreq), .rdata);
  tb_axil_master u_m (.clk, .req, .rsp);

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
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
    logic [31:0] val [N];
    int addr [N];
    #1 rst_n = 0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int i = 0; i < N; i++) begin
      addr[i] = (i * 37) % DEPTH;
      val[i]  = $urandom;
      u_m.write(32'(addr[i] * 4), val[i]);
      check(u_mem.mem[addr[i]] == val[i], $sformatf("word %0d written at its word address", addr[i]));
    end
    for (int i = 0; i < N; i++) begin
      u_m.read(32'(addr[i] * 4), d);
      check(d == val[i], $sformatf("read word %0d: %h, expected %h", addr[i], d, val[i]));
    end
    u_m.write(32'h20, 32'hCAFE_F00D);
    u_m.read(32'h20, d);
    check(d == 32'hCAFE_F00D, "read after write");
    check(u_mem.mem[8] == 32'hCAFE_F00D, "byte address 0x20 is word 8");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
