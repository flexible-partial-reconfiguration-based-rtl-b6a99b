// tb_dct_pe: checks dct_pe against a real-valued DCT (equation 1) on a
// constant block, a ramp, and random blocks. Every coefficient must match the
// reference to within 1; the cycle count per block is checked as well.
module tb_dct_pe;
  import prbram_pkg::*;
  import tb_ref_pkg::*;

  localparam int NBLK  = 4;
  localparam int DEPTH = 1024;
  localparam int BLOCK_CYCLES = 1154;   // 66 load + 512 row + 512 column + 64 store

  logic clk = 0, rst_n = 1, pe_reset = 0, start = 0;
  logic done, busy;
  mem_req_t req;
  logic [31:0] rdata;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  dct_pe dut (.clk, .rst_n, .pe_reset, .start, .num_blocks(16'(NBLK)), .done, .busy,
              .mem_req(req), .mem_rdata(rdata));
  bram_memory #(.DEPTH(DEPTH)) u_mem (.clk, .req, .rdata);

  int pix [NBLK][64];

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int t0, t1;
    for (int b = 0; b < NBLK; b++)
      for (int i = 0; i < 64; i++) begin
        case (b)
          0: pix[b][i] = 200;                          // flat block: only DC
          1: pix[b][i] = (i % 8) * 32;                 // horizontal ramp
          2: pix[b][i] = (i % 2) ? 255 : 0;            // high-frequency pattern
          default: pix[b][i] = int'($urandom_range(0, 255));
        endcase
        u_mem.mem[b*64+i] = 32'(pix[b][i]);
      end
    #1 rst_n = 0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    @(posedge clk);
    start <= 1;
    @(posedge clk);
    start <= 0;
    t0 = $time;
    wait (done);
    t1 = $time;
    check((t1 - t0) / 10 == NBLK * BLOCK_CYCLES,
          $sformatf("cycles %0d, expected %0d", (t1 - t0) / 10, NBLK * BLOCK_CYCLES));
    @(posedge clk);
    for (int b = 0; b < NBLK; b++) begin
      int exp [64];
      ref_dct(pix[b], exp);
      for (int i = 0; i < 64; i++) begin
        automatic int got = int'($signed(u_mem.mem[b*64+i]));
        automatic int d = got - exp[i];
        check(d >= -1 && d <= 1, $sformatf("block %0d coef %0d: got %0d, expected %0d", b, i, got, exp[i]));
      end
    end
    // the flat block: DC = 8 * (200 - 128) = 576, every AC coefficient 0
    check(int'($signed(u_mem.mem[0])) == 576, "flat block DC");
    check(u_mem.mem[1] == 0 && u_mem.mem[8] == 0, "flat block AC");
    // done is held, a second start clears it and finishes again
    check(done && !busy, "done held");
    start <= 1;
    @(posedge clk);
    start <= 0;
    @(posedge clk);
    check(!done && busy, "restart clears done");
    pe_reset <= 1;
    @(posedge clk);
    pe_reset <= 0;
    @(posedge clk);
    check(!done && !busy, "pe_reset stops the element");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
