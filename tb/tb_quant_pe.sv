// tb_quant_pe: checks quant_pe against Round(DCT / Q) with the standard
// luminance matrix, on random coefficients of both signs, exact halves and
// the extremes, and checks the streaming rate of 128 cycles per block.
module tb_quant_pe;
  import prbram_pkg::*;
  import tb_ref_pkg::*;

  localparam int NBLK  = 3;
  localparam int DEPTH = 1024;
  localparam int BLOCK_CYCLES = 128;

  logic clk = 0, rst_n = 1, pe_reset = 0, start = 0;
  logic done, busy;
  mem_req_t req;
  logic [31:0] rdata;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  quant_pe dut (.clk, .rst_n, .pe_reset, .start, .num_blocks(16'(NBLK)), .done, .busy,
                .mem_req(req), .mem_rdata(rdata));
  bram_memory #(.DEPTH(DEPTH)) u_mem (.clk, .req, .rdata);

  int coef [NBLK*64];

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int t0, t1;
    for (int i = 0; i < NBLK*64; i++) begin
      case (i / 64)
        0: coef[i] = (i % 2) ? -(QLUM[i % 64] / 2 + QLUM[i % 64] * 3) : QLUM[i % 64] * 5 + QLUM[i % 64] / 2;
        1: coef[i] = (i % 2) ? -1024 : 1023;
        default: coef[i] = int'($urandom_range(0, 2047)) - 1024;
      endcase
      u_mem.mem[i] = 32'(coef[i]);
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
    for (int i = 0; i < NBLK*64; i++) begin
      automatic int exp = ref_quant(coef[i], QLUM[i % 64]);
      automatic int got = int'($signed(u_mem.mem[i]));
      check(got == exp, $sformatf("word %0d: %0d / %0d gave %0d, expected %0d", i, coef[i], QLUM[i % 64], got, exp));
    end
    // Figure-style spot check: 640 / 16 = 40
    check(ref_quant(640, 16) == 40, "reference model");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
