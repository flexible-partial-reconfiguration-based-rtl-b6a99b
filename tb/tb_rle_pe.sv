// tb_rle_pe: checks rle_pe (zig-zag scan, DC DPCM, (run, value) coding) on
//   - the quantized 8x8 example block with DC 40 and AC 12, 10, 1, -7, -4,
//   - three blocks with DC 45, 54, 48, whose DC words must read 45, 9, -6,
//   - a block with runs of 5 and 7 zeros before the values 1 and 2,
//   - a block with a 40-zero run (two (15, 0) words) ending on a nonzero value
//     in the last position (no end-of-block word),
//   - random sparse blocks,
// against an independent reference model.
module tb_rle_pe;
  import prbram_pkg::*;
  import tb_ref_pkg::*;

  localparam int NBLK  = 10;
  localparam int DEPTH = 1024;

  logic clk = 0, rst_n = 1, pe_reset = 0, start = 0;
  logic done, busy;
  mem_req_t req;
  logic [31:0] rdata;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  rle_pe dut (.clk, .rst_n, .pe_reset, .start, .num_blocks(16'(NBLK)), .done, .busy,
              .mem_req(req), .mem_rdata(rdata));
  bram_memory #(.DEPTH(DEPTH)) u_mem (.clk, .req, .rdata);

  int coef [NBLK][64];

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int prev;
    for (int b = 0; b < NBLK; b++)
      for (int i = 0; i < 64; i++) coef[b][i] = 0;
    // blocks 0..2: DC sequence 45, 54, 48
    coef[0][0] = 45; coef[1][0] = 54; coef[2][0] = 48;
    // block 3: the quantized example block
    coef[3][0] = 40; coef[3][1] = 12; coef[3][8] = 10; coef[3][9] = -7; coef[3][10] = -4; coef[3][16] = 1;
    // block 4: five zeros then 1, then 1, seven zeros, then 2 (zig-zag positions 6, 7, 15)
    coef[4][ZZ_ORDER[6]] = 1; coef[4][ZZ_ORDER[7]] = 1; coef[4][ZZ_ORDER[15]] = 2;
    // block 5: value at zig-zag 3, 40 zeros, value in the last position
    coef[5][ZZ_ORDER[3]] = -300; coef[5][ZZ_ORDER[44]] = 5; coef[5][63] = -1;
    // blocks 6..9: random sparse
    for (int b = 6; b < NBLK; b++)
      for (int i = 0; i < 64; i++)
        if ($urandom_range(0, 3) == 0) coef[b][i] = int'($urandom_range(0, 200)) - 100;
    for (int b = 0; b < NBLK; b++)
      for (int i = 0; i < 64; i++) u_mem.mem[b*64+i] = 32'(coef[b][i]);

    #1 rst_n = 0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    @(posedge clk);
    start <= 1;
    @(posedge clk);
    start <= 0;
    wait (done);
    @(posedge clk);

    prev = 0;
    for (int b = 0; b < NBLK; b++) begin
      int exp [$];
      ref_rle(coef[b], prev, exp);
      prev = coef[b][0];
      for (int k = 0; k < exp.size(); k++)
        check(u_mem.mem[b*64+k] == 32'(exp[k]),
              $sformatf("block %0d word %0d: got %h, expected %h", b, k, u_mem.mem[b*64+k], exp[k]));
    end
    // printed values, checked directly
    check(int'($signed(u_mem.mem[0*64])) == 45, "DPCM 45");
    check(int'($signed(u_mem.mem[1*64])) == 9,  "DPCM 9");
    check(int'($signed(u_mem.mem[2*64])) == -6, "DPCM -6");
    check(u_mem.mem[4*64+1] == 32'h0005_0001, "pair (5,1)");
    check(u_mem.mem[4*64+3] == 32'h0007_0002, "pair (7,2)");
    check(u_mem.mem[3*64+1] == 32'h0000_000C && u_mem.mem[3*64+5] == 32'h0002_FFFC &&
          u_mem.mem[3*64+6] == 32'h0000_0000, "example block pairs and end of block");
    check(u_mem.mem[5*64+2] == 32'h000F_0000 && u_mem.mem[5*64+3] == 32'h000F_0000, "two runs of 16 zeros");
    check(u_mem.mem[5*64+4] == 32'h0008_0005 && u_mem.mem[5*64+5] == 32'h000F_0000 &&
          u_mem.mem[5*64+6] == 32'h0002_FFFF, "value in the last position, no end of block");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
