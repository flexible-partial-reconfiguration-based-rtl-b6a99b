// tb_huffman_pe: checks huffman_pe on
//   - the worked example: DC difference -8 must start with 101 0111, the AC
//     value 12 must follow as 1011 1100, and the block ends in 1010,
//   - blocks with runs of 16 zeros, a nonzero last coefficient, large values,
//   - random blocks,
// against an independent bit-string model, including the bit count in word 0
// and the 1-padding of the last word. It also checks the printed rows of the
// AC Run/SIZE table against the table built inside the RTL.
module tb_huffman_pe;
  import prbram_pkg::*;
  import tb_ref_pkg::*;

  localparam int NBLK  = 8;
  localparam int DEPTH = 1024;

  logic clk = 0, rst_n = 1, pe_reset = 0, start = 0;
  logic done, busy;
  mem_req_t req;
  logic [31:0] rdata;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  huffman_pe dut (.clk, .rst_n, .pe_reset, .start, .num_blocks(16'(NBLK)), .done, .busy,
                  .mem_req(req), .mem_rdata(rdata));
  bram_memory #(.DEPTH(DEPTH)) u_mem (.clk, .req, .rdata);

  int coef [NBLK][64];
  string exp_bits [NBLK];

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  function automatic string code_str(input hcode_t c);
    string s = "";
    for (int b = int'(c.len) - 1; b >= 0; b--) s = {s, c.code[b] ? "1" : "0"};
    return s;
  endfunction

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    string printed [2][11] = '{
      '{"1010", "00", "01", "100", "1011", "11010", "1111000", "11111000", "1111110110",
        "1111111110000010", "1111111110000011"},
      '{"", "1100", "11011", "1111001", "111110110", "11111110110", "1111111110000100",
        "1111111110000101", "1111111110000110", "1111111110000111", "1111111110001000"}};
    int prev;

    // printed Table.3 rows against the RTL table and the reference
    for (int r = 0; r < 2; r++)
      for (int s = 0; s < 11; s++)
        if (printed[r][s] != "") begin
          check(code_str(AC_TAB[r*16+s]) == printed[r][s], $sformatf("RTL AC code %0d/%0d", r, s));
          check(ac_code_str(r*16+s) == printed[r][s], $sformatf("reference AC code %0d/%0d", r, s));
        end
    // printed Table.2
    for (int s = 0; s < 12; s++)
      check(code_str(dc_code(4'(s))) == DC_STR[s], $sformatf("DC code %0d", s));

    for (int b = 0; b < NBLK; b++)
      for (int i = 0; i < 64; i++) coef[b][i] = 0;
    // block 0: DC 48 (predecessor), block 1: the example block with DC 40
    coef[0][0] = 48;
    coef[1][0] = 40; coef[1][1] = 12; coef[1][8] = 10; coef[1][9] = -7; coef[1][10] = -4; coef[1][16] = 1;
    // block 2: long runs and a nonzero last coefficient
    coef[2][0] = -1000; coef[2][ZZ_ORDER[20]] = 1023; coef[2][63] = -512;
    // block 3: every coefficient nonzero (longest codes and value bits)
    for (int i = 0; i < 64; i++) coef[3][i] = (i % 2) ? -1023 : 1000;
    // blocks 4..7: random
    for (int b = 4; b < NBLK; b++)
      for (int i = 0; i < 64; i++)
        if ($urandom_range(0, 4) == 0) coef[b][i] = int'($urandom_range(0, 400)) - 200;

    prev = 0;
    for (int b = 0; b < NBLK; b++) begin
      int w [$];
      ref_rle(coef[b], prev, w);
      prev = coef[b][0];
      exp_bits[b] = ref_huff(w);
      for (int k = 0; k < 64; k++) u_mem.mem[b*64+k] = (k < w.size()) ? 32'(w[k]) : 32'hDEAD_0000;
    end
    check(exp_bits[1].substr(0, 14) == "101011110111100", "reference reproduces the worked example");

    #1 rst_n = 0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    @(posedge clk);
    start <= 1;
    @(posedge clk);
    start <= 0;
    wait (done);
    @(posedge clk);

    for (int b = 0; b < NBLK; b++) begin
      automatic int n = exp_bits[b].len();
      automatic string got = "";
      check(u_mem.mem[b*64] == 32'(n), $sformatf("block %0d bit count %0d, expected %0d", b, u_mem.mem[b*64], n));
      for (int k = 0; k < (n + 31) / 32; k++) begin
        automatic logic [31:0] wd = u_mem.mem[b*64+1+k];
        for (int j = 31; j >= 0; j--) got = {got, wd[j] ? "1" : "0"};
      end
      check(got.substr(0, n - 1) == exp_bits[b], $sformatf("block %0d bits\n got %s\n exp %s", b, got, exp_bits[b]));
      if (n % 32 != 0) begin
        automatic bit pad_ok = 1;
        for (int j = n; j < got.len(); j++) if (got[j] != "1") pad_ok = 0;
        check(pad_ok, $sformatf("block %0d padding", b));
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
