// tb_recon_partition: loads each of the four modules in turn (rm_id) and
// runs the whole JPEG chain on two blocks held in a small block RAM. Checks
// that start and pe_reset reach only the selected module, that done and busy
// come from it, and that after the four runs the block RAM holds the
// expected Huffman bits (reference model with the hardware's fixed-point
// DCT, so that rounding in Quantization agrees).
module tb_recon_partition;
  import prbram_pkg::*;
  import tb_ref_pkg::*;

  localparam int NBLK  = 2;
  localparam int DEPTH = 256;

  logic clk = 0, rst_n = 1, pe_reset = 0, start = 0;
  rm_id_e rm_id = RM_DCT;
  logic done, busy;
  mem_req_t req;
  logic [31:0] rdata;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  recon_partition dut (.clk, .rst_n, .rm_id, .pe_reset, .start, .num_blocks(16'(NBLK)), .done, .busy,
                       .mem_req(req), .mem_rdata(rdata));
  bram_memory #(.DEPTH(DEPTH)) u_mem (.clk, .req, .rdata);

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  function automatic logic [3:0] all_busy();
    return {dut.u_huff.busy, dut.u_rle.busy, dut.u_quant.busy, dut.u_dct.busy};
  endfunction

  task automatic run(input rm_id_e id);
    rm_id <= id;
    @(posedge clk);
    start <= 1;
    @(posedge clk);
    start <= 0;
    @(posedge clk);
    check(all_busy() == (4'b1 << id), $sformatf("only module %0d busy (%b)", id, all_busy()));
    check(busy, "partition busy");
    wait (done);
    @(posedge clk);
  endtask

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int pix [NBLK][64];
    int prev;
    #1 rst_n = 0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int b = 0; b < NBLK; b++)
      for (int i = 0; i < 64; i++) begin
        pix[b][i] = (b == 0) ? 100 + (i % 8) * 8 + (i / 8) * 4 : int'($urandom_range(0, 255));
        u_mem.mem[b*64+i] = 32'(pix[b][i]);
      end

    // pe_reset goes only to the selected module: stop a Quantization run
    rm_id <= RM_QUANT;
    @(posedge clk);
    start <= 1;
    @(posedge clk);
    start <= 0;
    rm_id    <= RM_DCT;                   // switch away, then reset: quant keeps running
    pe_reset <= 1;
    @(posedge clk);
    pe_reset <= 0;
    @(posedge clk);
    check(dut.u_quant.busy, "reset of another module leaves Quantization running");
    rm_id    <= RM_QUANT;
    pe_reset <= 1;
    @(posedge clk);
    pe_reset <= 0;
    @(posedge clk);
    check(!dut.u_quant.busy && !done, "pe_reset stops the selected module");
    // restore the pixels the aborted run may have touched
    for (int b = 0; b < NBLK; b++)
      for (int i = 0; i < 64; i++) u_mem.mem[b*64+i] = 32'(pix[b][i]);

    run(RM_DCT);
    run(RM_QUANT);
    run(RM_RLE);
    run(RM_HUFF);

    prev = 0;
    for (int b = 0; b < NBLK; b++) begin
      int d [64], q [64];
      int w [$];
      string bits, got;
      ref_dct_fixed(pix[b], d);
      for (int i = 0; i < 64; i++) q[i] = ref_quant(d[i], QLUM[i]);
      ref_rle(q, prev, w);
      prev = q[0];
      bits = ref_huff(w);
      check(u_mem.mem[b*64] == 32'(bits.len()), $sformatf("block %0d bit count %0d, expected %0d",
                                                          b, u_mem.mem[b*64], bits.len()));
      got = "";
      for (int k = 0; k < (bits.len() + 31) / 32; k++)
        for (int j = 31; j >= 0; j--) got = {got, u_mem.mem[b*64+1+k][j] ? "1" : "0"};
      check(got.substr(0, bits.len() - 1) == bits, $sformatf("block %0d code bits", b));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
