// tb_prbram_env: end-to-end test of prbram_top, playing the part of the ARM
// software through the two AXI4-Lite ports.
//
// A synthetic grey-scale image of IMG_W x IMG_H pixels (smooth gradients,
// flat areas, a few sharp edges and noise) is split into NLOADS parts that
// are processed one after the other, as when the image does not fit the
// block RAM. For each part:
//   1. mux_sel = 0, the 8x8 blocks are written word by word into BRAM;
//   2. mux_sel = 1; for DCT, Quantization, RLE and Huffman in turn: RM_ID is
//      written (one reconfiguration), NBLK set, start pulsed, STATUS polled
//      until done, and CYCLES read;
//   3. mux_sel = 0, every block's bit count and code words are read back and
//      compared with an independent reference model of the whole encoder.
// In the first part the DCT run is started once and cut short by pe_reset,
// then the pixels are reloaded and the run repeated, and the intermediate
// results after DCT are spot-checked through the ARM port. If NLOADS2 is not
// zero, the whole image is then encoded a second time in NLOADS2 parts, with
// no reset in between.
//
// Mechanisms counted, each of which must occur: reconfigurations, switches of
// the BRAM multiplexer, start/done handshakes, pe_reset aborts, BRAM
// reloads, DC predictor restarts, runs of 16 zeros, end-of-block codes and
// blocks whose last coefficient is nonzero.
module tb_prbram_env
  import prbram_pkg::*;
  import tb_ref_pkg::*;
#(
  parameter int IMG_W  = 32,
  parameter int IMG_H  = 16,
  parameter int NLOADS = 2,
  parameter int NLOADS2 = 0,
  parameter int CHECK_STAGES = 1,
  parameter int WATCHDOG = 2000000
) ();

  localparam int BLK_X    = IMG_W / 8;
  localparam int NBLK_ALL = (IMG_W / 8) * (IMG_H / 8);
  int nblk;                                          // blocks per BRAM load

  logic clk = 0, rst_n = 1;
  axil_req_t ctrl_req, mem_req;
  axil_rsp_t ctrl_rsp, mem_rsp;
  logic pe_done;
  rm_id_e rm_loaded;
  int checks = 0, failures = 0;

  // mechanism counters
  int n_reconfig = 0, n_mux_switch = 0, n_handshake = 0, n_abort = 0, n_reload = 0;
  int n_dc_restart = 0, n_zrl = 0, n_eob = 0, n_no_eob = 0;
  longint cycles_stage [4];

  always #5 clk = ~clk;

  prbram_top dut (.clk, .rst_n, .ctrl_axi_req(ctrl_req), .ctrl_axi_rsp(ctrl_rsp),
                  .mem_axi_req(mem_req), .mem_axi_rsp(mem_rsp), .pe_done, .rm_loaded);
  tb_axil_master u_ctrl (.clk, .req(ctrl_req), .rsp(ctrl_rsp));
  tb_axil_master u_mem  (.clk, .req(mem_req),  .rsp(mem_rsp));

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL: %s", what);
    end
  endtask

  function automatic int pixel(input int x, input int y);
    int v;
    v = (x * 3 + y * 2) % 256;                       // gradient
    if (((x / 64) + (y / 64)) % 3 == 1) v = 128;     // flat areas
    if ((x % 97) < 3) v = 255 - v;                   // sharp edges
    v = v + int'($urandom_range(0, 6)) - 3;          // noise
    // two special blocks in every band of 8 rows: a checkerboard (energy up
    // to the last zig-zag position) and a pure vertical cosine of frequency 7
    // (one AC coefficient after 34 zeros)
    if (x / 8 == 1) v = ((x + y) % 2 != 0) ? 255 : 0;
    if (x / 8 == 2) v = 128 + int'($floor(100.0 * $cos((2 * (y % 8) + 1) * 7 * 3.14159265358979 / 16.0) + 0.5));
    if (v < 0) v = 0;
    if (v > 255) v = 255;
    return v;
  endfunction

  int img [NBLK_ALL][64];

  initial begin
    repeat (WATCHDOG) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic set_mux(input bit sel);
    u_ctrl.write(32'(REG_CTRL), {29'd0, sel, 2'b00});
    n_mux_switch++;
  endtask

  task automatic load_rm(input rm_id_e id);
    logic [31:0] d;
    u_ctrl.write(32'(REG_RM_ID), 32'(id));
    u_ctrl.read(32'(REG_RM_ID), d);
    check(d == 32'(id) && rm_loaded == id, $sformatf("module %0d loaded", id));
    n_reconfig++;
  endtask

  task automatic run_rm(input rm_id_e id);
    logic [31:0] d;
    load_rm(id);
    u_ctrl.write(32'(REG_CTRL), 32'h5);              // start, mux_sel stays 1
    do u_ctrl.read(32'(REG_STATUS), d); while (d[0] != 1'b1);
    check(d[1] == 1'b0, "not busy when done");
    u_ctrl.read(32'(REG_CYCLES), d);
    cycles_stage[id] += longint'(d);
    n_handshake++;
    if (id == RM_DCT)
      check(d == 32'(nblk * 1154 + 1), $sformatf("DCT cycles %0d, expected %0d", d, nblk * 1154 + 1));
    if (id == RM_QUANT)
      check(d == 32'(nblk * 128 + 1), $sformatf("Quantization cycles %0d, expected %0d", d, nblk * 128 + 1));
  endtask

  task automatic load_pixels(input int part);
    for (int b = 0; b < nblk; b++)
      for (int i = 0; i < 64; i++)
        u_mem.write(32'((b * 64 + i) * 4), 32'(img[part * nblk + b][i]));
  endtask

  // encode the whole image in nloads parts
  task automatic encode(input int nloads, input bit first);
    logic [31:0] d;
    nblk = NBLK_ALL / nloads;
    u_ctrl.write(32'(REG_NBLK), 32'(nblk));

    for (int part = 0; part < nloads; part++) begin
      int prev;
      set_mux(1'b0);
      load_pixels(part);
      n_reload++;
      set_mux(1'b1);

      if (first && part == 0) begin
        // start the DCT and cut it short with pe_reset
        load_rm(RM_DCT);
        u_ctrl.write(32'(REG_CTRL), 32'h5);
        u_ctrl.write(32'(REG_CTRL), 32'h6);          // pe_reset, mux_sel 1
        u_ctrl.read(32'(REG_STATUS), d);
        check(d == 32'h0, "pe_reset leaves neither done nor busy");
        u_ctrl.write(32'(REG_CTRL), 32'h4);
        n_abort++;
        set_mux(1'b0);
        load_pixels(part);
        n_reload++;
        set_mux(1'b1);
      end

      run_rm(RM_DCT);
      if (CHECK_STAGES != 0 && first && part == 0) begin
        int ref_d [64];
        set_mux(1'b0);
        ref_dct(img[0], ref_d);
        for (int i = 0; i < 64; i += 9) begin
          u_mem.read(32'(i * 4), d);
          check($signed(d) - ref_d[i] <= 1 && $signed(d) - ref_d[i] >= -1,
                $sformatf("DCT coefficient %0d: %0d, expected %0d", i, $signed(d), ref_d[i]));
        end
        set_mux(1'b1);
      end
      run_rm(RM_QUANT);
      run_rm(RM_RLE);
      run_rm(RM_HUFF);

      // read back and compare with the reference encoder
      set_mux(1'b0);
      prev = 0;
      n_dc_restart++;
      for (int b = 0; b < nblk; b++) begin
        int dq [64], q [64];
        int w [$];
        string bits, got;
        int nb;
        ref_dct_fixed(img[part * nblk + b], dq);
        for (int i = 0; i < 64; i++) q[i] = ref_quant(dq[i], QLUM[i]);
        ref_rle(q, prev, w);
        prev = q[0];
        foreach (w[k]) if (k > 0 && w[k] == 32'h000F_0000) n_zrl++;
        if (w[w.size() - 1] == 0 && w.size() > 1) n_eob++;
        else n_no_eob++;
        bits = ref_huff(w);
        u_mem.read(32'(b * 64 * 4), d);
        nb = int'(d);
        check(nb == bits.len(), $sformatf("part %0d block %0d: %0d bits, expected %0d", part, b, nb, bits.len()));
        got = "";
        for (int k = 0; k < (bits.len() + 31) / 32; k++) begin
          u_mem.read(32'((b * 64 + 1 + k) * 4), d);
          for (int j = 31; j >= 0; j--) got = {got, d[j] ? "1" : "0"};
        end
        check(got.substr(0, bits.len() - 1) == bits, $sformatf("part %0d block %0d code bits\n got %s\n exp %s", part, b, got, bits));
      end
    end

  endtask

  initial begin
    #1 rst_n = 0;
    repeat (3) @(posedge clk);
    rst_n = 1;

    for (int b = 0; b < NBLK_ALL; b++)
      for (int i = 0; i < 64; i++)
        img[b][i] = pixel((b % BLK_X) * 8 + i % 8, (b / BLK_X) * 8 + i / 8);

    encode(NLOADS, 1'b1);
    if (NLOADS2 != 0) encode(NLOADS2, 1'b0);

    check(n_reconfig > 0,   "reconfiguration happened");
    check(n_mux_switch > 0, "BRAM multiplexer switched");
    check(n_handshake > 0,  "start/done handshake happened");
    check(n_abort > 0,      "pe_reset abort happened");
    check(n_reload > 1,     "BRAM reloaded");
    check(n_dc_restart > 0, "DC predictor restarted");
    check(n_zrl > 0,        "run of 16 zeros coded");
    check(n_eob > 0,        "end-of-block coded");
    check(n_no_eob > 0,     "block ending on a nonzero coefficient");
    $display("image %0dx%0d, %0d blocks in %0d loads, then in %0d loads", IMG_W, IMG_H, NBLK_ALL, NLOADS, NLOADS2);
    $display("reconfigurations %0d, mux switches %0d, handshakes %0d, aborts %0d, loads %0d",
             n_reconfig, n_mux_switch, n_handshake, n_abort, n_reload);
    $display("ZRL %0d, EOB %0d, no-EOB blocks %0d", n_zrl, n_eob, n_no_eob);
    $display("cycles: DCT %0d, Quantization %0d, RLE %0d, Huffman %0d",
             cycles_stage[0], cycles_stage[1], cycles_stage[2], cycles_stage[3]);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
