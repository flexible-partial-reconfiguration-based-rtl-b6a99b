// tb_ctrl_bus: checks the control-bus register file over AXI4-Lite: reset
// values, read-back of CTRL, RM_ID and NBLK, byte strobes, the one-cycle
// start pulse, the read-only STATUS bits, and the cycle counter, using a
// small model of a processing element that is busy for a fixed time.
module tb_ctrl_bus;
  import prbram_pkg::*;

  localparam int RUN_CYCLES = 37;

  logic clk = 0, rst_n = 1;
  axil_req_t req;
  axil_rsp_t rsp;
  logic pe_start, pe_reset, mux_sel, pe_done, pe_busy;
  rm_id_e rm_id;
  logic [15:0] num_blocks;
  int checks = 0, failures = 0;
  int start_pulses = 0, start_len = 0, max_start_len = 0;

  always #5 clk = ~clk;

  ctrl_bus dut (.clk, .rst_n, .axi_req(req), .axi_rsp(rsp), .pe_start, .pe_reset, .mux_sel,
                .rm_id, .num_blocks, .pe_done, .pe_busy);
  tb_axil_master u_m (.clk, .req, .rsp);

  // processing-element model: busy for RUN_CYCLES after start, then done
  int cnt;
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      pe_busy <= 1'b0;
      pe_done <= 1'b0;
      cnt     <= 0;
    end else if (pe_start) begin
      pe_busy <= 1'b1;
      pe_done <= 1'b0;
      cnt     <= RUN_CYCLES - 1;
    end else if (pe_busy) begin
      if (cnt == 0) begin
        pe_busy <= 1'b0;
        pe_done <= 1'b1;
      end
      cnt <= cnt - 1;
    end
  end

  always @(posedge clk) begin
    if (pe_start) begin
      start_len++;
      if (start_len == 1) start_pulses++;
      if (start_len > max_start_len) max_start_len = start_len;
    end else start_len = 0;
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [31:0] d;
    #1 rst_n = 0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    check(!mux_sel && !pe_reset && rm_id == RM_DCT && num_blocks == 0, "reset values");
    u_m.write(32'h8, 32'h2);
    u_m.write(32'hC, 32'h0000_0800);
    u_m.write(32'h0, 32'h4);                 // mux_sel = 1
    check(rm_id == RM_RLE && num_blocks == 16'h0800 && mux_sel && !pe_reset, "outputs after writes");
    u_m.read(32'h8, d);  check(d == 32'h2, "RM_ID read-back");
    u_m.read(32'hC, d);  check(d == 32'h800, "NBLK read-back");
    u_m.read(32'h0, d);  check(d == 32'h4, "CTRL read-back");
    u_m.write(32'hC, 32'h0000_1234, 4'b0001); // low byte only
    u_m.read(32'hC, d);  check(d == 32'h0000_0834, $sformatf("byte strobe, got %h", d));
    u_m.read(32'h4, d);  check(d == 32'h0, "STATUS idle");
    u_m.write(32'h4, 32'h3);                 // read-only
    u_m.read(32'h4, d);  check(d == 32'h0, "STATUS read-only");
    u_m.write(32'h0, 32'h5);                 // start, keep mux_sel
    check(mux_sel, "start keeps mux_sel");
    u_m.read(32'h4, d);  check(d[1] && !d[0], "STATUS busy");
    u_m.read(32'h0, d);  check(d[0] == 1'b0, "start reads 0");
    wait (pe_done);
    repeat (3) @(posedge clk);
    u_m.read(32'h4, d);  check(d == 32'h1, "STATUS done");
    u_m.read(32'h10, d); check(d == RUN_CYCLES + 1, $sformatf("CYCLES %0d, expected %0d", d, RUN_CYCLES + 1));
    check(start_pulses == 1 && max_start_len == 1, "exactly one one-cycle start pulse");
    u_m.write(32'h0, 32'h2);                 // pe_reset level, mux_sel back to 0
    check(pe_reset && !mux_sel, "pe_reset and mux_sel = 0");
    u_m.read(32'h20, d); check(d == 32'h0, "unmapped address reads 0");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
