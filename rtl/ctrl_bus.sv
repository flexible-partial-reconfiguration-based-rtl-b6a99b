// ctrl_bus: the ARM-to-fabric control bus of the PR_BRAM overlay, an
// AXI4-Lite slave with a small register file.
//
// Software runs the dataflow through it: it sets the BRAM multiplexer
// (mux_sel), names the module loaded into the reconfigurable partition
// (rm_id), gives the number of 8x8 blocks in BRAM, pulses start, polls done,
// and can reset the loaded module. Register map (byte addresses):
//   0x00 CTRL    [0] start (write 1: one-cycle pulse, reads 0)
//                [1] pe_reset (level)   [2] mux_sel (0 ARM, 1 PE)
//   0x04 STATUS  [0] done  [1] busy                    (read only)
//   0x08 RM_ID   [1:0] loaded module: 0 DCT, 1 Quantization, 2 RLE, 3 Huffman
//   0x0C NBLK    [15:0] blocks to process
//   0x10 CYCLES  clock cycles of the last run, from start until busy falls,
//                plus one (read only)
// Other addresses read as 0 and ignore writes; responses are always OKAY.
//
// Handshake: a write is taken when address and data are both valid; awready
// and wready rise together for that cycle and bvalid follows on the next
// cycle until bready. A read is taken when arvalid is high and no read
// response is pending; rvalid follows on the next cycle until rready. Byte
// strobes are honoured.
//
// The design description has the ARM drive start and reset and read done over
// AXI; the register map, the self-clearing start and the cycle counter are
// choices of this implementation.
module ctrl_bus
  import prbram_pkg::*;
#(
  parameter int unsigned ADDR_W = 12      // decoded address bits
) (
  input  logic         clk,
  input  logic         rst_n,
  input  axil_req_t    axi_req,
  output axil_rsp_t    axi_rsp,
  output logic         pe_start,
  output logic         pe_reset,
  output logic         mux_sel,
  output rm_id_e       rm_id,
  output logic [15:0]  num_blocks,
  input  logic         pe_done,
  input  logic         pe_busy
);

  logic              bvalid, rvalid;
  logic [31:0]       rdata;
  logic [31:0]       cycles;
  logic              counting;

  logic              wr_take, rd_take;
  logic [ADDR_W-1:0] waddr, raddr;

  assign wr_take = axi_req.awvalid && axi_req.wvalid && !bvalid;
  assign rd_take = axi_req.arvalid && !rvalid;
  assign waddr   = axi_req.awaddr[ADDR_W-1:0];
  assign raddr   = axi_req.araddr[ADDR_W-1:0];

  // merge written bytes into an old register value
  function automatic logic [31:0] merge(input logic [31:0] old, input logic [31:0] wd, input logic [3:0] strb);
    logic [31:0] r;
    for (int b = 0; b < 4; b++) r[b*8 +: 8] = strb[b] ? wd[b*8 +: 8] : old[b*8 +: 8];
    return r;
  endfunction

  logic [31:0] ctrl_w, rm_w, nblk_w;
  assign ctrl_w = merge({29'd0, mux_sel, pe_reset, 1'b0}, axi_req.wdata, axi_req.wstrb);
  assign rm_w   = merge({30'd0, rm_id}, axi_req.wdata, axi_req.wstrb);
  assign nblk_w = merge({16'd0, num_blocks}, axi_req.wdata, axi_req.wstrb);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      bvalid     <= 1'b0;
      rvalid     <= 1'b0;
      rdata      <= '0;
      pe_start   <= 1'b0;
      pe_reset   <= 1'b0;
      mux_sel    <= 1'b0;
      rm_id      <= RM_DCT;
      num_blocks <= '0;
      cycles     <= '0;
      counting   <= 1'b0;
    end else begin
      pe_start <= 1'b0;

      // write channel
      if (wr_take) begin
        bvalid <= 1'b1;
        unique case (waddr)
          REG_CTRL[ADDR_W-1:0]: begin
            pe_start <= ctrl_w[0];
            pe_reset <= ctrl_w[1];
            mux_sel  <= ctrl_w[2];
          end
          REG_RM_ID[ADDR_W-1:0]: rm_id      <= rm_id_e'(rm_w[1:0]);
          REG_NBLK[ADDR_W-1:0]:  num_blocks <= nblk_w[15:0];
          default: ;
        endcase
      end else if (bvalid && axi_req.bready) begin
        bvalid <= 1'b0;
      end

      // read channel
      if (rd_take) begin
        rvalid <= 1'b1;
        unique case (raddr)
          REG_CTRL[ADDR_W-1:0]:   rdata <= {29'd0, mux_sel, pe_reset, 1'b0};
          REG_STATUS[ADDR_W-1:0]: rdata <= {30'd0, pe_busy, pe_done};
          REG_RM_ID[ADDR_W-1:0]:  rdata <= {30'd0, rm_id};
          REG_NBLK[ADDR_W-1:0]:   rdata <= {16'd0, num_blocks};
          REG_CYCLES[ADDR_W-1:0]: rdata <= cycles;
          default:                rdata <= '0;
        endcase
      end else if (rvalid && axi_req.rready) begin
        rvalid <= 1'b0;
      end

      // run-time counter: cleared by start, counts until the module is no
      // longer busy (finished, or stopped by pe_reset)
      if (pe_start) begin
        cycles   <= 32'd1;
        counting <= 1'b1;
      end else if (counting) begin
        if (!pe_busy) counting <= 1'b0;
        else          cycles   <= cycles + 32'd1;
      end
    end
  end

  always_comb begin
    axi_rsp         = '0;
    axi_rsp.awready = wr_take;
    axi_rsp.wready  = wr_take;
    axi_rsp.bvalid  = bvalid;
    axi_rsp.bresp   = 2'b00;
    axi_rsp.arready = rd_take;
    axi_rsp.rvalid  = rvalid;
    axi_rsp.rdata   = rdata;
    axi_rsp.rresp   = 2'b00;
  end

  // AXI handshake rules: a response stays valid until it is taken, and
  // the master holds its address until it is taken
  a_bvalid_hold: assert property (@(posedge clk) disable iff (!rst_n)
                                  bvalid && !axi_req.bready |=> bvalid);
  a_rvalid_hold: assert property (@(posedge clk) disable iff (!rst_n)
                                  rvalid && !axi_req.rready |=> rvalid && $stable(rdata));
  a_awvalid_hold: assert property (@(posedge clk) disable iff (!rst_n)
                                   axi_req.awvalid && !axi_rsp.awready |=> axi_req.awvalid);
  a_arvalid_hold: assert property (@(posedge clk) disable iff (!rst_n)
                                   axi_req.arvalid && !axi_rsp.arready |=> axi_req.arvalid);

endmodule
