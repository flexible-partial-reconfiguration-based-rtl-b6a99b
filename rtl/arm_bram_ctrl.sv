// arm_bram_ctrl: the ARM-side BRAM controller, an AXI4-Lite slave that gives
// software word access to the block RAM (through bram_mux, when mux_sel = 0).
//
// Software uses it to copy raw image data from DDR into the BRAM before the
// first processing element runs, and to copy the final results out again.
// Byte address bits [AW+1:2] select the 32-bit word; byte strobes are not
// applied (every write writes the whole word).
//
// Timing: a write is taken when address and data are both valid; the BRAM
// write is issued in that cycle and bvalid follows on the next cycle until
// bready. A read is taken when arvalid is high, nothing else is in flight
// and no write is taken in the same cycle; the BRAM read is issued in that
// cycle, the word arrives one cycle later and is held in rdata with rvalid
// until rready. One transaction at a time.
//
// The design description names this controller; its protocol details are
// choices of this implementation.
module arm_bram_ctrl
  import prbram_pkg::*;
#(
  parameter int unsigned AW = MEM_AW      // word address bits
) (
  input  logic         clk,
  input  logic         rst_n,
  input  axil_req_t    axi_req,
  output axil_rsp_t    axi_rsp,
  output mem_req_t     mem_req,
  input  logic [31:0]  mem_rdata
);

  logic        bvalid, rvalid, rd_wait;
  logic [31:0] rdata;
  logic        wr_take, rd_take;

  assign wr_take = axi_req.awvalid && axi_req.wvalid && !bvalid && !rd_wait && !rvalid;
  assign rd_take = axi_req.arvalid && !wr_take && !bvalid && !rd_wait && !rvalid;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      bvalid  <= 1'b0;
      rvalid  <= 1'b0;
      rd_wait <= 1'b0;
      rdata   <= '0;
    end else begin
      if (wr_take)                          bvalid <= 1'b1;
      else if (bvalid && axi_req.bready)    bvalid <= 1'b0;

      rd_wait <= rd_take;
      if (rd_wait) begin
        rvalid <= 1'b1;
        rdata  <= mem_rdata;
      end else if (rvalid && axi_req.rready) begin
        rvalid <= 1'b0;
      end
    end
  end

  always_comb begin
    mem_req = '0;
    if (wr_take) begin
      mem_req.en    = 1'b1;
      mem_req.we    = 1'b1;
      mem_req.addr  = MEM_AW'(axi_req.awaddr[AW+1:2]);
      mem_req.wdata = axi_req.wdata;
    end else if (rd_take) begin
      mem_req.en   = 1'b1;
      mem_req.addr = MEM_AW'(axi_req.araddr[AW+1:2]);
    end
  end

  always_comb begin
    axi_rsp         = '0;
    axi_rsp.awready = wr_take;
    axi_rsp.wready  = wr_take;
    axi_rsp.bvalid  = bvalid;
    axi_rsp.arready = rd_take;
    axi_rsp.rvalid  = rvalid;
    axi_rsp.rdata   = rdata;
  end

  a_bvalid_hold: assert property (@(posedge clk) disable iff (!rst_n)
                                  bvalid && !axi_req.bready |=> bvalid);
  a_rvalid_hold: assert property (@(posedge clk) disable iff (!rst_n)
                                  rvalid && !axi_req.rready |=> rvalid && $stable(rdata));
  a_one_at_a_time: assert property (@(posedge clk) disable iff (!rst_n)
                                    !(bvalid && (rvalid || rd_wait)));

endmodule
