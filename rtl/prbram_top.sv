// prbram_top: PR_BRAM overlay for dataflow computation, built around a JPEG
// encoder (DCT -> Quantization -> RLE -> Huffman).
//
// A dataflow graph normally needs every processing element (PE) on the chip
// at once, with FIFOs between them. Here only one PE exists at a time: it
// sits in a reconfigurable partition and is swapped for the next one by
// partial reconfiguration, and the data that would flow through the FIFOs
// waits in on-chip block RAM instead of off-chip DDR. The fixed (static) part
// of the design is this overlay:
//
//   ARM --AXI4-Lite--> ctrl_bus ------- start / reset / rm_id / num_blocks --+
//                          ^-------------------- done / busy ---------------+|
//                                                                          ||
//   ARM --AXI4-Lite--> arm_bram_ctrl --(sel=0)--+                          vv
//                                               bram_mux --> bram_memory   recon_partition
//                          recon_partition --(sel=1)--+       |  rdata        (one of DCT,
//                                                             +-> both sides   Quant, RLE, Huff)
//
// Software sequence for one BRAM load (half of a 512x512 image, 2048
// blocks): set mux_sel = 0 and write the pixels through arm_bram_ctrl; set
// mux_sel = 1; then for each module in turn write RM_ID (standing for loading
// its partial bitstream), pulse start and wait for done. Every module
// rewrites each 8x8 block in place. Finally set mux_sel = 0 and read the coded
// blocks back. Register map: see ctrl_bus.
//
// Ports: plain clock, active-low reset, and the two AXI4-Lite slave ports as
// request/response structs; pe_done and rm_loaded are brought out for
// observation (the first as an interrupt-style done, the second shows which
// module the partition holds).
//
// The overlay structure (control bus, ARM-side BRAM controller, MUX, block
// RAM, one partition holding the four JPEG modules in turn, start/done/reset
// handshake) follows the design description; the BRAM size follows its
// numbers; register map, word layouts and bus details are choices of this
// implementation.
module prbram_top
  import prbram_pkg::*;
#(
  parameter int unsigned BRAM_DEPTH = 131072
) (
  input  logic       clk,
  input  logic       rst_n,
  input  axil_req_t  ctrl_axi_req,
  output axil_rsp_t  ctrl_axi_rsp,
  input  axil_req_t  mem_axi_req,
  output axil_rsp_t  mem_axi_rsp,
  output logic       pe_done,
  output rm_id_e     rm_loaded
);

  logic         pe_start, pe_reset, mux_sel, pe_busy;
  logic [15:0]  num_blocks;
  rm_id_e       rm_id;
  mem_req_t     arm_req, pe_req, bram_req;
  logic [31:0]  bram_rdata;

  ctrl_bus u_ctrl (
    .clk, .rst_n,
    .axi_req(ctrl_axi_req), .axi_rsp(ctrl_axi_rsp),
    .pe_start, .pe_reset, .mux_sel, .rm_id, .num_blocks,
    .pe_done, .pe_busy
  );

  arm_bram_ctrl u_arm_bram (
    .clk, .rst_n,
    .axi_req(mem_axi_req), .axi_rsp(mem_axi_rsp),
    .mem_req(arm_req), .mem_rdata(bram_rdata)
  );

  bram_mux u_mux (
    .sel(mux_sel), .arm_req, .pe_req, .mem_req(bram_req)
  );

  bram_memory #(.DEPTH(BRAM_DEPTH)) u_bram (
    .clk, .req(bram_req), .rdata(bram_rdata)
  );

  recon_partition u_rp (
    .clk, .rst_n, .rm_id, .pe_reset, .start(pe_start), .num_blocks,
    .done(pe_done), .busy(pe_busy), .mem_req(pe_req), .mem_rdata(bram_rdata)
  );

  assign rm_loaded = rm_id;

endmodule
