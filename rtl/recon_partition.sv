// recon_partition: the reconfigurable partition of the PR_BRAM overlay.
//
// On the FPGA the partition holds exactly one reconfigurable module at a
// time: the ARM loads DCT, Quantization, RLE and Huffman one after the other
// through the configuration port, and each module sees the same partition
// pins. This is possible because all four share one interface (start / done
// / reset control, a block count, and one BRAM port).
//
// In RTL all four modules are instantiated and rm_id, written by software in
// place of loading a partial bitstream, chooses which one is connected to the
// partition pins: only that module receives start and pe_reset, and only its
// BRAM request, done and busy leave the partition. The modules not selected
// stay idle. Combinational apart from the modules themselves; the timing is
// that of the selected module.
module recon_partition
  import prbram_pkg::*;
(
  input  logic         clk,
  input  logic         rst_n,
  input  rm_id_e       rm_id,
  input  logic         pe_reset,
  input  logic         start,
  input  logic [15:0]  num_blocks,
  output logic         done,
  output logic         busy,
  output mem_req_t     mem_req,
  input  logic [31:0]  mem_rdata
);

  logic [3:0]  sel;
  logic [3:0]  rm_done;
  logic [3:0]  rm_busy;
  mem_req_t    rm_req [4];

  always_comb begin
    sel = '0;
    sel[rm_id] = 1'b1;
  end

  dct_pe u_dct (
    .clk, .rst_n, .pe_reset(pe_reset && sel[RM_DCT]), .start(start && sel[RM_DCT]), .num_blocks,
    .done(rm_done[RM_DCT]), .busy(rm_busy[RM_DCT]), .mem_req(rm_req[RM_DCT]), .mem_rdata
  );

  quant_pe u_quant (
    .clk, .rst_n, .pe_reset(pe_reset && sel[RM_QUANT]), .start(start && sel[RM_QUANT]), .num_blocks,
    .done(rm_done[RM_QUANT]), .busy(rm_busy[RM_QUANT]), .mem_req(rm_req[RM_QUANT]), .mem_rdata
  );

  rle_pe u_rle (
    .clk, .rst_n, .pe_reset(pe_reset && sel[RM_RLE]), .start(start && sel[RM_RLE]), .num_blocks,
    .done(rm_done[RM_RLE]), .busy(rm_busy[RM_RLE]), .mem_req(rm_req[RM_RLE]), .mem_rdata
  );

  huffman_pe u_huff (
    .clk, .rst_n, .pe_reset(pe_reset && sel[RM_HUFF]), .start(start && sel[RM_HUFF]), .num_blocks,
    .done(rm_done[RM_HUFF]), .busy(rm_busy[RM_HUFF]), .mem_req(rm_req[RM_HUFF]), .mem_rdata
  );

  assign done    = rm_done[rm_id];
  assign busy    = rm_busy[rm_id];
  assign mem_req = rm_req[rm_id];

endmodule
