// bram_memory: the on-chip block RAM of the PR_BRAM overlay.
//
// It holds one half of the image (2048 8x8 blocks, one 32-bit sample per
// word) and every intermediate result the dataflow stages leave for each
// other, which is what replaces the FIFOs of the dataflow graph. The default
// depth of 131072 words is the 128 BRAM36 tiles of the static design
// (128 x 1024 x 32 bits = 524288 bytes, the 1048.576 KB image data split in
// two).
//
// Single port, synchronous: a request with en && we writes wdata at addr; a
// request with en && !we returns the word in rdata on the next clock edge
// (read-first). rdata holds its value while en is low. Only one agent uses the
// port at a time; bram_mux decides which.
module bram_memory
  import prbram_pkg::*;
#(
  parameter int unsigned DEPTH = 131072
) (
  input  logic         clk,
  input  mem_req_t     req,
  output logic [31:0]  rdata
);

  logic [31:0] mem [DEPTH];

  always_ff @(posedge clk) begin
    if (req.en) begin
      if (req.we) mem[req.addr] <= req.wdata;
      else        rdata         <= mem[req.addr];
    end
  end

  // an address beyond the array would silently alias in hardware
  a_addr_in_range: assert property (@(posedge clk) req.en |-> (32'(req.addr) < DEPTH));

endmodule
