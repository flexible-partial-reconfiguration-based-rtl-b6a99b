// bram_mux: the multiplexer in front of the single BRAM port.
//
// With sel = 0 the ARM-side BRAM controller owns the memory: software loads
// raw image data from DDR and fetches results for the SD card. With sel = 1
// the processing element in the reconfigurable partition owns it and
// streams its blocks. The request of the side that is not selected is
// dropped; read data needs no multiplexing because the BRAM output is wired
// to both sides. Purely combinational.
//
// The multiplexer and the sel = 0 setting for the ARM phases follow the
// design description; which sel value means the PE side is a choice of this
// implementation.
module bram_mux
  import prbram_pkg::*;
(
  input  logic      sel,
  input  mem_req_t  arm_req,
  input  mem_req_t  pe_req,
  output mem_req_t  mem_req
);

  always_comb begin
    if (sel) mem_req = pe_req;
    else     mem_req = arm_req;
  end

endmodule
