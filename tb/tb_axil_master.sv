// tb_axil_master: AXI4-Lite master model for the testbenches. Drives one
// request struct and offers blocking write and read tasks. The master keeps
// each valid high until the matching ready, and holds bready/rready low for
// a random 0..2 cycles before taking a response, so that the slave's
// response holding is exercised.
module tb_axil_master
  import prbram_pkg::*;
(
  input  logic       clk,
  output axil_req_t  req,
  input  axil_rsp_t  rsp
);

  initial req = '0;

  task automatic write(input logic [31:0] addr, input logic [31:0] data, input logic [3:0] strb = 4'hF);
    @(posedge clk);
    req.awaddr  <= addr;
    req.awvalid <= 1'b1;
    req.wdata   <= data;
    req.wstrb   <= strb;
    req.wvalid  <= 1'b1;
    do @(posedge clk); while (!(rsp.awready && rsp.wready));
    req.awvalid <= 1'b0;
    req.wvalid  <= 1'b0;
    repeat ($urandom_range(0, 2)) @(posedge clk);
    req.bready <= 1'b1;
    do @(posedge clk); while (!rsp.bvalid);
    req.bready <= 1'b0;
  endtask

  task automatic read(input logic [31:0] addr, output logic [31:0] data);
    @(posedge clk);
    req.araddr  <= addr;
    req.arvalid <= 1'b1;
    do @(posedge clk); while (!rsp.arready);
    req.arvalid <= 1'b0;
    repeat ($urandom_range(0, 2)) @(posedge clk);
    req.rready <= 1'b1;
    do @(posedge clk); while (!rsp.rvalid);
    data = rsp.rdata;
    req.rready <= 1'b0;
  endtask

endmodule
