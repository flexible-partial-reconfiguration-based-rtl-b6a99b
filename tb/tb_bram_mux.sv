// tb_bram_mux: drives random requests on both sides and checks that the
// BRAM sees the ARM-side request when sel = 0 and the PE-side request when
// sel = 1.
module tb_bram_mux;
  import prbram_pkg::*;

  logic sel;
  mem_req_t arm_req, pe_req, mem_req;
  int checks = 0, failures = 0;

  bram_mux dut (.sel, .arm_req, .pe_req, .mem_req);

  initial begin
    #100000;
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 200; i++) begin
      sel     = 1'($urandom);
      arm_req = '{en: 1'($urandom), we: 1'($urandom), addr: MEM_AW'($urandom), wdata: $urandom};
      pe_req  = '{en: 1'($urandom), we: 1'($urandom), addr: MEM_AW'($urandom), wdata: $urandom};
      #1;
      checks++;
      if (mem_req != (sel ? pe_req : arm_req)) begin
        failures++;
        $display("FAIL: step %0d sel=%0d", i, sel);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
