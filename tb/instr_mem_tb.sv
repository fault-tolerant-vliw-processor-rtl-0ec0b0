// instr_mem_tb: writes random packets to random addresses, then reads them
// back and compares with a reference.
module instr_mem_tb;
  import ftv_pkg::*;
  logic clk = 1'b0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;
  pc_t raddr, waddr;
  packet_t rdata, wdata;
  logic we;
  packet_t model [64];
  instr_mem #(.DEPTH(IMEM_WORDS)) dut (.clk(clk), .raddr(raddr), .rdata(rdata), .we(we), .waddr(waddr), .wdata(wdata));

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    we = 0; raddr = 0; waddr = 0; wdata = '0;
    for (int i = 0; i < 64; i++) begin
      @(negedge clk);
      we = 1; waddr = pc_t'(i * 16 + 3);
      for (int s = 0; s < N_SLOT; s++) wdata[s] = $urandom;
      model[i] = wdata;
    end
    @(negedge clk); we = 0;
    for (int i = 63; i >= 0; i--) begin
      raddr = pc_t'(i * 16 + 3); #1;
      checks++;
      if (rdata !== model[i]) begin failures++; $display("FAIL addr %0d", raddr); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
